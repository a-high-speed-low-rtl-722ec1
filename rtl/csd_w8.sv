// csd_w8: CSD constant multiplier of the 128-point path.
//
// A 128-point frame has one butterfly stage more than a 64-point one: the
// remaining eight-point transform over n5 = 4*t0 + l is split into a radix-2
// step over t0 (a delay-feedback unit of depth 1) and a four-point transform
// over the lanes. Between them lane l needs W8^(l*c), where c is the
// frequency bit that step produced (time-index bit 0). The constants are
// 1, (1-j)/sqrt(2), -j and (-1-j)/sqrt(2): cos(pi/4) multiplications by a CSD
// constant and an exact -j. 64-point frames pass unchanged.
//
// Timing: registered output, latency 1 cycle.
module csd_w8
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t in_d  [LANES],
  input  ctrl_t in_c,
  output cplx_t out_d [LANES],
  output ctrl_t out_c
);

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      if (in_c.sel128 && in_c.idx[0]) out_d[l] <= cmul_w16(in_d[l], 4'(2 * l));  // W8^l = W16^(2l)
      else                             out_d[l] <= in_d[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_c <= '0;
    else        out_c <= in_c;
  end

endmodule
