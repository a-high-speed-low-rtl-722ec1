// csd_cmult: CSD complex constant multiplier between the two radix-2^2 halves
// of the radix-2^4 group, on all four lanes.
//
// After the first two butterfly stages the time index of a sample holds k1,
// k2 (already transformed) and n3, n4 (not yet transformed). The radix-2^4
// decomposition needs the twiddle W16^((2*n3 + n4)*(k1 + 2*k2)) here; the
// exponent takes only the values 0, 1, 2, 3, 4, 6 and 9, so every product is a
// sum of shifted copies of the input: cos(pi/8) = 473/512, sin(pi/8) = 195/512
// and cos(pi/4) = 362/512 are written as canonic signed digit numbers.
// Exponent 0 passes the input through, exponent 4 is an exact -j. The four
// lanes of one cycle share the exponent, since it depends only on the time
// index. The index bits sit one place lower in 64-point frames.
//
// Timing: combinational products, registered output, latency 1 cycle.
module csd_cmult
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t in_d  [LANES],
  input  ctrl_t in_c,
  output cplx_t out_d [LANES],
  output ctrl_t out_c
);

  logic [1:0] kk, nn;
  logic [3:0] e;

  always_comb begin
    if (in_c.sel128) begin
      kk = {in_c.idx[3], in_c.idx[4]};   // k1 + 2*k2
      nn = {in_c.idx[2], in_c.idx[1]};   // 2*n3 + n4
    end else begin
      kk = {in_c.idx[2], in_c.idx[3]};
      nn = {in_c.idx[1], in_c.idx[0]};
    end
    e = 4'(kk * nn);
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) out_d[l] <= cmul_w16(in_d[l], e);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_c <= '0;
    else        out_c <= in_c;
  end

endmodule
