// lane_dft4: last two butterfly stages, a four-point DFT across the four
// parallel lanes.
//
// Y[m] = sum over l of z_l * (-j)^(l*m), computed as two radix-2 steps with a
// -j between them; each step halves its result like every other butterfly
// of the processor. Lane m of the output holds frequency bin k = k' + (N/4)*m,
// where k' is given by the time index.
//
// Timing: registered output, latency 1 cycle.
module lane_dft4
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t in_d  [LANES],
  input  ctrl_t in_c,
  output cplx_t out_d [LANES],
  output ctrl_t out_c
);

  cplx_t a0, a1, a2, a3;

  always_comb begin
    a0 = bfly_sum(in_d[0], in_d[2]);
    a2 = bfly_dif(in_d[0], in_d[2]);
    a1 = bfly_sum(in_d[1], in_d[3]);
    a3 = mul_nj(bfly_dif(in_d[1], in_d[3]));
  end

  always_ff @(posedge clk) begin
    out_d[0] <= bfly_sum(a0, a1);
    out_d[2] <= bfly_dif(a0, a1);
    out_d[1] <= bfly_sum(a2, a3);
    out_d[3] <= bfly_dif(a2, a3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_c <= '0;
    else        out_c <= in_c;
  end

endmodule
