// booth_stage: four-parallel general twiddle multiplication between the
// radix-2^4 group and the last stages, with one twiddle ROM and one Booth
// complex multiplier per lane.
//
// After the four butterfly stages of the radix-2^4 group a sample's time index
// holds k1..k4 and its remaining input index is n5 (the lane in 64-point
// frames; the lowest time-index bit and the lane, 4*t0 + l, in 128-point
// frames). The decomposition needs W_N^(n5*(k1 + 2k2 + 4k3 + 8k4)) here. The
// exponent is formed per lane, scaled to 128ths of a turn for 64-point
// frames, looked up in the ROM and applied by the Booth multiplier. An
// exponent of 0 passes the sample through unchanged.
//
// Timing: registered output, latency 1 cycle.
module booth_stage
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t in_d  [LANES],
  input  ctrl_t in_c,
  output cplx_t out_d [LANES],
  output ctrl_t out_c
);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [3:0] kp;
    logic [2:0] n5;
    logic [6:0] e;
    sample_t    tr, ti;
    cplx_t      prod;

    always_comb begin
      if (in_c.sel128) begin
        kp = rev4(in_c.idx[4:1]);
        n5 = {in_c.idx[0], 2'(l)};
        e  = 7'(n5 * kp);
      end else begin
        kp = rev4(in_c.idx[3:0]);
        n5 = {1'b0, 2'(l)};
        e  = 7'(2 * n5 * kp);
      end
    end

    twiddle_rom u_rom (.e(e), .tf_re(tr), .tf_im(ti));
    booth_cmult u_mul (.in_d(in_d[l]), .tf_re(tr), .tf_im(ti), .out_d(prod));

    always_ff @(posedge clk) begin
      out_d[l] <= (e == '0) ? in_d[l] : prod;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_c <= '0;
    else        out_c <= in_c;
  end

endmodule
