// fft_r24mdf: four-parallel 128/64-point radix-2^4 multipath delay-feedback
// (MDF) FFT/IFFT processor.
//
// Four complex samples enter per clock in natural order (lane l carries
// x[4t + l] at cycle t of a frame), so an N-point frame takes N/4 cycles and
// the processor sustains four samples per clock. The transform is decimation
// in frequency. The time index t carries the top log2(N/4) bits of n, which
// are transformed lane by lane by delay-feedback butterfly units; the lane
// bits are transformed last, across the lanes:
//
//   BF_64 / BF_128   first stage, one per size (memories 8 / 16 words)
//   BF1  (depth 8)   second stage            -> CSD complex multiplier (W16)
//   BF2  (depth 4)   third stage, with -j    -> BF1 (depth 2), fourth stage
//   ROM + Booth complex multiplier           W_N^(n5*k) general twiddles
//   BF1  (depth 1)   128-point only          -> CSD constant multiplier (W8)
//   lane_dft4        four-point DFT across the lanes
//
// The shared units run at half depth in 64-point frames. sel_point = 0 selects
// 64-point and 1 selects 128-point; mode = 0 is the FFT and 1 the IFFT, which
// is computed by swapping real and imaginary parts at the input and at the
// output. Both are sampled on the first cycle of a frame. Every butterfly
// halves its result, so the output is X[k]/N (and the IFFT is exactly
// (1/N) * sum X[k] W^-nk). The output is in the decimation-in-frequency
// order: lane m at output cycle t holds bin out_bin[m] =
//   64-point:  rev4(t) + 16*m
//   128-point: rev4(t[4:1]) + 16*t[0] + 32*m
// and out_idx gives t. Nothing reorders it.
//
// Timing: input to output latency is 25 cycles for 64-point and 41 cycles
// for 128-point frames; frames may follow each other without a gap. A frame
// must be presented on N/4 consecutive in_valid cycles. When sel_point
// changes, leave at least 32 idle cycles between the two frames.
module fft_r24mdf
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       sel_point,
  input  logic       mode,
  input  cplx_t      in_d    [LANES],
  output logic       out_valid,
  output logic       out_sel_point,
  output logic       out_mode,
  output logic [4:0] out_idx,
  output logic [6:0] out_bin [LANES],
  output cplx_t      out_d   [LANES]
);

  // ---------------------------------------------------------------- input
  logic [IDXW-1:0] cnt;
  logic            sel_q, inv_q;
  logic            cur_sel, cur_inv;
  cplx_t           r_d [LANES];
  ctrl_t           r_c;

  always_comb begin
    cur_sel = (cnt == '0) ? sel_point : sel_q;
    cur_inv = (cnt == '0) ? mode : inv_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      sel_q <= 1'b0;
      inv_q <= 1'b0;
      r_c   <= '0;
    end else begin
      r_c.valid  <= in_valid;
      r_c.sel128 <= cur_sel;
      r_c.inv    <= cur_inv;
      r_c.idx    <= cnt;
      if (in_valid) begin
        sel_q <= cur_sel;
        inv_q <= cur_inv;
        if (cnt == (cur_sel ? IDXW'(31) : IDXW'(15))) cnt <= '0;
        else                                         cnt <= cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) r_d[l] <= cur_inv ? swap_ri(in_d[l]) : in_d[l];
  end

  // A frame is presented on consecutive cycles.
  a_frame_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
                                       (cnt != '0) |-> in_valid)
    else $error("in_valid dropped inside a frame");

  // ------------------------------------------- BF_64 / BF_128 and MUX
  ctrl_t c64_i, c128_i, c64_o, c128_o, s1_c;
  cplx_t d64_o [LANES];
  cplx_t d128_o [LANES];
  cplx_t s1_d [LANES];

  always_comb begin
    c64_i        = r_c;
    c64_i.valid  = r_c.valid && !r_c.sel128;
    c128_i       = r_c;
    c128_i.valid = r_c.valid && r_c.sel128;
  end

  bf_first #(.DEPTH(8))  u_bf64  (.clk(clk), .rst_n(rst_n), .in_d(r_d), .in_c(c64_i),
                                  .out_d(d64_o), .out_c(c64_o));
  bf_first #(.DEPTH(16)) u_bf128 (.clk(clk), .rst_n(rst_n), .in_d(r_d), .in_c(c128_i),
                                  .out_d(d128_o), .out_c(c128_o));

  always_comb begin
    s1_c = c128_o.valid ? c128_o : c64_o;
    for (int l = 0; l < LANES; l++) s1_d[l] = c128_o.valid ? d128_o[l] : d64_o[l];
  end

  // ------------------------------------------------ shared butterflies
  cplx_t s2_d [LANES];
  cplx_t m1_d [LANES];
  cplx_t s3_d [LANES];
  cplx_t s4_d [LANES];
  cplx_t m2_d [LANES];
  cplx_t s5_d [LANES];
  cplx_t m3_d [LANES];
  cplx_t o_d  [LANES];
  ctrl_t s2_c [LANES];
  ctrl_t s3_c [LANES];
  ctrl_t s4_c [LANES];
  ctrl_t s5_c [LANES];
  ctrl_t m1_c, m2_c, m3_c, o_c;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    bf_unit #(.DMAX(8), .SHARED(1'b1), .ROT(1'b0)) u_s2 (
      .clk(clk), .rst_n(rst_n), .in_d(s1_d[l]), .in_c(s1_c), .out_d(s2_d[l]), .out_c(s2_c[l]));
    bf_unit #(.DMAX(4), .SHARED(1'b1), .ROT(1'b1)) u_s3 (
      .clk(clk), .rst_n(rst_n), .in_d(m1_d[l]), .in_c(m1_c), .out_d(s3_d[l]), .out_c(s3_c[l]));
    bf_unit #(.DMAX(2), .SHARED(1'b1), .ROT(1'b0)) u_s4 (
      .clk(clk), .rst_n(rst_n), .in_d(s3_d[l]), .in_c(s3_c[0]), .out_d(s4_d[l]), .out_c(s4_c[l]));
    bf_unit #(.DMAX(1), .SHARED(1'b1), .ROT(1'b0)) u_s5 (
      .clk(clk), .rst_n(rst_n), .in_d(m2_d[l]), .in_c(m2_c), .out_d(s5_d[l]), .out_c(s5_c[l]));
  end

  csd_cmult   u_csd16 (.clk(clk), .rst_n(rst_n), .in_d(s2_d), .in_c(s2_c[0]),
                       .out_d(m1_d), .out_c(m1_c));
  booth_stage u_booth (.clk(clk), .rst_n(rst_n), .in_d(s4_d), .in_c(s4_c[0]),
                       .out_d(m2_d), .out_c(m2_c));
  csd_w8      u_csd8  (.clk(clk), .rst_n(rst_n), .in_d(s5_d), .in_c(s5_c[0]),
                       .out_d(m3_d), .out_c(m3_c));
  lane_dft4   u_dft4  (.clk(clk), .rst_n(rst_n), .in_d(m3_d), .in_c(m3_c),
                       .out_d(o_d), .out_c(o_c));

  // ----------------------------------------------------------- output
  always_comb begin
    out_valid     = o_c.valid;
    out_sel_point = o_c.sel128;
    out_mode      = o_c.inv;
    out_idx       = o_c.idx;
    for (int m = 0; m < LANES; m++) begin
      out_d[m] = o_c.inv ? swap_ri(o_d[m]) : o_d[m];
      if (o_c.sel128) out_bin[m] = 7'(rev4(o_c.idx[4:1])) + 7'(16 * o_c.idx[0]) + 7'(32 * m);
      else            out_bin[m] = 7'(rev4(o_c.idx[3:0])) + 7'(16 * m);
    end
  end

endmodule
