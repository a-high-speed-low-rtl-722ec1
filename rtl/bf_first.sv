// bf_first: first radix-2 stage of the processor on all four lanes (the
// BF_64 block with DEPTH = 8, the BF_128 block with DEPTH = 16).
//
// The input arrives in natural order, four samples per clock: lane l carries
// x[4t + l] at cycle t of the frame. x[n] and x[n + N/2] are therefore on the
// same lane, N/8 cycles apart, so each lane stores the first half of its frame
// (N/8 words) and combines it with the second half as it arrives; the
// differences are written back in the place of the stored inputs and leave
// while the next frame fills the memory. The outputs with k1 = 1 and n2 = 1 are
// multiplied by -j, the trivial twiddle (-j)^(n2*k1) of the radix-2^4
// decomposition, so that the next stage can be a plain butterfly.
//
// Interface: `in_d` four complex samples and the frame sideband `in_c`; the
// same on the output, DEPTH + 1 cycles later. Both instances exist side by
// side and the processor's input multiplexer steers each frame to the one
// that matches its size, as the source architecture draws it.
module bf_first
  import fft_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t in_d  [LANES],
  input  ctrl_t in_c,
  output cplx_t out_d [LANES],
  output ctrl_t out_c
);

  ctrl_t lane_c [LANES];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    bf_unit #(.DMAX(DEPTH), .SHARED(1'b0), .ROT(1'b1)) u_bf (
      .clk   (clk),
      .rst_n (rst_n),
      .in_d  (in_d[l]),
      .in_c  (in_c),
      .out_d (out_d[l]),
      .out_c (lane_c[l])
    );
  end

  assign out_c = lane_c[0];

endmodule
