// bf_unit: radix-2 delay-feedback butterfly for one complex lane (BF1, or BF2
// when ROT = 1), with its register bank.
//
// The register bank is a D-word RAM addressed by a pointer that steps through
// 0..D-1, so a word is read back exactly D cycles after it was written. Each
// cycle the word at the pointer is read and rewritten in place:
//   - first half of a block of 2D samples (time-index bit log2(D) = 0): the
//     input is written and the word it replaces leaves as output; these are
//     the differences of the previous block;
//   - second half: the stored x[n] and the arriving x[n+D] give
//     (x[n]+x[n+D])/2 at the output, and (x[n]-x[n+D])/2 is written back in
//     the place of x[n].
// The output is the same block D cycles later, sums first, then differences.
// This in-place scheme is the one the source architecture gives for its
// butterfly units; each word here also holds the sample's sideband, so an
// output's control comes from the same word as its data (own choice).
//
// SHARED = 1 makes the unit serve both transform sizes: D = DMAX in 128-point
// frames and D = DMAX/2 in 64-point frames (a unit with DMAX = 1 is bypassed
// in 64-point frames). ROT = 1 gives the BF2 unit: an output whose time-index
// bits p and p-1 (p = log2 D) are both 1 is multiplied by -j, the trivial
// twiddle of the radix-2^2 pair.
//
// Timing: one sample per clock, output registered, latency D + 1 cycles. A
// frame must arrive on consecutive cycles; gaps between frames are allowed
// (the stored differences drain during the gap). A change of transform size
// needs a gap of at least DMAX cycles.
module bf_unit
  import fft_pkg::*;
#(
  parameter int DMAX   = 8,
  parameter bit SHARED = 1'b1,
  parameter bit ROT    = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t in_d,
  input  ctrl_t in_c,
  output cplx_t out_d,
  output ctrl_t out_c
);

  localparam int PMAX = $clog2(DMAX);
  localparam int AW   = (PMAX > 0) ? PMAX : 1;

  cplx_t         bank  [DMAX];   // data words
  ctrl_t         cbank [DMAX];   // their sidebands
  logic [AW-1:0] ptr;            // address counter
  logic [AW-1:0] last;           // D - 1, also the address mask
  logic [AW-1:0] addr;           // read/write address
  logic          mode_q;         // size of the last valid sample
  logic          sel;            // current size: 1 = full depth
  logic          bypass;
  int            p;              // processed index bit, log2 D
  logic          second;
  cplx_t         head, bf_out, push;
  ctrl_t         head_c, oc;
  logic          rot;

  always_comb begin
    sel    = !SHARED || (in_c.valid ? in_c.sel128 : mode_q);
    bypass = SHARED && (DMAX == 1) && !sel;
    last   = sel ? AW'(DMAX - 1) : AW'((DMAX > 1) ? DMAX / 2 - 1 : 0);
    p      = sel ? PMAX : PMAX - 1;
    if (p < 0) p = 0;
    addr   = ptr & last;
    head   = bank[addr];
    head_c = cbank[addr];
    second = in_c.valid && in_c.idx[p];
    if (bypass) begin
      bf_out = in_d;
      push   = in_d;
      oc     = in_c;
    end else if (second) begin
      bf_out = bfly_sum(head, in_d);
      push   = bfly_dif(head, in_d);
      oc     = head_c;
    end else begin
      bf_out = head;
      push   = in_d;
      oc     = head_c;
    end
    rot = ROT && (p >= 1) && oc.idx[p] && oc.idx[(p >= 1) ? p - 1 : 0];
  end

  always_ff @(posedge clk) begin
    bank[addr] <= push;
    out_d     <= rot ? mul_nj(bf_out) : bf_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DMAX; i++) cbank[i] <= '0;
      ptr    <= '0;
      out_c  <= '0;
      mode_q <= 1'b0;
    end else begin
      cbank[addr] <= in_c;
      ptr         <= (addr + 1'b1) & last;
      out_c      <= oc;
      if (in_c.valid) mode_q <= in_c.sel128;
    end
  end

endmodule
