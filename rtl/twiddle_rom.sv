// twiddle_rom: twiddle factor ROM for the Booth complex multipliers.
//
// Returns W128^e = cos(2*pi*e/128) - j*sin(2*pi*e/128) for e = 0..127 as Q1.9
// numbers (value/512). Only one eighth of a period is stored: the 17 entries
// cos(2*pi*i/128) and sin(2*pi*i/128), i = 0..16, rounded to the nearest
// integer after scaling by 512 (1.0 is held as 511). The rest of the circle
// is unfolded by symmetry: within a quadrant an angle above pi/4 swaps the
// cosine and sine of its complement, and the quadrant rotates the pair by
// multiples of 90 degrees. A 64-point twiddle W64^e is W128^(2e).
//
// Interface: combinational, `e` in, `tf_re` = cos and `tf_im` = -sin out.
module twiddle_rom
  import fft_pkg::*;
(
  input  logic [6:0] e,
  output sample_t    tf_re,
  output sample_t    tf_im
);

  // round(512*cos(2*pi*i/128)), clamped to 511, and round(512*sin(2*pi*i/128))
  localparam logic [8:0] COS_T [17] = '{
    9'd511, 9'd511, 9'd510, 9'd506, 9'd502, 9'd497, 9'd490, 9'd482, 9'd473,
    9'd463, 9'd452, 9'd439, 9'd426, 9'd411, 9'd396, 9'd379, 9'd362};
  localparam logic [8:0] SIN_T [17] = '{
    9'd0,   9'd25,  9'd50,  9'd75,  9'd100, 9'd124, 9'd149, 9'd172, 9'd196,
    9'd219, 9'd241, 9'd263, 9'd284, 9'd305, 9'd325, 9'd344, 9'd362};

  logic [1:0] q;
  logic [4:0] r;
  logic [4:0] a;
  logic signed [W-1:0] c0, s0, c, s;

  always_comb begin
    q = e[6:5];
    r = e[4:0];
    if (r <= 5'd16) begin
      a  = r;
      c0 = W'(signed'({1'b0, COS_T[a]}));
      s0 = W'(signed'({1'b0, SIN_T[a]}));
    end else begin
      a  = 5'd0 - r;                     // 32 - r
      c0 = W'(signed'({1'b0, SIN_T[a]}));
      s0 = W'(signed'({1'b0, COS_T[a]}));
    end
    unique case (q)
      2'd0: begin c =  c0; s =  s0; end
      2'd1: begin c = -s0; s =  c0; end
      2'd2: begin c = -c0; s = -s0; end
      default: begin c =  s0; s = -c0; end
    endcase
    tf_re = c;
    tf_im = -s;
  end

endmodule
