// booth_cmult: Booth complex multiplier (four fixed-width Booth multipliers).
//
// (a + jb) * (tr + j*ti): four real products from booth_mult, then
// re = a*tr - b*ti and im = a*ti + b*tr, each saturated to 10 bits. Each real
// product is already rounded to the output grid, so the result may differ
// from the exactly rounded product by up to 2 LSB.
//
// Interface: combinational; twiddle tf_re/tf_im in Q1.9.
module booth_cmult
  import fft_pkg::*;
(
  input  cplx_t   in_d,
  input  sample_t tf_re,
  input  sample_t tf_im,
  output cplx_t   out_d
);

  sample_t p_ar, p_bi, p_ai, p_br;

  booth_mult u_m1 (.x(in_d.re), .c(tf_re), .y(p_ar));
  booth_mult u_m2 (.x(in_d.im), .c(tf_im), .y(p_bi));
  booth_mult u_m3 (.x(in_d.re), .c(tf_im), .y(p_ai));
  booth_mult u_m4 (.x(in_d.im), .c(tf_re), .y(p_br));

  always_comb begin
    out_d.re = sat(24'(p_ar) - 24'(p_bi));
    out_d.im = sat(24'(p_ai) + 24'(p_br));
  end

endmodule
