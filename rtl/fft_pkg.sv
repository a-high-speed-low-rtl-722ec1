// fft_pkg: types, constants and arithmetic helpers shared by the 128/64-point
// four-parallel radix-2^4 multipath delay-feedback (MDF) FFT/IFFT processor.
//
// Data are complex samples with 10-bit two's-complement real and imaginary
// parts (the word length of the processor). Every radix-2 butterfly divides its
// result by two with round-half-up and saturation, so an N-point transform
// delivers X[k]/N at the output and never overflows. Twiddle constants are
// Q1.9 values (value/512). The sideband `ctrl_t` travels with every sample
// through the pipeline: each stage derives its control from it instead of
// keeping a counter of its own.
package fft_pkg;

  localparam int W = 10;          // word length of Re and Im
  localparam int LANES = 4;       // four-parallel data path
  localparam int IDXW = 5;        // time index within a frame: N/4 = 32 cycles max
  localparam int FRAC = 9;        // twiddle coefficients are Q1.9

  typedef logic signed [W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef struct packed {
    logic            valid;       // sample carries data
    logic            sel128;      // sel_point: 0 = 64-point, 1 = 128-point
    logic            inv;         // mode: 0 = FFT, 1 = IFFT
    logic [IDXW-1:0] idx;         // cycle index within the frame
  } ctrl_t;

  // Saturate a wide value to W bits.
  function automatic sample_t sat(input logic signed [23:0] v);
    if (v > 24'sd511) return sample_t'(10'sd511);
    if (v < -24'sd512) return sample_t'(-10'sd512);
    return sample_t'(v[W-1:0]);
  endfunction

  // (a + b) / 2 and (a - b) / 2, rounded half up, saturated.
  function automatic sample_t half_add(input sample_t a, input sample_t b);
    logic signed [W+1:0] s;
    s = (12'(a) + 12'(b) + 12'sd1) >>> 1;
    return sat(24'(s));
  endfunction

  function automatic sample_t half_sub(input sample_t a, input sample_t b);
    logic signed [W+1:0] s;
    s = (12'(a) - 12'(b) + 12'sd1) >>> 1;
    return sat(24'(s));
  endfunction

  function automatic cplx_t bfly_sum(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = half_add(a.re, b.re);
    r.im = half_add(a.im, b.im);
    return r;
  endfunction

  function automatic cplx_t bfly_dif(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = half_sub(a.re, b.re);
    r.im = half_sub(a.im, b.im);
    return r;
  endfunction

  // Multiply by -j: (a + jb)(-j) = b - ja.
  function automatic cplx_t mul_nj(input cplx_t x);
    cplx_t r;
    sample_t a;
    a    = x.re;
    r.re = x.im;
    r.im = sat(-24'(a));
    return r;
  endfunction

  // Swap real and imaginary parts (IFFT through the forward transform).
  function automatic cplx_t swap_ri(input cplx_t x);
    cplx_t r;
    r.re = x.im;
    r.im = x.re;
    return r;
  endfunction

  // CSD constant multipliers, full precision (result is value * 512), for
  // the Q1.9 constants cos(pi/8) = 473 (0111011001), sin(pi/8) = 195
  // (0011000011) and cos(pi/4) = 362:
  //   473 = 2^9 - 2^5 - 2^3 + 2^0
  //   195 = 2^8 - 2^6 + 2^2 - 2^0
  //   362 = 2^9 - 2^7 - 2^4 - 2^2 - 2^1
  function automatic logic signed [23:0] csd_c8(input sample_t x);
    logic signed [23:0] v;
    v = 24'(x);
    return (v <<< 9) - (v <<< 5) - (v <<< 3) + v;
  endfunction

  function automatic logic signed [23:0] csd_s8(input sample_t x);
    logic signed [23:0] v;
    v = 24'(x);
    return (v <<< 8) - (v <<< 6) + (v <<< 2) - v;
  endfunction

  function automatic logic signed [23:0] csd_c4(input sample_t x);
    logic signed [23:0] v;
    v = 24'(x);
    return (v <<< 9) - (v <<< 7) - (v <<< 4) - (v <<< 2) - (v <<< 1);
  endfunction

  // Round a Q.9 product to the data grid and saturate.
  function automatic sample_t rnd9(input logic signed [23:0] p);
    return sat((p + 24'sd256) >>> FRAC);
  endfunction

  // x * W16^e with W16 = exp(-j*2*pi/16) (C8 = cos(pi/8), S8 = sin(pi/8),
  // C4 = cos(pi/4) below), for the exponents that occur in the
  // radix-2^4 decomposition (0, 1, 2, 3, 4, 6, 9). With W = c - js:
  //   re = a*c + b*s,  im = b*c - a*s.
  function automatic cplx_t cmul_w16(input cplx_t x, input logic [3:0] e);
    logic signed [23:0] ac8, as8, ac4, bc8, bs8, bc4, pr, pi;
    cplx_t r;
    ac8 = csd_c8(x.re); as8 = csd_s8(x.re); ac4 = csd_c4(x.re);
    bc8 = csd_c8(x.im); bs8 = csd_s8(x.im); bc4 = csd_c4(x.im);
    pr = '0; pi = '0;
    case (e)
      4'd1: begin pr =  ac8 + bs8; pi =  bc8 - as8; end   // c= C8, s= S8
      4'd2: begin pr =  ac4 + bc4; pi =  bc4 - ac4; end   // c= C4, s= C4
      4'd3: begin pr =  as8 + bc8; pi =  bs8 - ac8; end   // c= S8, s= C8
      4'd6: begin pr = -ac4 + bc4; pi = -bc4 - ac4; end   // c=-C4, s= C4
      4'd9: begin pr = -ac8 - bs8; pi = -bc8 + as8; end   // c=-C8, s=-S8
      default: ;
    endcase
    case (e)
      4'd0: r = x;
      4'd4: r = mul_nj(x);
      default: begin r.re = rnd9(pr); r.im = rnd9(pi); end
    endcase
    return r;
  endfunction

  // Reverse the four bits of k.
  function automatic logic [3:0] rev4(input logic [3:0] k);
    return {k[0], k[1], k[2], k[3]};
  endfunction

endpackage
