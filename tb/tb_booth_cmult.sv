// tb_booth_cmult: self-checking test of the fixed-width Booth complex
// multiplier.
//
// Random samples are multiplied by random unit twiddles (Q1.9, angle
// uniform over the circle) and by a few corner cases (zero input, twiddle 1,
// -j, full-scale inputs). The reference is the exact product
// (a + jb)(tr + j*ti)/512 in double precision; each real product of the
// fixed-width multiplier may be off by about one unit, so a difference of
// up to 2 LSB per component is accepted. A zero input must give exactly zero.
module tb_booth_cmult;
  import fft_pkg::*;

  cplx_t   in_d, out_d;
  sample_t tf_re, tf_im;

  booth_cmult dut (.*);

  int checks = 0, failures = 0;
  real sum_err = 0.0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(int a, int b, int tr, int ti);
    real er, ei;
    cplx_t v;
    int gr, gi;
    in_d.re = W'(a); in_d.im = W'(b);
    tf_re = W'(tr); tf_im = W'(ti);
    #1;
    v  = out_d;
    gr = int'($signed(v[2*W-1:W]));
    gi = int'($signed(v[W-1:0]));
    er = (real'(a) * real'(tr) - real'(b) * real'(ti)) / 512.0;
    ei = (real'(a) * real'(ti) + real'(b) * real'(tr)) / 512.0;
    if (er > 511.0) er = 511.0;
    if (er < -512.0) er = -512.0;
    if (ei > 511.0) ei = 511.0;
    if (ei < -512.0) ei = -512.0;
    sum_err += rabs(real'(gr) - er) + rabs(real'(gi) - ei);
    checks++;
    if (rabs(real'(gr) - er) > 2.0 || rabs(real'(gi) - ei) > 2.0
        || (a == 0 && b == 0 && (gr != 0 || gi != 0))) begin
      failures++;
      if (failures < 10) $display("(%0d,%0d)*(%0d,%0d): got (%0d,%0d) expected (%0.2f,%0.2f)",
                                  a, b, tr, ti, gr, gi, er, ei);
    end
  endtask

  initial begin
    check(0, 0, 473, -195);
    check(0, 0, -362, 362);
    check(300, -200, 511, 0);
    check(300, -200, 0, -511);
    check(511, 511, 362, -362);
    check(-512, -512, -362, 362);
    check(-512, 511, 196, -473);
    for (int i = 0; i < 3000; i++) begin
      real ang;
      int tr, ti;
      ang = 2.0 * 3.14159265358979 * real'($urandom_range(65535)) / 65536.0;
      tr = $rtoi(511.0 * $cos(ang));
      ti = $rtoi(511.0 * $sin(ang));
      check($signed($urandom_range(720)) - 360, $signed($urandom_range(720)) - 360, tr, ti);
    end
    $display("mean abs error per component: %0.3f LSB", sum_err / real'(2 * checks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
