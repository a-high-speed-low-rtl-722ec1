// tb_twiddle_rom: exhaustive test of the twiddle ROM.
//
// For every e = 0..127 the outputs must equal round(512*cos(2*pi*e/128)) and
// -round(512*sin(2*pi*e/128)), each clamped to +-511, computed here in
// double precision.
module tb_twiddle_rom;
  import fft_pkg::*;

  logic [6:0] e;
  sample_t    tf_re, tf_im;

  twiddle_rom dut (.*);

  int checks = 0, failures = 0;

  function automatic int clamp_round(real v);
    int r;
    r = $rtoi(v + (v >= 0.0 ? 0.5 : -0.5));
    if (r > 511) r = 511;
    if (r < -511) r = -511;
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 128; i++) begin
      int ec, es;
      real ang;
      e = 7'(i);
      #1;
      ang = 2.0 * 3.14159265358979 * real'(i) / 128.0;
      ec = clamp_round(512.0 * $cos(ang));
      es = -clamp_round(512.0 * $sin(ang));
      checks++;
      if (int'(tf_re) != ec || int'(tf_im) != es) begin
        failures++;
        $display("e=%0d: got (%0d,%0d) expected (%0d,%0d)", i, tf_re, tf_im, ec, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
