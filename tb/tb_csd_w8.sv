// tb_csd_w8: self-checking test of the 128-point CSD constant multiplier.
//
// Random samples with every time index in both sizes. In a 128-point frame
// with index bit 0 set, lane l must come out as x * exp(-j*2*pi*l/8)
// (exact cosines, 2 LSB accepted for lanes 1 and 3, exact for lanes 0 and
// 2); every other sample must pass unchanged. Latency is one clock.
module tb_csd_w8;
  import fft_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  cplx_t in_d [LANES];
  cplx_t out_d [LANES];
  ctrl_t in_c, out_c;

  csd_w8 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    int xr [LANES], xi [LANES];
    for (int l = 0; l < LANES; l++) in_d[l] = '0;
    in_c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      for (int s = 0; s < 2; s++) begin
        for (int t = 0; t < (s ? 32 : 16); t++) begin
          @(negedge clk);
          in_c.valid = 1'b1; in_c.sel128 = s[0]; in_c.inv = 1'b0; in_c.idx = IDXW'(t);
          for (int l = 0; l < LANES; l++) begin
            xr[l] = $signed($urandom_range(720)) - 360;
            xi[l] = $signed($urandom_range(720)) - 360;
            in_d[l].re = W'(xr[l]);
            in_d[l].im = W'(xi[l]);
          end
          @(posedge clk);
          #1;
          checks++;
          if (out_c != in_c) begin failures++; $display("sideband not delayed by one clock"); end
          for (int l = 0; l < LANES; l++) begin
            int e, gr, gi;
            real ang, er, ei, tol;
            cplx_t v;
            e   = (s == 1 && (t & 1) == 1) ? l : 0;
            ang = -2.0 * 3.14159265358979 * real'(e) / 8.0;
            er  = real'(xr[l]) * $cos(ang) - real'(xi[l]) * $sin(ang);
            ei  = real'(xr[l]) * $sin(ang) + real'(xi[l]) * $cos(ang);
            tol = (e % 2 == 0) ? 0.0 : 2.0;
            v   = out_d[l];
            gr  = int'($signed(v[2*W-1:W]));
            gi  = int'($signed(v[W-1:0]));
            checks++;
            if (rabs(real'(gr) - er) > tol + 0.5 || rabs(real'(gi) - ei) > tol + 0.5) begin
              failures++;
              if (failures < 10) $display("s=%0d t=%0d lane %0d: got (%0d,%0d) expected (%0.2f,%0.2f)",
                                          s, t, l, gr, gi, er, ei);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
