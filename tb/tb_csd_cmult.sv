// tb_csd_cmult: self-checking test of the W16 CSD complex constant
// multiplier.
//
// Random samples are applied with every time index in both transform sizes.
// The expected output is x * exp(-j*2*pi*e/16), e = (2*n3 + n4)*(k1 + 2*k2)
// taken from the index bits, computed in double precision with exact
// cosines and rounded; the CSD constants are within 1/512 of the true
// values, so up to 2 LSB of difference is accepted (0 for e = 0 and e = 4).
// The result must appear one clock after the input, with the sideband.
module tb_csd_cmult;
  import fft_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  cplx_t in_d [LANES];
  cplx_t out_d [LANES];
  ctrl_t in_c, out_c;

  csd_cmult dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int nexp [16];

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
          int k1, k2, n3, n4, e, tol;
          real ang, er, ei;
          @(negedge clk);
          in_c.valid = 1'b1; in_c.sel128 = s[0]; in_c.inv = 1'b0; in_c.idx = IDXW'(t);
          for (int l = 0; l < LANES; l++) begin
            xr[l] = $signed($urandom_range(720)) - 360;
            xi[l] = $signed($urandom_range(720)) - 360;
            in_d[l].re = W'(xr[l]);
            in_d[l].im = W'(xi[l]);
          end
          if (s) begin k1 = (t >> 4) & 1; k2 = (t >> 3) & 1; n3 = (t >> 2) & 1; n4 = (t >> 1) & 1; end
          else   begin k1 = (t >> 3) & 1; k2 = (t >> 2) & 1; n3 = (t >> 1) & 1; n4 = t & 1; end
          e = (2 * n3 + n4) * (k1 + 2 * k2);
          nexp[e]++;
          tol = (e == 0 || e == 4) ? 0 : 2;
          ang = -2.0 * 3.14159265358979 * real'(e) / 16.0;
          @(posedge clk);
          #1;
          checks++;
          if (out_c != in_c) begin failures++; $display("sideband not delayed by one clock"); end
          for (int l = 0; l < LANES; l++) begin
            cplx_t v;
            int gr, gi;
            v  = out_d[l];
            gr = int'($signed(v[2*W-1:W]));
            gi = int'($signed(v[W-1:0]));
            er = real'(xr[l]) * $cos(ang) - real'(xi[l]) * $sin(ang);
            ei = real'(xr[l]) * $sin(ang) + real'(xi[l]) * $cos(ang);
            checks++;
            if (rabs(real'(gr) - er) > real'(tol) + 0.5 || rabs(real'(gi) - ei) > real'(tol) + 0.5) begin
              failures++;
              if (failures < 10) $display("e=%0d lane %0d: got (%0d,%0d) expected (%0.2f,%0.2f)", e, l, gr, gi, er, ei);
            end
          end
        end
      end
    end
    foreach (nexp[e]) begin
      if (e inside {0, 1, 2, 3, 4, 6, 9}) begin
        checks++;
        if (nexp[e] == 0) begin failures++; $display("exponent %0d never applied", e); end
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
