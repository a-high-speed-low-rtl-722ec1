// tb_booth_stage: self-checking test of the four-parallel general twiddle
// stage (ROM + Booth complex multipliers).
//
// Random samples are applied with every time index of 64-point and
// 128-point frames. Lane l at index t must come out, one clock later, as
// x * exp(-j*2*pi*n5*k/N), where k = k1 + 2k2 + 4k3 + 8k4 is read from the
// index bits (bit-reversed) and n5 is the lane (64-point) or 4*t[0] + lane
// (128-point). The reference uses exact cosines in double precision; the
// ROM rounding and the fixed-width products allow 3 LSB. A zero exponent
// must pass the sample unchanged.
module tb_booth_stage;
  import fft_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  cplx_t in_d [LANES];
  cplx_t out_d [LANES];
  ctrl_t in_c, out_c;

  booth_stage dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real sum_err = 0.0;

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
            int n, kq, n5, gr, gi, tb4;
            real ang, er, ei, tol;
            cplx_t v;
            n   = s ? 128 : 64;
            tb4 = s ? (t >> 1) : t;                           // k4 k3 k2 k1 from MSB down
            kq  = ((tb4 >> 3) & 1) | (((tb4 >> 2) & 1) << 1) | (((tb4 >> 1) & 1) << 2) | ((tb4 & 1) << 3);
            n5  = s ? (4 * (t & 1) + l) : l;
            ang = -2.0 * 3.14159265358979 * real'(n5 * kq) / real'(n);
            er  = real'(xr[l]) * $cos(ang) - real'(xi[l]) * $sin(ang);
            ei  = real'(xr[l]) * $sin(ang) + real'(xi[l]) * $cos(ang);
            tol = (n5 * kq == 0) ? 0.0 : 3.0;
            v   = out_d[l];
            gr  = int'($signed(v[2*W-1:W]));
            gi  = int'($signed(v[W-1:0]));
            sum_err += rabs(real'(gr) - er) + rabs(real'(gi) - ei);
            checks++;
            if (rabs(real'(gr) - er) > tol + 0.5 || rabs(real'(gi) - ei) > tol + 0.5) begin
              failures++;
              if (failures < 10) $display("N=%0d t=%0d lane %0d: got (%0d,%0d) expected (%0.2f,%0.2f)",
                                          n, t, l, gr, gi, er, ei);
            end
          end
        end
      end
    end
    $display("mean abs error per component: %0.3f LSB", sum_err / real'(2 * checks));
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
