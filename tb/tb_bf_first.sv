// tb_bf_first: self-checking test of the first butterfly stage (BF_128 at
// its default depth of 16, four lanes).
//
// Three random 128-point frames are sent back to back in natural order
// (lane l holds x[4t + l]), then one more after a gap. For output cycle j of
// a frame, lane l must hold (x[4j+l] + x[4(j+16)+l])/2 for j < 16 and
// (x[4(j-16)+l] - x[4j+l])/2 for j >= 16 (rounded half up, saturated), the
// latter multiplied by -j when j >= 24 (k1 = 1 and n2 = 1). The latency of 17
// cycles is checked on every output.
module tb_bf_first;
  import fft_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  cplx_t in_d [LANES];
  cplx_t out_d [LANES];
  ctrl_t in_c, out_c;

  bf_first dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int xr [8][128];
  int xi [8][128];
  int tin [8][32];
  int nf = 0, of = 0;

  function automatic int hadd(int a, int b);
    int s;
    s = (a + b + 1) >>> 1;
    if (s > 511) s = 511;
    if (s < -512) s = -512;
    return s;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_c.valid) begin
      int j, er, ei, gr, gi, t;
      j = int'(out_c.idx);
      for (int l = 0; l < LANES; l++) begin
        cplx_t v;
        v  = out_d[l];
        gr = int'($signed(v[2*W-1:W]));
        gi = int'($signed(v[W-1:0]));
        if (j < 16) begin
          er = hadd(xr[of][4*j+l], xr[of][4*(j+16)+l]);
          ei = hadd(xi[of][4*j+l], xi[of][4*(j+16)+l]);
        end else begin
          er = hadd(xr[of][4*(j-16)+l], -xr[of][4*j+l]);
          ei = hadd(xi[of][4*(j-16)+l], -xi[of][4*j+l]);
          if (j >= 24) begin
            t  = er;
            er = ei;
            ei = (t == -512) ? 511 : -t;
          end
        end
        checks++;
        if (gr != er || gi != ei) begin
          failures++;
          if (failures < 10) $display("frame %0d idx %0d lane %0d: got (%0d,%0d) expected (%0d,%0d)",
                                      of, j, l, gr, gi, er, ei);
        end
      end
      checks++;
      if (cyc - tin[of][j] != 17) begin
        failures++;
        $display("frame %0d idx %0d latency %0d", of, j, cyc - tin[of][j]);
      end
      if (j == 31) of++;
    end
  end

  task automatic send();
    for (int t = 0; t < 32; t++) begin
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        xr[nf][4*t+l] = $signed($urandom_range(1023)) - 512;
        xi[nf][4*t+l] = $signed($urandom_range(1023)) - 512;
        in_d[l].re = W'(xr[nf][4*t+l]);
        in_d[l].im = W'(xi[nf][4*t+l]);
      end
      in_c.valid  = 1'b1;
      in_c.sel128 = 1'b1;
      in_c.inv    = 1'b0;
      in_c.idx    = IDXW'(t);
      tin[nf][t]  = cyc;
    end
    nf++;
  endtask

  initial begin
    for (int l = 0; l < LANES; l++) in_d[l] = '0;
    in_c = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) send();
    @(negedge clk); in_c.valid = 1'b0;
    repeat (7) @(negedge clk);
    send();
    @(negedge clk); in_c.valid = 1'b0;
    repeat (40) @(negedge clk);
    checks++;
    if (of != nf) begin
      failures++;
      $display("%0d frames in, %0d out", nf, of);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
