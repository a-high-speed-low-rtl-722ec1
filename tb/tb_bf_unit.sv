// tb_bf_unit: self-checking test of the delay-feedback butterfly unit in its
// BF2 form (DMAX = 8, shared between sizes, -j rotation on).
//
// Random frames are sent in 128-point timing (32-cycle frames, depth 8) and
// then, after a gap, in 64-point timing (16-cycle frames, depth 4), back to
// back within each size. For every output the expected value is computed
// from the stored input frame: the sum (x[j] + x[j+D])/2 in the first half of
// each 2D block, the difference (x[j-D] - x[j])/2 in the second half, both
// rounded half up and saturated, then multiplied by -j where index bits p
// and p-1 are both set (p = log2 D). The latency D + 1 is checked on every
// output sample.
module tb_bf_unit;
  import fft_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  cplx_t in_d, out_d;
  ctrl_t in_c, out_c;

  bf_unit #(.DMAX(8), .SHARED(1'b1), .ROT(1'b1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int xr [64][32];
  int xi [64][32];
  int tin [64][32];
  logic fsel [64];
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
      int j, d, p, f, er, ei, gr, gi, t;
      cplx_t v;
      v  = out_d;
      gr = int'($signed(v[2*W-1:W]));
      gi = int'($signed(v[W-1:0]));
      j  = int'(out_c.idx);
      if (j == 0 && cyc > 0) ;
      f  = of;
      d  = fsel[f] ? 8 : 4;
      p  = fsel[f] ? 3 : 2;
      if ((j % (2 * d)) < d) begin
        er = hadd(xr[f][j], xr[f][j + d]);
        ei = hadd(xi[f][j], xi[f][j + d]);
      end else begin
        er = hadd(xr[f][j - d], -xr[f][j]);
        ei = hadd(xi[f][j - d], -xi[f][j]);
      end
      if (((j >> p) & 1) == 1 && ((j >> (p - 1)) & 1) == 1) begin
        t  = er;
        er = ei;
        ei = (t == -512) ? 511 : -t;
      end
      checks++;
      if (gr != er || gi != ei) begin
        failures++;
        if (failures < 10) $display("frame %0d idx %0d: got (%0d,%0d) expected (%0d,%0d)", f, j, gr, gi, er, ei);
      end
      checks++;
      if (cyc - tin[f][j] != d + 1) begin
        failures++;
        if (failures < 10) $display("frame %0d idx %0d: latency %0d", f, j, cyc - tin[f][j]);
      end
      if (j == (fsel[f] ? 31 : 15)) of++;
    end
  end

  task automatic send(logic sel);
    int n;
    n = sel ? 32 : 16;
    fsel[nf] = sel;
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      xr[nf][t] = $signed($urandom_range(1023)) - 512;
      xi[nf][t] = $signed($urandom_range(1023)) - 512;
      in_d.re = W'(xr[nf][t]);
      in_d.im = W'(xi[nf][t]);
      in_c.valid = 1'b1;
      in_c.sel128 = sel;
      in_c.inv = 1'b0;
      in_c.idx = IDXW'(t);
      tin[nf][t] = cyc;
    end
    nf++;
  endtask

  initial begin
    in_d = '0;
    in_c = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) send(1'b1);
    @(negedge clk); in_c.valid = 1'b0;
    repeat (20) @(negedge clk);
    repeat (3) send(1'b0);
    @(negedge clk); in_c.valid = 1'b0;
    repeat (3) @(negedge clk);
    send(1'b0);                           // after a short gap
    @(negedge clk); in_c.valid = 1'b0;
    repeat (20) @(negedge clk);
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
