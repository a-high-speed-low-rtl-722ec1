// tb_fft_r24mdf: end-to-end test of the 128/64-point FFT/IFFT processor.
//
// Sends a sequence of frames: 64-point and 128-point, FFT and IFFT,
// back-to-back and after idle gaps, with size switches in between. Inputs
// are random complex samples plus a tone. Each output sample is compared
// with a double-precision DFT of the frame divided by N (IFFT: positive
// exponent), within a tolerance of TOL LSB per component. The test also
// checks the bin numbering (every bin exactly once per frame), the
// returned size and mode, the latency (25 / 41 cycles) and that
// back-to-back input frames come out back-to-back (four samples per clock).
// Each mechanism is counted; one that never happened counts as a failure.
module tb_fft_r24mdf;
  import fft_pkg::*;

  localparam int TOL = 4;
  localparam int MAXF = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, sel_point = 1'b0, mode = 1'b0;
  cplx_t in_d [LANES];
  logic out_valid, out_sel_point, out_mode;
  logic [4:0] out_idx;
  logic [6:0] out_bin [LANES];
  cplx_t out_d [LANES];

  fft_r24mdf dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // frame records
  int     nfr = 0;
  logic   f_sel [MAXF];
  logic   f_inv [MAXF];
  int     f_start [MAXF];
  int     x_re [MAXF][128];
  int     x_im [MAXF][128];
  real    e_re [MAXF][128];
  real    e_im [MAXF][128];

  // mechanism counters
  int n64 = 0, n128 = 0, nfft = 0, nifft = 0, nswitch = 0, nb2b = 0, ngap = 0;
  int maxerr = 0;
  real sig_pow = 0.0, err_pow = 0.0;

  task automatic compute_expected(int f);
    int n;
    real sgn, ang;
    n = f_sel[f] ? 128 : 64;
    sgn = f_inv[f] ? 1.0 : -1.0;
    for (int k = 0; k < n; k++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int i = 0; i < n; i++) begin
        ang = sgn * 2.0 * 3.14159265358979 * real'((i * k) % n) / real'(n);
        sr += real'(x_re[f][i]) * $cos(ang) - real'(x_im[f][i]) * $sin(ang);
        si += real'(x_re[f][i]) * $sin(ang) + real'(x_im[f][i]) * $cos(ang);
      end
      e_re[f][k] = sr / real'(n);
      e_im[f][k] = si / real'(n);
    end
  endtask

  task automatic send_frame(logic sel, logic inv, int gap);
    int n, f, tone;
    f = nfr;
    n = sel ? 128 : 64;
    f_sel[f] = sel;
    f_inv[f] = inv;
    tone = $urandom_range(n - 1);
    for (int i = 0; i < n; i++) begin
      x_re[f][i] = $signed($urandom_range(300)) - 150
                   + $rtoi(150.0 * $cos(2.0 * 3.14159265358979 * real'(tone * i) / real'(n)));
      x_im[f][i] = $signed($urandom_range(300)) - 150
                   + $rtoi(150.0 * $sin(2.0 * 3.14159265358979 * real'(tone * i) / real'(n)));
    end
    compute_expected(f);
    if (sel) n128++; else n64++;
    if (inv) nifft++; else nfft++;
    if (f > 0 && f_sel[f-1] != sel) nswitch++;
    if (f > 0 && gap == 0) nb2b++;
    if (gap > 0) ngap++;
    nfr++;
    repeat (gap) begin
      @(negedge clk);
      in_valid = 1'b0;
    end
    for (int t = 0; t < n / 4; t++) begin
      @(negedge clk);
      if (t == 0) f_start[f] = cyc;
      in_valid  = 1'b1;
      sel_point = (t == 0) ? sel : 1'($urandom_range(1));   // ignored after cycle 0
      mode      = (t == 0) ? inv : 1'($urandom_range(1));
      for (int l = 0; l < LANES; l++) begin
        in_d[l].re = W'(x_re[f][4 * t + l]);
        in_d[l].im = W'(x_im[f][4 * t + l]);
      end
    end
  endtask

  // output checker
  int ofr = -1;
  int seen [128];
  int last_out_cyc = 0;
  int out_cnt = 0;

  task automatic close_frame(int f);
    int n;
    n = f_sel[f] ? 128 : 64;
    for (int k = 0; k < n; k++) begin
      checks++;
      if (seen[k] != 1) begin
        failures++;
        $display("frame %0d bin %0d seen %0d times", f, k, seen[k]);
      end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (out_idx == 0) begin
        if (ofr >= 0) close_frame(ofr);
        ofr++;
        for (int k = 0; k < 128; k++) seen[k] = 0;
        // latency
        checks++;
        if (cyc - f_start[ofr] != (f_sel[ofr] ? 41 : 25)) begin
          failures++;
          $display("frame %0d latency %0d", ofr, cyc - f_start[ofr]);
        end
        // back-to-back in, back-to-back out
        if (ofr > 0 && f_start[ofr] - f_start[ofr-1] == (f_sel[ofr-1] ? 32 : 16)
            && f_sel[ofr] == f_sel[ofr-1]) begin
          checks++;
          if (cyc - last_out_cyc != 1) begin
            failures++;
            $display("frame %0d not back-to-back at the output", ofr);
          end
        end
      end
      last_out_cyc = cyc;
      out_cnt++;
      checks++;
      if (out_sel_point != f_sel[ofr] || out_mode != f_inv[ofr]) begin
        failures++;
        $display("frame %0d size/mode tag wrong", ofr);
      end
      for (int m = 0; m < LANES; m++) begin
        int k, dr, di, gr, gi;
        cplx_t v;
        v  = out_d[m];
        gr = int'($signed(v[2*W-1:W]));
        gi = int'($signed(v[W-1:0]));
        k = int'(out_bin[m]);
        seen[k]++;
        dr = gr - $rtoi(e_re[ofr][k] + (e_re[ofr][k] >= 0.0 ? 0.5 : -0.5));
        di = gi - $rtoi(e_im[ofr][k] + (e_im[ofr][k] >= 0.0 ? 0.5 : -0.5));
        sig_pow += e_re[ofr][k] * e_re[ofr][k] + e_im[ofr][k] * e_im[ofr][k];
        err_pow += (real'(gr) - e_re[ofr][k]) * (real'(gr) - e_re[ofr][k])
                 + (real'(gi) - e_im[ofr][k]) * (real'(gi) - e_im[ofr][k]);
        if (dr < 0) dr = -dr;
        if (di < 0) di = -di;
        if (dr > maxerr) maxerr = dr;
        if (di > maxerr) maxerr = di;
        checks++;
        if (dr > TOL || di > TOL) begin
          failures++;
          if (failures < 20)
            $display("frame %0d bin %0d: got (%0d,%0d) expected (%0.2f,%0.2f)", ofr, k,
                     gr, gi, e_re[ofr][k], e_im[ofr][k]);
        end
      end
    end
  end

  initial begin
    for (int l = 0; l < LANES; l++) in_d[l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send_frame(1'b0, 1'b0, 2);    // 64 FFT
    send_frame(1'b0, 1'b0, 0);    // back-to-back
    send_frame(1'b0, 1'b1, 0);    // 64 IFFT, back-to-back
    send_frame(1'b1, 1'b0, 40);   // switch to 128
    send_frame(1'b1, 1'b0, 0);
    send_frame(1'b1, 1'b1, 0);    // 128 IFFT
    send_frame(1'b1, 1'b0, 5);    // short gap, same size
    send_frame(1'b0, 1'b1, 40);   // back to 64
    @(negedge clk);
    in_valid = 1'b0;
    repeat (80) @(negedge clk);
    close_frame(ofr);
    checks++;
    if (ofr + 1 != nfr) begin
      failures++;
      $display("%0d frames sent, %0d received", nfr, ofr + 1);
    end
    // every mechanism happened
    checks++; if (n64 == 0)     begin failures++; $display("no 64-point frame"); end
    checks++; if (n128 == 0)    begin failures++; $display("no 128-point frame"); end
    checks++; if (nfft == 0)    begin failures++; $display("no FFT frame"); end
    checks++; if (nifft == 0)   begin failures++; $display("no IFFT frame"); end
    checks++; if (nswitch == 0) begin failures++; $display("no size switch"); end
    checks++; if (nb2b == 0)    begin failures++; $display("no back-to-back frames"); end
    checks++; if (ngap == 0)    begin failures++; $display("no idle gap"); end
    $display("frames=%0d 64pt=%0d 128pt=%0d fft=%0d ifft=%0d switches=%0d back_to_back=%0d gaps=%0d max_err=%0d",
             nfr, n64, n128, nfft, nifft, nswitch, nb2b, ngap, maxerr);
    $display("SQNR over all frames: %0.1f dB", 10.0 * $log10(sig_pow / err_pow));
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
