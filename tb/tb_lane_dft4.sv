// tb_lane_dft4: self-checking test of the four-point DFT across the lanes.
//
// Random lane vectors are applied every clock; one clock later lane m must
// hold (1/4) * sum over l of z_l * (-j)^(l*m), computed in double precision.
// Each of the two internal halvings rounds, so 1 LSB of difference is
// accepted. The sideband must follow with the same one-clock delay.
module tb_lane_dft4;
  import fft_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  cplx_t in_d [LANES];
  cplx_t out_d [LANES];
  ctrl_t in_c, out_c;

  lane_dft4 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    int zr [LANES], zi [LANES];
    for (int l = 0; l < LANES; l++) in_d[l] = '0;
    in_c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in_c.valid = 1'($urandom_range(1));
      in_c.sel128 = 1'($urandom_range(1));
      in_c.idx = IDXW'($urandom_range(31));
      for (int l = 0; l < LANES; l++) begin
        zr[l] = $signed($urandom_range(1023)) - 512;
        zi[l] = $signed($urandom_range(1023)) - 512;
        in_d[l].re = W'(zr[l]);
        in_d[l].im = W'(zi[l]);
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_c != in_c) begin failures++; $display("sideband not delayed by one clock"); end
      for (int m = 0; m < LANES; m++) begin
        real er, ei;
        int gr, gi;
        cplx_t v;
        er = 0.0; ei = 0.0;
        for (int l = 0; l < LANES; l++) begin
          // (-j)^(l*m): rotate by -90 degrees (l*m) times
          case ((l * m) % 4)
            0: begin er += zr[l]; ei += zi[l]; end
            1: begin er += zi[l]; ei -= zr[l]; end
            2: begin er -= zr[l]; ei -= zi[l]; end
            default: begin er -= zi[l]; ei += zr[l]; end
          endcase
        end
        er /= 4.0; ei /= 4.0;
        v  = out_d[m];
        gr = int'($signed(v[2*W-1:W]));
        gi = int'($signed(v[W-1:0]));
        checks++;
        if (rabs(real'(gr) - er) > 1.0 || rabs(real'(gi) - ei) > 1.0) begin
          failures++;
          if (failures < 10) $display("lane %0d: got (%0d,%0d) expected (%0.2f,%0.2f)", m, gr, gi, er, ei);
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
