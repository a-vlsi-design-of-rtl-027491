// tb_lqd_asip: end-to-end test of the LQ decomposition processor.
// Loads the Gram-Schmidt program and, for several random 4x4 complex
// channels, the channel and constants; runs the program and reads back the
// fixed-point cancellation ratios and Q^H entries. They are compared with a
// Gram-Schmidt decomposition done in double precision in the testbench
// (tolerance: 2 units of the 11-bit fraction). Also checks that H = L Q holds
// for the floating-point l and q words, that the run finishes, and that a
// matrix takes no more than 233 cycles (the reference design needs 232.52
// on average; the scheduled program here needs 228).
module tb_lqd_asip;
  import lqd_pkg::*;
  import tb_fp_pkg::*;
  import tb_lqd_prog_pkg::*;
  localparam int IAW = $clog2(IDEPTH);
  localparam int NMAT = 6;
  logic clk = 0, rst_n = 0, start = 0;
  logic [IAW:0] prog_len;
  logic busy, done, illegal;
  logic [31:0] cycles;
  logic h_we = 0, h_re = 0, i_we = 0;
  logic [DAW-1:0] h_addr;
  cword_t h_wdata, h_rdata;
  logic [IAW-1:0] i_addr;
  instr_t i_wdata;
  int checks = 0, failures = 0;
  instr_t prog [$];

  lqd_asip dut (.*);
  always #5 clk = ~clk;

  task automatic hwrite(input int addr, input real re, input real im);
    @(negedge clk);
    h_we = 1; h_addr = DAW'(addr); h_wdata = '{re: r2f(re), im: r2f(im)};
    @(negedge clk);
    h_we = 0;
  endtask

  task automatic hread(input int addr, output cword_t w);
    @(negedge clk);
    h_re = 1; h_addr = DAW'(addr);
    @(negedge clk);
    h_re = 0;
    w = h_rdata;
  endtask

  task automatic check_int(input int got, input real exact, input string what);
    int e;
    e = $rtoi(exact * 2048.0);
    checks++;
    if (got - e > 2 || e - got > 2) begin
      failures++; $display("FAIL %s: got %0d exp %0d", what, got, e);
    end
  endtask

  initial begin
    real hr[4][4], hi[4][4], qr[4][4], qi[4][4], lr[4][4], li[4][4];
    cword_t w;
    build(prog);
    prog_len = (IAW+1)'(prog.size());
    $display("program length %0d instructions", prog.size());
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (prog[k]) begin
      @(negedge clk);
      i_we = 1; i_addr = IAW'(k); i_wdata = prog[k];
    end
    @(negedge clk) i_we = 0;
    hwrite(A_ONE, 1.0, 0.0);
    hwrite(A_SCALE, 2048.0, 0.0);
    for (int m = 0; m < NMAT; m++) begin
      for (int n = 0; n < 4; n++)
        for (int j = 0; j < 4; j++) begin
          hr[n][j] = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
          hi[n][j] = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
          hwrite(hx(n+1, j+1), hr[n][j], hi[n][j]);
          hr[n][j] = f2r(r2f(hr[n][j])); hi[n][j] = f2r(r2f(hi[n][j]));
        end
      // reference Gram-Schmidt
      for (int n = 0; n < 4; n++) begin
        real vr[4], vi[4], nrm;
        for (int j = 0; j < 4; j++) begin vr[j] = hr[n][j]; vi[j] = hi[n][j]; end
        for (int k = 0; k < n; k++) begin
          lr[n][k] = 0.0; li[n][k] = 0.0;
          for (int j = 0; j < 4; j++) begin   // a_nj * conj(q_kj)
            lr[n][k] += hr[n][j]*qr[k][j] + hi[n][j]*qi[k][j];
            li[n][k] += hi[n][j]*qr[k][j] - hr[n][j]*qi[k][j];
          end
          for (int j = 0; j < 4; j++) begin
            vr[j] -= lr[n][k]*qr[k][j] - li[n][k]*qi[k][j];
            vi[j] -= lr[n][k]*qi[k][j] + li[n][k]*qr[k][j];
          end
        end
        nrm = 0.0;
        for (int j = 0; j < 4; j++) nrm += vr[j]*vr[j] + vi[j]*vi[j];
        nrm = $sqrt(nrm);
        lr[n][n] = nrm; li[n][n] = 0.0;
        for (int j = 0; j < 4; j++) begin qr[n][j] = vr[j]/nrm; qi[n][j] = vi[j]/nrm; end
      end
      // run
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      fork
        begin wait (done); end
        begin repeat (5000) @(posedge clk); end
      join_any
      disable fork;
      checks++;
      if (!done) begin failures++; $display("FAIL program did not finish"); end
      $display("matrix %0d: %0d cycles", m, cycles);
      checks++;
      if (cycles > 233) begin failures++; $display("FAIL %0d cycles per matrix", cycles); end
      checks++;
      if (illegal) begin failures++; $display("FAIL illegal operation"); end
      @(negedge clk);
      // fixed-point results
      for (int i = 2; i <= 4; i++)
        for (int j = 1; j < i; j++) begin
          hread(A_LFIX + lidx(i, j), w);
          check_int(int'($signed(w.re)), lr[i-1][j-1] / lr[i-1][i-1], $sformatf("L%0d%0d re", i, j));
          check_int(int'($signed(w.im)), li[i-1][j-1] / lr[i-1][i-1], $sformatf("L%0d%0d im", i, j));
        end
      for (int i = 1; i <= 4; i++)
        for (int j = 1; j <= 4; j++) begin
          hread(A_WFIX + 4*(i-1) + (j-1), w);
          check_int(int'($signed(w.re)), qr[j-1][i-1], $sformatf("W%0d%0d re", i, j));
          check_int(int'($signed(w.im)), -qi[j-1][i-1], $sformatf("W%0d%0d im", i, j));
        end
      // H = L Q from the processor's floating-point words (row 4)
      begin
        cword_t q [4][4], l [4];
        real sr, si;
        for (int k = 1; k <= 4; k++)
          for (int j = 1; j <= 4; j++) hread(qx(k, j), q[k-1][j-1]);
        for (int k = 1; k <= 3; k++) hread(lx(4, k), l[k-1]);
        hread(nx(4) + 1, l[3]);
        for (int j = 0; j < 4; j++) begin
          sr = 0.0; si = 0.0;
          for (int k = 0; k < 4; k++) begin
            sr += f2r(l[k].re)*f2r(q[k][j].re) - f2r(l[k].im)*f2r(q[k][j].im);
            si += f2r(l[k].re)*f2r(q[k][j].im) + f2r(l[k].im)*f2r(q[k][j].re);
          end
          checks++;
          if (sr - hr[3][j] > 1e-4 || hr[3][j] - sr > 1e-4 || si - hi[3][j] > 1e-4 || hi[3][j] - si > 1e-4) begin
            failures++; $display("FAIL H = LQ, row 4 col %0d: %g,%g vs %g,%g", j+1, sr, si, hr[3][j], hi[3][j]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
