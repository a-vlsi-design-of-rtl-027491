// tb_thp_top: end-to-end test of the precoder with all parameters at their
// defaults. The decomposition side is clocked at 400 MHz and the precoding
// datapath at 160 MHz, the two rates of the reference design.
//
// Control phase: for NRUN subcarriers, a random, reasonably conditioned 4x4
// complex channel is written to the decomposition processor, the
// Gram-Schmidt program runs, and the loader moves the coefficients into the
// memories. The coefficients are read back and compared with a double
// precision decomposition (within 2 LSB).
// Data phase: NVEC random 16-QAM symbol vectors (window M = 4), each on a
// random one of those subcarriers, stream through IC and WCM, mostly back to
// back. Every output x^ is compared bit for bit with a fixed-point model of
// the cancellation and weighting, must appear exactly five cycles after its
// input, and must survive the channel: H x^ divided by l_ii and folded into
// [-M, M) must decide to the transmitted symbol.
// Mechanisms counted (each must occur): decomposition runs, coefficient
// loads, operand-hazard waits in the processor, back-to-back accumulations
// (forwarded accumulator), modulo folds that change a value, subcarrier
// changes between consecutive vectors, and idle cycles in the stream.
// Also checks that decomposing and loading all 480 subcarriers at 400 MHz
// takes less than the 20 ms between channel-state updates.
module tb_thp_top;
  import thp_pkg::*;
  import lqd_pkg::*;
  import tb_fp_pkg::*;
  import tb_lqd_prog_pkg::*;
  localparam int IAW  = $clog2(IDEPTH);
  localparam int SAW  = $clog2(NSC);
  localparam int NRUN = 480;      // subcarriers decomposed (all of them)
  localparam int NVEC = 4000;     // symbol vectors precoded
  localparam int MQ   = 4;        // modulo window of 16-QAM

  timeunit 1ns;
  timeprecision 1ps;
  logic clk_lqd = 0, clk = 0, rst_n = 0;
  logic lqd_start = 0, h_we = 0, h_re = 0, i_we = 0, x_valid = 0;
  logic [IAW:0] prog_len;
  logic [SAW-1:0] csi_sc, x_sc;
  logic lqd_busy, lqd_done, lqd_illegal, coef_busy, y_valid;
  logic [31:0] lqd_cycles;
  logic [DAW-1:0] h_addr;
  cword_t h_wdata, h_rdata;
  logic [IAW-1:0] i_addr;
  instr_t i_wdata;
  logic signed [DATA_W-1:0] x_re [NT], x_im [NT], xt_re [NT], xt_im [NT], y_re [NT], y_im [NT];
  logic xt_valid [NT];
  logic [DATA_W-1:0] m, inv2m;

  thp_top dut (.*);
  always #1.25  clk_lqd = ~clk_lqd;   // 400 MHz decomposition side
  always #3.125 clk = ~clk;           // 160 MHz precoding datapath

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // per-subcarrier data kept by the testbench
  real hr [NRUN][4][4], hi [NRUN][4][4], lnn [NRUN][4];
  int  lfr [NRUN][NL], lfi [NRUN][NL], wfr [NRUN][NQ], wfi [NRUN][NQ];
  instr_t prog [$];
  // expected outputs
  int exp_re [NT][$], exp_im [NT][$], exp_cyc [$], exp_sc [$], sym_re [NT][$], sym_im [NT][$];
  // mechanism counters
  int n_runs = 0, n_loads = 0, n_stall = 0, n_accfwd = 0, n_fold = 0, n_scswitch = 0, n_idle = 0;
  int n_out = 0, n_symerr = 0;
  longint n_lqcyc = 0;   // clk_lqd cycles spent decomposing and loading

  always @(posedge clk_lqd) begin
    if (dut.u_lqd.u_ctrl.busy && dut.u_lqd.u_ctrl.fetched && dut.u_lqd.u_ctrl.stall) n_stall++;
    if (dut.u_lqd.u_pu.v2 && dut.u_lqd.u_pu.v3 && dut.u_lqd.u_pu.cfg2.acc) n_accfwd++;
    if (lqd_done) n_runs++;
    if (lqd_busy || coef_busy) n_lqcyc++;
    if (dut.u_loader.q_we && int'(dut.u_loader.q_wel) == NQ-1) n_loads++;
  end

  function automatic int rnd(input real v);
    return int'($floor(v / 2048.0 + 0.5));
  endfunction
  function automatic int fold(input int v);
    int mm;
    mm = MQ << DATA_FRAC;
    if (v < -mm || v >= mm) n_fold++;
    return v - int'($floor((real'(v) + real'(mm)) / real'(2*mm))) * 2 * mm;
  endfunction
  function automatic int sat(input int v);
    if (v > 16383) return 16383;
    if (v < -16384) return -16384;
    return v;
  endfunction
  function automatic int sat32(input logic [31:0] v);
    if ($signed(v) > 16383) return 16383;
    if ($signed(v) < -16384) return -16384;
    return int'($signed(v));
  endfunction

  task automatic hwrite(input int addr, input real re, input real im);
    @(negedge clk_lqd);
    h_we = 1; h_addr = DAW'(addr); h_wdata = '{re: r2f(re), im: r2f(im)};
    @(negedge clk_lqd);
    h_we = 0;
  endtask
  task automatic hread(input int addr, output cword_t w);
    @(negedge clk_lqd);
    h_re = 1; h_addr = DAW'(addr);
    @(negedge clk_lqd);
    h_re = 0;
    w = h_rdata;
  endtask
  task automatic check_coef(input int got, input real exact, input string what);
    int e;
    e = $rtoi(exact * 2048.0);
    checks++;
    if (got - e > 2 || e - got > 2) begin
      failures++; $display("FAIL %s: got %0d exp %0d", what, got, e);
    end
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      int ec, s;
      checks++;
      n_out++;
      if (exp_cyc.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        ec = exp_cyc.pop_front(); s = exp_sc.pop_front();
        if (ec != cycle) begin failures++; $display("FAIL latency: cycle %0d exp %0d", cycle, ec); end
        for (int i = 0; i < NT; i++) begin
          int er, ei;
          er = exp_re[i].pop_front(); ei = exp_im[i].pop_front();
          checks++;
          if (int'(y_re[i]) != er || int'(y_im[i]) != ei) begin
            failures++; $display("FAIL x^%0d: got %0d,%0d exp %0d,%0d", i+1, y_re[i], y_im[i], er, ei);
          end
        end
        // through the channel: r = H x^, r_i / l_ii folded must give the symbol
        for (int i = 0; i < NT; i++) begin
          real rr, ri, fr, fi;
          int dr, di, tr, ti;
          rr = 0.0; ri = 0.0;
          for (int j = 0; j < NT; j++) begin
            rr += hr[s][i][j] * real'(y_re[j]) / 1024.0 - hi[s][i][j] * real'(y_im[j]) / 1024.0;
            ri += hr[s][i][j] * real'(y_im[j]) / 1024.0 + hi[s][i][j] * real'(y_re[j]) / 1024.0;
          end
          fr = rr / lnn[s][i]; fi = ri / lnn[s][i];
          fr = fr - $floor((fr + MQ) / (2.0*MQ)) * 2.0 * MQ;
          fi = fi - $floor((fi + MQ) / (2.0*MQ)) * 2.0 * MQ;
          dr = 2 * int'($floor(fr / 2.0)) + 1;   // nearest odd level
          di = 2 * int'($floor(fi / 2.0)) + 1;
          tr = sym_re[i].pop_front(); ti = sym_im[i].pop_front();
          checks++;
          if (dr != tr || di != ti) begin
            n_symerr++; failures++;
            $display("FAIL symbol decision stream %0d: %0d,%0d sent %0d,%0d (%g,%g)", i+1, dr, di, tr, ti, fr, fi);
          end
        end
      end
    end
  end

  initial begin
    cword_t w;
    for (int k = 0; k < NT; k++) begin x_re[k] = '0; x_im[k] = '0; end
    x_sc = '0; csi_sc = '0; h_addr = '0; h_wdata = '0; i_addr = '0; i_wdata = '0;
    m = DATA_W'(MQ << DATA_FRAC);
    inv2m = DATA_W'((1 << (DATA_W-1)) / (2*MQ));
    build(prog);
    prog_len = (IAW+1)'(prog.size());
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (prog[k]) begin
      @(negedge clk_lqd);
      i_we = 1; i_addr = IAW'(k); i_wdata = prog[k];
    end
    @(negedge clk_lqd) i_we = 0;
    hwrite(A_ONE, 1.0, 0.0);
    hwrite(A_SCALE, 2048.0, 0.0);

    // ---------------- control phase: one CSI update ----------------
    for (int s = 0; s < NRUN; s++) begin
      real qr[4][4], qi[4][4], lr[4][4], li[4][4];
      for (int n = 0; n < 4; n++)
        for (int j = 0; j < 4; j++) begin
          hr[s][n][j] = (real'($urandom_range(0, 1000)) - 500.0) / 1000.0 + ((n == j) ? 1.5 : 0.0);
          hi[s][n][j] = (real'($urandom_range(0, 1000)) - 500.0) / 1000.0;
          hwrite(hx(n+1, j+1), hr[s][n][j], hi[s][n][j]);
          hr[s][n][j] = f2r(r2f(hr[s][n][j])); hi[s][n][j] = f2r(r2f(hi[s][n][j]));
        end
      for (int n = 0; n < 4; n++) begin
        real vr[4], vi[4], nrm;
        for (int j = 0; j < 4; j++) begin vr[j] = hr[s][n][j]; vi[j] = hi[s][n][j]; end
        for (int k = 0; k < n; k++) begin
          lr[n][k] = 0.0; li[n][k] = 0.0;
          for (int j = 0; j < 4; j++) begin
            lr[n][k] += hr[s][n][j]*qr[k][j] + hi[s][n][j]*qi[k][j];
            li[n][k] += hi[s][n][j]*qr[k][j] - hr[s][n][j]*qi[k][j];
          end
          for (int j = 0; j < 4; j++) begin
            vr[j] -= lr[n][k]*qr[k][j] - li[n][k]*qi[k][j];
            vi[j] -= lr[n][k]*qi[k][j] + li[n][k]*qr[k][j];
          end
        end
        nrm = 0.0;
        for (int j = 0; j < 4; j++) nrm += vr[j]*vr[j] + vi[j]*vi[j];
        nrm = $sqrt(nrm);
        lnn[s][n] = nrm;
        for (int j = 0; j < 4; j++) begin qr[n][j] = vr[j]/nrm; qi[n][j] = vi[j]/nrm; end
      end
      @(negedge clk_lqd);
      csi_sc = SAW'(s); lqd_start = 1;
      @(negedge clk_lqd) lqd_start = 0;
      wait (lqd_done);
      wait (coef_busy);
      wait (!coef_busy);
      checks++;
      if (lqd_illegal) begin failures++; $display("FAIL illegal operation"); end
      if (s == 0) $display("decomposition: %0d cycles per matrix", lqd_cycles);
      for (int i = 2; i <= 4; i++)
        for (int j = 1; j < i; j++) begin
          hread(A_LFIX + lidx(i, j), w);
          lfr[s][lidx(i, j)] = sat32(w.re); lfi[s][lidx(i, j)] = sat32(w.im);
          check_coef(lfr[s][lidx(i, j)], lr[i-1][j-1] / lnn[s][i-1], "L re");
          check_coef(lfi[s][lidx(i, j)], li[i-1][j-1] / lnn[s][i-1], "L im");
        end
      for (int i = 0; i < NQ; i++) begin
        hread(A_WFIX + i, w);
        wfr[s][i] = sat32(w.re); wfi[s][i] = sat32(w.im);
        check_coef(wfr[s][i], qr[i % 4][i / 4], "W re");
        check_coef(wfi[s][i], -qi[i % 4][i / 4], "W im");
      end
    end

    // ---------------- data phase ----------------
    begin
      int prev_sc;
      prev_sc = -1;
      for (int v = 0; v < NVEC; v++) begin
        int xr[NT], xi[NT], tr[NT], ti[NT], s;
        @(negedge clk);
        if ($urandom_range(0, 9) == 0) begin
          x_valid = 0; n_idle++;
          @(negedge clk);
        end
        s = int'($urandom_range(0, NRUN-1));
        if (s != prev_sc && prev_sc >= 0) n_scswitch++;
        prev_sc = s;
        for (int k = 0; k < NT; k++) begin
          xr[k] = 2 * int'($urandom_range(0, 3)) - 3;
          xi[k] = 2 * int'($urandom_range(0, 3)) - 3;
          sym_re[k].push_back(xr[k]); sym_im[k].push_back(xi[k]);
          xr[k] = xr[k] << DATA_FRAC; xi[k] = xi[k] << DATA_FRAC;
          x_re[k] = DATA_W'(xr[k]); x_im[k] = DATA_W'(xi[k]);
        end
        // fixed-point model: cancellation, then weighting
        tr[0] = xr[0]; ti[0] = xi[0];
        for (int i = 1; i < NT; i++) begin
          int ar, ai, idx;
          ar = xr[i]; ai = xi[i];
          for (int j = 0; j < i; j++) begin
            idx = i*(i-1)/2 + j;
            ar -= rnd(real'(lfr[s][idx]) * real'(tr[j]) - real'(lfi[s][idx]) * real'(ti[j]));
            ai -= rnd(real'(lfr[s][idx]) * real'(ti[j]) + real'(lfi[s][idx]) * real'(tr[j]));
          end
          tr[i] = fold(ar); ti[i] = fold(ai);
        end
        for (int i = 0; i < NT; i++) begin
          int sr, si;
          sr = 0; si = 0;
          for (int j = 0; j < NT; j++) begin
            sr += rnd(real'(wfr[s][i*NT+j]) * real'(tr[j]) - real'(wfi[s][i*NT+j]) * real'(ti[j]));
            si += rnd(real'(wfr[s][i*NT+j]) * real'(ti[j]) + real'(wfi[s][i*NT+j]) * real'(tr[j]));
          end
          exp_re[i].push_back(sat(sr)); exp_im[i].push_back(sat(si));
        end
        exp_cyc.push_back(cycle + 5); exp_sc.push_back(s);
        x_sc = SAW'(s); x_valid = 1;
      end
      @(negedge clk) x_valid = 0;
      repeat (10) @(posedge clk);
    end

    checks++;
    if (exp_cyc.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_cyc.size()); end
    $display("decomposition runs %0d, coefficient loads %0d, hazard waits %0d, forwarded accumulations %0d",
             n_runs, n_loads, n_stall, n_accfwd);
    $display("vectors out %0d, modulo folds %0d, subcarrier switches %0d, idle cycles %0d, symbol errors %0d",
             n_out, n_fold, n_scswitch, n_idle, n_symerr);
    $display("CSI update: %0d cycles for %0d subcarriers, %0.3f ms at 400 MHz",
             n_lqcyc, NRUN, real'(n_lqcyc) * 2.5e-6);
    checks += 8;
    // the whole update must fit the 20 ms channel-state interval
    if (real'(n_lqcyc) * 2.5e-6 >= 20.0) begin failures++; $display("FAIL CSI update too slow"); end
    if (n_runs != NRUN)  begin failures++; $display("FAIL decomposition runs"); end
    if (n_loads != NRUN) begin failures++; $display("FAIL coefficient loads"); end
    if (n_stall == 0)    begin failures++; $display("FAIL no hazard wait"); end
    if (n_accfwd == 0)   begin failures++; $display("FAIL no forwarded accumulation"); end
    if (n_fold == 0)     begin failures++; $display("FAIL no modulo fold"); end
    if (n_scswitch == 0) begin failures++; $display("FAIL no subcarrier switch"); end
    if (n_idle == 0)     begin failures++; $display("FAIL no idle cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
