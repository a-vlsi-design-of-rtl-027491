// tb_thp_wcm: self-checking test of the arrayed weight multiplication unit.
// Feeds random vectors x~ in the staircase order the unit expects (lane k
// k-1 cycles after lane 1) with a random 4x4 complex matrix per vector, and
// compares x^ = W x~ (each product rounded, result saturated to 15 bits) with a
// direct evaluation. Checks that x^ appears exactly four cycles after lane 1.
module tb_thp_wcm;
  localparam int W = 15, FRAC = 10, CFRAC = 11, NT = 4, NQ = 16;
  localparam int NVEC = 400;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] xt_re [NT], xt_im [NT], w_re [NQ], w_im [NQ];
  logic signed [W-1:0] y_re [NT], y_im [NT];
  logic out_valid;
  int checks = 0, failures = 0, cycle = 0, sat_seen = 0;
  // per-cycle lane data: lane_re[c][k] = value to show on lane k in cycle c
  int lane_re [int][NT], lane_im [int][NT];
  int exp_re [NT][$], exp_im [NT][$], exp_cyc [$];

  thp_wcm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int rnd(input real v);
    return int'($floor(v / real'(1 << CFRAC) + 0.5));
  endfunction
  function automatic int sat(input int v);
    if (v > 16383) return 16383;
    if (v < -16384) return -16384;
    return v;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int ec;
      checks++;
      if (exp_cyc.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        ec = exp_cyc.pop_front();
        if (cycle != ec) begin failures++; $display("FAIL latency: cycle %0d exp %0d", cycle, ec); end
        for (int i = 0; i < NT; i++) begin
          int er, ei;
          er = exp_re[i].pop_front(); ei = exp_im[i].pop_front();
          checks++;
          if (int'(y_re[i]) != er || int'(y_im[i]) != ei) begin
            failures++;
            $display("FAIL row %0d: got %0d,%0d exp %0d,%0d", i+1, y_re[i], y_im[i], er, ei);
          end
        end
      end
    end
  end

  initial begin
    int c0;
    for (int k = 0; k < NT; k++) begin xt_re[k] = '0; xt_im[k] = '0; end
    for (int k = 0; k < NQ; k++) begin w_re[k] = '0; w_im[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    c0 = cycle;
    for (int t = 0; t < NVEC + NT; t++) begin
      // lanes of earlier vectors that are due now
      for (int k = 0; k < NT; k++) begin
        if (lane_re.exists(cycle) && t >= 0) begin
          xt_re[k] = W'(lane_re[cycle][k]); xt_im[k] = W'(lane_im[cycle][k]);
        end else begin
          xt_re[k] = W'($urandom); xt_im[k] = W'($urandom);
        end
      end
      if (t < NVEC && $urandom_range(0, 4) != 0) begin
        int xr[NT], xi[NT], wr[NQ], wi[NQ], er[NT], ei[NT];
        bit big;
        big = ($urandom_range(0, 9) == 0);
        for (int k = 0; k < NT; k++) begin
          xr[k] = big ? 16383 - int'($urandom_range(0, 100)) : int'($urandom_range(0, 8191)) - 4096;
          xi[k] = big ? -16384 + int'($urandom_range(0, 100)) : int'($urandom_range(0, 8191)) - 4096;
        end
        for (int n = 0; n < NQ; n++) begin
          wr[n] = big ? 2047 : int'($urandom_range(0, 4095)) - 2048;
          wi[n] = big ? -2047 : int'($urandom_range(0, 4095)) - 2048;
          w_re[n] = W'(wr[n]); w_im[n] = W'(wi[n]);
        end
        for (int i = 0; i < NT; i++) begin
          int sr, si;
          sr = 0; si = 0;
          for (int j = 0; j < NT; j++) begin
            sr += rnd(real'(wr[i*NT+j]) * real'(xr[j]) - real'(wi[i*NT+j]) * real'(xi[j]));
            si += rnd(real'(wr[i*NT+j]) * real'(xi[j]) + real'(wi[i*NT+j]) * real'(xr[j]));
          end
          if (sr != sat(sr) || si != sat(si)) sat_seen++;
          er[i] = sat(sr); ei[i] = sat(si);
        end
        for (int i = 0; i < NT; i++) begin exp_re[i].push_back(er[i]); exp_im[i].push_back(ei[i]); end
        exp_cyc.push_back(cycle + NT);
        // lane 1 now, lane k in cycle + k - 1
        xt_re[0] = W'(xr[0]); xt_im[0] = W'(xi[0]);
        for (int k = 1; k < NT; k++) begin
          lane_re[cycle + k][k] = xr[k]; lane_im[cycle + k][k] = xi[k];
        end
        in_valid = 1;
      end else begin
        in_valid = 0;
        for (int n = 0; n < NQ; n++) begin w_re[n] = W'($urandom); w_im[n] = W'($urandom); end
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_cyc.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("saturating vectors: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
