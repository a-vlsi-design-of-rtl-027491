// tb_thp_ic: self-checking test of the arrayed interference cancellation unit.
// Streams random symbol vectors (with gaps) and random coefficient sets
// through the unit with a 16-QAM window (M = 4) and compares every lane with
// the cancellation equations evaluated directly, lane by lane, in the
// testbench. Also checks the staircase latency: x~1 and x~2 one cycle, x~3
// two cycles and x~4 three cycles after the vector enters.
module tb_thp_ic;
  localparam int W = 15, FRAC = 10, CFRAC = 11, NT = 4, NL = 6;
  localparam int MREAL = 4;
  localparam int NVEC = 400;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] x_re [NT], x_im [NT], l_re [NL], l_im [NL];
  logic [W-1:0] m, inv2m;
  logic signed [W-1:0] xt_re [NT], xt_im [NT];
  logic xt_valid [NT];
  int checks = 0, failures = 0, cycle = 0;
  int exp_re [NT][$], exp_im [NT][$], exp_cyc [NT][$];
  localparam int LAT [NT] = '{1, 1, 2, 3};

  thp_ic dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int rnd(input real v);
    return int'($floor(v / real'(1 << CFRAC) + 0.5));
  endfunction
  function automatic int fold(input int v);
    int mm = MREAL << FRAC;
    return v - int'($floor((real'(v) + real'(mm)) / real'(2*mm))) * 2 * mm;
  endfunction

  // reference: x~_i = Mod(x_i - sum_j L_ij x~_j), x~_1 = x_1
  task automatic model(input int xr[NT], input int xi[NT], input int lr[NL], input int li[NL],
                       output int tr[NT], output int ti[NT]);
    int idx;
    tr[0] = xr[0]; ti[0] = xi[0];
    for (int i = 1; i < NT; i++) begin
      int ar, ai;
      ar = xr[i]; ai = xi[i];
      for (int j = 0; j < i; j++) begin
        idx = i*(i-1)/2 + j;
        ar -= rnd(real'(lr[idx]) * real'(tr[j]) - real'(li[idx]) * real'(ti[j]));
        ai -= rnd(real'(lr[idx]) * real'(ti[j]) + real'(li[idx]) * real'(tr[j]));
      end
      tr[i] = fold(ar); ti[i] = fold(ai);
    end
  endtask

  always @(posedge clk) begin
    for (int k = 0; k < NT; k++) begin
      if (rst_n && xt_valid[k]) begin
        checks++;
        if (exp_re[k].size() == 0) begin
          failures++; $display("FAIL lane %0d: unexpected output", k+1);
        end else begin
          int er, ei, ec;
          er = exp_re[k].pop_front(); ei = exp_im[k].pop_front(); ec = exp_cyc[k].pop_front();
          if (int'(xt_re[k]) != er || int'(xt_im[k]) != ei || cycle != ec) begin
            failures++;
            $display("FAIL lane %0d cyc %0d(exp %0d): got %0d,%0d exp %0d,%0d", k+1, cycle, ec,
                     xt_re[k], xt_im[k], er, ei);
          end
        end
      end
    end
  end

  initial begin
    int sent = 0;
    m = W'(MREAL << FRAC);
    inv2m = W'((1 << (W-1)) / (2*MREAL));
    for (int k = 0; k < NT; k++) begin x_re[k] = '0; x_im[k] = '0; end
    for (int k = 0; k < NL; k++) begin l_re[k] = '0; l_im[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (sent < NVEC) begin
      @(negedge clk);
      if ($urandom_range(0, 3) != 0) begin
        int xr[NT], xi[NT], lr[NL], li[NL], tr[NT], ti[NT];
        for (int k = 0; k < NT; k++) begin
          xr[k] = int'($urandom_range(0, 2*(MREAL << FRAC) - 1)) - (MREAL << FRAC);
          xi[k] = int'($urandom_range(0, 2*(MREAL << FRAC) - 1)) - (MREAL << FRAC);
          x_re[k] = W'(xr[k]); x_im[k] = W'(xi[k]);
        end
        for (int k = 0; k < NL; k++) begin
          lr[k] = int'($urandom_range(0, 6144)) - 3072;
          li[k] = int'($urandom_range(0, 6144)) - 3072;
          l_re[k] = W'(lr[k]); l_im[k] = W'(li[k]);
        end
        model(xr, xi, lr, li, tr, ti);
        for (int k = 0; k < NT; k++) begin
          exp_re[k].push_back(tr[k]); exp_im[k].push_back(ti[k]);
          exp_cyc[k].push_back(cycle + LAT[k]);
        end
        in_valid = 1;
        sent++;
      end else begin
        in_valid = 0;
        for (int k = 0; k < NL; k++) begin l_re[k] = W'($urandom); l_im[k] = W'($urandom); end
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
    for (int k = 0; k < NT; k++) begin
      checks++;
      if (exp_re[k].size() != 0) begin failures++; $display("FAIL lane %0d: missing outputs", k+1); end
    end
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
