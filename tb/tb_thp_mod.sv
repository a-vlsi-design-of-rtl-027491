// tb_thp_mod: self-checking test of the complex modulo fold.
// Drives random values for the window sizes of QPSK, 16-QAM and 64-QAM
// (M = 2, 4, 8) and compares each part with x - floor((x+M)/(2M))*2M worked
// out in real arithmetic. Also checks that every output lies in [-M, M).
module tb_thp_mod;
  localparam int W = 15, FRAC = 10, IN_W = 19;
  logic signed [IN_W-1:0] x_re, x_im;
  logic [W-1:0] m, inv2m;
  logic signed [W-1:0] y_re, y_im;
  int checks = 0, failures = 0;

  thp_mod #(.W(W), .FRAC(FRAC), .IN_W(IN_W)) dut (.*);

  function automatic int ref_fold(input int x, input int mm);
    real q;
    q = $floor((real'(x) + real'(mm)) / (2.0 * real'(mm)));
    return x - int'(q) * 2 * mm;
  endfunction

  task automatic check(input int got, input int exp, input int mm, input string what);
    checks++;
    if (got != exp || got < -mm || got >= mm) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d (M=%0d)", what, got, exp, mm);
    end
  endtask

  initial begin
    int ms [3] = '{2, 4, 8};
    for (int s = 0; s < 3; s++) begin
      m     = W'(ms[s] << FRAC);
      inv2m = W'((1 << (W-1)) / (2*ms[s]));
      for (int n = 0; n < 400; n++) begin
        int a, b;
        a = int'($urandom_range(0, 2*60000)) - 60000;
        b = (n < 8) ? (n - 4) * (ms[s] << FRAC) : int'($urandom_range(0, 2*60000)) - 60000;
        x_re = IN_W'(a); x_im = IN_W'(b);
        #1;
        check(int'(y_re), ref_fold(a, ms[s] << FRAC), ms[s] << FRAC, "re");
        check(int'(y_im), ref_fold(b, ms[s] << FRAC), ms[s] << FRAC, "im");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
