// tb_thp_cmac: self-checking test of the complex multiply-accumulate cell in
// both forms (acc - c*x and acc + c*x). The expected value is computed with
// real arithmetic and round-half-up of each real part of the product.
module tb_thp_cmac;
  localparam int W = 15, FRAC = 10, CFRAC = 11, AW = 19;
  logic signed [AW-1:0] acc_re, acc_im, ys_re, ys_im, ya_re, ya_im;
  logic signed [W-1:0]  c_re, c_im, x_re, x_im;
  int checks = 0, failures = 0;

  thp_cmac #(.SUBTRACT(1'b1)) u_sub (.acc_re, .acc_im, .c_re, .c_im, .x_re, .x_im, .y_re(ys_re), .y_im(ys_im));
  thp_cmac #(.SUBTRACT(1'b0)) u_add (.acc_re, .acc_im, .c_re, .c_im, .x_re, .x_im, .y_re(ya_re), .y_im(ya_im));

  function automatic int rnd(input real v);
    return int'($floor(v / real'(1 << CFRAC) + 0.5));
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int ar, ai, cr, ci, xr, xi, pr, pi;
      ar = int'($urandom_range(0, 40000)) - 20000;
      ai = int'($urandom_range(0, 40000)) - 20000;
      cr = int'($urandom_range(0, 32767)) - 16384;
      ci = int'($urandom_range(0, 32767)) - 16384;
      xr = int'($urandom_range(0, 32767)) - 16384;
      xi = int'($urandom_range(0, 32767)) - 16384;
      acc_re = AW'(ar); acc_im = AW'(ai);
      c_re = W'(cr); c_im = W'(ci); x_re = W'(xr); x_im = W'(xi);
      #1;
      pr = rnd(real'(cr) * real'(xr) - real'(ci) * real'(xi));
      pi = rnd(real'(cr) * real'(xi) + real'(ci) * real'(xr));
      check(int'(ys_re), ar - pr, "sub re");
      check(int'(ys_im), ai - pi, "sub im");
      check(int'(ya_re), ar + pr, "add re");
      check(int'(ya_im), ai + pi, "add im");
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
