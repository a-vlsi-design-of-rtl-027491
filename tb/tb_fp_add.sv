// tb_fp_add: self-checking test of the single-precision adder/subtractor (both operations, including near-cancelling operands).
// Random normal operands; the exact result is computed in double precision
// from the operand bit patterns and the output must lie within one unit in
// the last place (truncation) of it. A few exact cases are checked bit for bit.
module tb_fp_add;
  import tb_fp_pkg::*;
  logic [31:0] a, b, y;
  logic sub;
  int checks = 0, failures = 0;

  fp_add dut (.a, .b, .sub, .y);

  task automatic expect_bits(input logic [31:0] exp, input string what);
    #1;
    checks++;
    if (y !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, y, exp); end
  endtask

  initial begin
    sub = 0; b = 32'h3f80_0000;
    for (int n = 0; n < 5000; n++) begin
      real exact;
      a = rand_f(40); b = rand_f(40); sub = 1'($urandom);
      if ("add" == "sqrt") a[31] = 1'b0;
      if ("add" == "add" && n % 4 == 0) b = {b[31], a[30:23], b[22:0]};   // equal exponents
      if ("add" == "add" && n % 8 == 1) b = {a[31], a[30:8], 8'($urandom)}; // near cancellation
      #1;
      exact = sub ? f2r(a) - f2r(b) : f2r(a) + f2r(b);
      checks++;
      if (!close(f2r(y), exact, 1.0)) begin
        failures++;
        $display("FAIL a=%h b=%h sub=%0d y=%h (%g) exact %g", a, b, sub, y, f2r(y), exact);
      end
    end
    // exact cases
    a = 32'h4040_0000; b = 32'h4000_0000; sub = 0;   // 3, 2
    case ("add")
      "mul":  expect_bits(32'h40c0_0000, "3*2");
      "add":  expect_bits(32'h40a0_0000, "3+2");
      "div":  expect_bits(32'h3fc0_0000, "3/2");
      default: begin a = 32'h4110_0000; expect_bits(32'h4040_0000, "sqrt 9"); end
    endcase
    a = 32'h0000_0000; b = 32'h4000_0000;
    case ("add")
      "mul":  expect_bits(32'h0000_0000, "0*2");
      "add":  expect_bits(32'h4000_0000, "0+2");
      "div":  expect_bits(32'h0000_0000, "0/2");
      default: expect_bits(32'h0000_0000, "sqrt 0");
    endcase
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
