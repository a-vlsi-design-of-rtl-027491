// tb_lqd_imem: self-checking test of the processor's instruction memory:
// writes every word, then reads random addresses with the one-cycle latency
// and checks that the output holds while r_en is low.
module tb_lqd_imem;
  import lqd_pkg::*;
  logic clk = 0, w_en = 0, r_en = 0;
  logic [8:0] w_addr, r_addr;
  instr_t w_data, r_data, model [IDEPTH], last;
  int checks = 0, failures = 0;

  lqd_imem dut (.*);
  always #5 clk = ~clk;

  initial begin
    w_addr = '0; r_addr = '0; w_data = '0;
    for (int a = 0; a < IDEPTH; a++) begin
      @(negedge clk);
      w_en = 1; w_addr = 9'(a); w_data = instr_t'({$urandom, $urandom});
      model[a] = w_data;
    end
    @(negedge clk) w_en = 0;
    last = '0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      r_en = ($urandom_range(0, 3) != 0);
      r_addr = 9'($urandom_range(0, IDEPTH-1));
      if (r_en) last = model[r_addr];
      @(posedge clk);
      #1;
      if (n > 0 || r_en) begin
        checks++;
        if (r_data !== last) begin failures++; $display("FAIL read: got %h exp %h", r_data, last); end
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
