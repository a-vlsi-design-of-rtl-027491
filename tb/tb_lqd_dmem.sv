// tb_lqd_dmem: self-checking test of the processor's data memory at full
// size (2048 complex words): random writes and simultaneous reads on both
// read ports, compared with a model, including read-during-write (old data).
module tb_lqd_dmem;
  import lqd_pkg::*;
  logic clk = 0, ra_en = 0, rb_en = 0, w_en = 0;
  logic [10:0] ra_addr, rb_addr, w_addr;
  cword_t ra_data, rb_data, w_data;
  logic [63:0] model [N];
  bit valid [N];
  int checks = 0, failures = 0;

  lqd_dmem dut (.*);
  always #5 clk = ~clk;

  initial begin
    ra_addr = '0; rb_addr = '0; w_addr = '0; w_data = '0;
    // fill all words first
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      w_en = 1; w_addr = 11'(a); w_data = {$urandom, $urandom};
      model[a] = w_data;
    end
    for (int n = 0; n < 5000; n++) begin
      logic [63:0] ea, eb;
      @(negedge clk);
      ra_en = 1; rb_en = 1;
      ra_addr = 11'($urandom_range(0, N-1));
      rb_addr = (n % 5 == 0) ? w_addr : 11'($urandom_range(0, N-1));
      ea = model[ra_addr]; eb = model[rb_addr];
      w_en = 1; w_addr = (n % 5 == 1) ? rb_addr : 11'($urandom_range(0, N-1));
      w_data = {$urandom, $urandom};
      @(posedge clk);
      model[w_addr] = w_data;
      #1;
      checks += 2;
      if (ra_data !== ea) begin failures++; $display("FAIL port A @%0d", ra_addr); end
      if (rb_data !== eb) begin failures++; $display("FAIL port B @%0d", rb_addr); end
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
