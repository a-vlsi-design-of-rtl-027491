// tb_thp_coef_loader: self-checking test of the coefficient loader. A small
// behavioural memory stands in for the processor's data memory (one-cycle
// read). After start, the loader must read the 22 result words, write six L
// elements and sixteen Q^H elements of the chosen subcarrier with values
// saturated to 15 bits, and drop busy; checked against the source words.
module tb_thp_coef_loader;
  import lqd_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [8:0] sc;
  logic rd_en;
  logic [DAW-1:0] rd_addr;
  cword_t rd_data;
  logic l_we, q_we;
  logic [8:0] l_waddr, q_waddr;
  logic [2:0] l_wel;
  logic [3:0] q_wel;
  logic signed [14:0] wdata_re, wdata_im;
  int checks = 0, failures = 0, nl, nq, nsat;
  logic [31:0] src_re [256], src_im [256];
  longint t0;

  thp_coef_loader dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rd_en) rd_data <= '{re: src_re[rd_addr[7:0]], im: src_im[rd_addr[7:0]]};

  function automatic int sat(input logic [31:0] v);
    if ($signed(v) > 16383) return 16383;
    if ($signed(v) < -16384) return -16384;
    return int'($signed(v));
  endfunction

  always @(posedge clk) begin
    if (rst_n && (l_we || q_we)) begin
      int a, er, ei;
      checks++;
      a = l_we ? 128 + int'(l_wel) : 144 + int'(q_wel);
      er = sat(src_re[a]); ei = sat(src_im[a]);
      if (er != int'(wdata_re) || ei != int'(wdata_im) || (l_we && q_we) ||
          (l_we ? l_waddr : q_waddr) != sc) begin
        failures++; $display("FAIL word %0d: got %0d,%0d exp %0d,%0d", a, wdata_re, wdata_im, er, ei);
      end
      if (er == 16383 || er == -16384) nsat++;
      if (l_we) nl++; else nq++;
    end
  end

  initial begin
    rd_data = '0;
    for (int rep = 0; rep < 20; rep++) begin
      for (int a = 0; a < 256; a++) begin
        src_re[a] = (a % 11 == 0) ? $urandom : 32'(int'($urandom_range(0, 40000)) - 20000);
        src_im[a] = 32'(int'($urandom_range(0, 40000)) - 20000);
      end
      sc = 9'($urandom_range(0, 479));
      nl = 0; nq = 0;
      repeat (2) @(posedge clk);
      rst_n <= 1;
      @(negedge clk) start = 1; t0 = $time;
      @(negedge clk) start = 0;
      wait (!busy);
      checks += 3;
      if (nl != 6)  begin failures++; $display("FAIL %0d L writes", nl); end
      if (nq != 16) begin failures++; $display("FAIL %0d Q writes", nq); end
      if (($time - t0) / 10 > 24) begin failures++; $display("FAIL took %0d cycles", ($time - t0) / 10); end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL saturation not exercised"); end
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
