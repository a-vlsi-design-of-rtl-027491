// tb_thp_coef_mem: self-checking test of the per-subcarrier coefficient
// memory (the 16-element Q^H configuration at full depth). Writes every
// element of random subcarriers, element by element, keeps a model copy, and
// checks whole-entry reads with their one-cycle latency, including a read of
// a word being written in the same cycle (old data expected). Both ports
// run on one clock here; the two-clock use is exercised by the top-level test.
module tb_thp_coef_mem;
  localparam int W = 15, NE = 16, DEPTH = 480;
  logic clk = 0, we = 0, re = 0;
  logic [8:0] waddr, raddr;
  logic [3:0] wel;
  logic signed [W-1:0] wdata_re, wdata_im;
  logic signed [W-1:0] rdata_re [NE], rdata_im [NE];
  int checks = 0, failures = 0;
  int model_re [DEPTH][NE], model_im [DEPTH][NE];
  bit written [DEPTH];

  thp_coef_mem #(.W(W), .NE(NE), .DEPTH(DEPTH)) dut (.wclk(clk), .rclk(clk), .*);
  always #5 clk = ~clk;

  initial begin
    waddr = '0; raddr = '0; wel = '0; wdata_re = '0; wdata_im = '0;
    for (int n = 0; n < 6000; n++) begin
      int a, e, r, vr, vi;
      bit dor;
      @(negedge clk);
      a = int'($urandom_range(0, DEPTH-1)); e = int'($urandom_range(0, NE-1));
      vr = int'($urandom_range(0, 32767)) - 16384; vi = int'($urandom_range(0, 32767)) - 16384;
      we = 1; waddr = 9'(a); wel = 4'(e); wdata_re = W'(vr); wdata_im = W'(vi);
      // read an entry that has been written before (sometimes the one being written)
      dor = 0;
      r = (n % 7 == 0) ? a : int'($urandom_range(0, DEPTH-1));
      if (written[r]) begin re = 1; raddr = 9'(r); dor = 1; end else re = 0;
      @(posedge clk);
      #1;
      if (dor) begin
        for (int k = 0; k < NE; k++) begin
          checks++;
          if (int'(rdata_re[k]) != model_re[r][k] || int'(rdata_im[k]) != model_im[r][k]) begin
            failures++; $display("FAIL sc %0d el %0d: got %0d,%0d exp %0d,%0d", r, k,
                                 rdata_re[k], rdata_im[k], model_re[r][k], model_im[r][k]);
          end
        end
      end
      model_re[a][e] = vr; model_im[a][e] = vi;
      if (e == NE-1 && !written[a]) begin
        // make the entry fully defined before it is read: fill the rest
        for (int k = 0; k < NE-1; k++) begin
          @(negedge clk);
          re = 0; wel = 4'(k); wdata_re = W'(k * 3 - a); wdata_im = W'(a - k);
          model_re[a][k] = k * 3 - a; model_im[a][k] = a - k;
        end
        written[a] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
