// tb_lqd_pu: self-checking test of the processing unit. Issues one random
// operation per cycle (all supported codes, accumulative ones in runs so
// the forwarded accumulator is exercised back to back, and some unsupported
// codes) and compares each result, three cycles later, with a model that
// evaluates the operation in double precision and keeps its own
// accumulator. Unsupported codes must give no result and raise `illegal`.
module tb_lqd_pu;
  import lqd_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [OPW-1:0] op;
  cword_t a, b, y;
  logic [DAW-1:0] tag_in, tag_out;
  logic out_valid, illegal;
  int checks = 0, failures = 0, cycle = 0;
  real acc_re = 0.0, acc_im = 0.0;
  real exp_re [$], exp_im [$], exp_scale [$];
  real scale, run_scale = 0.0;   // run_scale: error budget carried by the accumulator
  int  exp_tag [$], exp_cyc [$], ill_cyc [$];
  int  bits_mode [$];     // 1: compare bits exactly (data movement, conversions)
  logic [63:0] exp_bits [$];
  int  n_acc_b2b = 0, dbg_op;
  int  exp_op [$];

  lqd_pu dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real mag(input real v);
    return v < 0.0 ? -v : v;
  endfunction
  function automatic real sgn(input logic [31:0] f);
    return f[31] ? -1.0 : 1.0;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        real er, ei, tol;
        int mode, t, c;
        logic [63:0] eb;
        checks++;
        er = exp_re.pop_front(); ei = exp_im.pop_front(); t = exp_tag.pop_front();
        c = exp_cyc.pop_front(); mode = bits_mode.pop_front(); eb = exp_bits.pop_front(); dbg_op = exp_op.pop_front();
        tol = exp_scale.pop_front() * 8.0 / 8388608.0;
        if (mode == 1) begin
          if (y !== eb || int'(tag_out) != t || cycle != c) begin
            failures++; $display("FAIL bits: got %h exp %h tag %0d/%0d cyc %0d/%0d", y, eb, tag_out, t, cycle, c);
          end
        end else begin
          // error bound: a few units in the last place of the largest term
          if (f2r(y.re) - er > tol || er - f2r(y.re) > tol) begin
            failures++; $display("FAIL re: got %.12g exp %.12g tol %g op %0d", f2r(y.re), er, tol, dbg_op);
          end
          if (f2r(y.im) - ei > tol || ei - f2r(y.im) > tol) begin
            failures++; $display("FAIL im: got %g exp %g", f2r(y.im), ei);
          end
          if (int'(tag_out) != t || cycle != c) begin
            failures++; $display("FAIL tag/latency: tag %0d/%0d cycle %0d/%0d", tag_out, t, cycle, c);
          end
        end
      end
      if (illegal) begin
        checks++;
        if (ill_cyc.size() == 0 || ill_cyc.pop_front() != cycle) begin
          failures++; $display("FAIL unexpected illegal pulse");
        end
      end
    end
  end

  task automatic push(input real r, input real i, input int mode, input logic [63:0] bits);
    exp_re.push_back(r); exp_im.push_back(i); exp_scale.push_back(scale); exp_tag.push_back(int'(tag_in));
    exp_cyc.push_back(cycle + 3); bits_mode.push_back(mode); exp_bits.push_back(bits); exp_op.push_back(int'(op));
  endtask

  initial begin
    int prev_acc = 0;
    a = '0; b = '0; op = '0; tag_in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      int code;
      real ar, ai, br, bi, rr, ri;
      code = int'($urandom_range(0, 27));
      if (prev_acc != 0 && $urandom_range(0, 1) == 1) code = prev_acc;  // runs of accumulation
      a = '{re: rand_f(8), im: rand_f(8)};
      b = '{re: rand_f(8), im: rand_f(8)};
      if (code == 9) a.re[31] = 1'b0;
      if (code == 24) begin a.re = 32'($urandom) >>> $urandom_range(0, 30); a.im = -32'($urandom_range(0, 1000)); end
      if (code == 25) begin a.re = rand_f(12); a.im = rand_f(12); end
      ar = f2r(a.re); ai = f2r(a.im); br = f2r(b.re); bi = f2r(b.im);
      scale = mag(acc_re) + mag(acc_im) + mag(ar) + mag(ai) + mag(br) + mag(bi) +
              mag(ar*br) + mag(ai*bi) + mag(ar*bi) + mag(ai*br) + mag(ar/br) + mag(ar/bi) + 1.0e-20;
      if (code == 4 || code == 5 || code == 6 || code == 7 || code == 11) scale += run_scale;
      run_scale = scale;
      op = OPW'(code); tag_in = DAW'($urandom); in_valid = 1;
      case (code)
        0:  begin rr = ar + br; ri = ai + bi; end
        1:  begin rr = ar - br; ri = ai - bi; end
        2:  begin rr = ar*br - ai*bi; ri = ar*bi + ai*br; end
        3:  begin rr = ar*br; ri = ai*br; end
        4:  begin rr = acc_re + (ar + br); ri = acc_im + (ai + bi); end
        5:  begin rr = acc_re + (ar - br); ri = acc_im + (ai - bi); end
        6:  begin rr = acc_re + (ar*br - ai*bi); ri = acc_im + (ar*bi + ai*br); end
        7:  begin rr = acc_re + ar*br; ri = acc_im + ai*br; end
        8:  begin rr = ar / br; ri = ar / bi; end
        9:  begin rr = $sqrt(ar); ri = 0.0; end
        10: begin rr = ar*br + ai*bi; ri = 0.0; end
        11: begin rr = acc_re + ar*br + ai*bi; ri = acc_im; end
        12: begin rr = ar*br + ai*bi; ri = ar*bi - ai*br; end
        default: begin rr = 0.0; ri = 0.0; end
      endcase
      if (code == 4 || code == 5 || code == 6 || code == 7 || code == 11) begin
        if (prev_acc != 0) n_acc_b2b++;
      end
      case (code)
        0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12: begin
          push(rr, ri, 0, '0);
          acc_re = rr; acc_im = ri;
        end
        14, 15, 20, 21, 22, 23, 24, 25: begin
          logic [63:0] eb;
          case (code)
            14: eb = {a.re, ~a.im[31], a.im[30:0]};
            15: eb = a;
            20: eb = {a.re, b.re};
            21: eb = {a.re, 32'd0};
            22: eb = {a.im, 32'd0};
            23: eb = {a.re[31], 31'h3f80_0000, a.im[31], 31'h3f80_0000};
            24: eb = {r2f_int(a.re), r2f_int(a.im)};
            default: eb = {f2i_ref(a.re), f2i_ref(a.im)};
          endcase
          push(0.0, 0.0, 1, eb);
          acc_re = (code == 25) ? 0.0 : f2r(eb[63:32]);
          acc_im = (code == 25) ? 0.0 : f2r(eb[31:0]);
          // after an integer result the model's accumulator is unknown as a real
          if (code == 25) prev_acc = 0;
        end
        default: ill_cyc.push_back(cycle + 3);
      endcase
      prev_acc = (code == 4 || code == 5 || code == 6 || code == 7 || code == 11) ? code :
                 ((code == 0 || code == 2 || code == 3 || code == 10) && code != 25 ? 6 : 0);
      if (code == 25) begin
        // restart accumulation from a known value
        prev_acc = 0;
      end
      @(negedge clk);
      if (code == 25) begin
        // a non-accumulative operation reloads the accumulator with a real value
        in_valid = 1; op = OPW'(OP_CADD); a = '{re: rand_f(4), im: rand_f(4)}; b = a;
        scale = 4.0 * (mag(f2r(a.re)) + mag(f2r(a.im)));
        push(2.0*f2r(a.re), 2.0*f2r(a.im), 0, '0);
        acc_re = 2.0*f2r(a.re); acc_im = 2.0*f2r(a.im);
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_re.size() != 0 || ill_cyc.size() != 0) begin failures++; $display("FAIL missing results"); end
    checks++;
    if (n_acc_b2b < 100) begin failures++; $display("FAIL too few back-to-back accumulations"); end
    $display("back-to-back accumulative operations: %0d", n_acc_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // integer -> float reference (exact for |v| < 2^24, truncating above)
  function automatic logic [31:0] r2f_int(input logic [31:0] v);
    real r;
    r = real'($signed(v));
    return tb_lqd_prog_pkg::r2f(r);
  endfunction
  function automatic logic [31:0] f2i_ref(input logic [31:0] f);
    real r;
    r = f2r(f);
    if (r >= 2147483647.0) return 32'h7fff_ffff;
    if (r <= -2147483648.0) return 32'h8000_0000;
    return 32'($rtoi(r));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
