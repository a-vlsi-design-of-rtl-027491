// thp_ic: interference cancellation unit, arrayed pipelined form.
//
// Computes the successive cancellation with precomputed ratios
// L_ij = l_ij / l_jj:
//   x~1 = x1
//   x~2 = Mod(x2 - L21 x~1)
//   x~3 = Mod(x3 - L31 x~1 - L32 x~2)
//   x~4 = Mod(x4 - L41 x~1 - L42 x~2 - L43 x~3)
// Instead of one long chain per row, each row is a line of single
// multiply-subtract cells (M1S1) with a register after each cell that does
// not end in a fold, so no path holds more than one M1S1 and one Mod:
//   row 1 : x1 ------------------------------------------> reg -> x~1
//   row 2 : M1S1(x2, L21, x1) -> Mod ---------------------> reg -> x~2
//   row 3 : M1S1(x3, L31, x1) -> reg -> M1S1(., L32, x~2) -> Mod -> reg -> x~3
//   row 4 : M1S1(x4, L41, x1) -> reg -> M1S1(., L42, x~2) -> reg
//                              -> M1S1(., L43, x~3) -> Mod -> reg -> x~4
// The cells of rows 3 and 4 take x~2 and x~3 from their output registers, so
// every cell works on values of the same symbol vector. The row structure,
// the six cells, three folds and the three inserted registers follow the
// design description; the coefficient delay registers (L32, L42 one cycle,
// L43 two cycles) are this implementation's addition so that a new
// coefficient set can accompany every symbol vector (one per subcarrier).
//
// Timing: one symbol vector per clock. For a vector presented with in_valid in
// cycle t, x~1 and x~2 are valid in t+1, x~3 in t+2 and x~4 in t+3
// (xt_valid[k] marks lane k). This staircase is what the WCM unit consumes.
// m and inv2m are configuration inputs and must be stable while data flows.
// Reset (synchronous, active low) clears only the valid flags.
module thp_ic
  import thp_pkg::*;
#(
  parameter int W     = DATA_W,
  parameter int FRAC  = DATA_FRAC,
  parameter int CFRAC = COEF_FRAC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_re  [NT],   // x1..x4
  input  logic signed [W-1:0] x_im  [NT],
  input  logic signed [W-1:0] l_re  [NL],   // L21 L31 L32 L41 L42 L43
  input  logic signed [W-1:0] l_im  [NL],
  input  logic        [W-1:0] m,            // modulo window M
  input  logic        [W-1:0] inv2m,        // 1/(2M)
  output logic signed [W-1:0] xt_re [NT],   // x~1..x~4 (staircase timing)
  output logic signed [W-1:0] xt_im [NT],
  output logic                xt_valid [NT]
);
  localparam int AW = W + GUARD;
  localparam int L21 = 0, L31 = 1, L32 = 2, L41 = 3, L42 = 4, L43 = 5;

  // ---- combinational cells ----
  logic signed [AW-1:0] r2_re, r2_im;     // row 2 M1S1
  logic signed [AW-1:0] r3a_re, r3a_im;   // row 3 first M1S1
  logic signed [AW-1:0] r3b_re, r3b_im;   // row 3 second M1S1
  logic signed [AW-1:0] r4a_re, r4a_im;
  logic signed [AW-1:0] r4b_re, r4b_im;
  logic signed [AW-1:0] r4c_re, r4c_im;
  logic signed [W-1:0]  f2_re, f2_im, f3_re, f3_im, f4_re, f4_im;  // fold outputs

  // ---- registers ----
  logic signed [AW-1:0] p3_re, p3_im;     // inserted register, row 3
  logic signed [AW-1:0] p4a_re, p4a_im;   // inserted registers, row 4
  logic signed [AW-1:0] p4b_re, p4b_im;
  logic signed [W-1:0]  l32_d1_re, l32_d1_im, l42_d1_re, l42_d1_im;
  logic signed [W-1:0]  l43_d1_re, l43_d1_im, l43_d2_re, l43_d2_im;
  logic                 v1, v2, v3;

  thp_cmac #(.W(W), .FRAC(FRAC), .CFRAC(CFRAC), .ACC_W(AW), .SUBTRACT(1'b1)) u_m1s1_21 (
    .acc_re(AW'(x_re[1])), .acc_im(AW'(x_im[1])), .c_re(l_re[L21]), .c_im(l_im[L21]),
    .x_re(x_re[0]), .x_im(x_im[0]), .y_re(r2_re), .y_im(r2_im));
  thp_cmac #(.W(W), .FRAC(FRAC), .CFRAC(CFRAC), .ACC_W(AW), .SUBTRACT(1'b1)) u_m1s1_31 (
    .acc_re(AW'(x_re[2])), .acc_im(AW'(x_im[2])), .c_re(l_re[L31]), .c_im(l_im[L31]),
    .x_re(x_re[0]), .x_im(x_im[0]), .y_re(r3a_re), .y_im(r3a_im));
  thp_cmac #(.W(W), .FRAC(FRAC), .CFRAC(CFRAC), .ACC_W(AW), .SUBTRACT(1'b1)) u_m1s1_41 (
    .acc_re(AW'(x_re[3])), .acc_im(AW'(x_im[3])), .c_re(l_re[L41]), .c_im(l_im[L41]),
    .x_re(x_re[0]), .x_im(x_im[0]), .y_re(r4a_re), .y_im(r4a_im));
  thp_cmac #(.W(W), .FRAC(FRAC), .CFRAC(CFRAC), .ACC_W(AW), .SUBTRACT(1'b1)) u_m1s1_32 (
    .acc_re(p3_re), .acc_im(p3_im), .c_re(l32_d1_re), .c_im(l32_d1_im),
    .x_re(xt_re[1]), .x_im(xt_im[1]), .y_re(r3b_re), .y_im(r3b_im));
  thp_cmac #(.W(W), .FRAC(FRAC), .CFRAC(CFRAC), .ACC_W(AW), .SUBTRACT(1'b1)) u_m1s1_42 (
    .acc_re(p4a_re), .acc_im(p4a_im), .c_re(l42_d1_re), .c_im(l42_d1_im),
    .x_re(xt_re[1]), .x_im(xt_im[1]), .y_re(r4b_re), .y_im(r4b_im));
  thp_cmac #(.W(W), .FRAC(FRAC), .CFRAC(CFRAC), .ACC_W(AW), .SUBTRACT(1'b1)) u_m1s1_43 (
    .acc_re(p4b_re), .acc_im(p4b_im), .c_re(l43_d2_re), .c_im(l43_d2_im),
    .x_re(xt_re[2]), .x_im(xt_im[2]), .y_re(r4c_re), .y_im(r4c_im));

  thp_mod #(.W(W), .FRAC(FRAC), .IN_W(AW)) u_mod2 (
    .x_re(r2_re), .x_im(r2_im), .m(m), .inv2m(inv2m), .y_re(f2_re), .y_im(f2_im));
  thp_mod #(.W(W), .FRAC(FRAC), .IN_W(AW)) u_mod3 (
    .x_re(r3b_re), .x_im(r3b_im), .m(m), .inv2m(inv2m), .y_re(f3_re), .y_im(f3_im));
  thp_mod #(.W(W), .FRAC(FRAC), .IN_W(AW)) u_mod4 (
    .x_re(r4c_re), .x_im(r4c_im), .m(m), .inv2m(inv2m), .y_re(f4_re), .y_im(f4_im));

  always_ff @(posedge clk) begin
    // first column: cycle t -> t+1
    xt_re[0] <= x_re[0];  xt_im[0] <= x_im[0];
    xt_re[1] <= f2_re;    xt_im[1] <= f2_im;
    p3_re    <= r3a_re;   p3_im    <= r3a_im;
    p4a_re   <= r4a_re;   p4a_im   <= r4a_im;
    l32_d1_re <= l_re[L32]; l32_d1_im <= l_im[L32];
    l42_d1_re <= l_re[L42]; l42_d1_im <= l_im[L42];
    l43_d1_re <= l_re[L43]; l43_d1_im <= l_im[L43];
    // second column: t+1 -> t+2
    xt_re[2] <= f3_re;    xt_im[2] <= f3_im;
    p4b_re   <= r4b_re;   p4b_im   <= r4b_im;
    l43_d2_re <= l43_d1_re; l43_d2_im <= l43_d1_im;
    // third column: t+2 -> t+3
    xt_re[3] <= f4_re;    xt_im[3] <= f4_im;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
    end else begin
      v1 <= in_valid; v2 <= v1; v3 <= v2;
    end
  end
  assign xt_valid[0] = v1;
  assign xt_valid[1] = v1;
  assign xt_valid[2] = v2;
  assign xt_valid[3] = v3;
endmodule
