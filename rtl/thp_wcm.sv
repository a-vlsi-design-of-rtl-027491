// thp_wcm: weight coefficient multiplication unit, arrayed pipelined form.
//
// Computes x^ = W x~ with W = Q^H (entries w_ij, row-major). Each of the four
// output rows is a line of cells, one per input lane, with a register between
// cells:
//   M1(w_i1 x~1) -> reg -> M1A1(+ w_i2 x~2) -> reg -> M1A1(+ w_i3 x~3) -> reg
//                -> M1A1(+ w_i4 x~4) -> output register -> x^_i
// Lane k of x~ is consumed k-1 cycles after lane 1, which is exactly the
// staircase in which the IC unit produces it, and the four outputs leave
// together. The cell rows follow the design description; the output register,
// the saturation of x^ to W bits and the coefficient delay registers (column
// j of W delayed by j-1 cycles so a new matrix can come with every vector)
// are this implementation's choices.
//
// Timing: one vector per clock. With in_valid and w presented in cycle t
// together with x~1, x~2 in t+1, x~3 in t+2 and x~4 in t+3, x^ is valid
// (out_valid) in cycle t+4. Reset (synchronous, active low) clears only the
// valid pipeline.
module thp_wcm
  import thp_pkg::*;
#(
  parameter int W     = DATA_W,
  parameter int FRAC  = DATA_FRAC,
  parameter int CFRAC = COEF_FRAC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,      // marks lane 1 of a vector
  input  logic signed [W-1:0] xt_re [NT],    // staircase timing, see above
  input  logic signed [W-1:0] xt_im [NT],
  input  logic signed [W-1:0] w_re  [NQ],    // w_ij at index (i-1)*4 + (j-1)
  input  logic signed [W-1:0] w_im  [NQ],
  output logic signed [W-1:0] y_re  [NT],    // x^1..x^4
  output logic signed [W-1:0] y_im  [NT],
  output logic                out_valid
);
  localparam int AW = W + GUARD;
  localparam logic signed [AW-1:0] MAXV = AW'((1 <<< (W-1)) - 1);
  localparam logic signed [AW-1:0] MINV = -AW'(1 <<< (W-1));

  function automatic logic signed [W-1:0] sat(input logic signed [AW-1:0] v);
    if (v > MAXV)      return MAXV[W-1:0];
    else if (v < MINV) return MINV[W-1:0];
    else               return v[W-1:0];
  endfunction

  // s_*[i][k]: partial sum of row i after cell k (combinational)
  // a_*[i][k]: register after cell k (k = 0..2)
  logic signed [AW-1:0] s_re [NT][NT], s_im [NT][NT];
  logic signed [AW-1:0] a_re [NT][NT-1], a_im [NT][NT-1];
  // cw_*[d][idx]: coefficients delayed by d cycles (d = 0..3, only column > d used)
  logic signed [W-1:0]  cw_re [NT][NQ], cw_im [NT][NQ];
  logic [NT-1:0]        vpipe;

  always_comb begin
    for (int n = 0; n < NQ; n++) begin
      cw_re[0][n] = w_re[n];
      cw_im[0][n] = w_im[n];
    end
  end

  for (genvar i = 0; i < NT; i++) begin : g_row
    for (genvar k = 0; k < NT; k++) begin : g_cell
      thp_cmac #(.W(W), .FRAC(FRAC), .CFRAC(CFRAC), .ACC_W(AW), .SUBTRACT(1'b0)) u_cell (
        .acc_re((k == 0) ? '0 : a_re[i][(k == 0) ? 0 : k-1]),
        .acc_im((k == 0) ? '0 : a_im[i][(k == 0) ? 0 : k-1]),
        .c_re(cw_re[k][i*NT+k]), .c_im(cw_im[k][i*NT+k]),
        .x_re(xt_re[k]), .x_im(xt_im[k]),
        .y_re(s_re[i][k]), .y_im(s_im[i][k]));
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NT; i++) begin
      for (int k = 0; k < NT-1; k++) begin
        a_re[i][k] <= s_re[i][k];
        a_im[i][k] <= s_im[i][k];
      end
      y_re[i] <= sat(s_re[i][NT-1]);
      y_im[i] <= sat(s_im[i][NT-1]);
    end
    for (int d = 1; d < NT; d++) begin
      for (int n = 0; n < NQ; n++) begin
        cw_re[d][n] <= cw_re[d-1][n];
        cw_im[d][n] <= cw_im[d-1][n];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[NT-2:0], in_valid};
  end
  assign out_valid = vpipe[NT-1];
endmodule
