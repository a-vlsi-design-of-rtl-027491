// thp_cmac: one complex multiply-accumulate cell of the arrayed datapath.
//   SUBTRACT = 1 : y = acc - c * x   (the "M1S1" cell of the IC unit)
//   SUBTRACT = 0 : y = acc + c * x   (the "M1A1" cell of the WCM unit;
//                                     with acc = 0 it is the "M1" cell)
//
// c is a coefficient (W bits, CFRAC fraction bits), x a sample (W bits, FRAC
// fraction bits), acc and y running values (ACC_W bits, FRAC fraction bits).
// The complex product uses four real multiplications; each real part of the
// product is rounded to FRAC fraction bits (add half an LSB, shift) before it
// is added to acc. The cell's function is the one named in the design
// description; its rounding and widths are this implementation's choices.
//
// Timing: purely combinational; the arrays around it hold the registers.
module thp_cmac #(
  parameter int W        = thp_pkg::DATA_W,
  parameter int FRAC     = thp_pkg::DATA_FRAC,
  parameter int CFRAC    = thp_pkg::COEF_FRAC,
  parameter int ACC_W    = thp_pkg::DATA_W + thp_pkg::GUARD,
  parameter bit SUBTRACT = 1'b1
) (
  input  logic signed [ACC_W-1:0] acc_re,
  input  logic signed [ACC_W-1:0] acc_im,
  input  logic signed [W-1:0]     c_re,
  input  logic signed [W-1:0]     c_im,
  input  logic signed [W-1:0]     x_re,
  input  logic signed [W-1:0]     x_im,
  output logic signed [ACC_W-1:0] y_re,
  output logic signed [ACC_W-1:0] y_im
);
  localparam int PW = 2*W + 1;

  logic signed [PW-1:0] p_re, p_im;
  logic signed [PW-1:0] r_re, r_im;

  always_comb begin
    p_re = PW'(c_re) * PW'(x_re) - PW'(c_im) * PW'(x_im);
    p_im = PW'(c_re) * PW'(x_im) + PW'(c_im) * PW'(x_re);
    r_re = (p_re + (PW'(1) <<< (CFRAC-1))) >>> CFRAC;
    r_im = (p_im + (PW'(1) <<< (CFRAC-1))) >>> CFRAC;
    if (SUBTRACT) begin
      y_re = acc_re - ACC_W'(r_re);
      y_im = acc_im - ACC_W'(r_im);
    end else begin
      y_re = acc_re + ACC_W'(r_re);
      y_im = acc_im + ACC_W'(r_im);
    end
  end
endmodule
