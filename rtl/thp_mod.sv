// thp_mod: complex modulo fold of the Tomlinson-Harashima precoder,
//   Mod(x) = x - floor((x + M + jM) / (2M)) * 2M,
// applied to the real and imaginary parts independently.
//
// Each part goes through the chain of the modulo block in the design
// description: add M, multiply by 1/(2M), floor, multiply by 2M, subtract from
// the input. The result lies in [-M, M). The window M depends on the
// modulation and is therefore an input, together with its reciprocal 1/(2M)
// (unsigned, W-1 fraction bits); 2M is M shifted left by one bit. When M is a
// power of two the fold is exact; otherwise it is exact up to the precision of
// the supplied reciprocal.
//
// Timing: purely combinational. The callers place a register after it.
// Formats: x has IN_W bits and FRAC fraction bits, M and y have W bits and
// FRAC fraction bits (choices of this implementation; the description fixes
// only the 15-bit word length).
module thp_mod #(
  parameter int W    = thp_pkg::DATA_W,
  parameter int FRAC = thp_pkg::DATA_FRAC,
  parameter int IN_W = thp_pkg::DATA_W + thp_pkg::GUARD
) (
  input  logic signed [IN_W-1:0] x_re,
  input  logic signed [IN_W-1:0] x_im,
  input  logic        [W-1:0]    m,      // window size M, > 0
  input  logic        [W-1:0]    inv2m,  // 1/(2M), W-1 fraction bits
  output logic signed [W-1:0]    y_re,
  output logic signed [W-1:0]    y_im
);
  localparam int IFRAC = W - 1;
  localparam int PW    = IN_W + 2 + W;   // product width

  function automatic logic signed [W-1:0] fold(input logic signed [IN_W-1:0] x);
    logic signed [IN_W+1:0] shifted;   // x + M
    logic signed [PW-1:0]   scaled;    // (x + M) / (2M)
    logic signed [PW-1:0]   k;         // floor(...)
    logic signed [PW-1:0]   wrap;      // k * 2M
    logic signed [PW-1:0]   r;
    shifted = (IN_W+2)'(x) + (IN_W+2)'($signed({1'b0, m}));
    scaled  = PW'(shifted) * PW'($signed({1'b0, inv2m}));
    k       = scaled >>> (FRAC + IFRAC);       // floor: arithmetic shift
    wrap    = k * PW'($signed({1'b0, m, 1'b0}));
    r       = PW'(x) - wrap;
    return r[W-1:0];
  endfunction

  assign y_re = fold(x_re);
  assign y_im = fold(x_im);
endmodule
