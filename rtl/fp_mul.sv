// fp_mul: IEEE 754 single-precision multiplier (the MUL units of the
// processing unit). Combinational.
//
// Simplifications of this implementation: subnormal inputs and results are
// flushed to zero, the result is truncated (rounded toward zero), an exponent
// overflow or an infinite input gives infinity, and NaN is not generated.
module fp_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic        s;
  logic [47:0] p;
  logic signed [10:0] e;
  always_comb begin
    s = a[31] ^ b[31];
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = 11'(a[30:23]) + 11'(b[30:23]) - 11'sd127 + (p[47] ? 11'sd1 : 11'sd0);
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0)        y = {s, 31'd0};
    else if (a[30:23] == 8'hff || b[30:23] == 8'hff) y = {s, 8'hff, 23'd0};
    else if (e >= 11'sd255)                         y = {s, 8'hff, 23'd0};
    else if (e <= 11'sd0)                           y = {s, 31'd0};
    else y = {s, e[7:0], p[47] ? p[46:24] : p[45:23]};
  end
endmodule
