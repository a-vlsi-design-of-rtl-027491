// fp_div: IEEE 754 single-precision divider (the FDIV units of the
// processing unit), y = a / b. Combinational.
//
// The significands are divided with an integer quotient of 25-26 bits that
// is then truncated (rounded toward zero). Division by zero or an infinite
// dividend gives infinity; subnormals are flushed to zero; NaN is not
// generated. These are choices of this implementation; the description only
// names a dedicated high-speed divider.
module fp_div (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic        s;
  logic [48:0] num;
  logic [48:0] q;
  logic signed [10:0] e;
  always_comb begin
    s   = a[31] ^ b[31];
    num = {1'b1, a[22:0], 25'd0};
    q   = num / {25'd0, 1'b1, b[22:0]};
    e   = 11'(a[30:23]) - 11'(b[30:23]) + (q[25] ? 11'sd127 : 11'sd126);
    if (b[30:23] == 8'd0 || a[30:23] == 8'hff) y = {s, 8'hff, 23'd0};
    else if (a[30:23] == 8'd0 || b[30:23] == 8'hff) y = {s, 31'd0};
    else if (e >= 11'sd255)                    y = {s, 8'hff, 23'd0};
    else if (e <= 11'sd0)                      y = {s, 31'd0};
    else y = {s, e[7:0], q[25] ? q[24:2] : q[23:1]};
  end
endmodule
