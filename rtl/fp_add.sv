// fp_add: IEEE 754 single-precision adder/subtractor (the ADD/SUB units of
// the processing unit). y = a + b, or a - b when sub is set. Combinational.
//
// The smaller operand is aligned with three extra bits and a sticky bit, the
// magnitudes are added or subtracted, the sum is normalised by a leading-one
// search and truncated (rounded toward zero). Subnormals are flushed to zero,
// exponent overflow gives infinity, NaN is not generated. These are choices
// of this implementation.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);
  logic [31:0] bb, x, z;        // x: larger magnitude, z: smaller
  logic [7:0]  d;
  logic [27:0] mx, mz, mzs;     // {hidden, 23 frac, 3 guard} + carry room
  logic [28:0] sum;
  logic        sticky;
  int          lead;
  logic signed [10:0] e;
  logic [28:0] norm;
  always_comb begin
    bb = {b[31] ^ sub, b[30:0]};
    // flush subnormals
    if (a[30:23] == 8'd0) x = 32'd0; else x = a;
    if (bb[30:23] == 8'd0) z = 32'd0; else z = bb;
    if (z[30:0] > x[30:0]) begin
      {x, z} = {z, x};
    end
    d      = x[30:23] - z[30:23];
    mx     = {1'b0, (x[30:23] != 0), x[22:0], 3'b000};
    mz     = {1'b0, (z[30:23] != 0), z[22:0], 3'b000};
    if (d > 8'd27) begin
      mzs    = '0;
      sticky = (mz != '0);
    end else begin
      mzs    = mz >> d;
      sticky = ((mz & ((28'd1 << d) - 28'd1)) != '0);
    end
    mzs[0] = mzs[0] | sticky;
    if (x[31] == z[31]) sum = {1'b0, mx} + {1'b0, mzs};
    else                sum = {1'b0, mx} - {1'b0, mzs};
    lead = 0;
    for (int i = 0; i < 29; i++) if (sum[i]) lead = i;
    e    = 11'(x[30:23]) + 11'(lead) - 11'sd26;
    norm = sum << (28 - lead);   // leading one at bit 28
    if (x[30:23] == 8'd0 && z[30:23] == 8'd0) y = 32'd0;
    else if (x[30:23] == 8'hff)               y = x;
    else if (sum == '0)                       y = 32'd0;
    else if (e >= 11'sd255)                   y = {x[31], 8'hff, 23'd0};
    else if (e <= 11'sd0)                     y = {x[31], 31'd0};
    else                                      y = {x[31], e[7:0], norm[27:5]};
  end
endmodule
