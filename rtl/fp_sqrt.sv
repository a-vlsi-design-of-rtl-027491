// fp_sqrt: IEEE 754 single-precision square root (the FSQRT unit of the
// processing unit). Combinational.
//
// The exponent is halved (the significand doubled first when the unbiased
// exponent is odd) and the significand root is found bit by bit, 24 result
// bits, truncated. A negative or zero input gives +0, subnormals are flushed
// to zero, infinity stays infinity. These are choices of this
// implementation; the description only names a dedicated square-root unit.
module fp_sqrt (
  input  logic [31:0] a,
  output logic [31:0] y
);
  logic [47:0] rad;     // radicand with 46 fraction bits
  logic [23:0] r;       // root with 23 fraction bits
  logic [23:0] cand;    // root with the trial bit set
  logic [47:0] trial;
  logic [7:0]  e;
  always_comb begin
    if (a[30:23] == 8'd0 || a[31]) begin
      rad = '0; e = 8'd0;
    end else if (a[23]) begin      // biased exponent odd: unbiased even
      rad = {1'b0, 1'b1, a[22:0], 23'd0};
      e   = 8'((9'(a[30:23]) + 9'd127) >> 1);
    end else begin                 // unbiased odd: use 2*m
      rad = {1'b1, a[22:0], 24'd0};
      e   = 8'((9'(a[30:23]) + 9'd126) >> 1);
    end
    r = '0;
    for (int i = 23; i >= 0; i--) begin
      cand  = r | (24'd1 << i);
      trial = 48'(cand) * 48'(cand);
      if (trial <= rad) r = cand;
    end
    if (a[30:23] == 8'hff && !a[31])    y = {1'b0, 8'hff, 23'd0};
    else if (a[30:23] == 8'd0 || a[31]) y = 32'd0;
    else                                y = {1'b0, e, r[22:0]};
  end
endmodule
