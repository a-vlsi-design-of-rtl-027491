// lqd_pkg: instruction set and word formats of the LQ decomposition
// processor (an application-specific instruction-set processor with
// single-precision floating-point arithmetic).
//
// A data word is one complex number: two IEEE 754 single-precision values,
// real part in bits [63:32], imaginary part in [31:0]. An instruction holds
// the output address C, input addresses B and A (log2 N bits each) and the
// operation code (log2 N_op bits), in that order from the most significant
// end. The operation numbers are those of the processor's instruction table.
package lqd_pkg;
  localparam int N      = 2048;           // data memory words
  localparam int NOP    = 256;            // operation code space
  localparam int DAW    = $clog2(N);      // 11
  localparam int OPW    = $clog2(NOP);    // 8
  localparam int IW     = 3*DAW + OPW;    // 41-bit instruction
  localparam int IDEPTH = 512;            // instruction memory words

  typedef logic [31:0] f32_t;
  typedef struct packed { f32_t re; f32_t im; } cword_t;

  typedef enum logic [OPW-1:0] {
    OP_CADD    = 8'd0,   // C = A + B
    OP_CSUB    = 8'd1,   // C = A - B
    OP_CMUL    = 8'd2,   // C = A * B
    OP_RMUL    = 8'd3,   // C = A * Re(B)
    OP_ACADD   = 8'd4,   // C = acc + (A + B)
    OP_ACSUB   = 8'd5,   // C = acc + (A - B)
    OP_ACMUL   = 8'd6,   // C = acc + A * B
    OP_ARMUL   = 8'd7,   // C = acc + A * Re(B)
    OP_RDIV    = 8'd8,   // C = Re(A)/Re(B) + j Re(A)/Im(B)
    OP_SQRT    = 8'd9,   // C = sqrt(Re(A))
    OP_SQABS   = 8'd10,  // C = Re(A)Re(B) + Im(A)Im(B)   (|A|^2 when B = A)
    OP_ASQABS  = 8'd11,  // C = acc + Re(A)Re(B) + Im(A)Im(B)
    OP_HMUL    = 8'd12,  // C = conj(A) * B
    OP_NEWTON  = 8'd13,  // not supported: no operation
    OP_CONJ    = 8'd14,  // C = conj(A)
    OP_COPY    = 8'd15,  // C = A
    OP_CAT_I   = 8'd16,  // CORDIC operations 16..19: not supported
    OP_CAT_R   = 8'd17,
    OP_CSC_I   = 8'd18,
    OP_CSC_R   = 8'd19,
    OP_MERGE   = 8'd20,  // C = Re(A) + j Re(B)
    OP_EXTRE   = 8'd21,  // C = Re(A)
    OP_EXTIM   = 8'd22,  // C = Im(A)
    OP_SIGN    = 8'd23,  // C = sign(Re(A)) + j sign(Im(A)), as +-1.0
    OP_I2F     = 8'd24,  // both parts: 32-bit integer -> float
    OP_F2I     = 8'd25   // both parts: float -> 32-bit integer (toward zero, saturating)
  } op_e;

  typedef struct packed {
    logic [DAW-1:0] c;
    logic [DAW-1:0] b;
    logic [DAW-1:0] a;
    logic [OPW-1:0] op;
  } instr_t;

  localparam f32_t F_ZERO = 32'h0000_0000;
  localparam f32_t F_ONE  = 32'h3f80_0000;

  // 32-bit two's complement integer -> float, truncating
  function automatic f32_t i2f(input logic [31:0] v);
    logic        s;
    logic [31:0] mag;
    logic [31:0] norm;
    int          p;
    s   = v[31];
    mag = s ? (~v + 32'd1) : v;
    if (mag == '0) return F_ZERO;
    p = 0;
    for (int i = 0; i < 32; i++) if (mag[i]) p = i;
    norm = mag << (31 - p);
    return {s, 8'(127 + p), norm[30:8]};
  endfunction

  // float -> 32-bit two's complement integer, toward zero, saturating
  function automatic logic [31:0] f2i(input f32_t f);
    logic [7:0]  e;
    logic [55:0] m;
    logic [31:0] mag;
    e = f[30:23];
    if (e < 8'd127) return '0;
    if (e >= 8'd158) return f[31] ? 32'h8000_0000 : 32'h7fff_ffff;
    m   = 56'({1'b1, f[22:0]}) << (e - 8'd127);
    mag = m[54:23];
    return f[31] ? (~mag + 32'd1) : mag;
  endfunction
endpackage
