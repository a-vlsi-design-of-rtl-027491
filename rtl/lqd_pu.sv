// lqd_pu: processing unit of the LQ decomposition processor.
//
// A three-stage floating-point complex datapath with eight single-precision
// units plus a divider pair and a square-root unit:
//   stage 1: FPU1..FPU4 multiply Ar*Br, Ai*Bi, Ar*Bi, Ai*Br. Registers A1, A2,
//            B1, B2 take either these products, the raw operand parts, or
//            zero, depending on the operation.
//   stage 2: FPU5 = A1 +/- A2 and FPU6 = B1 +/- B2. Registers C1/D1 take the
//            accumulator (real/imaginary) for accumulative operations, zero
//            otherwise; C2/D2 take the FPU5/FPU6 results.
//   stage 3: FPU7 = C1 + C2 (real result), FPU8 = D1 + D2 (imaginary result),
//            then the output register.
// FDIVr = Ar/Br, FDIVi = Ar/Bi and FSQRT = sqrt(Ar) work in stage 1; their
// results, and those of the data-movement operations (conjugate, copy,
// merge, extract, sign, integer conversions), travel beside the adder stages
// to the output register.
//
// The unit arrangement and the operand names come from the processing-unit
// description; the operand routing of each operation, the accumulator
// behaviour and the handling of unsupported codes are this implementation's
// choices. The accumulator is loaded with every result; an accumulative
// operation adds its own result to it. The accumulator value entering C1/D1
// is forwarded from stage 3, so back-to-back accumulative operations need no
// gap. Codes 13 and 16..19 (Newton initialisation and CORDIC steps), whose
// exact definition is not available, and all codes above 25 are not executed:
// they produce no result and pulse `illegal` at the output.
//
// Timing: fully pipelined, one operation per cycle, latency 3: an operation
// presented with in_valid in cycle t has its result in out_valid/y in cycle
// t+3. `tag` (the destination address) travels with it.
module lqd_pu
  import lqd_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [OPW-1:0] op,
  input  cword_t         a,
  input  cword_t         b,
  input  logic [DAW-1:0] tag_in,
  output logic           out_valid,
  output cword_t         y,
  output logic [DAW-1:0] tag_out,
  output logic           illegal
);
  typedef enum logic [1:0] {S_PROD, S_OPND, S_ZERO} srcsel_e;
  typedef struct packed {
    srcsel_e a1, a2, b1, b2;
    logic    sub5, sub6;
    logic    acc;       // add accumulator in stage 3
    logic    special;   // result comes from the side path
    logic    legal;
  } cfg_t;

  function automatic cfg_t decode(input logic [OPW-1:0] code);
    cfg_t c;
    c = '{a1: S_ZERO, a2: S_ZERO, b1: S_ZERO, b2: S_ZERO,
          sub5: 1'b0, sub6: 1'b0, acc: 1'b0, special: 1'b0, legal: 1'b1};
    case (code)
      OP_CADD, OP_ACADD, OP_CSUB, OP_ACSUB: begin
        c.a1 = S_OPND; c.a2 = S_OPND; c.b1 = S_OPND; c.b2 = S_OPND;
        c.sub5 = (code == OP_CSUB || code == OP_ACSUB);
        c.sub6 = c.sub5;
      end
      OP_CMUL, OP_ACMUL: begin
        c.a1 = S_PROD; c.a2 = S_PROD; c.sub5 = 1'b1;
        c.b1 = S_PROD; c.b2 = S_PROD;
      end
      OP_RMUL, OP_ARMUL: begin
        c.a1 = S_PROD; c.b2 = S_PROD;
      end
      OP_SQABS, OP_ASQABS: begin
        c.a1 = S_PROD; c.a2 = S_PROD;
      end
      OP_HMUL: begin
        c.a1 = S_PROD; c.a2 = S_PROD;
        c.b1 = S_PROD; c.b2 = S_PROD; c.sub6 = 1'b1;
      end
      OP_RDIV, OP_SQRT, OP_CONJ, OP_COPY, OP_MERGE, OP_EXTRE, OP_EXTIM,
      OP_SIGN, OP_I2F, OP_F2I:
        c.special = 1'b1;
      default: c.legal = 1'b0;
    endcase
    c.acc = (code == OP_ACADD || code == OP_ACSUB || code == OP_ACMUL ||
             code == OP_ARMUL || code == OP_ASQABS);
    return c;
  endfunction

  // ---------------- stage 1 ----------------
  cfg_t  cfg1;
  f32_t  p1, p2, p3, p4, qdr, qdi, sq;
  cword_t side1;

  assign cfg1 = decode(op);

  fp_mul  u_fpu1 (.a(a.re), .b(b.re), .y(p1));
  fp_mul  u_fpu2 (.a(a.im), .b(b.im), .y(p2));
  fp_mul  u_fpu3 (.a(a.re), .b(b.im), .y(p3));
  fp_mul  u_fpu4 (.a(a.im), .b(b.re), .y(p4));
  fp_div  u_fdivr (.a(a.re), .b(b.re), .y(qdr));
  fp_div  u_fdivi (.a(a.re), .b(b.im), .y(qdi));
  fp_sqrt u_fsqrt (.a(a.re), .y(sq));

  function automatic f32_t sel(input srcsel_e s, input f32_t prod, input f32_t opnd);
    case (s)
      S_PROD:  return prod;
      S_OPND:  return opnd;
      default: return F_ZERO;
    endcase
  endfunction

  always_comb begin
    case (op)
      OP_RDIV:  side1 = '{re: qdr, im: qdi};
      OP_SQRT:  side1 = '{re: sq, im: F_ZERO};
      OP_CONJ:  side1 = '{re: a.re, im: {~a.im[31], a.im[30:0]}};
      OP_MERGE: side1 = '{re: a.re, im: b.re};
      OP_EXTRE: side1 = '{re: a.re, im: F_ZERO};
      OP_EXTIM: side1 = '{re: a.im, im: F_ZERO};
      OP_SIGN:  side1 = '{re: {a.re[31], F_ONE[30:0]}, im: {a.im[31], F_ONE[30:0]}};
      OP_I2F:   side1 = '{re: i2f(a.re), im: i2f(a.im)};
      OP_F2I:   side1 = '{re: f2i(a.re), im: f2i(a.im)};
      default:  side1 = a;   // OP_COPY
    endcase
  end

  // REG A1 A2 B1 B2 and the side path
  f32_t   rA1, rA2, rB1, rB2;
  cfg_t   cfg2, cfg3;
  cword_t side2, side3;
  logic   v2, v3, ill2, ill3;
  logic [DAW-1:0] tag2, tag3;

  always_ff @(posedge clk) begin
    rA1   <= sel(cfg1.a1, p1, a.re);
    rA2   <= sel(cfg1.a2, p2, b.re);
    rB1   <= sel(cfg1.b1, p3, a.im);
    rB2   <= sel(cfg1.b2, p4, b.im);
    cfg2  <= cfg1;
    side2 <= side1;
    tag2  <= tag_in;
  end

  // ---------------- stage 2 ----------------
  f32_t s5, s6;
  fp_add u_fpu5 (.a(rA1), .b(rA2), .sub(cfg2.sub5), .y(s5));
  fp_add u_fpu6 (.a(rB1), .b(rB2), .sub(cfg2.sub6), .y(s6));

  // ---------------- stage 3 ----------------
  f32_t   rC1, rC2, rD1, rD2, s7, s8;
  cword_t acc_q, res3;

  fp_add u_fpu7 (.a(rC1), .b(rC2), .sub(1'b0), .y(s7));
  fp_add u_fpu8 (.a(rD1), .b(rD2), .sub(1'b0), .y(s8));
  assign res3 = cfg3.special ? side3 : '{re: s7, im: s8};

  // accumulator as seen by the operation now in stage 2 (forwarded)
  cword_t acc_fwd;
  assign acc_fwd = (v3 && cfg3.legal) ? res3 : acc_q;

  always_ff @(posedge clk) begin
    rC1   <= cfg2.acc ? acc_fwd.re : F_ZERO;
    rD1   <= cfg2.acc ? acc_fwd.im : F_ZERO;
    rC2   <= s5;
    rD2   <= s6;
    cfg3  <= cfg2;
    side3 <= side2;
    tag3  <= tag2;
    y       <= res3;
    tag_out <= tag3;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v2 <= 1'b0; v3 <= 1'b0; out_valid <= 1'b0;
      ill2 <= 1'b0; ill3 <= 1'b0; illegal <= 1'b0;
      acc_q <= '0;
    end else begin
      v2        <= in_valid && cfg1.legal;
      ill2      <= in_valid && !cfg1.legal;
      v3        <= v2;
      ill3      <= ill2;
      out_valid <= v3;
      illegal   <= ill3;
      if (v3) acc_q <= res3;
    end
  end
endmodule
