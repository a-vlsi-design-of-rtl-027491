// tb_lqd_prog_pkg: the LQ decomposition program for the processor, written
// as a generator, and the data-memory layout it uses.
//
// For a 4x4 complex channel H with rows a_n (classical Gram-Schmidt):
//   l_nk = sum_j a_nj conj(q_kj)                (k < n)
//   v_n  = a_n - sum_k l_nk q_k,   l_nn = |v_n|,   q_n = v_n / l_nn
// then the cancellation ratios L_nk = l_nk / l_nn, and the fixed-point
// integers round-toward-zero(L_nk * 2^11) and round-toward-zero(w_ij * 2^11)
// with w_ij = conj(q_ji) (the entries of Q^H), ready for the coefficient
// memories. The generated list is then reordered by `schedule` so that
// results are not read too soon after they are produced (228 cycles per
// matrix instead of 310 in plain order).
package tb_lqd_prog_pkg;
  import lqd_pkg::*;

  // data memory layout (word addresses)
  localparam int A_H     = 0;     // a_nj at A_H + 4(n-1) + (j-1)
  localparam int A_ONE   = 16;    // 1.0
  localparam int A_SCALE = 17;    // 2^COEF_FRAC
  localparam int A_Q     = 32;    // q_nj
  localparam int A_QC    = 48;    // conj(q_nj)
  localparam int A_LL    = 64;    // l_nk (k < n) at A_LL + 4(n-1) + (k-1)
  localparam int A_T     = 80;    // row n: temporaries at A_T + 4(n-2) + (j-1)
  localparam int A_V     = 96;    // v_nj
  localparam int A_NRM   = 192;   // row n: squared norm, norm, (norm, norm), 1/norm at A_NRM + 4(n-1)
  localparam int A_LR    = 120;   // L_nk float, packed index 0..5
  localparam int A_LFIX  = 128;   // L_nk fixed-point integers, packed index 0..5
  localparam int A_WFIX  = 144;   // w_ij fixed-point integers at A_WFIX + 4(i-1) + (j-1)
  localparam int A_TMPW  = 160;   // scaled temporaries

  function automatic instr_t ins(input op_e op, input int c, input int a, input int b);
    return '{c: DAW'(c), b: DAW'(b), a: DAW'(a), op: op};
  endfunction

  function automatic int hx(input int n, input int j); return A_H + 4*(n-1) + (j-1); endfunction
  function automatic int qx(input int n, input int j); return A_Q + 4*(n-1) + (j-1); endfunction
  function automatic int qcx(input int n, input int j); return A_QC + 4*(n-1) + (j-1); endfunction
  function automatic int vx(input int n, input int j); return A_V + 4*(n-1) + (j-1); endfunction
  function automatic int nx(input int n); return A_NRM + 4*(n-1); endfunction
  function automatic int tx(input int n, input int j); return A_T + 4*(n-2) + (j-1); endfunction
  function automatic int lx(input int n, input int k); return A_LL + 4*(n-1) + (k-1); endfunction
  function automatic int lidx(input int i, input int j); return (i-1)*(i-2)/2 + (j-1); endfunction

  // True for the operations that add to the accumulator: they must follow
  // the instruction that starts their chain with nothing in between.
  function automatic bit is_acc(input op_e op);
    return op inside {OP_ACADD, OP_ACSUB, OP_ACMUL, OP_ARMUL, OP_ASQABS};
  endfunction

  // List scheduling of a program for the in-order processor. The program is
  // cut into blocks (an instruction plus the accumulative instructions that
  // follow it). Blocks keep every read/write and write/write order on a
  // data address. Among the blocks whose predecessors are placed, the first
  // one that would not wait on an operand is taken; if every one would
  // wait, the one with the shortest wait. A result can be read DIST
  // instructions after its producer without a wait.
  localparam int DIST = 5;
  task automatic schedule(ref instr_t prog[$]);
    int     bstart [$], blen [$];
    bit     placed [$];
    int     lastw [N];
    instr_t outp [$];
    int     nb, best, bestcost, cost, pos, now;
    bit     ok;
    for (int i = 0; i < prog.size(); i++)
      if (i == 0 || !is_acc(op_e'(prog[i].op))) begin bstart.push_back(i); blen.push_back(1); end
      else blen[blen.size()-1]++;
    nb = bstart.size();
    for (int b = 0; b < nb; b++) placed.push_back(1'b0);
    for (int a = 0; a < N; a++) lastw[a] = -1000;
    now = 0;
    for (int step = 0; step < nb; step++) begin
      best = -1; bestcost = 1 << 30;
      for (int b = 0; b < nb && bestcost > 0; b++) begin
        if (placed[b]) continue;
        // every earlier unplaced block must not conflict with b
        ok = 1'b1;
        for (int e = 0; e < b && ok; e++) begin
          if (placed[e]) continue;
          for (int i = bstart[e]; i < bstart[e] + blen[e] && ok; i++)
            for (int j = bstart[b]; j < bstart[b] + blen[b] && ok; j++)
              if (prog[i].c == prog[j].a || prog[i].c == prog[j].b || prog[i].c == prog[j].c ||
                  prog[j].c == prog[i].a || prog[j].c == prog[i].b) ok = 1'b0;
        end
        if (!ok) continue;
        // issue times of b's instructions if placed now
        pos = now;
        for (int j = bstart[b]; j < bstart[b] + blen[b]; j++) begin
          if (lastw[prog[j].a] + DIST > pos) pos = lastw[prog[j].a] + DIST;
          if (lastw[prog[j].b] + DIST > pos) pos = lastw[prog[j].b] + DIST;
          pos++;
        end
        cost = pos - now - blen[b];
        if (cost < bestcost) begin best = b; bestcost = cost; end
      end
      placed[best] = 1'b1;
      for (int j = bstart[best]; j < bstart[best] + blen[best]; j++) begin
        if (lastw[prog[j].a] + DIST > now) now = lastw[prog[j].a] + DIST;
        if (lastw[prog[j].b] + DIST > now) now = lastw[prog[j].b] + DIST;
        lastw[prog[j].c] = now;
        now++;
        outp.push_back(prog[j]);
      end
    end
    prog = outp;
  endtask

  task automatic build(ref instr_t prog[$]);
    prog.delete();
    for (int n = 1; n <= 4; n++) begin
      // inner products with the earlier rows
      for (int k = 1; k < n; k++) begin
        prog.push_back(ins(OP_CMUL, lx(n, k), hx(n, 1), qcx(k, 1)));
        for (int j = 2; j <= 4; j++)
          prog.push_back(ins(OP_ACMUL, lx(n, k), hx(n, j), qcx(k, j)));
      end
      // v_n = a_n - sum l_nk q_k
      for (int j = 1; j <= 4; j++) begin
        if (n == 1) begin
          prog.push_back(ins(OP_COPY, vx(n, j), hx(n, j), hx(n, j)));
        end else begin
          prog.push_back(ins(OP_CMUL, tx(n, j), lx(n, 1), qx(1, j)));
          for (int k = 2; k < n; k++)
            prog.push_back(ins(OP_ACMUL, tx(n, j), lx(n, k), qx(k, j)));
          prog.push_back(ins(OP_CSUB, vx(n, j), hx(n, j), tx(n, j)));
        end
      end
      // norm and its reciprocal
      prog.push_back(ins(OP_SQABS, nx(n), vx(n, 1), vx(n, 1)));
      for (int j = 2; j <= 4; j++)
        prog.push_back(ins(OP_ASQABS, nx(n), vx(n, j), vx(n, j)));
      prog.push_back(ins(OP_SQRT,  nx(n) + 1, nx(n), nx(n)));
      prog.push_back(ins(OP_MERGE, nx(n) + 2, nx(n) + 1, nx(n) + 1));
      prog.push_back(ins(OP_RDIV,  nx(n) + 3, A_ONE, nx(n) + 2));
      // q_n and its conjugate
      for (int j = 1; j <= 4; j++)
        prog.push_back(ins(OP_RMUL, qx(n, j), vx(n, j), nx(n) + 3));
      for (int j = 1; j <= 4; j++)
        prog.push_back(ins(OP_CONJ, qcx(n, j), qx(n, j), qx(n, j)));
      // cancellation ratios of row n
      for (int k = 1; k < n; k++)
        prog.push_back(ins(OP_RMUL, A_LR + lidx(n, k), lx(n, k), nx(n) + 3));
    end
    // fixed-point conversion
    for (int i = 0; i < 6; i++)
      prog.push_back(ins(OP_RMUL, A_TMPW + i, A_LR + i, A_SCALE));
    for (int i = 1; i <= 4; i++)
      for (int j = 1; j <= 4; j++)
        prog.push_back(ins(OP_RMUL, A_TMPW + 8 + 4*(i-1) + (j-1), qcx(j, i), A_SCALE));
    for (int i = 0; i < 6; i++)
      prog.push_back(ins(OP_F2I, A_LFIX + i, A_TMPW + i, A_TMPW + i));
    for (int n = 0; n < 16; n++)
      prog.push_back(ins(OP_F2I, A_WFIX + n, A_TMPW + 8 + n, A_TMPW + 8 + n));
    schedule(prog);
  endtask

  // real -> single-precision bits (truncating), for loading test data
  function automatic f32_t r2f(input real v);
    logic s;
    int   e;
    real  m;
    if (v == 0.0) return 32'd0;
    s = (v < 0.0);
    m = s ? -v : v;
    e = 127;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    return {s, 8'(e), 23'($rtoi((m - 1.0) * 8388608.0))};
  endfunction
endpackage
