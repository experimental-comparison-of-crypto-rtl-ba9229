// tb_ecc_prog_pkg: program generator for the crypto-processor testbenches.
//
// Builds, in a 1024-entry code array, the machine code of two programs:
//
//  * gen_expr: r = ((a*b) + c) + (d*e) on two multipliers, the overlapped
//    schedule of the processor's assembly example (elements a..e = 0..4,
//    r = 5, d*e kept in 6).
//
//  * gen_scalar_mult: left-to-right signed-window scalar multiplication
//    Q = [k]P on a short Weierstrass curve y^2 = x^3 + a*x + b in affine
//    coordinates, all values in Montgomery form (x*R mod p):
//      - precompute 2P, 3P, 5P, 7P and the negatives -P, -3P, -5P, -7P;
//      - recode k, copy the table entry of the first digit into Q;
//      - for every further digit: Q = 2Q, then Q = Q + T[d] when d != 0,
//        dispatched through a 16-entry jump table on the digit.
//    Field inversion uses the inverter followed by a Montgomery product by
//    R^3 mod p, which brings the plain inverse back to Montgomery form.
//
// Points-memory layout (element numbers) for the scalar multiplication:
//   0 zero, 1 R^3 mod p, 2 curve a, 3/4 Q.x/Q.y, 6/7 2P, 8..15 temporaries,
//   E(d) = 16 + 2*(d + 8) for digit d in -7..7: x at E(d), y at E(d)+1.
//   The host writes P at E(1) and reads the result at 3/4.
package tb_ecc_prog_pkg;
  import hecc_pkg::*;

  localparam int PROG_DEPTH = 1024;
  localparam int FU_M0 = FU_MUL0;

  localparam int ZERO = 0, R3 = 1, CA = 2, QX = 3, QY = 4, P2X = 6, P2Y = 7;
  localparam int T1 = 8, T2 = 9, T3 = 10, T4 = 11, T5 = 12, UX = 14, UY = 15;

  logic [INSTR_BITS-1:0] code [PROG_DEPTH];
  int n;

  function automatic int elem(int d);
    return 16 + 2 * (d + 8);
  endfunction

  function automatic void emit(opcode_e op, int fu, int a, int b);
    instr_t i;
    i.op = op; i.fu = FU_BITS'(fu); i.a = ELEM_BITS'(a); i.b = ELEM_BITS'(b);
    code[n] = i;
    n++;
  endfunction

  // Jump-type instruction with a 16-bit target in {a, b}.
  function automatic void emit_t(opcode_e op, int target);
    emit(op, 0, (target >> 8) & 255, target & 255);
  endfunction

  function automatic void patch_t(int at, opcode_e op, int target);
    instr_t i;
    i.op = op; i.fu = '0; i.a = ELEM_BITS'(target >> 8); i.b = ELEM_BITS'(target);
    code[at] = i;
  endfunction

  function automatic void f_mul(int dst, int x, int y);
    emit(OP_READ, FU_M0, x, y); emit(OP_LAUNCH, FU_M0, 0, 0);
    emit(OP_WAIT, FU_M0, 0, 0); emit(OP_WRITE, FU_M0, dst, 0);
  endfunction

  function automatic void f_addsub(int dst, int x, int y, int sub);
    emit(OP_SET, 0, 0, sub);
    emit(OP_READ, FU_ADDSUB, x, y); emit(OP_LAUNCH, FU_ADDSUB, 0, 0);
    emit(OP_WAIT, FU_ADDSUB, 0, 0); emit(OP_WRITE, FU_ADDSUB, dst, 0);
  endfunction

  function automatic void f_add(int dst, int x, int y); f_addsub(dst, x, y, 0); endfunction
  function automatic void f_sub(int dst, int x, int y); f_addsub(dst, x, y, 1); endfunction
  function automatic void f_copy(int dst, int x);       f_addsub(dst, x, ZERO, 0); endfunction

  function automatic void f_inv(int dst, int x);
    emit(OP_READ, FU_INV, x, x); emit(OP_LAUNCH, FU_INV, 0, 0);
    emit(OP_WAIT, FU_INV, 0, 0); emit(OP_WRITE, FU_INV, dst, 0);
    f_mul(dst, dst, R3);
  endfunction

  // (ox, oy) = (x1, y1) + (x2, y2); ox/oy may be x1/y1.
  function automatic void pt_add(int ox, int oy, int x1, int y1, int x2, int y2);
    f_sub(T1, y2, y1);
    f_sub(T2, x2, x1);
    f_inv(T2, T2);
    f_mul(T3, T1, T2);          // lambda
    f_mul(T4, T3, T3);
    f_sub(T4, T4, x1);
    f_sub(T4, T4, x2);          // x3
    f_sub(T5, x1, T4);
    f_mul(T5, T3, T5);
    f_sub(oy, T5, y1);          // y3
    f_copy(ox, T4);
  endfunction

  // (ox, oy) = 2 (x, y); ox/oy may be x/y.
  function automatic void pt_dbl(int ox, int oy, int x, int y);
    f_mul(T1, x, x);
    f_add(T2, T1, T1);
    f_add(T2, T2, T1);
    f_add(T2, T2, CA);          // 3x^2 + a
    f_add(T3, y, y);
    f_inv(T3, T3);
    f_mul(T3, T2, T3);          // lambda
    f_mul(T4, T3, T3);
    f_add(T5, x, x);
    f_sub(T4, T4, T5);          // x3
    f_sub(T5, x, T4);
    f_mul(T5, T3, T5);
    f_sub(oy, T5, y);           // y3
    f_copy(ox, T4);
  endfunction

  function automatic void clear();
    n = 0;
    for (int i = 0; i < PROG_DEPTH; i++) code[i] = {OP_HALT, 21'd0};
  endfunction

  function automatic void gen_expr();
    clear();
    emit(OP_READ,   FU_M0,     0, 1);
    emit(OP_LAUNCH, FU_M0,     0, 0);
    emit(OP_READ,   FU_M0 + 1, 3, 4);
    emit(OP_LAUNCH, FU_M0 + 1, 0, 0);
    emit(OP_WAIT,   FU_M0,     0, 0);
    emit(OP_WRITE,  FU_M0,     5, 0);
    emit(OP_SET,    0,         0, 0);
    emit(OP_READ,   FU_ADDSUB, 5, 2);
    emit(OP_LAUNCH, FU_ADDSUB, 0, 0);
    emit(OP_WAIT,   FU_M0 + 1, 0, 0);
    emit(OP_WRITE,  FU_M0 + 1, 6, 0);
    emit(OP_WAIT,   FU_ADDSUB, 0, 0);
    emit(OP_WRITE,  FU_ADDSUB, 5, 0);
    emit(OP_READ,   FU_ADDSUB, 5, 6);
    emit(OP_LAUNCH, FU_ADDSUB, 0, 0);
    emit(OP_WAIT,   FU_ADDSUB, 0, 0);
    emit(OP_WRITE,  FU_ADDSUB, 5, 0);
    emit(OP_HALT,   0,         0, 0);
  endfunction

  function automatic void gen_scalar_mult();
    int tab_init, tab_add, loop_at, end_at, add_common;
    int nextd0, jtab0, nextd1, jtab1;
    int init_at [16];
    int add_at  [16];
    clear();
    // precomputation
    f_copy(QX, elem(1)); f_copy(QY, elem(1) + 1);
    pt_dbl(P2X, P2Y, QX, QY);
    pt_add(elem(3), elem(3) + 1, elem(1), elem(1) + 1, P2X, P2Y);
    pt_add(elem(5), elem(5) + 1, elem(3), elem(3) + 1, P2X, P2Y);
    pt_add(elem(7), elem(7) + 1, elem(5), elem(5) + 1, P2X, P2Y);
    for (int d = 1; d <= 7; d += 2) begin
      f_copy(elem(-d), elem(d));
      f_sub(elem(-d) + 1, ZERO, elem(d) + 1);
    end
    // recoding and the first digit
    emit(OP_RECODE, 0, 0, 0);
    nextd0 = n; emit(OP_NEXTD, 0, 0, 0);
    jtab0  = n; emit(OP_JTAB, 0, 0, 0);
    // main loop
    loop_at = n;
    nextd1 = n; emit(OP_NEXTD, 0, 0, 0);
    pt_dbl(QX, QY, QX, QY);
    jtab1 = n; emit(OP_JTAB, 0, 0, 0);
    // shared addition Q = Q + U
    add_common = n;
    pt_add(QX, QY, QX, QY, UX, UY);
    emit_t(OP_JMP, loop_at);
    // per-digit entries
    for (int i = 0; i < 16; i++) begin
      int d;
      d = i - 8;
      init_at[i] = n;
      if (d % 2 != 0 && d != -8) begin
        f_copy(QX, elem(d)); f_copy(QY, elem(d) + 1);
      end
      emit_t(OP_JMP, loop_at);
      add_at[i] = n;
      if (d % 2 != 0 && d != -8) begin
        f_copy(UX, elem(d)); f_copy(UY, elem(d) + 1);
        emit_t(OP_JMP, add_common);
      end else begin
        emit_t(OP_JMP, loop_at);
      end
    end
    // jump tables
    tab_init = n;
    for (int i = 0; i < 16; i++) emit_t(OP_JMP, init_at[i]);
    tab_add = n;
    for (int i = 0; i < 16; i++) emit_t(OP_JMP, add_at[i]);
    end_at = n;
    emit(OP_HALT, 0, 0, 0);
    patch_t(nextd0, OP_NEXTD, end_at);
    patch_t(jtab0,  OP_JTAB,  tab_init);
    patch_t(nextd1, OP_NEXTD, end_at);
    patch_t(jtab1,  OP_JTAB,  tab_add);
  endfunction

endpackage
