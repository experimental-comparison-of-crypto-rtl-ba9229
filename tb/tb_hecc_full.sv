// tb_hecc_full: one complete scalar multiplication on the processor at its
// default size: 256-bit ECC field, one Montgomery multiplier handling one word
// per cycle, 4NAF key recoding.
//
// The host loads the P-256 prime, a random curve coefficient a and a random
// point P (the point defines the curve constant b), and a random 256-bit
// scalar k. The processor runs the affine signed-window program and the
// result Q = [k]P is compared with a plain affine double-and-add over the
// binary digits of k computed in the testbench. Values cross the interface in
// Montgomery form x*2^256 mod p. The cycle count of the run is printed, and
// the mechanisms the program relies on (wait stalls, additions, subtractions,
// inversions, recoding, positive, negative and zero digits, end of digits)
// must each have happened.
module tb_hecc_full;
  import hecc_pkg::*;
  import tb_util_pkg::*;
  import tb_ecc_prog_pkg::*;

  localparam int unsigned FIELD_BITS = 256;
  localparam int unsigned NW  = FIELD_BITS / W;
  localparam int unsigned MAW = ELEM_BITS + $clog2(NW);
  localparam big_t        PRIME = P256;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                   start, running, done;
  logic                   prog_we, p_we, k_we, mem_we;
  logic [9:0]             prog_addr;
  logic [INSTR_BITS-1:0]  prog_wdata;
  logic [$clog2(NW)-1:0]  p_idx, k_idx;
  logic [W-1:0]           p_word, k_word, mem_wdata, mem_rdata;
  logic [MAW-1:0]         mem_addr;

  hecc_processor dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_stall = 0, n_add = 0, n_sub = 0, n_inv = 0, n_recode = 0;
  int n_dpos = 0, n_dneg = 0, n_dzero = 0, n_exhaust = 0, n_done = 0;
  instr_t cur;
  assign cur = instr_t'(dut.instr_bits);
  always @(posedge clk) if (rst_n) begin
    if (int'(dut.u_ctrl.state) == 1 && cur.op == OP_WAIT && dut.u_ctrl.sel_busy) n_stall++;
    if (dut.fu_start[FU_ADDSUB] && !dut.opmode) n_add++;
    if (dut.fu_start[FU_ADDSUB] && dut.opmode) n_sub++;
    if (dut.fu_start[FU_INV]) n_inv++;
    if (dut.rec_start) n_recode++;
    if (dut.rec_pop && dut.rec_digit > 0) n_dpos++;
    if (dut.rec_pop && dut.rec_digit < 0) n_dneg++;
    if (dut.rec_pop && dut.rec_digit == 0) n_dzero++;
    if (int'(dut.u_ctrl.state) == 1 && cur.op == OP_NEXTD && !dut.rec_avail) n_exhaust++;
    if (dut.u_ctrl.state != 0 && cur.op == OP_HALT) n_done++;
  end

  // ---- host access ----
  task automatic load_prog();
    for (int i = 0; i < tb_ecc_prog_pkg::n; i++) begin
      prog_we = 1; prog_addr = 10'(i); prog_wdata = code[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
  endtask

  task automatic write_elem(int e, big_t v);
    for (int j = 0; j < NW; j++) begin
      mem_we = 1; mem_addr = MAW'(e * NW + j); mem_wdata = v[j*W +: W];
      @(posedge clk); #1;
    end
    mem_we = 0;
  endtask

  task automatic read_elem(int e, output big_t v);
    v = '0;
    for (int j = 0; j < NW; j++) begin
      mem_addr = MAW'(e * NW + j);
      @(posedge clk); #1;
      v[j*W +: W] = mem_rdata;
    end
  endtask

  task automatic load_p(big_t m);
    for (int j = 0; j < NW; j++) begin
      p_we = 1; p_idx = j[$clog2(NW)-1:0]; p_word = m[j*W +: W];
      @(posedge clk); #1;
    end
    p_we = 0;
  endtask

  task automatic load_k(big_t k);
    for (int j = 0; j < NW; j++) begin
      k_we = 1; k_idx = j[$clog2(NW)-1:0]; k_word = k[j*W +: W];
      @(posedge clk); #1;
    end
    k_we = 0;
  endtask

  task automatic run(output int cycles);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cycles = 1;
    while (!done) begin
      @(posedge clk); #1;
      cycles++;
    end
  endtask

  function automatic big_t mt(big_t x);
    return to_mont(x, FIELD_BITS, PRIME);
  endfunction

  // ---- reference affine arithmetic ----
  function automatic void ref_add(inout big_t x1, inout big_t y1, input big_t x2, input big_t y2);
    big_t l, x3, y3;
    l  = mulmod(submod(y2, y1, PRIME), invmod(submod(x2, x1, PRIME), PRIME), PRIME);
    x3 = submod(submod(mulmod(l, l, PRIME), x1, PRIME), x2, PRIME);
    y3 = submod(mulmod(l, submod(x1, x3, PRIME), PRIME), y1, PRIME);
    x1 = x3; y1 = y3;
  endfunction

  function automatic void ref_dbl(inout big_t x, inout big_t y, input big_t a);
    big_t l, x3, y3;
    l  = mulmod(addmod(mulmod(3, mulmod(x, x, PRIME), PRIME), a, PRIME),
                invmod(addmod(y, y, PRIME), PRIME), PRIME);
    x3 = submod(mulmod(l, l, PRIME), addmod(x, x, PRIME), PRIME);
    y3 = submod(mulmod(l, submod(x, x3, PRIME), PRIME), y, PRIME);
    x = x3; y = y3;
  endfunction

  function automatic void ref_smul(big_t k, big_t px, big_t py, big_t a, output big_t qx, output big_t qy);
    int top;
    top = 0;
    for (int i = 0; i < FIELD_BITS; i++) if (k[i]) top = i;
    qx = px; qy = py;
    for (int i = top - 1; i >= 0; i--) begin
      ref_dbl(qx, qy, a);
      if (k[i]) ref_add(qx, qy, px, py);
    end
  endfunction

  initial begin
    big_t px, py, ca, k, qx, qy, ex, ey;
    int cycles;
    start = 0; prog_we = 0; p_we = 0; k_we = 0; mem_we = 0;
    prog_addr = '0; prog_wdata = '0; p_idx = '0; k_idx = '0; p_word = '0; k_word = '0;
    mem_addr = '0; mem_wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    load_p(PRIME);

    // 2. scalar multiplication
    gen_scalar_mult();
    load_prog();
    for (int t = 0; t < 1; t++) begin
      px = rand_below(PRIME, 256); py = rand_below(PRIME, 256); ca = rand_below(PRIME, 256);
      k  = rand_below({256{1'b1}}, 256) | (512'd1 << 255);
      write_elem(ZERO, 0);
      write_elem(R3, mulmod(mt(1), mulmod(mt(1), mt(1), PRIME), PRIME));   // R^3 mod p
      write_elem(CA, mt(ca));
      write_elem(elem(1), mt(px)); write_elem(elem(1) + 1, mt(py));
      load_k(k);
      run(cycles);
      read_elem(QX, qx); read_elem(QY, qy);
      ref_smul(k, px, py, ca, ex, ey);
      check(qx == mt(ex) && qy == mt(ey), $sformatf("[k]P k=%0h: got (%h, %h) expected (%h, %h)",
                                                     k, qx, qy, mt(ex), mt(ey)));
      $display("[k]P with k of %0d bits: %0d cycles", $clog2(k + 1), cycles);
    end

    check(n_stall   > 0, "wait stall");
    check(n_add     > 0, "modular addition");
    check(n_sub     > 0, "modular subtraction");
    check(n_inv     > 0, "inversion");
    check(n_recode  > 0, "key recoding");
    check(n_dpos    > 0, "positive digit");
    check(n_dneg    > 0, "negative digit");
    check(n_dzero   > 0, "zero digit");
    check(n_exhaust > 0, "nextd end of digits");
    check(n_done    > 0, "halt");
    $display("mechanisms: stalls=%0d add=%0d sub=%0d inv=%0d recode=%0d d+=%0d d-=%0d d0=%0d end=%0d halt=%0d",
             n_stall, n_add, n_sub, n_inv, n_recode, n_dpos, n_dneg, n_dzero, n_exhaust, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
