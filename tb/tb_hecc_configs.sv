// tb_hecc_configs: scalar multiplication on several processor configurations.
//
// The processor was evaluated over a grid of field sizes, multiplier counts
// N_M and words per cycle N_B. This testbench builds five points of that grid
// side by side:
//   256-bit ECC with (N_M, N_B) = (1, 2), (3, 4), (5, 4)
//   128-bit with (N_M, N_B) = (6, 2), (12, 2)
// Each runs one full-length scalar multiplication [k]P (the affine 4NAF
// example program) on a random curve over the P-256 or 2^127 - 1 prime, and
// checks the result against a plain affine double-and-add on the binary
// digits of k. It prints the cycle count of each run.
module tb_hecc_configs;
  import hecc_pkg::*;
  import tb_util_pkg::*;
  import tb_ecc_prog_pkg::*;

  localparam int NCFG = 5;
  localparam int CFG_BITS [NCFG] = '{256, 256, 256, 128, 128};
  localparam int CFG_NM   [NCFG] = '{1, 3, 5, 6, 12};
  localparam int CFG_NB   [NCFG] = '{2, 4, 4, 2, 2};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int finished = 0;

  initial begin : watchdog
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference affine arithmetic over the prime m ----
  function automatic void ref_add(inout big_t x1, inout big_t y1, input big_t x2, input big_t y2,
                                  input big_t m);
    big_t l, x3, y3;
    l  = mulmod(submod(y2, y1, m), invmod(submod(x2, x1, m), m), m);
    x3 = submod(submod(mulmod(l, l, m), x1, m), x2, m);
    y3 = submod(mulmod(l, submod(x1, x3, m), m), y1, m);
    x1 = x3; y1 = y3;
  endfunction

  function automatic void ref_dbl(inout big_t x, inout big_t y, input big_t a, input big_t m);
    big_t l, x3, y3;
    l  = mulmod(addmod(mulmod(3, mulmod(x, x, m), m), a, m), invmod(addmod(y, y, m), m), m);
    x3 = submod(mulmod(l, l, m), addmod(x, x, m), m);
    y3 = submod(mulmod(l, submod(x, x3, m), m), y, m);
    x = x3; y = y3;
  endfunction

  function automatic void ref_smul(big_t k, big_t px, big_t py, big_t a, big_t m,
                                   output big_t qx, output big_t qy);
    int top;
    top = 0;
    for (int i = 0; i < 512; i++) if (k[i]) top = i;
    qx = px; qy = py;
    for (int i = top - 1; i >= 0; i--) begin
      ref_dbl(qx, qy, a, m);
      if (k[i]) ref_add(qx, qy, px, py, m);
    end
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned FB  = CFG_BITS[g];
    localparam int unsigned NW  = FB / W;
    localparam int unsigned MAW = ELEM_BITS + $clog2(NW);

    logic                   start, running, done;
    logic                   prog_we, p_we, k_we, mem_we;
    logic [9:0]             prog_addr;
    logic [INSTR_BITS-1:0]  prog_wdata;
    logic [$clog2(NW)-1:0]  p_idx, k_idx;
    logic [W-1:0]           p_word, k_word, mem_wdata, mem_rdata;
    logic [MAW-1:0]         mem_addr;

    hecc_processor #(.FIELD_BITS(FB), .N_M(CFG_NM[g]), .N_B(CFG_NB[g])) dut (.*);

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

    initial begin
      big_t m, px, py, ca, k, qx, qy, ex, ey, r1;
      int cycles;
      start = 0; prog_we = 0; p_we = 0; k_we = 0; mem_we = 0;
      prog_addr = '0; prog_wdata = '0; p_idx = '0; k_idx = '0; p_word = '0; k_word = '0;
      mem_addr = '0; mem_wdata = '0;
      m = (FB == 256) ? P256 : P127;
      @(posedge rst_n);
      @(posedge clk); #1;
      for (int i = 0; i < PROG_DEPTH; i++) begin
        prog_we = 1; prog_addr = 10'(i); prog_wdata = code[i];
        @(posedge clk); #1;
      end
      prog_we = 0;
      for (int j = 0; j < NW; j++) begin
        p_we = 1; p_idx = j[$clog2(NW)-1:0]; p_word = m[j*W +: W];
        @(posedge clk); #1;
      end
      p_we = 0;
      px = rand_below(m, FB); py = rand_below(m, FB); ca = rand_below(m, FB);
      k  = rand_below(m, FB) | (512'd1 << (FB - 2));
      r1 = to_mont(1, FB, m);
      write_elem(ZERO, 0);
      write_elem(R3, mulmod(r1, mulmod(r1, r1, m), m));
      write_elem(CA, to_mont(ca, FB, m));
      write_elem(elem(1), to_mont(px, FB, m));
      write_elem(elem(1) + 1, to_mont(py, FB, m));
      for (int j = 0; j < NW; j++) begin
        k_we = 1; k_idx = j[$clog2(NW)-1:0]; k_word = k[j*W +: W];
        @(posedge clk); #1;
      end
      k_we = 0;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      cycles = 1;
      while (!done) begin
        @(posedge clk); #1;
        cycles++;
      end
      read_elem(QX, qx); read_elem(QY, qy);
      ref_smul(k, px, py, ca, m, ex, ey);
      checks++;
      if (qx != to_mont(ex, FB, m) || qy != to_mont(ey, FB, m)) begin
        failures++;
        $display("FAIL: %0d bits, N_M=%0d, N_B=%0d: wrong [k]P", FB, CFG_NM[g], CFG_NB[g]);
      end
      $display("%0d-bit field, N_M=%0d, N_B=%0d: [k]P in %0d cycles", FB, CFG_NM[g], CFG_NB[g], cycles);
      finished++;
    end
  end

  initial begin
    gen_scalar_mult();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (finished == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
