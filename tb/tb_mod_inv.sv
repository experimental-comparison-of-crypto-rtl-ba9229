// tb_mod_inv: self-checking test of the modular inverter.
//
// 256-bit inputs (NW = 8) below the P-256 prime: 1, 2, p-1 and random values.
// Each result is compared with a^(p-2) mod p (Fermat), and the cycle count
// must stay within the 4*256 + 2 steps bound of the binary algorithm. An input
// of zero must give zero.
module tb_mod_inv;
  import hecc_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned NW = 8;
  localparam int unsigned FB = NW * W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [FB-1:0]          p;
  logic                   ld_en, start, busy;
  logic [$clog2(NW)-1:0]  ld_idx, rd_idx;
  logic [W-1:0]           ld_a, ld_b, rd_word;

  mod_inv #(.NW(NW)) dut (.clk, .rst_n, .p, .ld_en, .ld_idx, .ld_a, .ld_b,
                          .start, .busy, .rd_idx, .rd_word);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(big_t a, big_t m);
    big_t r, exp_r;
    int busy_cycles;
    p = m[FB-1:0];
    for (int j = 0; j < NW; j++) begin
      ld_en = 1; ld_idx = j[$clog2(NW)-1:0]; ld_a = a[j*W +: W]; ld_b = $urandom;
      @(posedge clk); #1;
    end
    ld_en = 0;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    busy_cycles = 0;
    while (busy) begin
      busy_cycles++;
      @(posedge clk); #1;
    end
    r = '0;
    for (int j = 0; j < NW; j++) begin
      rd_idx = j[$clog2(NW)-1:0]; #1;
      r[j*W +: W] = rd_word;
    end
    exp_r = (a == 0) ? 0 : invmod(a, m);
    check(r == exp_r, $sformatf("a=%h r=%h exp=%h", a, r, exp_r));
    check(busy_cycles <= 4*FB + 2, $sformatf("busy for %0d cycles", busy_cycles));
  endtask

  initial begin
    ld_en = 0; start = 0; ld_idx = '0; rd_idx = '0; ld_a = '0; ld_b = '0; p = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    run_one(1, P256);
    run_one(2, P256);
    run_one(P256 - 1, P256);
    run_one(0, P256);
    for (int n = 0; n < 30; n++) run_one(rand_below(P256 - 1, 256) + 1, P256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
