// tb_mod_addsub: self-checking test of the modular adder/subtracter.
//
// 256-bit operands (NW = 8) below the P-256 prime, random and at the edges
// (0, p-1), in both modes; results are compared with the reference
// (a + b) mod p and (a - b) mod p, and busy must last exactly one cycle.
module tb_mod_addsub;
  import hecc_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned NW = 8;
  localparam int unsigned FB = NW * W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [FB-1:0]          p;
  logic                   opmode, ld_en, start, busy;
  logic [$clog2(NW)-1:0]  ld_idx, rd_idx;
  logic [W-1:0]           ld_a, ld_b, rd_word;

  mod_addsub #(.NW(NW)) dut (.clk, .rst_n, .p, .opmode, .ld_en, .ld_idx, .ld_a, .ld_b,
                             .start, .busy, .rd_idx, .rd_word);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  task automatic run_one(big_t a, big_t b, bit sub, big_t m);
    big_t r, exp_r;
    int busy_cycles;
    p = m[FB-1:0];
    for (int j = 0; j < NW; j++) begin
      ld_en = 1; ld_idx = j[$clog2(NW)-1:0]; ld_a = a[j*W +: W]; ld_b = b[j*W +: W];
      @(posedge clk); #1;
    end
    ld_en = 0;
    opmode = sub; start = 1;
    @(posedge clk); #1;
    start = 0; opmode = ~sub;      // the mode is sampled at start only
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
    exp_r = sub ? submod(a, b, m) : addmod(a, b, m);
    check(r == exp_r, $sformatf("%s a=%h b=%h r=%h exp=%h", sub ? "sub" : "add", a, b, r, exp_r));
    check(busy_cycles == 1, $sformatf("busy for %0d cycles", busy_cycles));
  endtask

  initial begin
    ld_en = 0; start = 0; opmode = 0; ld_idx = '0; rd_idx = '0; ld_a = '0; ld_b = '0; p = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    run_one(P256 - 1, P256 - 1, 0, P256);
    run_one(0, P256 - 1, 1, P256);
    run_one(5, 5, 1, P256);
    run_one(0, 0, 0, P256);
    for (int n = 0; n < 100; n++)
      run_one(rand_below(P256, 256), rand_below(P256, 256), n[0], P256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
