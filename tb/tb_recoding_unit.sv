// tb_recoding_unit: self-checking test of the key recoding unit.
//
// Four units, one per method (binary, NAF, 3NAF, 4NAF), recode the same
// 256-bit scalars. The digits are popped most significant first and checked
// against the defining properties instead of a copy of the algorithm:
//   - Horner evaluation v = 2v + d over the popped digits gives back k;
//   - the first digit popped is non-zero (no leading zeros);
//   - binary digits are 0/1; window-L digits are 0 or odd with |d| < 2^(L-1);
//   - among any L consecutive window-L digits at most one is non-zero.
// Together these fix the width-L NAF uniquely. The recoding time must equal
// the number of digits plus one cycle.
module tb_recoding_unit;
  import hecc_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned NW = 8;
  localparam int unsigned KB = NW * W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                          k_we, start, pop;
  logic [$clog2(NW)-1:0]         k_idx;
  logic [W-1:0]                  k_word;
  logic [3:0]                    busy, avail;
  logic signed [DIGIT_BITS-1:0]  digit [4];
  logic [3:0]                    pop_v;

  for (genvar g = 0; g < 4; g++) begin : g_dut
    recoding_unit #(.NW(NW), .MODE(recode_e'(g))) dut (
      .clk, .rst_n, .k_we, .k_idx, .k_word, .start, .busy(busy[g]),
      .pop(pop_v[g]), .avail(avail[g]), .digit(digit[g]));
  end

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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

  task automatic run_one(big_t k);
    int busy_cycles [4];
    pop_v = '0;
    for (int j = 0; j < NW; j++) begin
      k_we = 1; k_idx = j[$clog2(NW)-1:0]; k_word = k[j*W +: W];
      @(posedge clk); #1;
    end
    k_we = 0;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    busy_cycles = '{default: 0};
    while (busy != '0) begin
      for (int g = 0; g < 4; g++) if (busy[g]) busy_cycles[g]++;
      @(posedge clk); #1;
    end
    for (int g = 0; g < 4; g++) begin
      int L, n, last_nz, ok_digits, ok_adj;
      big_t v;
      L = (g == 0) ? 1 : g + 1;
      v = 0; n = 0; last_nz = -1000; ok_digits = 1; ok_adj = 1;
      check(k == 0 || (avail[g] && digit[g] != 0), $sformatf("mode %0d: leading digit %0d", g, digit[g]));
      while (avail[g]) begin
        int d;
        d = int'(digit[g]);
        if (L == 1) begin
          if (d != 0 && d != 1) ok_digits = 0;
        end else if (d != 0) begin
          if (d % 2 == 0 || d >= (1 << (L-1)) || d <= -(1 << (L-1))) ok_digits = 0;
          if (n - last_nz < L) ok_adj = 0;
          last_nz = n;
        end
        v = (v << 1) + big_t'(signed'(64'(d)));
        n++;
        pop_v[g] = 1;
        @(posedge clk); #1;
        pop_v[g] = 0;
      end
      check(v == k, $sformatf("mode %0d: digits give %h, k=%h", g, v, k));
      check(ok_digits == 1, $sformatf("mode %0d: digit out of range", g));
      check(ok_adj == 1, $sformatf("mode %0d: adjacent non-zero digits", g));
      check(busy_cycles[g] == n + 1, $sformatf("mode %0d: %0d cycles for %0d digits", g, busy_cycles[g], n));
    end
  endtask

  initial begin
    k_we = 0; start = 0; pop_v = '0; k_idx = '0; k_word = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    run_one(0);
    run_one(1);
    run_one(7);
    run_one({256{1'b1}});
    run_one(512'd1 << 255);
    for (int n = 0; n < 20; n++) run_one(rand_below({256{1'b1}}, 256));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
