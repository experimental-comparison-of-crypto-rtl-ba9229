// tb_mont_mul: self-checking test of the Montgomery multiplier.
//
// Three multipliers at the 256-bit size (NW = 8 words) are run side by side,
// handling one (NB = 1), four (NB = 4) and eight (NB = 8) words per cycle; the
// last two stall on the T_0 dependency between iterations. Random
// operands below the P-256 prime and below a random odd modulus are loaded
// word by word; each result r is checked against the reference through
// r * 2^256 = a * b (mod p) and r < p, and each latency against
// NW*NCH + (NW-1)*max(0, WCH + 3 - NCH) + 3 busy cycles (NCH = NW/NB chunks,
// WCH = 1 for NB = 1, else 0). Edge operands 0, 1 and p-1 are included.
module tb_mont_mul;
  import hecc_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned NW = 8;
  localparam int unsigned FB = NW * W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [FB-1:0]          p;
  logic [W-1:0]           pinv;
  logic                   ld_en, start;
  logic [$clog2(NW)-1:0]  ld_idx, rd_idx;
  logic [W-1:0]           ld_a, ld_b;
  logic                   busy1, busy4, busy8;
  logic [W-1:0]           rw1, rw4, rw8;

  mont_mul #(.NW(NW), .NB(1)) u1 (.clk, .rst_n, .p, .pinv, .ld_en, .ld_idx, .ld_a, .ld_b,
                                  .start, .busy(busy1), .rd_idx, .rd_word(rw1));
  mont_mul #(.NW(NW), .NB(4)) u4 (.clk, .rst_n, .p, .pinv, .ld_en, .ld_idx, .ld_a, .ld_b,
                                  .start, .busy(busy4), .rd_idx, .rd_word(rw4));
  mont_mul #(.NW(NW), .NB(8)) u8 (.clk, .rst_n, .p, .pinv, .ld_en, .ld_idx, .ld_a, .ld_b,
                                  .start, .busy(busy8), .rd_idx, .rd_word(rw8));

  function automatic int exp_busy(int nb);
    int nch, wch, st;
    nch = NW / nb;
    wch = (nb >= 2) ? 0 : 1;
    st  = (wch + 3 - nch > 0) ? wch + 3 - nch : 0;
    return NW * nch + (NW - 1) * st + 3;
  endfunction

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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

  task automatic run_one(big_t a, big_t b, big_t m);
    big_t r1, r4, r8, lhs1, lhs4, lhs8, rhs;
    int t0, lat1, lat4, lat8;
    p    = m[FB-1:0];
    pinv = mont_neg_inv(p[W-1:0]);
    for (int j = 0; j < NW; j++) begin
      ld_en = 1; ld_idx = j[$clog2(NW)-1:0]; ld_a = a[j*W +: W]; ld_b = b[j*W +: W];
      @(posedge clk); #1;
    end
    ld_en = 0;
    start = 1; t0 = cyc;
    @(posedge clk); #1;
    start = 0;
    lat1 = -1; lat4 = -1; lat8 = -1;
    while (busy1 || busy4 || busy8) begin
      @(posedge clk); #1;
      if (!busy1 && lat1 < 0) lat1 = cyc - t0;
      if (!busy4 && lat4 < 0) lat4 = cyc - t0;
      if (!busy8 && lat8 < 0) lat8 = cyc - t0;
    end
    if (lat1 < 0) lat1 = cyc - t0;
    if (lat4 < 0) lat4 = cyc - t0;
    if (lat8 < 0) lat8 = cyc - t0;
    r1 = '0; r4 = '0; r8 = '0;
    for (int j = 0; j < NW; j++) begin
      rd_idx = j[$clog2(NW)-1:0]; #1;
      r1[j*W +: W] = rw1;
      r4[j*W +: W] = rw4;
      r8[j*W +: W] = rw8;
    end
    rhs  = mulmod(a, b, m);
    lhs1 = to_mont(r1, FB, m);
    lhs4 = to_mont(r4, FB, m);
    lhs8 = to_mont(r8, FB, m);
    check(r1 < m && lhs1 == rhs, $sformatf("NB=1 a=%h b=%h r=%h", a, b, r1));
    check(r4 < m && lhs4 == rhs, $sformatf("NB=4 a=%h b=%h r=%h", a, b, r4));
    check(r8 < m && lhs8 == rhs, $sformatf("NB=8 a=%h b=%h r=%h", a, b, r8));
    // lat counts from the start edge to the first idle cycle: busy cycles + 1
    check(lat1 - 1 == exp_busy(1), $sformatf("NB=1 busy %0d, expected %0d", lat1 - 1, exp_busy(1)));
    check(lat4 - 1 == exp_busy(4), $sformatf("NB=4 busy %0d, expected %0d", lat4 - 1, exp_busy(4)));
    check(lat8 - 1 == exp_busy(8), $sformatf("NB=8 busy %0d, expected %0d", lat8 - 1, exp_busy(8)));
  endtask

  initial begin
    big_t m;
    ld_en = 0; start = 0; ld_idx = '0; rd_idx = '0; ld_a = '0; ld_b = '0;
    p = '0; pinv = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    run_one(0, 5, P256);
    run_one(1, 1, P256);
    run_one(P256 - 1, P256 - 1, P256);
    for (int n = 0; n < 40; n++)
      run_one(rand_below(P256, 256), rand_below(P256, 256), P256);
    for (int n = 0; n < 20; n++) begin
      m = rand_below({256{1'b1}}, 256) | 1 | (512'd1 << 255);
      run_one(rand_below(m, 256), rand_below(m, 256), m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
