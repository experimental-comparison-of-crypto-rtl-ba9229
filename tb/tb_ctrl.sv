// tb_ctrl: self-checking test of the controller.
//
// The controller runs a small program against testbench models: a program
// array, a two-read-port memory with one cycle of read latency, three fake
// arithmetic units (unit i returns a_j + b_j + i per word after 3 + 4*i busy
// cycles) and a recoding unit that serves a list of digits. The program
// overlaps two units, waits for both, writes the results back, sets OPMODE,
// then recodes and walks the digits through a jump table until nextd finds
// none left and jumps to halt. Checked: memory contents, the OPMODE value,
// the cycle count of every read (NW+1) and write (NW), that wait stalls while
// a unit is busy, the jump-table entry taken for each digit, and done.
module tb_ctrl;
  import hecc_pkg::*;

  localparam int unsigned NW   = 4;
  localparam int unsigned NFU  = 3;
  localparam int unsigned PD   = 64;
  localparam int unsigned MAW  = ELEM_BITS + $clog2(NW);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                          start, running, done;
  logic [$clog2(PD)-1:0]         pc;
  logic [INSTR_BITS-1:0]         instr_bits;
  logic [MAW-1:0]                ra_addr, rb_addr, wa_addr;
  logic [W-1:0]                  ra_data, rb_data;
  logic                          we;
  logic [NFU-1:0]                fu_ld_en, fu_start, fu_busy;
  logic [$clog2(NW)-1:0]         fu_ld_idx, fu_rd_idx;
  logic [W-1:0]                  fu_ld_a, fu_ld_b;
  logic [FU_BITS-1:0]            fu_rd_sel;
  logic                          opmode;
  logic                          rec_start, rec_busy, rec_pop, rec_avail;
  logic signed [DIGIT_BITS-1:0]  rec_digit;

  ctrl #(.NW(NW), .NFU(NFU), .PROG_DEPTH(PD)) dut (.*);

  // ---- program ----
  logic [INSTR_BITS-1:0] prog [PD];
  assign instr_bits = prog[pc];

  function automatic logic [INSTR_BITS-1:0] ins(opcode_e op, int fu, int a, int b);
    instr_t i;
    i.op = op; i.fu = FU_BITS'(fu); i.a = ELEM_BITS'(a); i.b = ELEM_BITS'(b);
    return i;
  endfunction

  // ---- memory model ----
  logic [W-1:0] mem [2**MAW];
  always_ff @(posedge clk) begin
    ra_data <= mem[ra_addr];
    rb_data <= mem[rb_addr];
  end

  // ---- fake units ----
  logic [W-1:0] ua [NFU][NW];
  logic [W-1:0] ub [NFU][NW];
  int           left [NFU];
  logic [W-1:0] res_word;
  always_comb begin
    res_word = '0;
    for (int i = 0; i < NFU; i++)
      if (int'(fu_rd_sel) == i) res_word = ua[i][fu_rd_idx] + ub[i][fu_rd_idx] + W'(i);
  end
  always_ff @(posedge clk) begin
    if (we) mem[wa_addr] <= res_word;
    for (int i = 0; i < NFU; i++) begin
      if (fu_ld_en[i]) begin
        ua[i][fu_ld_idx] <= fu_ld_a;
        ub[i][fu_ld_idx] <= fu_ld_b;
      end
      if (fu_start[i]) left[i] <= 3 + 4 * i;
      else if (left[i] > 0) left[i] <= left[i] - 1;
    end
  end
  always_comb for (int i = 0; i < NFU; i++) fu_busy[i] = (left[i] > 0);

  // ---- recoding unit model ----
  localparam int ND = 6;
  int digs [ND];
  int dptr;
  int rec_left;
  always_ff @(posedge clk) begin
    if (rec_start) rec_left <= 5;
    else if (rec_left > 0) rec_left <= rec_left - 1;
    if (rec_pop && dptr < ND) dptr <= dptr + 1;
  end
  assign rec_busy  = (rec_left > 0);
  assign rec_avail = !rec_busy && dptr < ND;
  assign rec_digit = (dptr < ND) ? DIGIT_BITS'(digs[dptr]) : '0;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- dwell time per program address and visits to the jump table ----
  int dwell [PD];
  int table_visits [16];
  int nvisits = 0;
  int wait_stalls = 0;
  instr_t cur;
  assign cur = instr_t'(instr_bits);
  always @(posedge clk) if (running) begin
    dwell[pc] <= dwell[pc] + 1;
    if (pc >= 30 && pc < 46 && nvisits < 16) begin
      table_visits[nvisits] = int'(pc) - 30 - 8;
      nvisits++;
    end
    if (cur.op == OP_WAIT && fu_busy[cur.fu[1:0]]) wait_stalls++;
  end

  initial begin
    for (int i = 0; i < PD; i++) begin prog[i] = ins(OP_HALT, 0, 0, 0); dwell[i] = 0; end
    for (int i = 0; i < NFU; i++) left[i] = 0;
    rec_left = 0;
    for (int i = 0; i < 2**MAW; i++) mem[i] = $urandom;
    prog[0]  = ins(OP_SET, 0, 0, 1);
    prog[1]  = ins(OP_READ, 2, 3, 4);
    prog[2]  = ins(OP_LAUNCH, 2, 0, 0);
    prog[3]  = ins(OP_READ, 0, 5, 6);
    prog[4]  = ins(OP_LAUNCH, 0, 0, 0);
    prog[5]  = ins(OP_WAIT, 2, 0, 0);
    prog[6]  = ins(OP_WRITE, 2, 7, 0);
    prog[7]  = ins(OP_WAIT, 0, 0, 0);
    prog[8]  = ins(OP_WRITE, 0, 8, 0);
    prog[9]  = ins(OP_RECODE, 0, 0, 0);
    prog[10] = ins(OP_NEXTD, 0, 0, 20);
    prog[11] = ins(OP_JTAB, 0, 0, 30);
    for (int i = 0; i < 16; i++) prog[30 + i] = ins(OP_JMP, 0, 0, 10);
    prog[20] = ins(OP_HALT, 0, 0, 0);
    digs = '{3, 0, -1, 7, -7, 1};
    dptr = 0;
    start = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    while (!done) begin @(posedge clk); #1; end
    for (int j = 0; j < NW; j++) begin
      check(mem[7*NW + j] == mem[3*NW + j] + mem[4*NW + j] + 2, $sformatf("element 7 word %0d", j));
      check(mem[8*NW + j] == mem[5*NW + j] + mem[6*NW + j] + 0, $sformatf("element 8 word %0d", j));
    end
    check(opmode == 1'b1, "OPMODE set to 1");
    check(dwell[1] == NW + 1 && dwell[3] == NW + 1, $sformatf("read takes %0d/%0d cycles", dwell[1], dwell[3]));
    check(dwell[6] == NW && dwell[8] == NW, $sformatf("write takes %0d/%0d cycles", dwell[6], dwell[8]));
    check(wait_stalls > 0, "wait stalled on a busy unit");
    check(nvisits == ND, $sformatf("%0d jump-table visits", nvisits));
    for (int i = 0; i < ND && i < nvisits; i++)
      check(table_visits[i] == digs[i], $sformatf("digit %0d took entry %0d", digs[i], table_visits[i]));
    check(!running, "halted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
