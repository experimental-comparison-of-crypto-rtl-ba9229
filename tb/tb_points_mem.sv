// tb_points_mem: self-checking test of the points memory.
//
// Writes random words to all 2048 addresses, then reads them back through
// both read ports at once (different addresses), checking the one-cycle read
// latency and that a read of the address being written returns the old word.
module tb_points_mem;
  import hecc_pkg::*;

  localparam int unsigned DEPTH = 2048;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] ra_addr, rb_addr, wa_addr;
  logic [W-1:0]  ra_data, rb_data, wa_data;
  logic          we;
  logic [W-1:0]  model [DEPTH];

  points_mem #(.DEPTH(DEPTH)) dut (.clk, .ra_addr, .ra_data, .rb_addr, .rb_data, .we, .wa_addr, .wa_data);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  initial begin
    logic [W-1:0] old;
    we = 0; ra_addr = '0; rb_addr = '0; wa_addr = '0; wa_data = '0;
    @(posedge clk); #1;
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; wa_addr = AW'(i); wa_data = $urandom; model[i] = wa_data;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      ra_addr = AW'(i); rb_addr = AW'(DEPTH - 1 - i);
      @(posedge clk); #1;
      check(ra_data == model[i], $sformatf("port A addr %0d", i));
      check(rb_data == model[DEPTH - 1 - i], $sformatf("port B addr %0d", DEPTH - 1 - i));
    end
    // read during write of the same address: old data, new data afterwards
    old = model[100];
    we = 1; wa_addr = AW'(100); wa_data = ~old; ra_addr = AW'(100); rb_addr = AW'(100);
    @(posedge clk); #1;
    we = 0;
    check(ra_data == old && rb_data == old, "read-during-write returns old data");
    @(posedge clk); #1;
    check(ra_data == ~old && rb_data == ~old, "new data after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
