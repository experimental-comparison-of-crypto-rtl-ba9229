// tb_prog_mem: self-checking test of the program memory.
//
// Fills a 1024 x 25-bit program memory with pseudo-random words through the
// write port, then reads every address back asynchronously and compares with
// a copy kept by the testbench; finally rewrites a few addresses and checks
// that only those change.
module tb_prog_mem;
  import hecc_pkg::*;

  localparam int unsigned DEPTH = 1024;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                      wr_en;
  logic [$clog2(DEPTH)-1:0]  wr_addr, rd_addr;
  logic [INSTR_BITS-1:0]     wr_data, rd_data;
  logic [INSTR_BITS-1:0]     model [DEPTH];

  prog_mem #(.DEPTH(DEPTH)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    @(posedge clk); #1;
    for (int i = 0; i < DEPTH; i++) begin
      wr_en = 1; wr_addr = i[9:0]; wr_data = INSTR_BITS'($urandom); model[i] = wr_data;
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int i = 0; i < DEPTH; i++) begin
      rd_addr = i[9:0]; #1;
      checks++;
      if (rd_data != model[i]) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", i, rd_data, model[i]);
      end
    end
    for (int i = 0; i < 8; i++) begin
      wr_en = 1; wr_addr = 10'(i * 97); wr_data = INSTR_BITS'($urandom); model[i * 97] = wr_data;
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int i = 0; i < DEPTH; i++) begin
      rd_addr = i[9:0]; #1;
      checks++;
      if (rd_data != model[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
