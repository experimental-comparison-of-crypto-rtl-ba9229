// tb_fu_result_mux: self-checking test of the result multiplexer.
//
// Five units with random result words; every select value 0..31 is applied
// and the output must be the selected unit's word, or zero past the last unit.
module tb_fu_result_mux;
  import hecc_pkg::*;

  localparam int unsigned NFU = 5;

  logic [NFU-1:0][W-1:0] words;
  logic [FU_BITS-1:0]    sel;
  logic [W-1:0]          word;

  fu_result_mux #(.NFU(NFU)) dut (.words, .sel, .word);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < NFU; i++) words[i] = $urandom;
      for (int s = 0; s < 32; s++) begin
        logic [W-1:0] exp_w;
        sel = FU_BITS'(s);
        #1;
        exp_w = (s < NFU) ? words[s] : '0;
        checks++;
        if (word !== exp_w) begin
          failures++;
          $display("FAIL: sel %0d gives %h, expected %h", s, word, exp_w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
