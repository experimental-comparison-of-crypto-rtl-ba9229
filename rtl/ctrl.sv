// ctrl: controller (CTRL) of the crypto-processor.
//
// Fetches 25-bit instructions from the program memory at pc and drives the
// arithmetic units, the points memory and the recoding unit. The arithmetic
// instructions are those of the processor's assembly language; control flow
// over the key digits is this design's own (see hecc_pkg for the encoding).
// Cycle costs, with NW words per field element:
//   read   fu, a, b : NW+1 cycles. Word j of elements a and b is read from the
//                     two memory ports and loaded into unit fu one cycle later.
//   write  fu, a    : NW cycles, one result word per cycle into element a.
//   launch fu       : 1 cycle, start pulse to unit fu.
//   wait   fu       : 1 cycle once unit fu is idle; stalls while it is busy.
//   set, jmp, nextd, jtab, nop : 1 cycle.
//   recode          : starts the recoding unit and stalls until it is done.
//   halt            : back to idle; done goes high and stays high until the
//                     next start.
// Several units can run at once: launch does not wait, so a program overlaps
// multipliers and the adder by placing its waits late. Nothing stops a
// program from reloading a busy unit; an assertion in each unit flags it.
// The operand bus fu_ld_a/fu_ld_b is the memory read data passed straight
// through, and the memory addresses and result select are fields of the
// current instruction; only the enables, indices and control flow are
// sequenced here.
module ctrl
  import hecc_pkg::*;
#(
  parameter int unsigned NW         = 8,
  parameter int unsigned NFU        = 3,
  parameter int unsigned PROG_DEPTH = 1024
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // host
  input  logic                                   start,
  output logic                                   running,
  output logic                                   done,
  // program memory
  output logic [$clog2(PROG_DEPTH)-1:0]          pc,
  input  logic [INSTR_BITS-1:0]                  instr_bits,
  // points memory
  output logic [ELEM_BITS+$clog2(NW)-1:0]        ra_addr,
  output logic [ELEM_BITS+$clog2(NW)-1:0]        rb_addr,
  input  logic [W-1:0]                           ra_data,
  input  logic [W-1:0]                           rb_data,
  output logic                                   we,
  output logic [ELEM_BITS+$clog2(NW)-1:0]        wa_addr,
  // arithmetic units
  output logic [NFU-1:0]                         fu_ld_en,
  output logic [$clog2(NW)-1:0]                  fu_ld_idx,
  output logic [W-1:0]                           fu_ld_a,
  output logic [W-1:0]                           fu_ld_b,
  output logic [NFU-1:0]                         fu_start,
  input  logic [NFU-1:0]                         fu_busy,
  output logic [$clog2(NW)-1:0]                  fu_rd_idx,
  output logic [FU_BITS-1:0]                     fu_rd_sel,
  output logic                                   opmode,
  // recoding unit
  output logic                                   rec_start,
  input  logic                                   rec_busy,
  output logic                                   rec_pop,
  input  logic                                   rec_avail,
  input  logic signed [DIGIT_BITS-1:0]           rec_digit
);

  localparam int unsigned PCW = $clog2(PROG_DEPTH);
  localparam int unsigned IXW = $clog2(NW);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_READ, S_WRITE, S_RECODE} state_e;

  state_e                        state;
  instr_t                        ins;
  logic [IXW:0]                  cnt;
  logic signed [DIGIT_BITS-1:0]  digit_r;
  logic                          rec_started;
  logic [PCW-1:0]                target;
  logic                          fu_ok;
  logic                          sel_busy;
  logic [$clog2(NFU)-1:0]        fu_idx;

  assign ins      = instr_t'(instr_bits);
  assign target   = PCW'({ins.a, ins.b});
  assign fu_ok    = (int'(ins.fu) < NFU);
  assign fu_idx   = ins.fu[$clog2(NFU)-1:0];
  assign sel_busy = fu_ok && fu_busy[fu_idx];
  assign running  = (state != S_IDLE);

  // Word index of the current transfer step.
  logic [IXW-1:0] widx;
  assign widx = (state == S_RUN) ? '0 : cnt[IXW-1:0];

  always_comb begin
    ra_addr   = {ins.a, widx};
    rb_addr   = {ins.b, widx};
    wa_addr   = {ins.a, widx};
    fu_rd_idx = widx;
    fu_rd_sel = ins.fu;
    fu_ld_idx = IXW'(cnt - 1'b1);
    fu_ld_a   = ra_data;
    fu_ld_b   = rb_data;
    fu_ld_en  = '0;
    fu_start  = '0;
    we        = 1'b0;
    rec_pop   = 1'b0;
    rec_start = 1'b0;
    unique case (state)
      S_READ:  if (fu_ok) fu_ld_en[fu_idx] = 1'b1;
      S_WRITE: we = fu_ok;
      S_RUN: begin
        unique case (ins.op)
          OP_LAUNCH: if (fu_ok) fu_start[fu_idx] = 1'b1;
          OP_WRITE:  we = fu_ok;
          OP_NEXTD:  rec_pop = rec_avail;
          default: ;
        endcase
      end
      S_RECODE: rec_start = !rec_started;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pc          <= '0;
      cnt         <= '0;
      done        <= 1'b0;
      opmode      <= 1'b0;
      digit_r     <= '0;
      rec_started <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          pc    <= '0;
          done  <= 1'b0;
        end
        S_RUN: begin
          unique case (ins.op)
            OP_READ: begin
              state <= S_READ;
              cnt   <= (IXW+1)'(1);
            end
            OP_WRITE: begin
              state <= S_WRITE;
              cnt   <= (IXW+1)'(1);
            end
            OP_WAIT:   if (!sel_busy) pc <= pc + 1'b1;
            OP_SET: begin
              if (ins.fu == '0) opmode <= ins.b[0];
              pc <= pc + 1'b1;
            end
            OP_JMP:    pc <= target;
            OP_NEXTD: begin
              if (rec_avail) begin
                digit_r <= rec_digit;
                pc      <= pc + 1'b1;
              end else begin
                pc <= target;
              end
            end
            OP_JTAB:   pc <= target + PCW'({~digit_r[DIGIT_BITS-1], digit_r[DIGIT_BITS-2:0]});
            OP_RECODE: begin
              state       <= S_RECODE;
              rec_started <= 1'b0;
            end
            OP_HALT: begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
            default:   pc <= pc + 1'b1;   // nop, launch
          endcase
        end
        S_READ: begin
          if (cnt == (IXW+1)'(NW)) begin
            state <= S_RUN;
            pc    <= pc + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_WRITE: begin
          if (cnt == (IXW+1)'(NW - 1)) begin
            state <= S_RUN;
            pc    <= pc + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_RECODE: begin
          rec_started <= 1'b1;
          if (rec_started && !rec_busy) begin
            state <= S_RUN;
            pc    <= pc + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
