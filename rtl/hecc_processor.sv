// hecc_processor: customisable crypto-processor for elliptic (ECC) and
// hyper-elliptic (HECC) curve scalar multiplication [k]P over GF(p).
//
// A controller (ctrl) runs a program of 25-bit instructions from the program
// memory. The program performs the curve operations as sequences of GF(p)
// operations on W = 32-bit word data held in the points memory, executed by
// one modular adder/subtracter, one modular inverter and N_M Montgomery
// multipliers that each handle N_B words per cycle. The recoding unit turns the
// scalar k into signed digits (binary, NAF, 3NAF or 4NAF) that the program
// consumes most significant first. Operands travel word by word from the two
// read ports of the points memory into a unit; results travel word by word
// through the result multiplexer back into the memory. The units run
// concurrently, so a program can overlap several multiplications.
//
// Defaults: the 256-bit ECC processor with n_M = 1, n_B = 1 and 4NAF recoding.
// The 128-bit HECC processor is FIELD_BITS = 128; the processor was evaluated
// with n_M = 1..5 (ECC) or 1..12 (HECC) and n_B = 1, 2, 4.
//
// Host interface (usable while running = 0): write the program (prog_*), the
// modulus p one word at a time (p_*), the scalar k (k_*), and read or write
// points-memory words (mem_*, read data one cycle after mem_addr). A start
// pulse runs the program from address 0; done rises when it executes halt.
// Functional units: 0 = adder/subtracter, 1 = inverter, 2.. = multipliers.
module hecc_processor
  import hecc_pkg::*;
#(
  parameter int unsigned FIELD_BITS = 256,
  parameter int unsigned N_M        = 1,
  parameter int unsigned N_B        = 1,
  parameter recode_e     RECODING   = REC_4NAF,
  parameter int unsigned PROG_DEPTH = 1024,
  localparam int unsigned NW        = FIELD_BITS / W,
  localparam int unsigned MAW       = ELEM_BITS + $clog2(NW),
  localparam int unsigned PCW       = $clog2(PROG_DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    running,
  output logic                    done,
  input  logic                    prog_we,
  input  logic [PCW-1:0]          prog_addr,
  input  logic [INSTR_BITS-1:0]   prog_wdata,
  input  logic                    p_we,
  input  logic [$clog2(NW)-1:0]   p_idx,
  input  logic [W-1:0]            p_word,
  input  logic                    k_we,
  input  logic [$clog2(NW)-1:0]   k_idx,
  input  logic [W-1:0]            k_word,
  input  logic                    mem_we,
  input  logic [MAW-1:0]          mem_addr,
  input  logic [W-1:0]            mem_wdata,
  output logic [W-1:0]            mem_rdata
);

  localparam int unsigned NFU = 2 + N_M;
  localparam int unsigned IXW = $clog2(NW);

  // Modulus register and its Montgomery word constant.
  logic [NW*W-1:0] p_r;
  logic [W-1:0]    pinv_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_r    <= '0;
      pinv_r <= '0;
    end else if (p_we && !running) begin
      p_r[p_idx*W +: W] <= p_word;
      if (p_idx == '0) pinv_r <= mont_neg_inv(p_word);
    end
  end

  // Controller.
  logic [PCW-1:0]         pc;
  logic [INSTR_BITS-1:0]  instr_bits;
  logic [MAW-1:0]         c_ra, c_rb, c_wa;
  logic                   c_we;
  logic [W-1:0]           ra_data, rb_data;
  logic [NFU-1:0]         fu_ld_en, fu_start, fu_busy;
  logic [IXW-1:0]         fu_ld_idx, fu_rd_idx;
  logic [W-1:0]           fu_ld_a, fu_ld_b, res_word;
  logic [FU_BITS-1:0]     fu_rd_sel;
  logic                   opmode;
  logic                   rec_start, rec_busy, rec_pop, rec_avail;
  logic signed [DIGIT_BITS-1:0] rec_digit;
  logic [NFU-1:0][W-1:0]  fu_words;

  ctrl #(.NW(NW), .NFU(NFU), .PROG_DEPTH(PROG_DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .running, .done,
    .pc, .instr_bits,
    .ra_addr(c_ra), .rb_addr(c_rb), .ra_data, .rb_data, .we(c_we), .wa_addr(c_wa),
    .fu_ld_en, .fu_ld_idx, .fu_ld_a, .fu_ld_b, .fu_start, .fu_busy,
    .fu_rd_idx, .fu_rd_sel, .opmode,
    .rec_start, .rec_busy, .rec_pop, .rec_avail, .rec_digit
  );

  prog_mem #(.DEPTH(PROG_DEPTH)) u_prog (
    .clk, .wr_en(prog_we && !running), .wr_addr(prog_addr), .wr_data(prog_wdata),
    .rd_addr(pc), .rd_data(instr_bits)
  );

  // Points memory: the host owns port A and the write port while idle.
  points_mem #(.DEPTH(2**MAW)) u_points (
    .clk,
    .ra_addr(running ? c_ra : mem_addr), .ra_data,
    .rb_addr(c_rb), .rb_data,
    .we(running ? c_we : mem_we),
    .wa_addr(running ? c_wa : mem_addr),
    .wa_data(running ? res_word : mem_wdata)
  );
  assign mem_rdata = ra_data;

  recoding_unit #(.NW(NW), .MODE(RECODING)) u_rec (
    .clk, .rst_n, .k_we(k_we && !running), .k_idx, .k_word,
    .start(rec_start), .busy(rec_busy), .pop(rec_pop), .avail(rec_avail), .digit(rec_digit)
  );

  mod_addsub #(.NW(NW)) u_addsub (
    .clk, .rst_n, .p(p_r), .opmode,
    .ld_en(fu_ld_en[FU_ADDSUB]), .ld_idx(fu_ld_idx), .ld_a(fu_ld_a), .ld_b(fu_ld_b),
    .start(fu_start[FU_ADDSUB]), .busy(fu_busy[FU_ADDSUB]),
    .rd_idx(fu_rd_idx), .rd_word(fu_words[FU_ADDSUB])
  );

  mod_inv #(.NW(NW)) u_inv (
    .clk, .rst_n, .p(p_r),
    .ld_en(fu_ld_en[FU_INV]), .ld_idx(fu_ld_idx), .ld_a(fu_ld_a), .ld_b(fu_ld_b),
    .start(fu_start[FU_INV]), .busy(fu_busy[FU_INV]),
    .rd_idx(fu_rd_idx), .rd_word(fu_words[FU_INV])
  );

  for (genvar m = 0; m < N_M; m++) begin : g_mul
    mont_mul #(.NW(NW), .NB(N_B)) u_mul (
      .clk, .rst_n, .p(p_r), .pinv(pinv_r),
      .ld_en(fu_ld_en[FU_MUL0+m]), .ld_idx(fu_ld_idx), .ld_a(fu_ld_a), .ld_b(fu_ld_b),
      .start(fu_start[FU_MUL0+m]), .busy(fu_busy[FU_MUL0+m]),
      .rd_idx(fu_rd_idx), .rd_word(fu_words[FU_MUL0+m])
    );
  end

  fu_result_mux #(.NFU(NFU)) u_rmux (
    .words(fu_words), .sel(fu_rd_sel), .word(res_word)
  );

endmodule
