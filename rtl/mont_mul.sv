// mont_mul: word-serial, 3-stage pipelined Montgomery modular multiplier
// over GF(p).
//
// Computes r = a * b * R^-1 mod p with R = 2^(W*NW), for a, b < p and p odd.
// The loop follows the operand-scanning Montgomery method: for every word a_i
// of operand A the partial result T is updated as T = (T + a_i*B + m*p) / 2^W,
// with m = (T_0 + a_i*b_0) * (-p^-1) mod 2^W. The words of B and p are taken
// in chunks of NB words (the "n_B parallel active words" of the processor),
// one chunk issued per clock cycle, through a 3-stage pipeline:
//   stage 1 (issue):      select a_i and the chunk; for the first chunk of an
//                         iteration compute m from the current T_0;
//   stage 2 (multiply):   form the 2*NB word products a_i*b_k and m*p_k;
//   stage 3 (accumulate): add T_k, both products and the carry of the previous
//                         chunk; store the sums one word down (the division by
//                         2^W) and keep the carry.
// The multiplier is a 3-stage pipeline in the processor; what each stage does
// is this design's choice. Stage 1 of a new iteration needs the new T_0, which
// the chunk holding word 1 writes in stage 3; when an iteration has too few
// chunks to cover that distance the issue stalls. Once the pipeline has
// drained, one more cycle subtracts p if T >= p.
//
// Timing, with NCH = NW/NB chunks per iteration and WCH the chunk that holds
// word 1 (0 when NB >= 2, 1 when NB = 1):
//   busy cycles = NW*NCH + (NW-1)*max(0, WCH + 3 - NCH) + 3
// e.g. 67 for NW = 8, NB = 1 and 26 for NW = 8, NB = 4.
//
// Interface (shared by all arithmetic units): operands are loaded one W-bit
// word per cycle through ld_en/ld_idx/ld_a/ld_b while the unit is idle; start
// begins the product; busy is high from the cycle after start until the result
// is ready; the result is read one word at a time, rd_word = result[rd_idx],
// combinationally, and stays until the next start.
module mont_mul
  import hecc_pkg::*;
#(
  parameter int unsigned NW = 8,   // words per field element (256-bit ECC field)
  parameter int unsigned NB = 1    // words of B and p handled per cycle
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NW*W-1:0]         p,       // modulus, odd, stable while busy
  input  logic [W-1:0]            pinv,    // -p^-1 mod 2^W
  input  logic                    ld_en,
  input  logic [$clog2(NW)-1:0]   ld_idx,
  input  logic [W-1:0]            ld_a,
  input  logic [W-1:0]            ld_b,
  input  logic                    start,
  output logic                    busy,
  input  logic [$clog2(NW)-1:0]   rd_idx,
  output logic [W-1:0]            rd_word
);

  localparam int unsigned NCH = NW / NB;               // chunks per a_i
  localparam int unsigned IW  = (NW > 1) ? $clog2(NW) : 1;
  localparam int unsigned CW  = (NCH > 1) ? $clog2(NCH) : 1;
  localparam int unsigned WCH = (NB >= 2) ? 0 : 1;     // chunk that writes T_0

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  // Pipeline register contents.
  typedef struct packed {
    logic          valid;
    logic          first;     // first chunk of an iteration
    logic          last;      // last chunk of an iteration
    logic [CW-1:0] c;         // chunk number
    logic [W-1:0]  a_i;
    logic [W-1:0]  m;
  } s2_t;

  typedef struct packed {
    logic          valid;
    logic          first;
    logic          last;
    logic [CW-1:0] c;
  } s3_t;

  state_e          state;
  logic [W-1:0]    a_r [NW];
  logic [W-1:0]    b_r [NW];
  logic [W-1:0]    t_r [NW+1];
  logic [IW-1:0]   i_r;                 // word of A being issued
  logic [CW-1:0]   c_r;                 // chunk being issued
  logic [W-1:0]    m_r;                 // m of the iteration being issued
  logic [W+1:0]    carry_r;
  s2_t             s2;
  s3_t             s3;
  logic [2*W-1:0]  ab_r [NB];           // stage 2 -> 3 products
  logic [2*W-1:0]  mp_r [NB];

  // ---- stage 1: issue ----
  logic [W-1:0]    a_i;
  logic [W-1:0]    t0_ab;
  logic [W-1:0]    m_new, m_use;
  logic            hazard, issue;
  assign a_i    = a_r[i_r];
  assign t0_ab  = t_r[0] + a_i * b_r[0];
  assign m_new  = t0_ab * pinv;
  assign m_use  = (c_r == '0) ? m_new : m_r;
  // T_0 is still to be written by a chunk in stage 2 or 3.
  assign hazard = (c_r == '0) &&
                  ((s2.valid && int'(s2.c) == WCH) || (s3.valid && int'(s3.c) == WCH));
  assign issue  = (state == S_RUN) && !hazard;

  // ---- stage 3: accumulate ----
  logic [2*W+1:0]  sum   [NB];
  logic [W+1:0]    cin   [NB+1];
  logic [W:0]      top_sum;
  always_comb begin
    cin[0] = s3.first ? '0 : carry_r;
    for (int j = 0; j < NB; j++) begin
      sum[j] = (2*W+2)'(t_r[int'(s3.c)*NB + j])
             + (2*W+2)'(ab_r[j])
             + (2*W+2)'(mp_r[j])
             + (2*W+2)'(cin[j]);
      cin[j+1] = sum[j][2*W+1:W];
    end
    top_sum = {1'b0, t_r[NW]} + cin[NB][W:0];
  end

  // ---- final conditional subtraction ----
  logic [(NW+1)*W-1:0] t_flat;
  logic [(NW+1)*W:0]   t_minus_p;
  always_comb begin
    for (int k = 0; k <= NW; k++) t_flat[k*W +: W] = t_r[k];
    t_minus_p = {1'b0, t_flat} - {{(W+1){1'b0}}, p};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      i_r     <= '0;
      c_r     <= '0;
      m_r     <= '0;
      carry_r <= '0;
      s2      <= '0;
      s3      <= '0;
      for (int j = 0; j < NB; j++) begin
        ab_r[j] <= '0;
        mp_r[j] <= '0;
      end
      for (int k = 0; k <= NW; k++) t_r[k] <= '0;
      for (int k = 0; k < NW; k++) begin
        a_r[k] <= '0;
        b_r[k] <= '0;
      end
    end else begin
      if (ld_en && state == S_IDLE) begin
        a_r[ld_idx] <= ld_a;
        b_r[ld_idx] <= ld_b;
      end

      // stage 1 -> 2
      s2.valid <= issue;
      if (issue) begin
        s2.first <= (c_r == '0);
        s2.last  <= (int'(c_r) == NCH - 1);
        s2.c     <= c_r;
        s2.a_i   <= a_i;
        s2.m     <= m_use;
        if (c_r == '0) m_r <= m_new;
      end

      // stage 2 -> 3
      s3 <= '{valid: s2.valid, first: s2.first, last: s2.last, c: s2.c};
      if (s2.valid)
        for (int j = 0; j < NB; j++) begin
          ab_r[j] <= s2.a_i * b_r[int'(s2.c)*NB + j];
          mp_r[j] <= s2.m * p[(int'(s2.c)*NB + j)*W +: W];
        end

      // stage 3
      if (s3.valid) begin
        carry_r <= cin[NB];
        for (int j = 0; j < NB; j++)
          if (int'(s3.c)*NB + j > 0) t_r[int'(s3.c)*NB + j - 1] <= sum[j][W-1:0];
        if (s3.last) begin
          t_r[NW-1] <= top_sum[W-1:0];
          t_r[NW]   <= {{(W-1){1'b0}}, top_sum[W]};
        end
      end

      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          i_r   <= '0;
          c_r   <= '0;
          for (int k = 0; k <= NW; k++) t_r[k] <= '0;
        end
        S_RUN: if (issue) begin
          if (int'(c_r) == NCH - 1) begin
            c_r <= '0;
            if (int'(i_r) == NW - 1) state <= S_DRAIN;
            else i_r <= i_r + 1'b1;
          end else begin
            c_r <= c_r + 1'b1;
          end
        end
        S_DRAIN: if (!s2.valid && !s3.valid) begin
          if (!t_minus_p[(NW+1)*W])
            for (int k = 0; k <= NW; k++) t_r[k] <= t_minus_p[k*W +: W];
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign rd_word = t_r[{1'b0, rd_idx}];

  // Operands may only change while the unit is idle.
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) ld_en |-> !busy);

endmodule
