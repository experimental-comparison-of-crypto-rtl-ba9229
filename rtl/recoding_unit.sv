// recoding_unit: key recoding of the scalar k into signed digits k_i.
//
// The scalar (NW words of W bits, so as wide as the field) is written one word
// at a time through k_we/k_idx/k_word. A start pulse recodes it, one digit per
// clock cycle from the least significant end, into a digit buffer:
//   REC_BIN : d = k mod 2
//   REC_NAF, REC_3NAF, REC_4NAF (window L = 2, 3, 4):
//             k odd:  d = k mods 2^L (the residue in [-2^(L-1)+1, 2^(L-1)-1])
//             k even: d = 0
//   then k = (k - d) / 2, until k = 0.
// The controller then pops the digits most significant first (left-to-right
// scalar multiplication): digit shows the next digit while avail is high, and
// pop moves to the following one. The method is fixed at build time by MODE;
// the processor offers binary, NAF, 3NAF and 4NAF units, and its reference
// ECC configuration uses 4NAF. The digit buffer and the pop interface are
// choices of this design.
//
// Timing: busy is high from the cycle after start for one cycle per digit
// (the recoded length, at most NW*W+1).
module recoding_unit
  import hecc_pkg::*;
#(
  parameter int unsigned NW   = 8,
  parameter recode_e     MODE = REC_4NAF
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          k_we,
  input  logic [$clog2(NW)-1:0]         k_idx,
  input  logic [W-1:0]                  k_word,
  input  logic                          start,
  output logic                          busy,
  input  logic                          pop,
  output logic                          avail,
  output logic signed [DIGIT_BITS-1:0]  digit
);

  localparam int unsigned KB = NW * W;
  localparam int unsigned ND = KB + 1;                 // longest recoding
  localparam int unsigned CB = $clog2(ND + 1);
  localparam int unsigned L  = (MODE == REC_BIN)  ? 1 :
                               (MODE == REC_NAF)  ? 2 :
                               (MODE == REC_3NAF) ? 3 : 4;

  logic [W-1:0]                 kw [NW];
  logic [KB+1:0]                k_r;                   // two spare bits for k - d with d < 0
  logic signed [DIGIT_BITS-1:0] buf_r [ND];
  logic [CB-1:0]                cnt_r;                 // digits produced / left to pop

  // Next digit of the current k.
  logic signed [DIGIT_BITS-1:0] d_next;
  logic [L-1:0]                 low;
  always_comb begin
    low = k_r[L-1:0];
    if (!k_r[0])                       d_next = '0;
    else if (L == 1)                   d_next = DIGIT_BITS'(1);
    else if (low[L-1])                 d_next = DIGIT_BITS'(int'(low) - (1 << L));
    else                               d_next = DIGIT_BITS'(low);
  end

  logic [KB+1:0] k_sub;
  assign k_sub = k_r - {{(KB+2-DIGIT_BITS){d_next[DIGIT_BITS-1]}}, d_next};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      k_r   <= '0;
      cnt_r <= '0;
      for (int i = 0; i < NW; i++) kw[i] <= '0;
      for (int i = 0; i < ND; i++) buf_r[i] <= '0;
    end else if (busy) begin
      if (k_r == '0) begin
        busy <= 1'b0;
      end else begin
        buf_r[cnt_r] <= d_next;
        cnt_r        <= cnt_r + 1'b1;
        k_r          <= k_sub >> 1;
      end
    end else begin
      if (k_we) kw[k_idx] <= k_word;
      if (start) begin
        busy  <= 1'b1;
        cnt_r <= '0;
        for (int i = 0; i < NW; i++) k_r[i*W +: W] <= kw[i];
        k_r[KB+1:KB] <= 2'b00;
      end else if (pop && cnt_r != '0) begin
        cnt_r <= cnt_r - 1'b1;
      end
    end
  end

  assign avail = !busy && (cnt_r != '0);
  assign digit = (cnt_r != '0) ? buf_r[cnt_r - 1'b1] : '0;

endmodule
