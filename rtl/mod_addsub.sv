// mod_addsub: modular adder/subtracter over GF(p).
//
// Computes r = a + b mod p (opmode = 0) or r = a - b mod p (opmode = 1) for
// a, b < p. The processor has a single adder/subtracter, small and fast, whose
// mode is set by the OPMODE register ("set OPMODE, 0" selects addition). Here
// the whole NW-word operation is done by one full-width adder and one
// correction adder in the cycle after start; busy is high for exactly that one
// cycle. The one-cycle full-width structure is a choice of this design.
//
// Interface: the common arithmetic-unit interface (see mont_mul) plus opmode,
// sampled at start.
module mod_addsub
  import hecc_pkg::*;
#(
  parameter int unsigned NW = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NW*W-1:0]         p,
  input  logic                    opmode,   // 0: add, 1: subtract
  input  logic                    ld_en,
  input  logic [$clog2(NW)-1:0]   ld_idx,
  input  logic [W-1:0]            ld_a,
  input  logic [W-1:0]            ld_b,
  input  logic                    start,
  output logic                    busy,
  input  logic [$clog2(NW)-1:0]   rd_idx,
  output logic [W-1:0]            rd_word
);

  localparam int unsigned FB = NW * W;

  logic [W-1:0]  a_r [NW];
  logic [W-1:0]  b_r [NW];
  logic [FB-1:0] a_flat, b_flat, r_r, r_next;
  logic          mode_r;

  always_comb begin
    for (int k = 0; k < NW; k++) begin
      a_flat[k*W +: W] = a_r[k];
      b_flat[k*W +: W] = b_r[k];
    end
  end

  // r = a + b, minus p when a + b >= p; r = a - b, plus p when a < b.
  logic [FB:0] s1, s2;
  always_comb begin
    if (!mode_r) begin
      s1 = {1'b0, a_flat} + {1'b0, b_flat};
      s2 = s1 - {1'b0, p};
      r_next = s2[FB] ? s1[FB-1:0] : s2[FB-1:0];
    end else begin
      s1 = {1'b0, a_flat} - {1'b0, b_flat};
      s2 = s1 + {1'b0, p};
      r_next = s1[FB] ? s2[FB-1:0] : s1[FB-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      mode_r <= 1'b0;
      r_r    <= '0;
      for (int k = 0; k < NW; k++) begin
        a_r[k] <= '0;
        b_r[k] <= '0;
      end
    end else begin
      if (ld_en && !busy) begin
        a_r[ld_idx] <= ld_a;
        b_r[ld_idx] <= ld_b;
      end
      if (start && !busy) begin
        busy   <= 1'b1;
        mode_r <= opmode;
      end else if (busy) begin
        busy <= 1'b0;
        r_r  <= r_next;
      end
    end
  end

  assign rd_word = r_r[rd_idx*W +: W];

  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) ld_en |-> !busy);

endmodule
