// mod_inv: modular inverter over GF(p).
//
// Computes r = a^-1 mod p for 0 < a < p and p an odd prime (r = 0 for a = 0).
// The processor has one inverter; its algorithm is not specified, so this one
// uses the binary extended Euclidean algorithm, one step per clock cycle:
//   u = a, v = p, x1 = 1, x2 = 0
//   while u != 1 and v != 1:
//     u even:  u = u/2, x1 = x1/2 mod p
//     v even:  v = v/2, x2 = x2/2 mod p
//     u >= v:  u = u - v, x1 = x1 - x2 mod p
//     else:    v = v - u, x2 = x2 - x1 mod p
//   r = (u == 1) ? x1 : x2
// Each subtraction is followed by a halving, and each halving shrinks u*v by
// half, so it takes at most 4*NW*W + 1 cycles, about 2.1*NW*W on average.
// The inverse is a plain one: on a Montgomery-form input a*R it returns
// a^-1*R^-1, and the program brings it back to Montgomery form with one
// Montgomery product by R^3 mod p.
//
// Interface: the common arithmetic-unit interface (see mont_mul); ld_b is
// ignored.
module mod_inv
  import hecc_pkg::*;
#(
  parameter int unsigned NW = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NW*W-1:0]         p,
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
  logic [FB-1:0] u, v, x1, x2, r_r;
  logic [FB-1:0] a_flat;

  always_comb for (int k = 0; k < NW; k++) a_flat[k*W +: W] = a_r[k];

  // x / 2 mod p for x < p, p odd.
  function automatic logic [FB-1:0] half_mod(input logic [FB-1:0] x, input logic [FB-1:0] m);
    logic [FB:0] t;
    t = x[0] ? ({1'b0, x} + {1'b0, m}) : {1'b0, x};
    return t[FB:1];
  endfunction

  // x - y mod p for x, y < p.
  function automatic logic [FB-1:0] sub_mod(input logic [FB-1:0] x, input logic [FB-1:0] y,
                                            input logic [FB-1:0] m);
    logic [FB:0] t;
    t = {1'b0, x} - {1'b0, y};
    return t[FB] ? (t[FB-1:0] + m) : t[FB-1:0];
  endfunction

  logic one_u, one_v;
  assign one_u = (u == FB'(1));
  assign one_v = (v == FB'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      u <= '0; v <= '0; x1 <= '0; x2 <= '0; r_r <= '0;
      for (int k = 0; k < NW; k++) a_r[k] <= '0;
    end else begin
      if (ld_en && !busy) a_r[ld_idx] <= ld_a;
      if (!busy) begin
        if (start) begin
          if (a_flat == '0) begin
            r_r <= '0;
          end else begin
            busy <= 1'b1;
            u  <= a_flat;
            v  <= p;
            x1 <= FB'(1);
            x2 <= '0;
          end
        end
      end else if (one_u || one_v) begin
        r_r  <= one_u ? x1 : x2;
        busy <= 1'b0;
      end else if (!u[0]) begin
        u  <= u >> 1;
        x1 <= half_mod(x1, p);
      end else if (!v[0]) begin
        v  <= v >> 1;
        x2 <= half_mod(x2, p);
      end else if (u >= v) begin
        u  <= u - v;
        x1 <= sub_mod(x1, x2, p);
      end else begin
        v  <= v - u;
        x2 <= sub_mod(x2, x1, p);
      end
    end
  end

  assign rd_word = r_r[rd_idx*W +: W];

  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) ld_en |-> !busy);

endmodule
