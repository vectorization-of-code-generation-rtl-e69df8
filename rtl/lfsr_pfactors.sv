// lfsr_pfactors - p-factors of the factorized multi-step Fibonacci LFSR.
//
// The W-step next-state function of an N-bit Fibonacci LFSR factors into
// F^W = P_W * G_W. The lower-triangular Toeplitz matrix P_W is built from the
// p-factors, which depend only on the generator polynomial g:
//     p_0 = 1,   p_i = XOR_{n=0..i-1} p_n & g_{N-i+n}   (i = 1..W-1).
// The recurrence and its use follow the design description. The block is
// purely combinational; because g changes only on reconfiguration, its
// outputs are static while codes are generated (a clock-gating opportunity
// the description points out; no gating is inserted here).
//
// Interface: g[j] = g_j (g_N = 1 is implied and not stored); p[i] = p_i.
module lfsr_pfactors #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 16
) (
  input  logic [N-1:0] g,
  output logic [W-1:0] p
);
  initial assert (W >= 1 && W <= N) else $error("lfsr_pfactors: need 1 <= W <= N");

  always_comb begin
    p    = '0;
    p[0] = 1'b1;
    for (int unsigned i = 1; i < W; i++) begin
      for (int unsigned n = 0; n < i; n++) begin
        p[i] = p[i] ^ (p[n] & g[N-i+n]);
      end
    end
  end
endmodule
