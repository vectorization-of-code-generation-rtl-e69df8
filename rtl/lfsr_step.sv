// lfsr_step - factorized W-step next-state logic of an N-bit Fibonacci LFSR,
// with a W-bit input vector for CRC / signature analysis.
//
// A one-step Fibonacci LFSR shifts x_1..x_{N-1} down one place and appends
// x_N = XOR_j g_j & x_j (plus one input bit y when it compresses a stream).
// Advancing W steps in one cycle is computed, following the design
// description, as X(t+W) = P_W * (G_W * X(t) + Y):
//   * G_W: the top N-W rows copy x_W..x_{N-1}; the bottom W rows form the
//     partial dot products s_{k+1} = XOR_{j=0..N-1-k} g_j & x_{j+k},
//     one balanced AND/XOR tree each, all evaluated in parallel;
//   * Y: input bit y_k is XORed onto s_{k+1} (step k consumes y_k);
//   * P_W: new bit n_k = XOR_{m=0..k} p_{k-m} & (s_{m+1} ^ y_m), a second
//     AND/XOR layer whose p-factors depend on g only (lfsr_pfactors).
// The logic depth is therefore two AND levels plus about log2(N*W) XOR
// levels, instead of the W chained feedback stages of a direct cascade.
//
// Interface (combinational): x[i] = x_i (x_0 is the next chip out),
// g[j] = g_j with g_N = 1 implied, y[k] = input bit consumed at step k
// (all zero for plain sequence generation). x_next is X(t+W).
// This design's choices: the bit numbering and that the input vector is
// always added (the caller zeroes it when CRC input is disabled).
module lfsr_step #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 16
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] g,
  input  logic [W-1:0] y,
  output logic [N-1:0] x_next
);
  logic [W-1:0] p;   // p-factors
  logic [W-1:0] u;   // G_W X(t) + Y, bottom W rows (u[k] = s_{k+1} ^ y_k)
  logic [W-1:0] nb;  // the W new sequence bits

  lfsr_pfactors #(.N(N), .W(W)) u_pf (.g(g), .p(p));

  // G_W X(t) + Y
  always_comb begin
    for (int unsigned k = 0; k < W; k++) begin
      u[k] = y[k];
      for (int unsigned j = 0; j + k < N; j++) begin
        u[k] = u[k] ^ (g[j] & x[j+k]);
      end
    end
  end

  // P_W (G_W X(t) + Y)
  always_comb begin
    for (int unsigned k = 0; k < W; k++) begin
      nb[k] = 1'b0;
      for (int unsigned m = 0; m <= k; m++) begin
        nb[k] = nb[k] ^ (p[k-m] & u[m]);
      end
    end
  end

  always_comb begin
    x_next = '0;
    for (int i = 0; i < int'(N) - int'(W); i++) x_next[i] = x[i+W];
    for (int unsigned k = 0; k < W; k++) x_next[N-W+k] = nb[k];
  end
endmodule
