// prn_generator - vectorized, reconfigurable PRN (pseudo random noise)
// generator: an (N+W)/W Fibonacci LFSR with normal and delayed output.
//
// State X' holds N+W sequence bits: xp[0..W-1] is an output buffer (the W
// chips most recently shifted out of the register) and xp[W..W+N-1] is the
// LFSR register r_0..r_{N-1}, r_0 being the next chip. On every LEAP
//   * the register advances W steps through lfsr_step (X = P_W G_W X),
//     optionally consuming W input bits for CRC / signature analysis,
//   * the buffer takes over r_0..r_{W-1},
//   * the normal output pipeline register takes Z  = O_W X': W consecutive
//     bits xp[o..o+W-1], o = cfg.unused, selected by a barrel shifter,
//   * the delayed output pipeline register takes Z' = H_W X':
//     zd[i] = XOR_j h_j & xp[i+j], a linear combination of the window that
//     equals the sequence delayed by an amount set through h.
// A polynomial of length M < N is mapped by shifting g (and h) up by N-M
// places and setting cfg.unused = N-M; its initial state goes into
// r_{N-M}..r_{N-1}. The output then comes out after a single LEAP, with no
// variable start-up latency. This structure follows the design description.
//
// Interface: cfg holds poly_g (bit j = g_j, g_N = 1 implied), poly_h,
// input_en, unused. load/load_state write X' (state restore), leap advances.
// crc_y[k] is consumed at step k when HAS_INPUT and cfg.input_en are set.
// z/zd are the pipeline registers, valid from the cycle after a LEAP; they
// show the window X' held before that LEAP. state is X', sig the register
// part r_0..r_{N-1} (the CRC signature). load has priority over leap.
// This design's choices: the bit numbering, reset to all zeros, and the
// HAS_INPUT parameter (only the first generator of the CGU takes input).
module prn_generator
  import cgu_pkg::*;
#(
  parameter int unsigned N         = LFSR_N,
  parameter int unsigned W         = VEC_W,
  parameter bit          HAS_INPUT = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     poly_g,
  input  logic [N-1:0]     poly_h,
  input  logic             input_en,
  input  logic [4:0]       unused,
  input  logic             load,
  input  logic [N+W-1:0]   load_state,
  input  logic             leap,
  input  logic [W-1:0]     crc_y,
  output logic [W-1:0]     z,
  output logic [W-1:0]     zd,
  output logic [N+W-1:0]   state,
  output logic [N-1:0]     sig
);
  initial assert (N <= 32 && W <= N) else $error("prn_generator: need W <= N <= 32");

  logic [N+W-1:0] xp_q;
  logic [N-1:0]   r_next;
  logic [W-1:0]   y;
  logic [W-1:0]   z_d, zd_d;

  assign y = (HAS_INPUT && input_en) ? crc_y : '0;

  lfsr_step #(.N(N), .W(W)) u_step (
    .x      (xp_q[N+W-1:W]),
    .g      (poly_g),
    .y      (y),
    .x_next (r_next)
  );

  // Normal output logic: barrel shifter selecting W bits from offset unused.
  assign z_d = W'(xp_q >> unused);

  // Delayed output logic: Z' = H_W X'.
  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      zd_d[i] = 1'b0;
      for (int unsigned j = 0; j < N; j++) begin
        zd_d[i] = zd_d[i] ^ (poly_h[j] & xp_q[i+j]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xp_q <= '0;
      z    <= '0;
      zd   <= '0;
    end else if (load) begin
      xp_q <= load_state;
    end else if (leap) begin
      xp_q <= {r_next, xp_q[2*W-1:W]};
      z    <= z_d;
      zd   <= zd_d;
    end
  end

  assign state = xp_q;
  assign sig   = xp_q[N+W-1:W];
endmodule
