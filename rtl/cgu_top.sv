// cgu_top - Code Generation Unit (CGU) of a vector co-processor for CDMA.
//
// The CGU produces one vector of 16 complex code chips per clock cycle from
// two reconfigurable 32/16 PRN generators (normal and delayed output, CRC
// input on the first), a Hadamard/OVSF generator and a table look-up
// register, combined by the code combiner under a 256-bit configuration
// vector. It executes one instruction per cycle, made of three parallel
// sub-operations:
//   vopc  NOP | CONFIG (vector_in -> configuration register)
//             | RCV_STATE (vector_in -> generator state)
//             | SND_STATE (state -> vector_out) | LEAP (generate a code vector)
//   sopc  NOP | SSND (CRC signature of PRN generator 1 -> scalar_out)
//   srcv  NONE | VMU (scalar_in -> TLU register, and CRC input of the LEAP
//             of the same instruction when input_en of generator 1 is set)
// Timing: every result is registered. A LEAP or SND_STATE issued in cycle t
// shows on vector_out with vector_out_valid in cycle t+1; SSND likewise on
// scalar_out with scalar_out_valid. The code of a LEAP is the combination of
// the generator windows held before that LEAP (the generators' output
// pipeline registers sit between them and the combiner); a generator whose
// state was just loaded needs one LEAP before its first chips come out.
// The code occupies vector_out[31:0] (bit 2n real, 2n+1 imaginary part of
// chip n), the remaining bits are zero. The state vector is LFSR 1 (48 bits),
// LFSR 2 (48 bits) and the Hadamard counter (5 bits), LSB first.
// The unit structure, instruction set, configuration and state contents
// follow the design description; the encodings, the bit placement, the
// 32-bit scalar path, the output and state snapshot registers and the reset
// values are this design's choices. The scalar signature is the full 32-bit
// register of generator 1; for a polynomial of length M the signature is its
// top M bits.
module cgu_top
  import cgu_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  cgu_cmd_t            cmd,
  input  logic [SCALAR_B-1:0] scalar_in,
  input  logic [VECTOR_B-1:0] vector_in,
  output logic [VECTOR_B-1:0] vector_out,
  output logic                vector_out_valid,
  output logic [SCALAR_B-1:0] scalar_out,
  output logic                scalar_out_valid
);
  cgu_cfg_t cfg;

  logic do_config, do_rcv, do_snd, do_leap, do_ssnd, do_vmu;
  assign do_config = (cmd.vopc == VOP_CONFIG);
  assign do_rcv    = (cmd.vopc == VOP_RCV_STATE);
  assign do_snd    = (cmd.vopc == VOP_SND_STATE);
  assign do_leap   = (cmd.vopc == VOP_LEAP);
  assign do_ssnd   = (cmd.sopc == SOP_SSND);
  assign do_vmu    = (cmd.srcv == SRCV_VMU);

  cgu_config_reg u_cfg (
    .clk(clk), .rst_n(rst_n), .load(do_config), .din(vector_in), .cfg(cfg)
  );

  // ---- PRN generators ------------------------------------------------------
  logic [VEC_W-1:0]       z1, zd1, z2, zd2;
  logic [PRN_STATE_B-1:0] st1, st2;
  logic [LFSR_N-1:0]      sig1;
  logic [VEC_W-1:0]       crc_y;

  assign crc_y = do_vmu ? scalar_in[VEC_W-1:0] : '0;

  prn_generator #(.HAS_INPUT(1'b1)) u_prn1 (
    .clk(clk), .rst_n(rst_n),
    .poly_g(cfg.prn1.poly_g), .poly_h(cfg.prn1.poly_h),
    .input_en(cfg.prn1.input_en), .unused(cfg.prn1.unused),
    .load(do_rcv), .load_state(vector_in[ST_LFSR1_LO +: PRN_STATE_B]),
    .leap(do_leap), .crc_y(crc_y),
    .z(z1), .zd(zd1), .state(st1), .sig(sig1)
  );

  // The second generator has no input port (its input_en is reserved).
  prn_generator #(.HAS_INPUT(1'b0)) u_prn2 (
    .clk(clk), .rst_n(rst_n),
    .poly_g(cfg.prn2.poly_g), .poly_h(cfg.prn2.poly_h),
    .input_en(cfg.prn2.input_en), .unused(cfg.prn2.unused),
    .load(do_rcv), .load_state(vector_in[ST_LFSR2_LO +: PRN_STATE_B]),
    .leap(do_leap), .crc_y('0),
    .z(z2), .zd(zd2), .state(st2), .sig()
  );

  // ---- Hadamard / OVSF generator ------------------------------------------
  logic [VEC_W-1:0]     h1;
  logic [HAD_CNT_B-1:0] had_cnt;

  hadamard_gen u_had (
    .clk(clk), .rst_n(rst_n), .code_nr(cfg.code_nr),
    .clear(do_config), .load(do_rcv),
    .load_cnt(vector_in[ST_CNT_LO +: HAD_CNT_B]),
    .leap(do_leap), .h(h1), .cnt(had_cnt)
  );

  // ---- Table look-up --------------------------------------------------------
  logic [VEC_W-1:0] lut_e, lut_o;

  tlu_register u_tlu (
    .clk(clk), .rst_n(rst_n), .load(do_vmu), .din(scalar_in[2*VEC_W-1:0]),
    .lut_e(lut_e), .lut_o(lut_o)
  );

  // ---- Code combiner --------------------------------------------------------
  logic [CODE_B-1:0] code;

  code_combiner u_comb (
    .lfsr1(z1), .lfsr2(z2), .slfsr1(zd1), .slfsr2(zd2),
    .lut_e(lut_e), .lut_o(lut_o), .h1(h1),
    .ks1(cfg.ks1), .ks2(cfg.ks2), .kr1(cfg.kr1), .kr2(cfg.kr2),
    .km1(cfg.km1), .km2(cfg.km2), .kcn(cfg.kcn),
    .code(code)
  );

  // ---- Output multiplexer ---------------------------------------------------
  logic [VECTOR_B-1:0] state_vec, snap_q;
  logic                sel_state_q, vvalid_q, svalid_q;
  logic [SCALAR_B-1:0] sout_q;

  always_comb begin
    state_vec = '0;
    state_vec[ST_LFSR1_LO +: PRN_STATE_B] = st1;
    state_vec[ST_LFSR2_LO +: PRN_STATE_B] = st2;
    state_vec[ST_CNT_LO   +: HAD_CNT_B]   = had_cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      snap_q      <= '0;
      sel_state_q <= 1'b0;
      vvalid_q    <= 1'b0;
      sout_q      <= '0;
      svalid_q    <= 1'b0;
    end else begin
      vvalid_q <= do_leap | do_snd;
      if (do_leap | do_snd) sel_state_q <= do_snd;
      if (do_snd)           snap_q      <= state_vec;
      svalid_q <= do_ssnd;
      if (do_ssnd)          sout_q      <= SCALAR_B'(sig1);
    end
  end

  assign vector_out       = sel_state_q ? snap_q : VECTOR_B'(code);
  assign vector_out_valid = vvalid_q;
  assign scalar_out       = sout_q;
  assign scalar_out_valid = svalid_q;

  // Instruction rule: an undefined vector opcode is never issued.
  a_vopc_legal: assert property (@(posedge clk) disable iff (!rst_n)
    cmd.vopc inside {VOP_NOP, VOP_CONFIG, VOP_RCV_STATE, VOP_SND_STATE, VOP_LEAP});
endmodule
