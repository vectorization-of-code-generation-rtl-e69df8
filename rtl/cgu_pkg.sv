// cgu_pkg - shared constants and types of the Code Generation Unit (CGU).
//
// The CGU is the code generator of a vector co-processor for CDMA base-band
// work. Each instruction carries a vector sub-operation (NOP, CONFIG,
// RCV_STATE, SND_STATE, LEAP), a scalar sub-operation (NOP, SSND) and a
// scalar-receive sub-operation (NONE, VMU); this package holds their
// encodings, the 256-bit configuration vector and the state vector layout.
//
// Sizes that follow the design description: LFSR length 32, 16 chips per
// cycle, 256-bit vector path, Hadamard spreading factor up to 512, the field
// widths of the configuration vector and the fields of the state vector.
// This design's own choices: the numeric opcode encodings, the 32-bit scalar
// path, the placement of the configuration fields (listed LSB first, the
// first field of the list at bit 0, the 41 top bits reserved) and the
// placement of the state fields (LFSR 1 at bits 47:0, LFSR 2 at 95:48, the
// Hadamard counter at 100:96).
package cgu_pkg;

  localparam int unsigned LFSR_N   = 32;   // physical LFSR length N
  localparam int unsigned VEC_W    = 16;   // chips per LEAP, step size W
  localparam int unsigned VECTOR_B = 256;  // vector data path width
  localparam int unsigned SCALAR_B = 32;   // scalar data path width
  localparam int unsigned SF_MAX   = 512;  // largest Hadamard spreading factor
  localparam int unsigned CODE_B   = 2 * VEC_W;  // complex code vector, 32 bits

  // Vector sub-operation.
  typedef enum logic [2:0] {
    VOP_NOP       = 3'd0,
    VOP_CONFIG    = 3'd1,
    VOP_RCV_STATE = 3'd2,
    VOP_SND_STATE = 3'd3,
    VOP_LEAP      = 3'd4
  } vopc_e;

  // Scalar sub-operation.
  typedef enum logic {
    SOP_NOP  = 1'b0,
    SOP_SSND = 1'b1
  } sopc_e;

  // Scalar-receive sub-operation.
  typedef enum logic {
    SRCV_NONE = 1'b0,
    SRCV_VMU  = 1'b1
  } srcv_e;

  // One CGU instruction.
  typedef struct packed {
    vopc_e vopc;
    sopc_e sopc;
    srcv_e srcv;
  } cgu_cmd_t;

  // Configuration of one PRN generator (70 bits).
  typedef struct packed {
    logic [4:0]  unused;     // N - M, M = actual polynomial length
    logic        input_en;   // CRC input enable
    logic [31:0] poly_h;     // delay polynomial h_0..h_31 (bit j = h_j)
    logic [31:0] poly_g;     // generator polynomial g_0..g_31 (bit j = g_j)
  } prn_cfg_t;

  // The 256-bit configuration vector. A packed struct puts its last member
  // at bit 0, so the members appear here in reverse: prn1.poly_g occupies
  // bits 31:0, kcn bits 214:183, and bits 255:215 are reserved.
  typedef struct packed {
    logic [40:0] reserved;
    logic [31:0] kcn;        // conditional negate pattern
    logic [7:0]  km2;        // mask pattern, branch 2
    logic [7:0]  km1;        // mask pattern, branch 1
    logic [1:0]  kr2;        // doubling scheme, branch 2
    logic [1:0]  kr1;        // doubling scheme, branch 1
    logic [6:0]  ks2;        // selected inputs, branch 2
    logic [6:0]  ks1;        // selected inputs, branch 1
    logic [8:0]  code_nr;    // Hadamard code number
    prn_cfg_t    prn2;
    prn_cfg_t    prn1;
  } cgu_cfg_t;

  // Bits of one PRN generator's state: N register bits plus W buffer bits.
  localparam int unsigned PRN_STATE_B = LFSR_N + VEC_W;          // 48
  localparam int unsigned HAD_CNT_B   = $clog2(SF_MAX / VEC_W);  // 5

  // State vector layout, LSB first.
  localparam int unsigned ST_LFSR1_LO = 0;
  localparam int unsigned ST_LFSR2_LO = PRN_STATE_B;
  localparam int unsigned ST_CNT_LO   = 2 * PRN_STATE_B;

  // Combiner input order i_0..i_6 (bit k of ks selects input k).
  localparam int unsigned CI_LFSR1  = 0;
  localparam int unsigned CI_LFSR2  = 1;
  localparam int unsigned CI_SLFSR1 = 2;
  localparam int unsigned CI_SLFSR2 = 3;
  localparam int unsigned CI_LUT_E  = 4;  // LUT(2i)
  localparam int unsigned CI_LUT_O  = 5;  // LUT(2i+1)
  localparam int unsigned CI_H1     = 6;
  localparam int unsigned CI_NUM    = 7;

endpackage
