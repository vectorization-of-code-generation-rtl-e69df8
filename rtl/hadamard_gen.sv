// hadamard_gen - vectorized Hadamard code generator.
//
// Chip k of Hadamard code word s (spreading factor SF, a power of two) is the
// parity of (s AND k): 0 maps to +1, 1 to -1. The generator is built for the
// largest spreading factor SF_MAX; a code with smaller SF and s < SF is the
// same function of k and repeats every SF chips, so no SF setting is needed.
// W chips are produced per LEAP: the chip index is k = counter*W + j. As in
// the design description, the counter supplies the upper index bits, which
// are ANDed with the upper code-number bits and reduced by one XOR tree into
// a common bit; the lower log2(W) code-number bits then set, for each lane
// j, which of them are added to that common bit. OVSF codes use the same unit
// with the code number bit-reversed over log2(SF_MAX) bits, done by software.
//
// Interface: code_nr is the configured code number; clear (CONFIG) zeroes
// the counter, load/load_cnt restore it (RCV_STATE), leap latches the next W
// chips into the output register h and advances the counter, which wraps
// after SF_MAX/W LEAPs. h is valid from the cycle after a LEAP.
// This design's choices: clear on reconfiguration, priority clear > load >
// leap, reset to zero.
module hadamard_gen
  import cgu_pkg::*;
#(
  parameter int unsigned SF = SF_MAX,
  parameter int unsigned W  = VEC_W,
  localparam int unsigned LOG_SF = $clog2(SF),
  localparam int unsigned LOG_W  = $clog2(W),
  localparam int unsigned CNT_B  = LOG_SF - LOG_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LOG_SF-1:0] code_nr,
  input  logic              clear,
  input  logic              load,
  input  logic [CNT_B-1:0]  load_cnt,
  input  logic              leap,
  output logic [W-1:0]      h,
  output logic [CNT_B-1:0]  cnt
);
  initial assert (SF > W && (1 << LOG_SF) == SF && (1 << LOG_W) == W)
    else $error("hadamard_gen: SF and W must be powers of two, SF > W");

  logic [CNT_B-1:0] cnt_q;
  logic             common;
  logic [W-1:0]     h_d;

  assign common = ^(code_nr[LOG_SF-1:LOG_W] & cnt_q);

  always_comb begin
    for (int unsigned j = 0; j < W; j++) begin
      h_d[j] = common ^ (^(code_nr[LOG_W-1:0] & LOG_W'(j)));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      h     <= '0;
    end else if (clear) begin
      cnt_q <= '0;
    end else if (load) begin
      cnt_q <= load_cnt;
    end else if (leap) begin
      cnt_q <= cnt_q + 1'b1;
      h     <= h_d;
    end
  end

  assign cnt = cnt_q;
endmodule
