// cgu_config_reg - the CGU configuration register.
//
// Holds the 256-bit configuration vector (see cgu_pkg::cgu_cfg_t): generator
// and delay polynomials, CRC enable and length offset of both PRN
// generators, the Hadamard code number and the code combiner constants. It
// is written from the vector input by the CONFIG operation and read by every
// functional unit; the CGU never changes it, so it is not part of the saved
// state. Loaded values are visible from the cycle after CONFIG.
// Reset to all zeros is this design's choice.
module cgu_config_reg
  import cgu_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [VECTOR_B-1:0] din,
  output cgu_cfg_t            cfg
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cfg <= '0;
    else if (load) cfg <= cgu_cfg_t'(din);
  end
endmodule
