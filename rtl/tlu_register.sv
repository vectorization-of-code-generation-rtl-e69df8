// tlu_register - table look-up register of the CGU.
//
// Codes that no generator of the CGU can produce (in UMTS, the quaternary
// part of the short codes) are computed elsewhere, stored as a table in the
// vector memory, and fed to the code combiner through this register. It is
// filled from the scalar input (scalar-receive sub-operation VMU) and holds
// 16 elements of 2 bits. Element i occupies bits 2i and 2i+1; the combiner
// sees them as two 16-bit ports, lut_e = LUT(2i) (bit 2i of every element,
// the most significant bit of a quaternary value) and lut_o = LUT(2i+1)
// (bit 2i+1, the least significant bit).
// The register and its split into two ports follow the design description;
// the scalar width of 32 bits, reset to zero and the element bit order are
// this design's choices. Timing: the value written in one cycle is visible
// on the outputs from the next.
module tlu_register
  import cgu_pkg::*;
#(
  parameter int unsigned W = VEC_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [2*W-1:0] din,
  output logic [W-1:0]   lut_e,
  output logic [W-1:0]   lut_o
);
  logic [2*W-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= din;
  end

  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      lut_e[i] = q[2*i];
      lut_o[i] = q[2*i+1];
    end
  end
endmodule
