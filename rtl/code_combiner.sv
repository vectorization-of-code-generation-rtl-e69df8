// code_combiner - combines the functional-unit outputs into the CGU code.
//
// Two identical branches (combiner_branch: select f_s, double f_r, mask f_m)
// each build a 32-bit complex code vector from a selection of the seven
// 16-bit inputs; f_a adds the two bit-wise (XOR) and f_cn adds the constant
// 32-bit pattern kcn, which in the {+1,-1} domain is a conditional negation.
// Output bit 2n is the real part and bit 2n+1 the imaginary part of complex
// chip n. With suitable constants this yields the UMTS long and short
// scrambling codes, the downlink code S_dl, the preamble codes and the GPS
// C/A code, all in binary form. The structure and the constants follow the
// design description. Purely combinational: in the CGU the inputs come from
// the output pipeline registers of the generators.
module code_combiner
  import cgu_pkg::*;
(
  input  logic [VEC_W-1:0]  lfsr1,
  input  logic [VEC_W-1:0]  lfsr2,
  input  logic [VEC_W-1:0]  slfsr1,
  input  logic [VEC_W-1:0]  slfsr2,
  input  logic [VEC_W-1:0]  lut_e,
  input  logic [VEC_W-1:0]  lut_o,
  input  logic [VEC_W-1:0]  h1,
  input  logic [6:0]        ks1,
  input  logic [6:0]        ks2,
  input  logic [1:0]        kr1,
  input  logic [1:0]        kr2,
  input  logic [7:0]        km1,
  input  logic [7:0]        km2,
  input  logic [31:0]       kcn,
  output logic [CODE_B-1:0] code
);
  logic [CI_NUM-1:0][VEC_W-1:0] in;
  logic [CODE_B-1:0] b1, b2;

  always_comb begin
    in[CI_LFSR1]  = lfsr1;
    in[CI_LFSR2]  = lfsr2;
    in[CI_SLFSR1] = slfsr1;
    in[CI_SLFSR2] = slfsr2;
    in[CI_LUT_E]  = lut_e;
    in[CI_LUT_O]  = lut_o;
    in[CI_H1]     = h1;
  end

  combiner_branch u_br1 (.ks(ks1), .kr(kr1), .km(km1), .in(in), .out(b1));
  combiner_branch u_br2 (.ks(ks2), .kr(kr2), .km(km2), .in(in), .out(b2));

  assign code = (b1 ^ b2) ^ kcn;   // f_a then f_cn
endmodule
