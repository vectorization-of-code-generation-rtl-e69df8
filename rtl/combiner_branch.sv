// combiner_branch - one branch of the code combiner: select, double, mask.
//
//   f_s: o[n] = XOR_m ks[m] & i_m[n] over the 7 inputs (16 bits each):
//        the branch's intermediate binary code C(n), n = 0..15;
//   f_r: doubling from 16 binary chips to 16 complex chips (32 bits). For
//        each group n = 0..7, output bits 4n and 4n+1 take C(2n) when kr[0]
//        is 0 and C(2n+1) when it is 1; bits 4n+2 and 4n+3 do the same under
//        kr[1]. Even output bits are real parts, odd ones imaginary parts;
//   f_m: o[n] = i[n] & km[n mod 8].
// The functions follow the design description, read with kr[0] = k_r0 and
// kr[1] = k_r1; the input order (LFSR1, LFSR2, SLFSR1, SLFSR2, LUT(2i),
// LUT(2i+1), H1 as i_0..i_6) is taken from its combiner figure.
// Purely combinational.
module combiner_branch
  import cgu_pkg::*;
(
  input  logic [CI_NUM-1:0]      ks,
  input  logic [1:0]             kr,
  input  logic [7:0]             km,
  input  logic [CI_NUM-1:0][VEC_W-1:0] in,
  output logic [CODE_B-1:0]      out
);
  logic [VEC_W-1:0]  sel;
  logic [CODE_B-1:0] dbl;

  // f_s
  always_comb begin
    sel = '0;
    for (int unsigned m = 0; m < CI_NUM; m++) begin
      if (ks[m]) sel = sel ^ in[m];
    end
  end

  // f_r and f_m
  always_comb begin
    for (int unsigned n = 0; n < CODE_B / 4; n++) begin
      dbl[4*n]   = kr[0] ? sel[2*n+1] : sel[2*n];
      dbl[4*n+1] = kr[0] ? sel[2*n+1] : sel[2*n];
      dbl[4*n+2] = kr[1] ? sel[2*n+1] : sel[2*n];
      dbl[4*n+3] = kr[1] ? sel[2*n+1] : sel[2*n];
    end
    for (int unsigned n = 0; n < CODE_B; n++) begin
      out[n] = dbl[n] & km[n % 8];
    end
  end
endmodule
