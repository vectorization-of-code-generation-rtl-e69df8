// tb_code_combiner - self-checking test of the code combiner.
//
// Part 1 drives random inputs and random constants and compares every output
// bit with a per-bit model: output bit n of a branch takes chip 2(n/4) or
// 2(n/4)+1 of the XOR of the selected inputs (chosen by kr[0] for n%4 < 2,
// by kr[1] otherwise), masked by km[n%8]; the code is branch 1 XOR branch 2
// XOR kcn. Part 2 sets the constants for the named UMTS/GPS codes and checks
// the outputs against the generalized combination equations written out
// directly: C_long/C_short, S_dl, C_pre and the GPS C/A code.
module tb_code_combiner;
  import cgu_pkg::*;
  logic [15:0] lfsr1, lfsr2, slfsr1, slfsr2, lut_e, lut_o, h1;
  logic [6:0] ks1, ks2;
  logic [1:0] kr1, kr2;
  logic [7:0] km1, km2;
  logic [31:0] kcn, code;

  code_combiner dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit branch_bit(logic [6:0] ks, logic [1:0] kr, logic [7:0] km, int n,
                                    logic [6:0][15:0] in);
    int chip = 2 * (n / 4) + ((n % 4 < 2) ? kr[0] : kr[1]);
    bit c = 0;
    for (int m = 0; m < 7; m++) if (ks[m]) c ^= in[m][chip];
    return c & km[n % 8];
  endfunction

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  task automatic rand_inputs();
    lfsr1 = 16'($urandom); lfsr2 = 16'($urandom); slfsr1 = 16'($urandom);
    slfsr2 = 16'($urandom); lut_e = 16'($urandom); lut_o = 16'($urandom); h1 = 16'($urandom);
  endtask

  initial begin
    logic [6:0][15:0] in;
    logic [15:0] c1, c2;
    // Part 1: random
    for (int it = 0; it < 2000; it++) begin
      rand_inputs();
      ks1 = 7'($urandom); ks2 = 7'($urandom); kr1 = 2'($urandom); kr2 = 2'($urandom);
      km1 = 8'($urandom); km2 = 8'($urandom); kcn = $urandom;
      #1;
      in = {h1, lut_o, lut_e, slfsr2, slfsr1, lfsr2, lfsr1};
      for (int n = 0; n < 32; n++)
        chk(code[n] == (branch_bit(ks1, kr1, km1, n, in) ^ branch_bit(ks2, kr2, km2, n, in) ^ kcn[n]),
            $sformatf("random bit %0d", n));
    end
    // Part 2: named codes
    for (int it = 0; it < 200; it++) begin
      rand_inputs();
      // C_long: C1 = LFSR1+LFSR2, C2 = SLFSR1+SLFSR2
      ks1 = 7'b0000011; kr1 = 2'b10; km1 = 8'hFF;
      ks2 = 7'b0001100; kr2 = 2'b00; km2 = 8'b10101010;
      kcn = 32'h88888888;
      #1;
      c1 = lfsr1 ^ lfsr2; c2 = slfsr1 ^ slfsr2;
      for (int i = 0; i < 8; i++) begin
        chk(code[4*i]   == c1[2*i],                 "C_long 4i");
        chk(code[4*i+1] == (c1[2*i] ^ c2[2*i]),     "C_long 4i+1");
        chk(code[4*i+2] == c1[2*i+1],               "C_long 4i+2");
        chk(code[4*i+3] == (1'b1 ^ c1[2*i+1] ^ c2[2*i]), "C_long 4i+3");
      end
      // C_short: C1 = LFSR1+LFSR2+LUT(2i)+LUT(2i+1), C2 = LFSR1+LFSR2+LUT(2i)
      ks1 = 7'b0110011; ks2 = 7'b0010011;
      #1;
      c1 = lfsr1 ^ lfsr2 ^ lut_e ^ lut_o; c2 = lfsr1 ^ lfsr2 ^ lut_e;
      for (int i = 0; i < 8; i++) begin
        chk(code[4*i]   == c1[2*i],                 "C_short 4i");
        chk(code[4*i+1] == (c1[2*i] ^ c2[2*i]),     "C_short 4i+1");
        chk(code[4*i+2] == c1[2*i+1],               "C_short 4i+2");
        chk(code[4*i+3] == (1'b1 ^ c1[2*i+1] ^ c2[2*i]), "C_short 4i+3");
      end
      // S_dl: C1 = LFSR1+LFSR2+H1, C2 = SLFSR1+SLFSR2+H1
      ks1 = 7'b1000011; kr1 = 2'b10; km1 = 8'b01010101;
      ks2 = 7'b1001100; kr2 = 2'b10; km2 = 8'b10101010;
      kcn = '0;
      #1;
      c1 = lfsr1 ^ lfsr2 ^ h1; c2 = slfsr1 ^ slfsr2 ^ h1;
      for (int i = 0; i < 8; i++) begin
        chk(code[4*i]   == c1[2*i],   "S_dl 4i");
        chk(code[4*i+1] == c2[2*i],   "S_dl 4i+1");
        chk(code[4*i+2] == c1[2*i+1], "S_dl 4i+2");
        chk(code[4*i+3] == c2[2*i+1], "S_dl 4i+3");
      end
      // C_pre: C1 = LFSR1+LFSR2+H1; (a,b,g,d) alternate (0,0,1,0), (1,1,0,1)
      ks1 = 7'b1000011; kr1 = 2'b10; km1 = 8'hFF;
      ks2 = 7'b0000000; kr2 = 2'b00; km2 = 8'h00;
      kcn = 32'hB4B4B4B4;  // per 8 bits: 0,0,1,0 then 1,1,0,1 (LSB first)
      #1;
      c1 = lfsr1 ^ lfsr2 ^ h1;
      for (int i = 0; i < 8; i++) begin
        bit [3:0] k;
        k = (i % 2 == 0) ? 4'b0100 : 4'b1011;  // {d,g,b,a}
        chk(code[4*i]   == (k[0] ^ c1[2*i]),   "C_pre 4i");
        chk(code[4*i+1] == (k[1] ^ c1[2*i]),   "C_pre 4i+1");
        chk(code[4*i+2] == (k[2] ^ c1[2*i+1]), "C_pre 4i+2");
        chk(code[4*i+3] == (k[3] ^ c1[2*i+1]), "C_pre 4i+3");
      end
      // GPS C/A: C1 = LFSR1 + SLFSR2, OUT = (C1(2i), C1(2i), C1(2i+1), C1(2i+1))
      ks1 = 7'b0001001; kr1 = 2'b10; km1 = 8'hFF;
      ks2 = 7'b0000000; km2 = 8'h00; kcn = '0;
      #1;
      c1 = lfsr1 ^ slfsr2;
      for (int i = 0; i < 8; i++) begin
        chk(code[4*i] == c1[2*i] && code[4*i+1] == c1[2*i], "GPS even");
        chk(code[4*i+2] == c1[2*i+1] && code[4*i+3] == c1[2*i+1], "GPS odd");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
