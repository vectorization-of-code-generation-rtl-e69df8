// tb_gps_ca - the GPS C/A (coarse/acquisition) code on the whole CGU at its
// default size.
//
// A C/A code is G1 XOR a phase-selected G2. G1 = 1+X^3+X^10 and
// G2 = 1+X^2+X^3+X^6+X^8+X^9+X^10 are 10-stage shift registers. Both start
// at all ones and shift from stage 1 toward stage 10. G1 is output from
// stage 10. For satellite PRN p, the G2 output is stage a XOR stage b of G2.
// In sequence terms, with chip n leaving stage 10 at time n:
//   G1: a(n+10) = a(n) + a(n+7)                             -> g = 0x081
//   G2: b(n+10) = b(n) + b(n+1) + b(n+2) + b(n+4) + b(n+7) + b(n+8) -> g = 0x197
//   stage k at time n holds b(n+10-k), so the phase selection of stages
//   (a, b) is the delay polynomial h = X^(10-a) + X^(10-b).
// Both are length-10 sequences, shorter than the 16 chips of a LEAP. They
// rely on the 48-bit window and the output offset (unused = 22). The
// combiner uses the C/A recipe C1 = LFSR1 + SLFSR2, doubled so that output
// bits 2m and 2m+1 both carry chip m.
// Checks for PRN 1..5 (stage pairs 2/6, 3/7, 4/8, 5/9, 1/9):
//   * the first 10 chips equal the published octal values 1440, 1620,
//     1710, 1744, 1133;
//   * every chip equals a literal stage-by-stage model of the two shift
//     registers, for 66 LEAPs (1056 chips);
//   * the code repeats after 1023 chips and has 512 ones per period;
//   * every output arrives exactly one cycle after its LEAP.
module tb_gps_ca;
  import cgu_pkg::*;

  localparam int NLEAP = 67;  // 1 window fill + 66 code vectors

  logic clk = 0, rst_n = 0;
  cgu_cmd_t cmd;
  logic [31:0]  scalar_in;
  logic [255:0] vector_in;
  logic [255:0] vector_out;
  logic         vector_out_valid;
  logic [31:0]  scalar_out;
  logic         scalar_out_valid;

  cgu_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  // Literal shift-register model: st[1..10], output chip = G1[10] ^ G2[a] ^ G2[b].
  function automatic void ref_code(int a, int b, ref bit code [1056]);
    bit [10:1] r1 = '1, r2 = '1;
    bit f1, f2;
    for (int n = 0; n < 1056; n++) begin
      code[n] = r1[10] ^ r2[a] ^ r2[b];
      f1 = r1[3] ^ r1[10];
      f2 = r2[2] ^ r2[3] ^ r2[6] ^ r2[8] ^ r2[9] ^ r2[10];
      r1 = {r1[9:1], f1};
      r2 = {r2[9:1], f2};
    end
  endfunction

  task automatic run_prn(int prn, int a, int b, logic [9:0] first10);
    cgu_cfg_t c;
    logic [255:0] st;
    bit ref_c [1056];
    bit got [1056];
    int q, ones;
    bit pend;
    logic [9:0] f;
    ref_code(a, b, ref_c);
    c = '0;
    c.prn1.poly_g = 32'h081 << 22; c.prn1.unused = 5'd22;
    c.prn2.poly_g = 32'h197 << 22; c.prn2.unused = 5'd22;
    c.prn2.poly_h = ((32'h1 << (10 - a)) | (32'h1 << (10 - b))) << 22;
    c.ks1 = 7'b0001001; c.kr1 = 2'b10; c.km1 = 8'hFF;
    @(negedge clk);
    cmd = '{VOP_CONFIG, SOP_NOP, SRCV_NONE}; vector_in = 256'(c);
    @(negedge clk);
    st = {8{$urandom}};
    st[47:38] = '1;   // G1: ten ones at the top of the register
    st[95:86] = '1;   // G2
    cmd = '{VOP_RCV_STATE, SOP_NOP, SRCV_NONE}; vector_in = st;
    @(negedge clk);
    q = 0; pend = 0;
    for (int t = 0; t <= NLEAP; t++) begin
      chk(vector_out_valid == pend, $sformatf("PRN %0d valid timing", prn));
      if (pend) begin
        q++;
        if (q >= 2)
          for (int m = 0; m < 16; m++) begin
            got[16 * (q - 2) + m] = vector_out[2 * m];
            chk(vector_out[2 * m] == vector_out[2 * m + 1],
                $sformatf("PRN %0d doubled chip", prn));
          end
      end
      cmd = (t < NLEAP) ? '{VOP_LEAP, SOP_NOP, SRCV_NONE} : '{VOP_NOP, SOP_NOP, SRCV_NONE};
      pend = (t < NLEAP);
      @(negedge clk);
    end
    chk(q == NLEAP, $sformatf("PRN %0d output count", prn));
    for (int n = 0; n < 10; n++) f[9 - n] = got[n];
    chk(f == first10, $sformatf("PRN %0d first chips %o", prn, f));
    ones = 0;
    for (int n = 0; n < 1056; n++) chk(got[n] == ref_c[n], $sformatf("PRN %0d chip %0d", prn, n));
    for (int n = 0; n < 1023; n++) ones += int'(got[n]);
    for (int n = 0; n < 1056 - 1023; n++) chk(got[n] == got[n + 1023], $sformatf("PRN %0d period", prn));
    chk(ones == 512, $sformatf("PRN %0d balance %0d", prn, ones));
  endtask

  initial begin
    cmd = '{VOP_NOP, SOP_NOP, SRCV_NONE};
    scalar_in = '0; vector_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_prn(1, 2, 6, 10'o1440);
    run_prn(2, 3, 7, 10'o1620);
    run_prn(3, 4, 8, 10'o1710);
    run_prn(4, 5, 9, 10'o1744);
    run_prn(5, 1, 9, 10'o1133);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
