// tb_umts_delay - checks the delayed outputs of the whole CGU over the real
// delays of two UMTS codes.
//
// A delay polynomial h makes the delayed output zd[i] = XOR_j h_j x(i+j).
// For an LFSR whose sequence obeys x(t+M) = XOR_j g_j x(t+j), that equals
// x(i+d) exactly when h(X) = X^d mod C(X), with C(X) = X^M + g(X). This
// testbench computes h by square-and-multiply over GF(2). It does not copy
// any tap list, so it checks the delay mechanism itself. Two workloads run
// on cgu_top at its default size:
//   1. UMTS long code: x = X^25+X^3+1 and y = X^25+X^3+X^2+X+1,
//      C2(i) = C1(i + 16777232), which is 1048577 LEAPs later.
//   2. UMTS downlink code S_dl: x = X^18+X^7+1 and y = X^18+X^10+X^7+X^5+1,
//      the Q branch delayed by 131072 chips, which is 8192 LEAPs later.
// The combiner is set to out[2m] = C1(m) = LFSR1+LFSR2 (mask 55) and
// out[2m+1] = C2(m) = SLFSR1+SLFSR2 (mask AA), with no negation. Both
// outputs of one LEAP come from the same window. So the odd bits of output
// q must equal the even bits of output q + d/16. K = 64 outputs are stored
// from the start and compared at the end. The testbench also checks that
// the computed h for the long code equals the mask taps x(4)+x(7)+x(18) and
// y(4)+y(6)+y(17). Every output must arrive exactly one cycle after its
// LEAP.
module tb_umts_delay;
  import cgu_pkg::*;

  localparam int K = 64;

  logic clk = 0, rst_n = 0;
  cgu_cmd_t cmd;
  logic [31:0]  scalar_in = '0;
  logic [255:0] vector_in = '0;
  logic [255:0] vector_out;
  logic         vector_out_valid;
  logic [31:0]  scalar_out;
  logic         scalar_out_valid;

  cgu_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (1200000) @(posedge clk);
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

  // (a * b) mod C over GF(2); C has degree m, g holds its low m terms.
  function automatic bit [31:0] mulmod(bit [31:0] a, bit [31:0] b, bit [31:0] g, int m);
    bit [63:0] p = '0;
    for (int i = 0; i < m; i++) if (b[i]) p ^= 64'(a) << i;
    for (int i = 2 * m - 2; i >= m; i--)
      if (p[i]) begin
        p[i] = 1'b0;
        p ^= 64'(g) << (i - m);
      end
    return p[31:0];
  endfunction

  // X^d mod C.
  function automatic bit [31:0] xpow(longint d, bit [31:0] g, int m);
    bit [31:0] r = 32'h1, b = 32'h2;
    if (m == 1) b = g;
    while (d > 0) begin
      if ((d & 64'd1) != 0) r = mulmod(r, b, g, m);
      b = mulmod(b, b, g, m);
      d >>= 1;
    end
    return r;
  endfunction

  // One run: configure, load random states, LEAP n_leap times and compare.
  task automatic run(string name, int m, bit [31:0] gx, bit [31:0] gy, longint d);
    cgu_cfg_t c;
    logic [255:0] st;
    bit [31:0] hx, hy;
    logic [15:0] c2_first [K];
    int lead, n_leap, q, n_cmp;
    bit pend;
    hx = xpow(d, gx, m);
    hy = xpow(d, gy, m);
    $display("%s: d=%0d hx=%h hy=%h", name, d, hx, hy);
    lead = int'(d / 16);
    n_leap = lead + K + 1;
    c = '0;
    c.prn1.poly_g = gx << (32 - m); c.prn1.poly_h = hx << (32 - m);
    c.prn1.unused = 5'(32 - m);
    c.prn2.poly_g = gy << (32 - m); c.prn2.poly_h = hy << (32 - m);
    c.prn2.unused = 5'(32 - m);
    c.ks1 = 7'b0000011; c.kr1 = 2'b10; c.km1 = 8'h55;
    c.ks2 = 7'b0001100; c.kr2 = 2'b10; c.km2 = 8'hAA;
    @(negedge clk);
    cmd = '{VOP_CONFIG, SOP_NOP, SRCV_NONE}; vector_in = 256'(c);
    @(negedge clk);
    st = '0;
    st[47:0]  = {16'($urandom | 1), 32'($urandom)};
    st[95:48] = {16'($urandom | 1), 32'($urandom)};
    for (int i = 16; i < 48 - m; i++) begin st[i] = 1'b0; st[48 + i] = 1'b0; end
    st[47 - 0] = 1'b1;  // non-zero state
    st[95 - 0] = 1'b1;
    cmd = '{VOP_RCV_STATE, SOP_NOP, SRCV_NONE}; vector_in = st;
    @(negedge clk);
    q = 0; n_cmp = 0; pend = 0;
    for (int t = 0; t <= n_leap; t++) begin
      // Result of the previous cycle's LEAP.
      chk(vector_out_valid == pend, {name, " valid timing"});
      if (pend) begin
        q++;
        if (q >= 2 && q < 2 + K)
          for (int i = 0; i < 16; i++) c2_first[q - 2][i] = vector_out[2 * i + 1];
        if (q >= 2 + lead && q < 2 + lead + K) begin
          logic [15:0] c1;
          for (int i = 0; i < 16; i++) c1[i] = vector_out[2 * i];
          chk(c1 == c2_first[q - 2 - lead], {name, " delayed == normal later"});
          n_cmp++;
        end
      end
      if (t < n_leap) begin
        cmd = '{VOP_LEAP, SOP_NOP, SRCV_NONE};
        pend = 1;
      end else begin
        cmd = '{VOP_NOP, SOP_NOP, SRCV_NONE};
        pend = 0;
      end
      @(negedge clk);
    end
    chk(n_cmp == K, {name, " all comparisons made"});
  endtask

  initial begin
    bit [31:0] hx, hy;
    cmd = '{VOP_NOP, SOP_NOP, SRCV_NONE};
    repeat (3) @(negedge clk);
    rst_n = 1;

    // The UMTS long-code mask taps are X^16777232 mod C(X).
    hx = xpow(64'd16777232, 32'h9, 25);
    hy = xpow(64'd16777232, 32'hF, 25);
    chk(hx == ((1 << 4) | (1 << 7) | (1 << 18)), "long-code x mask");
    chk(hy == ((1 << 4) | (1 << 6) | (1 << 17)), "long-code y mask");
    // Sanity of the arithmetic: X^(2^25-1) = 1 for the primitive x polynomial.
    chk(xpow(64'd33554431, 32'h9, 25) == 32'h1, "x period");

    run("S_dl", 18, 32'h81, 32'h4A1, 64'd131072);
    run("C_long", 25, 32'h9, 32'hF, 64'd16777232);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
