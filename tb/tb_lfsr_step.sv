// tb_lfsr_step - self-checking test of the factorized multi-step LFSR logic.
//
// Drives random states, polynomials and input vectors into lfsr_step at the
// default size (N = 32, W = 16) and at N = 8, W = 8, and compares x_next with
// W single steps of a bit-serial Fibonacci LFSR model (new bit = XOR of
// g_j & x_j, plus the input bit of that step). It also checks the p-factors
// of a 16-bit LFSR against the closed forms p_0..p_7 listed for that length.
module tb_lfsr_step;
  localparam int unsigned N = 32, W = 16;
  localparam int unsigned N2 = 8, W2 = 8;

  int checks = 0, failures = 0;

  logic [N-1:0]  x, g, xn;
  logic [W-1:0]  y;
  logic [N2-1:0] x2, g2, xn2;
  logic [W2-1:0] y2;
  logic [15:0]   g16;
  logic [15:0]   p16;

  lfsr_step #(.N(N),  .W(W))  dut  (.x(x),  .g(g),  .y(y),  .x_next(xn));
  lfsr_step #(.N(N2), .W(W2)) dut2 (.x(x2), .g(g2), .y(y2), .x_next(xn2));
  lfsr_pfactors #(.N(16), .W(16)) dut_p (.g(g16), .p(p16));

  function automatic logic [N-1:0] ref_step(logic [N-1:0] s, logic [N-1:0] gg,
                                            logic [W-1:0] yy, int n, int w);
    logic nb;
    for (int k = 0; k < w; k++) begin
      nb = yy[k];
      for (int j = 0; j < n; j++) nb ^= gg[j] & s[j];
      for (int j = 0; j < n - 1; j++) s[j] = s[j+1];
      s[n-1] = nb;
    end
    return s;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] r;
    logic [15:0]  e;
    for (int it = 0; it < 3000; it++) begin
      x  = $urandom;
      g  = {$urandom};
      y  = (it % 2 == 0) ? '0 : W'($urandom);
      x2 = N2'($urandom); g2 = N2'($urandom); y2 = (it % 3 == 0) ? '0 : W2'($urandom);
      g16 = 16'($urandom);
      #1;
      r = ref_step(x, g, y, N, W);
      checks++;
      if (xn !== r) begin
        failures++;
        if (failures < 5) $display("N32 mismatch x=%h g=%h y=%h got %h exp %h", x, g, y, xn, r);
      end
      r = ref_step(N'(x2), N'(g2), W'(y2), N2, W2);
      checks++;
      if (xn2 !== r[N2-1:0]) begin
        failures++;
        if (failures < 5) $display("N8 mismatch got %h exp %h", xn2, r[N2-1:0]);
      end
      // p-factors of a 16-bit LFSR, closed forms
      e[0] = 1'b1;
      e[1] = g16[15];
      e[2] = g16[14] ^ g16[15];
      e[3] = g16[13] ^ g16[15];
      e[4] = g16[12] ^ g16[14] ^ g16[15] ^ (g16[14] & g16[15]);
      e[5] = g16[11] ^ g16[15] ^ (g16[13] & g16[15]) ^ (g16[14] & g16[15]);
      e[6] = g16[10] ^ g16[13] ^ g16[14] ^ g16[15] ^ (g16[12] & g16[15]) ^ (g16[14] & g16[15]);
      e[7] = g16[9] ^ (g16[13] & g16[14]) ^ g16[15] ^ (g16[11] & g16[15]);
      checks++;
      if (p16[7:0] !== e[7:0]) begin
        failures++;
        if (failures < 5) $display("p-factor mismatch g=%h got %b exp %b", g16, p16[7:0], e[7:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
