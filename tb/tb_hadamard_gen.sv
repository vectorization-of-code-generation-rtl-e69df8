// tb_hadamard_gen - self-checking test of the vectorized Hadamard generator.
//
// For random code numbers the testbench runs more than a full period of
// SF_MAX/W = 32 LEAPs and compares each 16-chip output with the Hadamard
// definition chip(k) = parity(code_nr AND k), k = 16*counter + lane. It also
// checks the SF = 8 code table (codes 0..7 as printed bit patterns), that
// short codes repeat every SF chips, the orthogonality of all SF = 16 code
// pairs, the counter wrap, clear and load, and the one-cycle output latency.
// Finally it checks that OVSF channelisation codes (SF 4, 32, 256, 512),
// built independently by the code tree, come out of the generator when the
// code number is bit-reversed over log2(SF) bits, as software would do.
module tb_hadamard_gen;
  import cgu_pkg::*;
  localparam int SF = 512, W = 16;

  logic clk = 0, rst_n = 0;
  logic [8:0] code_nr = '0;
  logic clear = 0, load = 0, leap = 0;
  logic [4:0] load_cnt = '0;
  logic [W-1:0] h;
  logic [4:0] cnt;

  hadamard_gen #(.SF(SF), .W(W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, wraps = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit had(int s, int k);
    return ^(s & k);
  endfunction

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  task automatic do_leap();
    leap = 1; @(negedge clk); leap = 0;
  endtask

  // OVSF code tree: C(1,0) = 0; C(2sf,2n) = C(sf,n),C(sf,n);
  // C(2sf,2n+1) = C(sf,n),NOT C(sf,n). Returns chip k of C(sf,n).
  function automatic bit ovsf(int sf, int n, int k);
    if (sf == 1) return 1'b0;
    return ovsf(sf / 2, n / 2, k % (sf / 2)) ^ ((n % 2 == 1) && (k >= sf / 2));
  endfunction

  function automatic int bitrev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

  int ovsf_sf [4] = '{4, 32, 256, 512};

  // SF = 8 table: code number -> chips 0..7 (chip 0 first)
  bit [7:0] sf8 [8] = '{8'b00000000, 8'b01010101, 8'b00110011, 8'b01100110,
                       8'b00001111, 8'b01011010, 8'b00111100, 8'b01101001};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 20; it++) begin
      int c0;
      code_nr = 9'($urandom);
      clear = 1; @(negedge clk); clear = 0;
      chk(cnt == 0, "clear");
      for (int q = 0; q < 40; q++) begin
        c0 = cnt;
        do_leap();
        if (c0 == 31) begin
          chk(cnt == 0, "wrap");
          wraps++;
        end
        for (int j = 0; j < W; j++)
          chk(h[j] == had(code_nr, (c0 * W + j) % SF), $sformatf("chip code %0d", code_nr));
      end
    end
    // load
    code_nr = 9'h1A5;
    load_cnt = 5'd17; load = 1; @(negedge clk); load = 0;
    chk(cnt == 17, "load");
    do_leap();
    for (int j = 0; j < W; j++) chk(h[j] == had(9'h1A5, 17 * W + j), "after load");
    // SF = 8 table and periodicity
    for (int s = 0; s < 8; s++) begin
      code_nr = 9'(s);
      clear = 1; @(negedge clk); clear = 0;
      do_leap();
      for (int j = 0; j < W; j++) chk(h[j] == sf8[s][7 - (j % 8)], "sf8 table");
    end
    // orthogonality of SF = 16 codes
    for (int a = 0; a < 16; a++) begin
      logic [W-1:0] ha;
      code_nr = 9'(a); clear = 1; @(negedge clk); clear = 0; do_leap(); ha = h;
      for (int b = 0; b < 16; b++) begin
        int dot;
        code_nr = 9'(b); clear = 1; @(negedge clk); clear = 0; do_leap();
        dot = 0;
        for (int j = 0; j < W; j++) dot += (ha[j] ^ h[j]) ? -1 : 1;
        chk((a == b) ? (dot == 16) : (dot == 0), "orthogonality");
      end
    end
    // OVSF channelisation codes: code n of spreading factor sf, built by the
    // code tree, equals Hadamard code bitreverse(n) over log2(sf) bits.
    foreach (ovsf_sf[i]) begin
      int sf, n;
      sf = ovsf_sf[i];
      for (int t = 0; t < 24; t++) begin
        n = (sf <= 32) ? t % sf : int'($urandom % sf);
        code_nr = 9'(bitrev(n, $clog2(sf)));
        clear = 1; @(negedge clk); clear = 0;
        for (int q = 0; q < ((sf < W) ? 1 : sf / W) + 1; q++) begin
          do_leap();
          for (int j = 0; j < W; j++)
            chk(h[j] == ovsf(sf, n, (q * W + j) % sf), $sformatf("ovsf sf %0d n %0d", sf, n));
        end
      end
    end
    chk(wraps > 0, "wrap happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
