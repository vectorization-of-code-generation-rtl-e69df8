// tb_prn_generator - self-checking test of the vectorized PRN generator.
//
// For several polynomial lengths M (32, 25, 18, 10, 8 and 2, so also M < W)
// the testbench maps a random polynomial g and delay polynomial h onto the
// 32-bit generator (shifted up by N-M, unused = N-M), loads an M-bit initial
// state with random junk around it, and runs LEAPs. Each output is compared
// with a bit-serial length-M LFSR model: the normal output must be the next
// W sequence chips, the delayed output XOR_j h_j & seq[k+j]. In CRC mode a
// random input vector is consumed every LEAP and the signature register is
// compared with the model. A state save/restore in mid-run must continue the
// sequence. Each LEAP must produce its output in the following cycle.
module tb_prn_generator;
  import cgu_pkg::*;
  localparam int N = 32, W = 16;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] poly_g, poly_h;
  logic input_en = 0;
  logic [4:0] unused;
  logic load = 0, leap = 0;
  logic [N+W-1:0] load_state;
  logic [W-1:0] crc_y = '0;
  logic [W-1:0] z, zd;
  logic [N+W-1:0] state;
  logic [N-1:0] sig;

  prn_generator #(.N(N), .W(W), .HAS_INPUT(1'b1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference sequence of the length-M LFSR.
  bit seq[$];
  bit yin[$];
  bit [31:0] gm, hm;  // unshifted polynomials, bits 0..M-1

  function automatic bit next_bit(int k, int m);
    bit b = yin[k];
    for (int j = 0; j < m; j++) b ^= gm[j] & seq[k+j];
    return b;
  endfunction

  task automatic check(string what, logic got, bit exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s mismatch at t=%0t: got %b exp %b", what, $time, got, exp);
    end
  endtask

  task automatic run_case(int m, bit crc, int nleaps, bit do_save);
    int leaps_done;
    logic [N+W-1:0] saved;
    seq.delete(); yin.delete();
    gm = $urandom; gm[0] = 1'b1;
    if (m < 32) gm &= (32'h1 << m) - 1;
    hm = $urandom;
    if (m < 32) hm &= (32'h1 << m) - 1;
    for (int i = 0; i < m; i++) seq.push_back(1'($urandom));
    for (int i = 0; i < (nleaps + 2) * W; i++) yin.push_back(crc ? 1'($urandom) : 1'b0);
    for (int k = 0; seq.size() < (nleaps + 2) * W + m + W; k++) seq.push_back(next_bit(k, m));
    // configuration
    @(negedge clk);
    poly_g   = N'(gm) << (N - m);
    poly_h   = N'(hm) << (N - m);
    unused   = 5'(N - m);
    input_en = crc;
    load_state = {$urandom, $urandom};
    for (int i = 0; i < m; i++) load_state[W + N - m + i] = seq[i];
    load = 1;
    @(negedge clk);
    load = 0;
    leaps_done = 0;
    for (int q = 0; q < nleaps; q++) begin
      int t0;
      // save and restore the state in mid-run
      if (do_save && q == nleaps / 2) begin
        saved = state;
        load_state = {$urandom, $urandom}; load = 1; @(negedge clk);
        load_state = saved; @(negedge clk);
        load = 0;
        checks++;
        if (state !== saved) failures++;
      end
      leap = 1;
      for (int k = 0; k < W; k++) crc_y[k] = yin[q*W + k];
      t0 = cycles;
      @(negedge clk);
      leap = 0;
      crc_y = '0;
      checks++;
      if (cycles - t0 != 1) failures++;  // one-cycle output latency
      leaps_done++;
      if (leaps_done >= 2) begin
        int base = (leaps_done - 2) * W;
        for (int i = 0; i < W; i++) begin
          bit e = 0;
          check($sformatf("z m=%0d", m), z[i], seq[base + i]);
          for (int j = 0; j < m; j++) e ^= hm[j] & seq[base + i + j];
          check($sformatf("zd m=%0d", m), zd[i], e);
        end
      end
      // signature register holds seq[(q+1)W .. (q+1)W+m-1] in its top m bits
      for (int i = 0; i < m; i++)
        check($sformatf("sig m=%0d", m), sig[N - m + i], seq[(q + 1) * W + i]);
    end
  endtask

  initial begin
    poly_g = '0; poly_h = '0; unused = '0; load_state = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_case(32, 0, 40, 1);
    run_case(25, 0, 40, 1);
    run_case(18, 0, 40, 0);
    run_case(10, 0, 40, 1);
    run_case(8,  0, 40, 0);
    run_case(2,  0, 10, 0);
    run_case(32, 1, 30, 1);
    run_case(16, 1, 30, 0);
    run_case(8,  1, 30, 0);
    repeat (2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
