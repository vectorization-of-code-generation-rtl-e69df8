// tb_cgu_top - end-to-end test of the Code Generation Unit at its default
// size (32-bit LFSRs, 16 chips per cycle, SF 512, 256-bit vectors).
//
// The testbench programs the CGU through its instruction port only: CONFIG,
// RCV_STATE, LEAP, SND_STATE, SSND and scalar receive (VMU). Its reference
// is independent of the RTL: each PRN generator is a bit-serial length-M
// Fibonacci LFSR producing a sequence queue (with CRC input bits where
// enabled), the Hadamard code is parity(code_nr AND chip index), the TLU is
// the last scalar received, and the combiner is a per-bit model of the
// select / double / mask / add / negate functions. Phases:
//   A  UMTS long scrambling code (two length-25 LFSRs, delayed outputs by
//      mask polynomials, C_long combination), with a state save, a garbage
//      restore and a restore of the saved state in mid-run;
//   B  UMTS downlink code S_dl (two length-18 LFSRs plus Hadamard), run past
//      the Hadamard counter wrap;
//   C  GPS C/A code (two length-10 LFSRs, shorter than the vector);
//   D  UMTS short code (two length-8 LFSRs plus quaternary bits from TLU);
//   E  CRC of a random stream on generator 1 (length-16 polynomial), the
//      signature read back with SSND.
// Every LEAP/SND_STATE result must appear exactly one cycle later; each
// mechanism is counted and a mechanism that never happened is a failure.
module tb_cgu_top;
  import cgu_pkg::*;

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
    repeat (100000) @(posedge clk);
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

  // ---------------- reference model ----------------
  int          m_len [2];
  bit [31:0]   gm [2], hm [2];
  bit          seq0[$], seq1[$], yin0[$];
  int          pos [2];      // LEAPs since the state was loaded
  int          had_cnt;
  bit [31:0]   tlu;
  cgu_cfg_t    cfg;

  function automatic bit sq(int g, int k);
    return (g == 0) ? seq0[k] : seq1[k];
  endfunction

  // Extend the sequences so that index k exists.
  function automatic void extend(int g, int k);
    while (((g == 0) ? seq0.size() : seq1.size()) <= k) begin
      int n = (g == 0) ? seq0.size() : seq1.size();
      int i = n - m_len[g];
      bit b = (g == 0 && i < yin0.size()) ? yin0[i] : 1'b0;
      for (int j = 0; j < m_len[g]; j++) b ^= gm[g][j] & sq(g, i + j);
      if (g == 0) seq0.push_back(b); else seq1.push_back(b);
    end
  endfunction

  function automatic logic [15:0] ref_z(int g, int base);
    logic [15:0] v;
    extend(g, base + 15);
    for (int i = 0; i < 16; i++) v[i] = sq(g, base + i);
    return v;
  endfunction

  function automatic logic [15:0] ref_zd(int g, int base);
    logic [15:0] v;
    extend(g, base + 15 + m_len[g] - 1);
    for (int i = 0; i < 16; i++) begin
      v[i] = 1'b0;
      for (int j = 0; j < m_len[g]; j++) v[i] ^= hm[g][j] & sq(g, base + i + j);
    end
    return v;
  endfunction

  function automatic bit branch_bit(logic [6:0] ks, logic [1:0] kr, logic [7:0] km, int n,
                                    logic [6:0][15:0] in);
    int chip;
    bit c;
    chip = 2 * (n / 4) + ((n % 4 < 2) ? kr[0] : kr[1]);
    c = 0;
    for (int m = 0; m < 7; m++) if (ks[m]) c ^= in[m][chip];
    return c & km[n % 8];
  endfunction

  // ---------------- mechanism counters ----------------
  int n_config, n_rcv, n_snd, n_leap, n_ssnd, n_vmu, n_crc, n_resize, n_short,
      n_delayed, n_had_wrap, n_restore, n_tlu_code, n_had_code;

  // ---------------- instruction issue ----------------
  bit          exp_vvalid, exp_svalid, chk_code, chk_state;
  logic [31:0] exp_code;
  logic [255:0] exp_state_mask, exp_state;
  logic [31:0] exp_sout, exp_sout_mask;

  task automatic check_prev();
    chk(vector_out_valid == exp_vvalid, "vector_out_valid timing");
    chk(scalar_out_valid == exp_svalid, "scalar_out_valid timing");
    if (chk_code) chk(vector_out == {224'b0, exp_code}, "code vector");
    if (chk_state) chk((vector_out & exp_state_mask) == (exp_state & exp_state_mask), "state vector");
    if (exp_svalid) chk((scalar_out & exp_sout_mask) == (exp_sout & exp_sout_mask), "CRC signature");
  endtask

  task automatic issue(vopc_e v, sopc_e s, srcv_e r, logic [255:0] vin, logic [31:0] sin,
                       bit check_out);
    logic [6:0][15:0] in;
    bit crc_now;
    cmd.vopc = v; cmd.sopc = s; cmd.srcv = r;
    vector_in = vin; scalar_in = sin;
    exp_vvalid = (v == VOP_LEAP) || (v == VOP_SND_STATE);
    exp_svalid = (s == SOP_SSND);
    chk_code = 0; chk_state = 0;
    // SSND reads the signature before this instruction's LEAP
    if (s == SOP_SSND) begin
      n_ssnd++;
      exp_sout = '0; exp_sout_mask = '0;
      if (pos[0] >= 1) begin
        extend(0, pos[0] * 16 + m_len[0] - 1);
        for (int i = 0; i < m_len[0]; i++) begin
          exp_sout[32 - m_len[0] + i]      = seq0[pos[0] * 16 + i];
          exp_sout_mask[32 - m_len[0] + i] = 1'b1;
        end
      end
    end
    crc_now = (r == SRCV_VMU) && cfg.prn1.input_en;
    if (r == SRCV_VMU) begin
      n_vmu++;
      tlu = sin;
    end
    if (v == VOP_CONFIG) begin
      n_config++;
      cfg = cgu_cfg_t'(vin);
      had_cnt = 0;
    end
    if (v == VOP_RCV_STATE) n_rcv++;
    if (v == VOP_SND_STATE) begin
      n_snd++;
      chk_state = 1;
      exp_state = '0; exp_state_mask = '0;
      for (int g = 0; g < 2; g++) if (pos[g] >= 1) begin
        extend(g, (pos[g] - 1) * 16 + m_len[g] + 15);
        for (int k = 0; k < m_len[g] + 16; k++) begin
          exp_state[48*g + 32 - m_len[g] + k]      = sq(g, (pos[g] - 1) * 16 + k);
          exp_state_mask[48*g + 32 - m_len[g] + k] = 1'b1;
        end
      end
      exp_state[100:96] = 5'(had_cnt); exp_state_mask[100:96] = '1;
    end
    if (v == VOP_LEAP) begin
      n_leap++;
      if (crc_now) begin
        n_crc++;
        // input bits of steps pos*16 .. pos*16+15 of generator 1
        while (yin0.size() < pos[0] * 16) yin0.push_back(1'b0);
        for (int k = 0; k < 16; k++) yin0.push_back(sin[k]);
      end
      if (check_out && pos[0] >= 1 && pos[1] >= 1) begin
        in[CI_LFSR1]  = ref_z(0, (pos[0] - 1) * 16);
        in[CI_LFSR2]  = ref_z(1, (pos[1] - 1) * 16);
        in[CI_SLFSR1] = ref_zd(0, (pos[0] - 1) * 16);
        in[CI_SLFSR2] = ref_zd(1, (pos[1] - 1) * 16);
        for (int i = 0; i < 16; i++) begin
          in[CI_LUT_E][i] = tlu[2*i];
          in[CI_LUT_O][i] = tlu[2*i+1];
          in[CI_H1][i]    = ^(cfg.code_nr & 9'(had_cnt * 16 + i));
        end
        for (int n = 0; n < 32; n++)
          exp_code[n] = branch_bit(cfg.ks1, cfg.kr1, cfg.km1, n, in) ^
                        branch_bit(cfg.ks2, cfg.kr2, cfg.km2, n, in) ^ cfg.kcn[n];
        chk_code = 1;
        if (m_len[0] < 32) n_resize++;
        if (m_len[0] < 16) n_short++;
        if (cfg.prn1.poly_h != 0 && (cfg.ks1[CI_SLFSR1] | cfg.ks1[CI_SLFSR2] |
                                     cfg.ks2[CI_SLFSR1] | cfg.ks2[CI_SLFSR2])) n_delayed++;
        if (cfg.ks1[CI_LUT_E] | cfg.ks1[CI_LUT_O] | cfg.ks2[CI_LUT_E]) n_tlu_code++;
        if (cfg.ks1[CI_H1] | cfg.ks2[CI_H1]) n_had_code++;
      end
      pos[0]++; pos[1]++;
      if (had_cnt == 31) n_had_wrap++;
      had_cnt = (had_cnt + 1) % 32;
    end
    @(negedge clk);
    check_prev();
  endtask

  task automatic nop();
    issue(VOP_NOP, SOP_NOP, SRCV_NONE, '0, '0, 0);
  endtask

  // Configure both generators and the combiner, then load initial states.
  task automatic setup(int m1, bit [31:0] g1, bit [31:0] h1, bit [31:0] init1,
                       int m2, bit [31:0] g2, bit [31:0] h2, bit [31:0] init2,
                       logic [8:0] code_nr, logic [6:0] ks1, logic [6:0] ks2,
                       logic [1:0] kr1, logic [1:0] kr2, logic [7:0] km1, logic [7:0] km2,
                       logic [31:0] kcn, bit crc);
    cgu_cfg_t c;
    logic [255:0] st;
    c = '0;
    c.prn1.poly_g = g1 << (32 - m1); c.prn1.poly_h = h1 << (32 - m1);
    c.prn1.unused = 5'(32 - m1);     c.prn1.input_en = crc;
    c.prn2.poly_g = g2 << (32 - m2); c.prn2.poly_h = h2 << (32 - m2);
    c.prn2.unused = 5'(32 - m2);
    c.code_nr = code_nr; c.ks1 = ks1; c.ks2 = ks2; c.kr1 = kr1; c.kr2 = kr2;
    c.km1 = km1; c.km2 = km2; c.kcn = kcn;
    c.reserved = '1;  // reserved bits must be ignored
    m_len[0] = m1; m_len[1] = m2; gm[0] = g1; gm[1] = g2; hm[0] = h1; hm[1] = h2;
    seq0.delete(); seq1.delete(); yin0.delete();
    for (int i = 0; i < m1; i++) seq0.push_back(init1[i]);
    for (int i = 0; i < m2; i++) seq1.push_back(init2[i]);
    issue(VOP_CONFIG, SOP_NOP, SRCV_NONE, 256'(c), '0, 0);
    st = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < m1; i++) st[16 + 32 - m1 + i] = init1[i];
    for (int i = 0; i < m2; i++) st[48 + 16 + 32 - m2 + i] = init2[i];
    st[100:96] = 5'd0;
    issue(VOP_RCV_STATE, SOP_NOP, SRCV_NONE, st, '0, 0);
    pos[0] = 0; pos[1] = 0; had_cnt = 0;
  endtask

  initial begin
    logic [255:0] saved;
    int saved_pos [2];
    int saved_cnt;
    cmd = '{VOP_NOP, SOP_NOP, SRCV_NONE};
    pos[0] = 0; pos[1] = 0; had_cnt = 0; tlu = '0; cfg = '0;
    m_len[0] = 32; m_len[1] = 32;
    exp_vvalid = 0; exp_svalid = 0; chk_code = 0; chk_state = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- A: UMTS long scrambling code, C_long combination ----
    // x: X^25+X^3+1, y: X^25+X^3+X^2+X+1; delayed outputs by mask taps
    // x(4)+x(7)+x(18) and y(4)+y(6)+y(17); x starts from the code number
    // with bit 24 set, y from all ones.
    setup(25, 32'h9, (1 << 4) | (1 << 7) | (1 << 18), 32'h1000000 | ($urandom & 32'hFFFFFF),
          25, 32'hF, (1 << 4) | (1 << 6) | (1 << 17), 32'h1FFFFFF,
          9'd0, 7'b0000011, 7'b0001100, 2'b10, 2'b00, 8'hFF, 8'hAA, 32'h88888888, 0);
    issue(VOP_LEAP, SOP_NOP, SRCV_NONE, '0, '0, 0);   // first window after load
    for (int q = 0; q < 30; q++) issue(VOP_LEAP, SOP_NOP, SRCV_NONE, '0, '0, 1);
    issue(VOP_SND_STATE, SOP_NOP, SRCV_NONE, '0, '0, 0);
    saved = vector_out;
    saved_pos = pos; saved_cnt = had_cnt;
    issue(VOP_RCV_STATE, SOP_NOP, SRCV_NONE,
          {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}, '0, 0);
    pos[0] = 0; pos[1] = 0;
    for (int q = 0; q < 3; q++) issue(VOP_LEAP, SOP_NOP, SRCV_NONE, '0, '0, 0);
    issue(VOP_RCV_STATE, SOP_NOP, SRCV_NONE, saved, '0, 0);
    pos = saved_pos; had_cnt = saved_cnt;
    n_restore++;
    for (int q = 0; q < 30; q++) issue(VOP_LEAP, SOP_NOP, SRCV_NONE, '0, '0, 1);
    nop();

    // ---- B: S_dl, Z_n with Hadamard ----
    setup(18, 32'h81, 32'h0120, 32'h1 | ($urandom & 32'h3FFFE),
          18, 32'h4A1, 32'h8210, 32'h3FFFF,
          9'($urandom), 7'b1000011, 7'b1001100, 2'b10, 2'b10, 8'h55, 8'hAA, 32'h0, 0);
    issue(VOP_LEAP, SOP_NOP, SRCV_NONE, '0, '0, 0);
    for (int q = 0; q < 40; q++) issue(VOP_LEAP, SOP_NOP, SRCV_NONE, '0, '0, 1);
    issue(VOP_SND_STATE, SOP_NOP, SRCV_NONE, '0, '0, 0);
    nop();

    // ---- C: GPS C/A code, G1 + delayed G2 ----
    // G1 = 1+X^3+X^10 and G2 = 1+X^2+X^3+X^6+X^8+X^9+X^10 as shift registers
    // output at stage 10 (recursions g = 081h, 197h), both from all ones;
    // satellite 1 phase selection, stages 2 and 6 = delay taps 8 and 4.
    setup(10, 32'h81, 32'h1, 32'h3FF,
          10, 32'h197, 32'h110, 32'h3FF,
          9'd0, 7'b0001001, 7'b0000000, 2'b10, 2'b00, 8'hFF, 8'h00, 32'h0, 0);
    issue(VOP_LEAP, SOP_NOP, SRCV_NONE, '0, '0, 0);
    for (int q = 0; q < 30; q++) issue(VOP_LEAP, SOP_NOP, SRCV_NONE, '0, '0, 1);
    nop();

    // ---- D: UMTS short code, b and d LFSRs plus quaternary TLU bits ----
    setup(8, 32'hA3, 32'h0, 32'h1 | ($urandom & 32'hFE),
          8, 32'hB1, 32'h0, 32'h1 | ($urandom & 32'hFE),
          9'd0, 7'b0110011, 7'b0010011, 2'b10, 2'b00, 8'hFF, 8'hAA, 32'h88888888, 0);
    issue(VOP_LEAP, SOP_NOP, SRCV_VMU, '0, $urandom, 0);
    for (int q = 0; q < 30; q++) issue(VOP_LEAP, SOP_NOP, SRCV_VMU, '0, $urandom, 1);
    nop();

    // ---- E: CRC of a random stream, polynomial X^16+X^12+X^5+1 ----
    setup(16, 32'h1021, 32'h0, 32'h0,
          16, 32'h1021, 32'h0, 32'h0,
          9'd0, 7'b0000001, 7'b0000000, 2'b00, 2'b00, 8'hFF, 8'h00, 32'h0, 1);
    for (int q = 0; q < 24; q++) issue(VOP_LEAP, SOP_NOP, SRCV_VMU, '0, $urandom, 0);
    issue(VOP_NOP, SOP_SSND, SRCV_NONE, '0, '0, 0);
    for (int q = 0; q < 8; q++) issue(VOP_LEAP, (q % 2) ? SOP_SSND : SOP_NOP, SRCV_VMU, '0, $urandom, 0);
    issue(VOP_NOP, SOP_SSND, SRCV_NONE, '0, '0, 0);
    nop(); nop();

    $display("mechanisms: config=%0d rcv_state=%0d snd_state=%0d leap=%0d ssnd=%0d vmu=%0d crc_leaps=%0d",
             n_config, n_rcv, n_snd, n_leap, n_ssnd, n_vmu, n_crc);
    $display("            resized=%0d shorter_than_vector=%0d delayed=%0d had_wrap=%0d restore=%0d tlu_codes=%0d had_codes=%0d",
             n_resize, n_short, n_delayed, n_had_wrap, n_restore, n_tlu_code, n_had_code);
    if (n_config == 0 || n_rcv == 0 || n_snd == 0 || n_leap == 0 || n_ssnd == 0 ||
        n_vmu == 0 || n_crc == 0 || n_resize == 0 || n_short == 0 || n_delayed == 0 ||
        n_had_wrap == 0 || n_restore == 0 || n_tlu_code == 0 || n_had_code == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
