// tb_cgu_config_reg - self-checking test of the configuration register.
//
// Loads random 256-bit vectors and checks every configuration field against
// its bit range (prn1 g/h/input_en/unused from bit 0 up, then prn2, code_nr,
// ks1, ks2, kr1, kr2, km1, km2, kcn), and that the value holds without load.
module tb_cgu_config_reg;
  import cgu_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [255:0] din = '0;
  cgu_cfg_t cfg;

  cgu_config_reg dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c);
    checks++;
    if (!c) failures++;
  endtask

  initial begin
    logic [255:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(cfg == '0);
    for (int it = 0; it < 100; it++) begin
      for (int k = 0; k < 8; k++) v[32*k +: 32] = $urandom;
      din = v; load = 1; @(negedge clk); load = 0; din = ~v;
      repeat (2) begin
        chk(cfg.prn1.poly_g   == v[31:0]);
        chk(cfg.prn1.poly_h   == v[63:32]);
        chk(cfg.prn1.input_en == v[64]);
        chk(cfg.prn1.unused   == v[69:65]);
        chk(cfg.prn2.poly_g   == v[101:70]);
        chk(cfg.prn2.poly_h   == v[133:102]);
        chk(cfg.prn2.input_en == v[134]);
        chk(cfg.prn2.unused   == v[139:135]);
        chk(cfg.code_nr       == v[148:140]);
        chk(cfg.ks1           == v[155:149]);
        chk(cfg.ks2           == v[162:156]);
        chk(cfg.kr1           == v[164:163]);
        chk(cfg.kr2           == v[166:165]);
        chk(cfg.km1           == v[174:167]);
        chk(cfg.km2           == v[182:175]);
        chk(cfg.kcn           == v[214:183]);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
