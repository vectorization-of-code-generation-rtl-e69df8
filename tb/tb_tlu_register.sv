// tb_tlu_register - self-checking test of the table look-up register.
//
// Writes random 32-bit values and checks that LUT(2i) carries bit 2i and
// LUT(2i+1) bit 2i+1 of every element from the next cycle on, and that the
// register holds its value while load is low.
module tb_tlu_register;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, load = 0;
  logic [2*W-1:0] din = '0;
  logic [W-1:0] lut_e, lut_o;

  tlu_register #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*W-1:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      v = $urandom;
      din = v; load = 1; @(negedge clk); load = 0;
      din = $urandom;
      repeat (1 + it % 3) begin
        for (int i = 0; i < W; i++) begin
          checks++;
          if (lut_e[i] !== v[2*i] || lut_o[i] !== v[2*i+1]) failures++;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
