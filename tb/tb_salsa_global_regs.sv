// tb_salsa_global_regs: random writes to the global register bank; all 16
// registers are compared with a model after every write and after reset.
`timescale 1ns/1ps
module tb_salsa_global_regs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [4:0] idx = '0;
  logic [31:0] data = '0;
  logic [31:0] g [16];
  logic [31:0] model [16];
  salsa_global_regs #(.NUM_GLOBAL(16)) dut (.clk_i(clk), .rst_ni(rst_n), .wr_en_i(we), .wr_idx_i(idx),
    .wr_data_i(data), .glob_o(g));
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 16; i++) model[i] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (g[i] !== model[i]) begin failures++; if (failures < 10) $display("FAIL: g[%0d]=%h exp %h", i, g[i], model[i]); end
      end
      we = $urandom_range(1); idx = 5'($urandom_range(15)); data = $urandom;
      @(posedge clk);
      if (we) model[idx] = data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
