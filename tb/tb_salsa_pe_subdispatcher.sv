// tb_salsa_pe_subdispatcher: a group of 32 PEs starting at PE 64.
// Checks the one-cycle registered write enable for the addressed PE only,
// broadcast to all 32, no enable for other groups or for global/FIFO
// destinations, and the active range decode.
`timescale 1ns/1ps
module tb_salsa_pe_subdispatcher;
  import salsa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic v = 0, busy;
  reg_wr_t w;
  logic [7:0] lo = 0, hi = 0;
  logic [31:0] en, act, data;
  reg_ref_t dst;
  salsa_pe_subdispatcher #(.PES_PER_GROUP(32), .GROUP_BASE(64)) dut (.clk_i(clk), .rst_ni(rst_n),
    .wr_valid_i(v), .wr_i(w), .pe_lo_i(lo), .pe_hi_i(hi), .wr_en_o(en), .wr_dst_o(dst),
    .wr_data_o(data), .active_o(act), .busy_o(busy));
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end endtask
  initial begin
    w = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      logic [31:0] exp_en;
      int pe, t;
      bit bc;
      pe = $urandom_range(159); t = $urandom_range(3); bc = ($urandom_range(5) == 0);
      @(negedge clk);
      v = $urandom_range(3) != 0; w = '0; w.pe = 8'(pe); w.bcast = bc; w.dst = reg_ref_t'({2'(t), 5'($urandom_range(19))});
      w.data = {$urandom, $urandom};
      lo = 8'($urandom_range(159)); hi = 8'($urandom_range(159));
      #1;
      for (int k = 0; k < 32; k++)
        check(act[k] == ((64 + k) >= lo && (64 + k) <= hi), "active decode");
      exp_en = '0;
      if (v && t < 2) for (int k = 0; k < 32; k++) exp_en[k] = bc || (pe == 64 + k);
      @(negedge clk);
      check(en == exp_en, $sformatf("enables %h expected %h", en, exp_en));
      check(busy == (exp_en != 0), "busy");
      if (exp_en != 0) check(data == w.data[31:0] && dst == w.dst, "data and destination");
      v = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
