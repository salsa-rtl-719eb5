// tb_salsa_pe_dispatcher: writes of every destination type, checked one
// cycle later on exactly one of the three outputs (global port, FIFO push,
// PE write bus) with the right data.
`timescale 1ns/1ps
module tb_salsa_pe_dispatcher;
  import salsa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic v = 0, gen, fpush, pv, busy;
  reg_wr_t w, pw;
  logic [4:0] gidx;
  logic [31:0] gdata;
  logic [63:0] fdata;
  salsa_pe_dispatcher dut (.clk_i(clk), .rst_ni(rst_n), .wr_valid_i(v), .wr_i(w), .g_wr_en_o(gen),
    .g_wr_idx_o(gidx), .g_wr_data_o(gdata), .fifo_push_o(fpush), .fifo_data_o(fdata),
    .pe_wr_valid_o(pv), .pe_wr_o(pw), .busy_o(busy));
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end endtask
  initial begin
    w = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int t;
      bit vv;
      reg_wr_t ww;
      t = $urandom_range(3); vv = $urandom_range(3) != 0;
      ww = '0; ww.dst = reg_ref_t'({2'(t), 5'($urandom_range(15))}); ww.pe = 8'($urandom);
      ww.bcast = $urandom_range(1); ww.data = {$urandom, $urandom};
      @(negedge clk); v = vv; w = ww;
      @(negedge clk); v = 0;
      check(gen == (vv && t == 2), "global enable");
      check(fpush == (vv && t == 3), "fifo push");
      check(pv == (vv && t < 2), "PE write valid");
      check(busy == vv, "busy");
      if (vv && t == 2) check(gidx == ww.dst.idx && gdata == ww.data[31:0], "global data");
      if (vv && t == 3) check(fdata == ww.data, "fifo data");
      if (vv && t < 2)  check(pw == ww, "PE write record");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
