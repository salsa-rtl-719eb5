// tb_salsa_pe_subcollector: 32 PE output-register models with random valid
// bits. Each PE model clears a valid bit on out_clr, as a PE does. The test
// checks that every raised value is delivered exactly once, tagged with its
// PE (group base 32) and register index, lowest PE and register first within
// the values pending together, and that back-pressure on the output holds
// items back without losing them.
`timescale 1ns/1ps
module tb_salsa_pe_subcollector;
  import salsa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] val [32][5];
  logic [4:0]  vld [32];
  logic [4:0]  clr [32];
  logic ivalid, iready = 0, empty;
  out_item_t item;
  salsa_pe_subcollector #(.PES_PER_GROUP(32), .GROUP_BASE(32), .NUM_PRIV(20), .NUM_OUT(5)) dut (
    .clk_i(clk), .rst_ni(rst_n), .out_val_i(val), .out_vld_i(vld), .out_clr_o(clr),
    .item_valid_o(ivalid), .item_o(item), .item_ready_i(iready), .empty_o(empty));
  int checks = 0, failures = 0, raised = 0, got = 0;
  int seen [32][5];
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end endtask
  // PE models: valid bits cleared by the collector, raised by the test
  always @(posedge clk) if (rst_n) for (int p = 0; p < 32; p++) vld[p] <= vld[p] & ~clr[p];
  initial begin
    for (int p = 0; p < 32; p++) begin vld[p] = '0; for (int k = 0; k < 5; k++) begin val[p][k] = '0; seen[p][k] = 0; end end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int rnd = 0; rnd < 20; rnd++) begin
      int prev;
      // raise a batch while nothing is pending
      @(negedge clk);
      for (int p = 0; p < 32; p++) for (int k = 0; k < 5; k++)
        if ($urandom_range(7) == 0) begin
          vld[p][k] = 1'b1; val[p][k] = {8'(rnd), 8'(p), 8'(k), 8'hA5}; raised++;
        end
      prev = -1;
      // drain with random back-pressure
      for (int c = 0; c < 400; c++) begin
        iready = $urandom_range(2) != 0;
        #1;
        if (ivalid && iready) begin
          int p, k, key;
          p = int'(item.pe) - 32; k = int'(item.rix) - 15;
          key = p * 5 + k;
          if (p < 0 || p > 31 || k < 0 || k > 4) check(0, "tag range");
          else begin
            check(item.value == {8'(rnd), 8'(p), 8'(k), 8'hA5}, "value matches tag");
            check(key > prev, "lowest PE and register first");
            prev = key;
            seen[p][k]++;
            got++;
          end
        end
        @(negedge clk);
      end
      iready = 0;
    end
    check(got == raised, $sformatf("delivered %0d of %0d", got, raised));
    for (int p = 0; p < 32; p++) for (int k = 0; k < 5; k++) check(seen[p][k] <= 20, "no duplicates");
    check(empty, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
