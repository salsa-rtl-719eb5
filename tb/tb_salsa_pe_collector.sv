// tb_salsa_pe_collector: five source queues with random traffic. Checks that
// every item arrives exactly once, in order per source, that sources are
// served round-robin (no source waits for more than four grants to others
// while it has an item), and that output back-pressure loses nothing.
`timescale 1ns/1ps
module tb_salsa_pe_collector;
  import salsa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] inv, inr;
  out_item_t  inx [5];
  logic ov, ordy = 0, empty;
  out_item_t oi;
  salsa_pe_collector #(.NUM_GROUPS(5)) dut (.clk_i(clk), .rst_ni(rst_n), .in_valid_i(inv), .in_item_i(inx),
    .in_ready_o(inr), .out_valid_o(ov), .out_item_o(oi), .out_ready_i(ordy), .empty_o(empty));
  int checks = 0, failures = 0;
  int sent [5], rcv [5], wait_cnt [5], maxwait = 0;
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end endtask
  localparam int PER = 200;
  // sources: item value = source * 1000 + sequence number
  always_comb for (int g = 0; g < 5; g++) begin
    inv[g] = sent[g] < PER;
    inx[g] = '0; inx[g].pe = 16'(g * 32); inx[g].value = 32'(g * 1000 + sent[g]);
  end
  always @(posedge clk) if (rst_n) for (int g = 0; g < 5; g++) begin
    if (inv[g] && inr[g]) begin sent[g] <= sent[g] + 1; wait_cnt[g] <= 0; end
    else if (inv[g] && inr != 0) begin
      wait_cnt[g] <= wait_cnt[g] + 1;
      if (wait_cnt[g] + 1 > maxwait) maxwait <= wait_cnt[g] + 1;
    end
  end
  initial begin
    for (int g = 0; g < 5; g++) begin sent[g] = 0; rcv[g] = 0; wait_cnt[g] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      ordy = $urandom_range(3) != 0;
      #1;
      if (ov && ordy) begin
        int g;
        g = int'(oi.pe) / 32;
        check(oi.value == 32'(g * 1000 + rcv[g]), "in order per source");
        rcv[g]++;
      end
      @(negedge clk);
    end
    for (int g = 0; g < 5; g++) check(rcv[g] == PER, $sformatf("source %0d delivered %0d", g, rcv[g]));
    check(maxwait <= 4, $sformatf("round-robin wait %0d", maxwait));
    check(empty, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
