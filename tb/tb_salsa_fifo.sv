// tb_salsa_fifo: random push/pop traffic against a queue model.
// Checks every popped word, the empty/full flags and the occupancy count,
// including simultaneous push and pop on a full FIFO.
`timescale 1ns/1ps
module tb_salsa_fifo;
  localparam int W = 64, D = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, full, empty;
  logic [W-1:0] din = '0, dout;
  logic [$clog2(D+1)-1:0] count;
  salsa_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk_i(clk), .rst_ni(rst_n), .push_i(push), .din_i(din),
    .full_o(full), .pop_i(pop), .dout_o(dout), .empty_o(empty), .count_o(count));
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int saw_full = 0;
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end endtask
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int ph = 0; ph < 3; ph++)
      for (int c = 0; c < 2000; c++) begin
        @(negedge clk);
        // flags reflect the model
        check(empty == (model.size() == 0), "empty flag");
        check(full == (model.size() == D), "full flag");
        check(int'(count) == model.size(), "count");
        if (model.size() > 0) check(dout == model[0], "head data");
        // phase 0 fills, phase 1 mixes at full, phase 2 drains
        push = (ph == 0) ? ($urandom_range(9) < 8) : (ph == 1) ? $urandom_range(1) : ($urandom_range(9) < 2);
        pop  = (ph == 0) ? ($urandom_range(9) < 2) : (ph == 1) ? $urandom_range(1) : ($urandom_range(9) < 8);
        if (ph == 1 && full) begin push = 1; pop = 1; end
        if (full && !pop) push = 0;
        din = {$urandom, $urandom};
        if (full) saw_full++;
        @(posedge clk);
        if (pop && model.size() > 0) void'(model.pop_front());
        if (push) model.push_back(din);
      end
    check(saw_full > 0, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
