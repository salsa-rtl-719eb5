// tb_salsa_data_selector: the selector fed from a FIFO model.
// For several element widths and counts it checks that the elements reach
// PE 0 in order (least significant first), that the rest of the last word is
// dropped, that ready_o is low while the FIFO has not delivered (data stall),
// that the boundary lane adds the step per element, and that once the count
// is exhausted ready_o stays high with valid_o low.
`timescale 1ns/1ps
module tb_salsa_data_selector;
  import salsa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, feed = 0, pop, ready, take = 0, valid;
  logic [15:0] elems = 0, bstep = 0;
  logic [5:0] width = 8;
  logic [63:0] fdata;
  logic fempty;
  logic [31:0] lane [6];
  logic [63:0] fq [$];
  salsa_data_selector dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .feed_i(feed), .elems_i(elems),
    .width_i(width), .bstep_i(bstep), .fifo_data_i(fdata), .fifo_empty_i(fempty), .fifo_pop_o(pop),
    .ready_o(ready), .take_i(take), .lane_o(lane), .valid_o(valid));
  // FIFO model outputs, refreshed whenever the queue changes
  task automatic upd();
    fempty = fq.size() == 0;
    fdata  = fempty ? 64'd0 : fq[0];
  endtask
  initial upd();
  // the pop is applied just after the edge, once the selector has sampled the head
  always @(posedge clk) begin
    automatic bit p = pop;
    #1;
    if (p && fq.size() > 0) begin void'(fq.pop_front()); upd(); end
  end
  int checks = 0, failures = 0, stalls = 0;
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end endtask

  task automatic run(int w, int n, int bs);
    int per, words, got, lag;
    logic [63:0] words_a [32];
    per = 64 / w; words = (n + per - 1) / per;
    for (int k = 0; k < words; k++) words_a[k] = {$urandom, $urandom};
    @(negedge clk); start = 1; feed = 1; elems = 16'(n); width = 6'(w); bstep = 16'(bs);
    @(negedge clk); start = 0;
    got = 0; lag = 0;
    while (got < n) begin
      // trickle words into the FIFO model with gaps
      if ($urandom_range(2) == 0 && lag < words) begin fq.push_back(words_a[lag]); lag++; upd(); end
      take = $urandom_range(3) != 0;
      #2;
      if (!ready) stalls++;
      if (take && ready) begin
        logic [63:0] m;
        m = (w == 64) ? '1 : ((64'd1 << w) - 1);
        check(valid, "valid while elements remain");
        check(lane[S_C] == 32'((words_a[got / per] >> ((got % per) * w)) & m),
              $sformatf("w=%0d element %0d got %h exp word %h", w, got, lane[S_C], words_a[got / per]));
        check($signed(lane[S_H]) == bs * (got + 1), "boundary lane");
        check($signed(lane[S_F]) == NEG_INF, "F lane");
        got++;
      end
      @(negedge clk);
      take = 0;
    end
    @(negedge clk);
    check(ready && !valid, "count exhausted: ready, not valid");
    while (lag < words) begin fq.push_back(words_a[lag]); lag++; upd(); end
    check(fq.size() == words - (n + per - 1) / per, "no extra words consumed");
    fq.delete(); upd();
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run(8, 64, 0);
    run(2, 70, -2);
    run(4, 33, 5);
    run(32, 9, 1);
    run(16, 16, -1);
    check(stalls > 0, "data stall observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
