// tb_salsa_load_store: the Load/Store unit against the behavioural memory.
// Checks register multi-loads (PE index advancing, low and high halves),
// global multi-loads (register index advancing), broadcast loads, FIFO loads
// that must wait while the FIFO has no room, stores of collected values at
// consecutive addresses from the store base (also while a FIFO load is
// waiting for room), the done pulses with their register flag, and busy.
`timescale 1ns/1ps
module tb_salsa_load_store;
  import salsa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic iv = 0, irdy, mv, mr, mwe, rv, wv, ov = 0, ordy, busy, done, dreg, storing;
  instr_t ins;
  logic [39:0] ma;
  logic [63:0] md, rd;
  reg_wr_t w;
  logic [15:0] ffree = 16'd100;
  out_item_t oi;
  salsa_load_store dut (.clk_i(clk), .rst_ni(rst_n), .in_valid_i(iv), .in_i(ins), .in_ready_o(irdy),
    .mem_req_valid_o(mv), .mem_req_ready_i(mr), .mem_req_we_o(mwe), .mem_req_addr_o(ma), .mem_req_wdata_o(md),
    .mem_resp_valid_i(rv), .mem_resp_data_i(rd), .wr_valid_o(wv), .wr_o(w), .fifo_free_i(ffree),
    .out_valid_i(ov), .out_item_i(oi), .out_ready_o(ordy), .busy_o(busy), .ld_done_o(done), .ld_reg_o(dreg),
    .storing_o(storing));
  salsa_mem_model #(.WORDS(1024), .LAT(3), .READY_PCT_NOT(30)) u_mem (.clk_i(clk), .rst_ni(rst_n),
    .req_valid_i(mv), .req_ready_o(mr), .req_we_i(mwe), .req_addr_i(ma), .req_wdata_i(md),
    .resp_valid_o(rv), .resp_data_o(rd));
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end endtask
  reg_wr_t wq [$];
  int ndone = 0, nreg = 0, reads_while_full = 0;
  always @(posedge clk) if (rst_n) begin
    if (wv) wq.push_back(w);
    if (done) begin ndone++; if (dreg) nreg++; end
    if (mv && !mwe && ffree < 2 && ins.ld.dst.rtype == RT_FIFO) reads_while_full++;
  end
  task automatic give(instr_t x);
    @(negedge clk); iv = 1; ins = x;
    while (!irdy) @(negedge clk);
    @(negedge clk); iv = 0;
  endtask
  function automatic instr_t L(int wa, int cnt, int pe, int t, int idx, bit bc, bit hi);
    instr_t x;
    x = '0; x.kind = K_LOAD; x.ld.addr = 40'(wa * 8); x.ld.count = 16'(cnt); x.ld.pe = 8'(pe);
    x.ld.dst = reg_ref_t'({2'(t), 5'(idx)}); x.ld.bcast = bc; x.ld.high = hi;
    return x;
  endfunction
  task automatic wait_writes(int n);
    int t;
    t = 0;
    while (wq.size() < n && t < 2000) begin @(negedge clk); t++; end
  endtask
  initial begin
    ins = '0; oi = '0;
    for (int k = 0; k < 64; k++) u_mem.mem[k] = {32'(k + 1000), 32'(k)};
    repeat (3) @(negedge clk); rst_n = 1;
    // private multi-load, PE 5..7, register 2
    give(L(10, 3, 5, RT_PRIV, 2, 0, 0));
    wait_writes(3);
    for (int k = 0; k < 3; k++) begin
      reg_wr_t x; x = wq.pop_front();
      check(x.pe == 8'(5 + k) && x.dst.idx == 2 && x.dst.rtype == RT_PRIV && x.data[31:0] == 32'(10 + k), "private multi-load");
    end
    // high half into shared, broadcast
    give(L(20, 2, 3, RT_SHARED, 4, 1, 1));
    wait_writes(2);
    for (int k = 0; k < 2; k++) begin
      reg_wr_t x; x = wq.pop_front();
      check(x.bcast && x.pe == 3 && x.data[31:0] == 32'(1020 + k) && x.dst.rtype == RT_SHARED, "broadcast high-half load");
    end
    // global multi-load: register index advances
    give(L(30, 4, 0, RT_GLOBAL, 1, 0, 0));
    wait_writes(4);
    for (int k = 0; k < 4; k++) begin
      reg_wr_t x; x = wq.pop_front();
      check(x.dst.idx == 5'(1 + k) && x.data[31:0] == 32'(30 + k) && x.dst.rtype == RT_GLOBAL, "global multi-load");
    end
    repeat (10) @(negedge clk);
    check(ndone == 3 && nreg == 3, "three register-load done pulses");
    check(!busy, "idle after loads");
    // store base, then a FIFO load that finds the FIFO full while stores arrive
    begin instr_t x; x = '0; x.kind = K_STBASE; x.base = 40'(512 * 8); give(x); end
    ffree = 16'd1;
    give(L(40, 6, 0, RT_FIFO, 0, 0, 0));
    for (int k = 0; k < 5; k++) begin
      @(negedge clk); ov = 1; oi.pe = 16'(k); oi.rix = 8'(15 + k); oi.value = 32'(700 + k);
      while (!ordy) @(negedge clk);
      @(negedge clk); ov = 0;
      check(busy, "busy during multi-load");
    end
    repeat (10) @(negedge clk);
    check(wq.size() == 0, "no FIFO word read while the FIFO is full");
    ffree = 16'd50;
    wait_writes(6);
    for (int k = 0; k < 6; k++) begin
      reg_wr_t x; x = wq.pop_front();
      check(x.dst.rtype == RT_FIFO && x.data == {32'(1040 + k), 32'(40 + k)}, "FIFO word");
    end
    repeat (10) @(negedge clk);
    for (int k = 0; k < 5; k++)
      check(u_mem.mem[512 + k] == {16'(k), 8'(15 + k), 8'h00, 32'(700 + k)}, "stored output word");
    check(reads_while_full == 0, "read requested while FIFO had no room");
    check(ndone == 4 && nreg == 3, "FIFO load done without register flag");
    check(!busy, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
