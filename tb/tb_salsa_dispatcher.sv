// tb_salsa_dispatcher: the dependency rules, one scenario each.
// The test plays both execution units: it raises their done pulses and the
// idle/drained flags itself and checks when the dispatcher lets each
// instruction go, and to which queue.
`timescale 1ns/1ps
module tb_salsa_dispatcher;
  import salsa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic iv = 0, irdy, lsp, lsfull = 0, lsdone = 0, lsreg = 0, lsidle = 1, cup, cufull = 0, cudone = 0, drained = 1, idle, dep;
  instr_t ins;
  salsa_dispatcher dut (.clk_i(clk), .rst_ni(rst_n), .in_valid_i(iv), .in_i(ins), .in_ready_o(irdy),
    .ls_push_o(lsp), .ls_full_i(lsfull), .ls_done_i(lsdone), .ls_done_reg_i(lsreg), .ls_idle_i(lsidle),
    .cu_push_o(cup), .cu_full_i(cufull), .cu_done_i(cudone), .cu_drained_i(drained),
    .idle_o(idle), .dep_stall_o(dep));
  int checks = 0, failures = 0, ndep = 0;
  always @(posedge clk) if (rst_n && dep) ndep++;
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end endtask
  function automatic instr_t I(kind_e k, int t = 0);
    instr_t x; x = '0; x.kind = k; x.ld.dst.rtype = rtype_e'(t); return x;
  endfunction
  // present an instruction; return the number of cycles until it is taken and where it went
  task automatic present(instr_t x, int limit, output int waited, output bit to_ls, output bit to_cu);
    @(negedge clk); iv = 1; ins = x; waited = 0; to_ls = 0; to_cu = 0;
    #1;
    while (!irdy && waited < limit) begin @(negedge clk); #1; waited++; end
    to_ls = lsp; to_cu = cup;
    @(negedge clk); iv = 0;
  endtask
  task automatic pulse(ref logic s, input logic extra = 0);
    @(negedge clk); s = 1; lsreg = extra; @(negedge clk); s = 0; lsreg = 0;
  endtask
  initial begin
    int wt; bit tl, tc;
    ins = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    check(idle, "idle after reset");
    // a compute instruction goes at once
    present(I(K_COMP), 5, wt, tl, tc);
    check(wt == 0 && tc && !tl, "compute issued to compute queue");
    // a FIFO load goes while compute is outstanding
    present(I(K_LOAD, RT_FIFO), 5, wt, tl, tc);
    check(wt == 0 && tl && !tc, "FIFO load overlaps compute");
    // a register load waits for compute to finish
    present(I(K_LOAD, RT_PRIV), 5, wt, tl, tc);
    check(wt == 5 && !tl, "register load held while compute outstanding");
    check(ndep >= 5, "dependency stall reported");
    fork present(I(K_LOAD, RT_PRIV), 20, wt, tl, tc); begin repeat (3) @(negedge clk); pulse(cudone); end join
    check(wt > 0 && wt < 20 && tl, "register load released by compute done");
    // compute waits for the register load (the FIFO load finishing does not release it)
    fork present(I(K_COMP), 30, wt, tl, tc); begin repeat (3) @(negedge clk); pulse(lsdone, 0); repeat (3) @(negedge clk); pulse(lsdone, 1); end join
    check(wt >= 8 && wt < 30 && tc, $sformatf("compute released only by the register load (%0d)", wt));
    // store base waits for compute, drained and idle Load/Store
    drained = 0; lsidle = 0;
    fork present(I(K_STBASE), 40, wt, tl, tc);
      begin repeat (3) @(negedge clk); pulse(cudone); repeat (3) @(negedge clk); drained = 1; repeat (3) @(negedge clk); lsidle = 1; end join
    check(wt >= 10 && wt < 40 && tl, $sformatf("store base waits for drain (%0d)", wt));
    // fence waits for an outstanding FIFO load
    present(I(K_LOAD, RT_FIFO), 5, wt, tl, tc);
    fork present(I(K_FENCE), 30, wt, tl, tc); begin repeat (4) @(negedge clk); pulse(lsdone, 0); end join
    check(wt >= 4 && wt < 30 && !tl && !tc, "fence waits, then retires without a queue");
    // full queue blocks
    lsfull = 1;
    present(I(K_LOAD, RT_FIFO), 4, wt, tl, tc);
    check(wt == 4 && !tl, "full Load/Store queue blocks");
    lsfull = 0;
    present(I(K_LOAD, RT_FIFO), 4, wt, tl, tc);
    check(wt == 0 && tl, "queue free again");
    check(!idle, "one load outstanding");
    pulse(lsdone, 0);
    @(negedge clk);
    check(idle, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
