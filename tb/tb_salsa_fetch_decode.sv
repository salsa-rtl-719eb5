// tb_salsa_fetch_decode: random commands of every opcode, with the output
// side stalled at random. Each decoded instruction is compared field by field
// with the command that produced it (field positions as documented in
// salsa_pkg); unknown opcodes must be dropped and counted, and cmd_ready must
// fall while the 4-entry buffer is full.
`timescale 1ns/1ps
module tb_salsa_fetch_decode;
  import salsa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cv = 0, crdy, ov, ordy = 0;
  logic [6:0] f = 0;
  logic [63:0] a = 0, b = 0;
  instr_t o;
  logic [15:0] bad;
  salsa_fetch_decode dut (.clk_i(clk), .rst_ni(rst_n), .cmd_valid_i(cv), .cmd_ready_o(crdy), .cmd_funct_i(f),
    .cmd_rs1_i(a), .cmd_rs2_i(b), .out_valid_o(ov), .out_o(o), .out_ready_i(ordy), .bad_cnt_o(bad));
  int checks = 0, failures = 0, nbad = 0, saw_full = 0;
  typedef struct { int f; logic [63:0] a, b; } cmd_t;
  cmd_t exp_q [$];
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end endtask
  task automatic cmp(cmd_t e, instr_t x);
    case (e.f)
      0: begin
        check(x.kind == K_LOAD, "kind load");
        check(x.ld.addr == e.a[39:0] && x.ld.count == e.b[15:0] && x.ld.pe == e.b[23:16], "load addr/count/pe");
        check(x.ld.dst == reg_ref_t'({e.b[30:29], e.b[28:24]}) && x.ld.bcast == e.b[31] && x.ld.high == e.b[32], "load dst");
      end
      1: check(x.kind == K_STBASE && x.base == e.a[39:0], "store base");
      2: begin
        check(x.kind == K_COMP, "kind comp");
        check(x.cp.alu == alu_sel_e'(e.a[1:0]) && x.cp.op == gp_op_e'(e.a[5:2]), "alu/op");
        check(x.cp.a == e.a[12:6] && x.cp.b == e.a[19:13] && x.cp.dst == e.a[26:20], "operands");
        check(x.cp.emit == e.a[27] && x.cp.feed == e.a[28] && x.cp.pe_lo == e.a[39:32] && x.cp.pe_hi == e.a[47:40], "flags/range");
        check(x.cp.width == e.a[53:48] && x.cp.steps == e.b[23:0] && x.cp.elems == e.b[39:24] && x.cp.bstep == e.b[63:48], "counts");
      end
      default: check(x.kind == K_FENCE, "fence");
    endcase
  endtask
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    fork
      for (int n = 0; n < 600; n++) begin
        cmd_t e;
        e.f = ($urandom_range(9) == 0) ? 4 + $urandom_range(100) : $urandom_range(3);
        e.a = {$urandom, $urandom}; e.b = {$urandom, $urandom};
        @(negedge clk); cv = 1; f = 7'(e.f); a = e.a; b = e.b;
        while (!crdy) begin saw_full++; @(negedge clk); end
        @(posedge clk);
        if (e.f <= 3) exp_q.push_back(e); else nbad++;
        @(negedge clk); cv = 0;
      end
      for (int c = 0; c < 4000; c++) begin
        @(negedge clk); ordy = $urandom_range(3) == 0;
        #1;
        if (ov && ordy) begin
          if (exp_q.size() == 0) check(0, "unexpected output");
          else cmp(exp_q.pop_front(), o);
        end
      end
    join
    check(exp_q.size() == 0, "all commands delivered");
    check(int'(bad) == nbad, "bad command count");
    check(saw_full > 0, "buffer filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
