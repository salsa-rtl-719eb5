// tb_salsa_pe: one processing element, driven directly.
// 1) register writes into private and shared registers, read back through a
//    general-purpose PASS into a shared register;
// 2) general-purpose operations on private, global and left-shared operands;
// 3) emit to an output register raises its valid bit, out_clr clears it;
// 4) a stream of SW steps: characters with valid bits on the left input,
//    including gaps with valid low, compared with a reference row of H;
// 5) an inactive PE ignores steps.
`timescale 1ns/1ps
module tb_salsa_pe;
  import salsa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  comp_cmd_t cmd;
  logic step = 0, active = 1, left_v = 0, wr_en = 0;
  logic [31:0] left_sh [6], sh [6], glob [16], ov [5];
  logic sv;
  reg_ref_t wr_dst;
  logic [31:0] wr_data;
  logic [4:0] ovld, oclr = '0;
  salsa_pe dut (.clk_i(clk), .rst_ni(rst_n), .cmd_i(cmd), .step_i(step), .active_i(active),
    .left_sh_i(left_sh), .left_v_i(left_v), .sh_o(sh), .sv_o(sv), .glob_i(glob),
    .wr_en_i(wr_en), .wr_dst_i(wr_dst), .wr_data_i(wr_data),
    .out_val_o(ov), .out_vld_o(ovld), .out_clr_i(oclr));
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end endtask
  function automatic reg_ref_t R(int t, int i); return reg_ref_t'({2'(t), 5'(i)}); endfunction
  function automatic int mx(int x, int y); return x > y ? x : y; endfunction

  task automatic wr(int t, int i, logic [31:0] v);
    @(negedge clk); wr_en = 1; wr_dst = R(t, i); wr_data = v;
    @(negedge clk); wr_en = 0;
  endtask
  task automatic gp(gp_op_e o, reg_ref_t a, reg_ref_t b, reg_ref_t d, bit emit = 0);
    @(negedge clk); cmd = '0; cmd.alu = ALU_GP; cmd.op = o; cmd.a = a; cmd.b = b; cmd.dst = d; cmd.emit = emit;
    step = 1; @(negedge clk); step = 0;
  endtask

  int q, H [0:20], row;
  int dchars [20];
  initial begin
    cmd = '0;
    for (int i = 0; i < 6; i++) left_sh[i] = '0;
    for (int i = 0; i < 16; i++) glob[i] = 32'(i * 3);
    glob[G_MATCH] = 2; glob[G_MISMATCH] = -1; glob[G_GAP] = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    // 1) writes and PASS read-back
    wr(0, 7, 32'h1234_5678); wr(1, 3, 32'hcafe_f00d);
    gp(GP_PASS, R(0, 7), R(0, 0), R(1, 5));
    check(sh[5] == 32'h1234_5678, "private write + PASS to shared");
    check(sh[3] == 32'hcafe_f00d, "shared write");
    // 2) operand types
    gp(GP_ADD, R(0, 7), R(2, 4), R(0, 8));          // private + global
    gp(GP_PASS, R(0, 8), R(0, 0), R(1, 4));
    check(sh[4] == 32'h1234_5678 + 32'd12, "private + global");
    left_sh[2] = 32'd100;
    gp(GP_SUB, R(3, 2), R(2, 5), R(1, 0));          // left shared - global
    check(sh[0] == 32'd85, "left shared operand");
    gp(GP_MAX, R(1, 0), R(1, 4), R(1, 1));
    check(sh[1] == 32'h1234_5678 + 32'd12, "max of shared");
    // 3) emit to an output register
    check(ovld == '0, "no valid after reset");
    gp(GP_PASS, R(1, 0), R(0, 0), R(0, 17), 1);
    check(ovld == 5'b00100 && ov[2] == 32'd85, "emit sets valid of output reg 17");
    gp(GP_PASS, R(1, 0), R(0, 0), R(0, 16), 0);
    check(ovld == 5'b00100, "no valid without emit");
    @(negedge clk); oclr = 5'b00100; @(negedge clk); oclr = '0;
    check(ovld == '0, "collector clear");
    // 4) SW stream
    q = 2;
    wr(0, P_Q, 32'(q)); wr(0, P_H, 0); wr(0, P_D, 0); wr(0, P_MAX, 0);
    for (int j = 0; j < 12; j++) dchars[j] = $urandom_range(3);
    row = 0; H[0] = 0;
    for (int j = 0; j < 12; j++) begin
      int up, diag, e;
      up = (j * 7) % 5; diag = (j == 0) ? 0 : ((j - 1) * 7) % 5;
      e = mx(0, mx(diag + ((dchars[j] == q) ? 2 : -1), mx(up - 1, H[j] - 1)));
      H[j + 1] = e;
      // a cycle with no valid input first: PE must hold
      @(negedge clk); cmd = '0; cmd.alu = ALU_SW; cmd.emit = 1; left_v = 0;
      left_sh[S_C] = 32'd9; left_sh[S_H] = 32'd99; step = 1;
      @(negedge clk); step = 0;
      check(ovld == '0, "no cell without valid input");
      left_v = 1; left_sh[S_C] = 32'(dchars[j]); left_sh[S_H] = 32'(up); step = 1;
      @(negedge clk); step = 0;
      check(ovld[0] && $signed(ov[0]) == e, $sformatf("SW H(1,%0d)=%0d exp %0d", j + 1, $signed(ov[0]), e));
      check(sh[S_H] == 32'(e) && sh[S_C] == 32'(dchars[j]) && sv, "SW passes H and character right");
      oclr = 5'b00001; @(negedge clk); oclr = '0;
    end
    // 5) inactive
    active = 0;
    gp(GP_PASS, R(2, 1), R(0, 0), R(1, 5));
    check(sh[5] == 32'h1234_5678, "inactive PE ignores step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
