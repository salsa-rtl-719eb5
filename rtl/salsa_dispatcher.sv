// salsa_dispatcher: the Dispatch stage of SALSA.
//
// Takes decoded instructions in order and sends each either to the
// Load/Store unit's queue or to the Compute unit's queue, so that memory
// traffic and computation overlap whenever they do not depend on each other,
// as the document describes. The dependency rules are this design's:
//  * a load into the FIFO never waits: the FIFO decouples it from compute;
//  * a load into PE or global registers waits until no compute instruction
//    is outstanding, so it cannot change an operand under a running one;
//  * a compute instruction waits until no register load is outstanding;
//  * OP_STBASE waits until no compute instruction is outstanding and every
//    collected output has been stored, then goes to the Load/Store unit;
//  * OP_FENCE waits until all units are idle and drained, then retires.
// "Outstanding" is tracked with counters raised at dispatch and lowered by
// the done pulses of the two units. An instruction that cannot go stalls the
// stage (in_ready_o low) until it can: later instructions wait behind it.
module salsa_dispatcher
  import salsa_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   in_valid_i,
  input  instr_t in_i,
  output logic   in_ready_o,
  // Load/Store queue
  output logic   ls_push_o,
  input  logic   ls_full_i,
  input  logic   ls_done_i,
  input  logic   ls_done_reg_i,
  input  logic   ls_idle_i,
  // Compute queue
  output logic   cu_push_o,
  input  logic   cu_full_i,
  input  logic   cu_done_i,
  input  logic   cu_drained_i,
  // status
  output logic   idle_o,
  output logic   dep_stall_o
);
  logic [7:0] n_comp, n_ld, n_ld_reg;
  logic       go, to_ls, to_cu, is_reg_ld;

  always_comb begin
    to_ls = 1'b0;
    to_cu = 1'b0;
    go    = 1'b0;
    is_reg_ld = (in_i.kind == K_LOAD) && (in_i.ld.dst.rtype != RT_FIFO);
    unique case (in_i.kind)
      K_LOAD: begin
        to_ls = 1'b1;
        go    = !ls_full_i && (!is_reg_ld || n_comp == 8'd0);
      end
      K_STBASE: begin
        to_ls = 1'b1;
        go    = !ls_full_i && n_comp == 8'd0 && cu_drained_i && ls_idle_i;
      end
      K_COMP: begin
        to_cu = 1'b1;
        go    = !cu_full_i && n_ld_reg == 8'd0;
      end
      default: go = n_comp == 8'd0 && n_ld == 8'd0 && cu_drained_i && ls_idle_i;
    endcase
  end

  assign in_ready_o  = go;
  assign ls_push_o   = in_valid_i && go && to_ls;
  assign cu_push_o   = in_valid_i && go && to_cu;
  assign dep_stall_o = in_valid_i && !go;

  logic push_ld;
  assign push_ld = ls_push_o && (in_i.kind == K_LOAD);

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      n_comp   <= '0;
      n_ld     <= '0;
      n_ld_reg <= '0;
    end else begin
      n_comp   <= n_comp + 8'(cu_push_o) - 8'(cu_done_i);
      n_ld     <= n_ld + 8'(push_ld) - 8'(ls_done_i);
      n_ld_reg <= n_ld_reg + 8'(push_ld && is_reg_ld) - 8'(ls_done_i && ls_done_reg_i);
    end
  end

  assign idle_o = n_comp == 8'd0 && n_ld == 8'd0;
endmodule
