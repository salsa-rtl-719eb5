// salsa_fetch_decode: the Fetch & Decode stage of SALSA.
//
// Receives commands from the host core over a RoCC-style channel (valid/
// ready, the 7-bit funct field and the two 64-bit source operand values),
// decodes them into the instruction record of salsa_pkg (field layout given
// there) and buffers them in a DEPTH-entry FIFO toward the dispatcher, which
// pops them with out_ready_i. cmd_ready_o is low when the FIFO is full.
// A command with an unknown funct is accepted and dropped, and counted in
// bad_cnt_o. The document gives the RoCC basis and the operand contents;
// the exact field positions and the drop policy are this design's.
module salsa_fetch_decode
  import salsa_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        cmd_valid_i,
  output logic        cmd_ready_o,
  input  logic [6:0]  cmd_funct_i,
  input  logic [63:0] cmd_rs1_i,
  input  logic [63:0] cmd_rs2_i,
  output logic        out_valid_o,
  output instr_t      out_o,
  input  logic        out_ready_i,
  output logic [15:0] bad_cnt_o
);
  localparam int unsigned IW = $bits(instr_t);

  instr_t d;
  logic   known;

  always_comb begin
    d     = '0;
    known = 1'b1;
    unique case (cmd_funct_i)
      OP_LOAD: begin
        d.kind         = K_LOAD;
        d.ld.addr      = cmd_rs1_i[39:0];
        d.ld.count     = cmd_rs2_i[15:0];
        d.ld.pe        = cmd_rs2_i[23:16];
        d.ld.dst.idx   = cmd_rs2_i[28:24];
        d.ld.dst.rtype = rtype_e'(cmd_rs2_i[30:29]);
        d.ld.bcast     = cmd_rs2_i[31];
        d.ld.high      = cmd_rs2_i[32];
      end
      OP_STBASE: begin
        d.kind = K_STBASE;
        d.base = cmd_rs1_i[39:0];
      end
      OP_COMP: begin
        d.kind         = K_COMP;
        d.cp.alu       = alu_sel_e'(cmd_rs1_i[1:0]);
        d.cp.op        = gp_op_e'(cmd_rs1_i[5:2]);
        d.cp.a         = reg_ref_t'(cmd_rs1_i[12:6]);
        d.cp.b         = reg_ref_t'(cmd_rs1_i[19:13]);
        d.cp.dst       = reg_ref_t'(cmd_rs1_i[26:20]);
        d.cp.emit      = cmd_rs1_i[27];
        d.cp.feed      = cmd_rs1_i[28];
        d.cp.pe_lo     = cmd_rs1_i[39:32];
        d.cp.pe_hi     = cmd_rs1_i[47:40];
        d.cp.width     = cmd_rs1_i[53:48];
        d.cp.steps     = cmd_rs2_i[23:0];
        d.cp.elems     = cmd_rs2_i[39:24];
        d.cp.bstep     = cmd_rs2_i[63:48];
      end
      OP_FENCE: d.kind = K_FENCE;
      default:  known = 1'b0;
    endcase
  end

  logic          q_full, q_empty, acc;
  logic [IW-1:0] q_dout;

  assign cmd_ready_o = !q_full;
  assign acc         = cmd_valid_i && !q_full;

  salsa_fifo #(.WIDTH(IW), .DEPTH(DEPTH)) u_q (
    .clk_i, .rst_ni, .push_i(acc && known), .din_i(d), .full_o(q_full),
    .pop_i(out_ready_i), .dout_o(q_dout), .empty_o(q_empty), .count_o());

  assign out_o       = instr_t'(q_dout);
  assign out_valid_o = !q_empty;

  always_ff @(posedge clk_i) begin
    if (!rst_ni)            bad_cnt_o <= '0;
    else if (acc && !known) bad_cnt_o <= bad_cnt_o + 16'd1;
  end
endmodule
