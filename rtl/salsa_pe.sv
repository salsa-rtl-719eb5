// salsa_pe: processing element of the SALSA systolic array.
//
// A PE holds a bank of private registers, of which the last NUM_OUT are output
// registers carrying a valid bit, and a bank of shared output registers that
// its right-hand neighbour reads. It can read its left neighbour's shared
// outputs, its own registers and the global registers, and it has an ALU block
// with a general-purpose ALU and three alignment ALUs (Smith-Waterman,
// Needleman-Wunsch, affine Smith-Waterman). All of this follows the document.
//
// Operation. The compute controller broadcasts one instruction (cmd_i) and a
// step strobe. On every step in which active_i is high the PE executes it:
//  * general purpose: dst <= gp_op(A, B), where A and B name a private,
//    shared, global or left-shared register; dst is private or shared.
//  * alignment ALUs: only when the left neighbour's shared valid bit is set,
//    the PE computes the cell for the incoming database character and updates
//    P_H, P_D, P_MAX (and P_E), and passes the character, H (and F) right.
// On every active step the shared valid bit copies the left neighbour's one,
// so a wave of database characters moves one PE per step. The valid bit and
// the register roles (salsa_pkg P_*, S_*, G_*) are this design's own.
// With emit set, a result written to an output register raises its valid bit;
// the alignment ALUs then write H to the first output register. A collector
// clears the valid bit with out_clr_i when it takes the value.
// Register writes from the Load/Store path arrive on wr_*; the dispatcher
// never lets them coincide with a step. All updates take effect at the clock
// edge; everything is synchronous with an active-low reset.
module salsa_pe
  import salsa_pkg::*;
#(
  parameter int unsigned NUM_PRIV   = 20,
  parameter int unsigned NUM_OUT    = 5,
  parameter int unsigned NUM_SHARED = 6,
  parameter int unsigned NUM_GLOBAL = 16
) (
  input  logic                     clk_i,
  input  logic                     rst_ni,
  // instruction and step
  input  comp_cmd_t                cmd_i,
  input  logic                     step_i,
  input  logic                     active_i,
  // neighbours
  input  logic [DATA_W-1:0]        left_sh_i [NUM_SHARED],
  input  logic                     left_v_i,
  output logic [DATA_W-1:0]        sh_o      [NUM_SHARED],
  output logic                     sv_o,
  // global registers (read only)
  input  logic [DATA_W-1:0]        glob_i    [NUM_GLOBAL],
  // register write from the PE dispatcher
  input  logic                     wr_en_i,
  input  reg_ref_t                 wr_dst_i,
  input  logic [DATA_W-1:0]        wr_data_i,
  // output registers towards the sub-collector
  output logic [DATA_W-1:0]        out_val_o [NUM_OUT],
  output logic [NUM_OUT-1:0]       out_vld_o,
  input  logic [NUM_OUT-1:0]       out_clr_i
);
  localparam int unsigned OUT0 = NUM_PRIV - NUM_OUT;
  localparam int unsigned PIW  = (NUM_PRIV   > 1) ? $clog2(NUM_PRIV)   : 1;
  localparam int unsigned SIW  = (NUM_SHARED > 1) ? $clog2(NUM_SHARED) : 1;
  localparam int unsigned GIW  = (NUM_GLOBAL > 1) ? $clog2(NUM_GLOBAL) : 1;

  logic [DATA_W-1:0] priv [NUM_PRIV];
  logic [DATA_W-1:0] sh   [NUM_SHARED];
  logic              sv;
  logic [NUM_OUT-1:0] ovld;

  // ---------------------------------------------------------------- operands
  function automatic logic [DATA_W-1:0] rd(reg_ref_t r,
      logic [DATA_W-1:0] p  [NUM_PRIV],
      logic [DATA_W-1:0] s  [NUM_SHARED],
      logic [DATA_W-1:0] g  [NUM_GLOBAL],
      logic [DATA_W-1:0] ls [NUM_SHARED]);
    logic [DATA_W-1:0] v;
    v = '0;
    unique case (r.rtype)
      RT_PRIV:   if (32'(r.idx) < NUM_PRIV)   v = p[PIW'(r.idx)];
      RT_SHARED: if (32'(r.idx) < NUM_SHARED) v = s[SIW'(r.idx)];
      RT_GLOBAL: if (32'(r.idx) < NUM_GLOBAL) v = g[GIW'(r.idx)];
      default:   if (32'(r.idx) < NUM_SHARED) v = ls[SIW'(r.idx)];
    endcase
    return v;
  endfunction

  logic signed [DATA_W-1:0] opa, opb, gp_y;
  always_comb begin
    opa = rd(cmd_i.a, priv, sh, glob_i, left_sh_i);
    opb = rd(cmd_i.b, priv, sh, glob_i, left_sh_i);
  end

  salsa_gp_alu u_gp (.op_i(cmd_i.op), .a_i(opa), .b_i(opb), .y_o(gp_y));

  // ------------------------------------------------------ alignment ALUs
  logic signed [DATA_W-1:0] sw_h, nw_h, swa_h, swa_e, swa_f;

  salsa_sw_alu u_sw (
    .q_i(priv[P_Q]), .c_i(left_sh_i[S_C]), .up_i(left_sh_i[S_H]),
    .diag_i(priv[P_D]), .left_i(priv[P_H]),
    .match_i(glob_i[G_MATCH]), .mismatch_i(glob_i[G_MISMATCH]), .gap_i(glob_i[G_GAP]),
    .h_o(sw_h));

  salsa_nw_alu u_nw (
    .q_i(priv[P_Q]), .c_i(left_sh_i[S_C]), .up_i(left_sh_i[S_H]),
    .diag_i(priv[P_D]), .left_i(priv[P_H]),
    .match_i(glob_i[G_MATCH]), .mismatch_i(glob_i[G_MISMATCH]), .gap_i(glob_i[G_GAP]),
    .h_o(nw_h));

  salsa_swa_alu u_swa (
    .q_i(priv[P_Q]), .c_i(left_sh_i[S_C]), .up_h_i(left_sh_i[S_H]), .up_f_i(left_sh_i[S_F]),
    .diag_i(priv[P_D]), .left_h_i(priv[P_H]), .left_e_i(priv[P_E]),
    .match_i(glob_i[G_MATCH]), .mismatch_i(glob_i[G_MISMATCH]),
    .open_i(glob_i[G_OPEN]), .ext_i(glob_i[G_EXT]),
    .h_o(swa_h), .e_o(swa_e), .f_o(swa_f));

  logic signed [DATA_W-1:0] cell_h;
  always_comb begin
    unique case (cmd_i.alu)
      ALU_NW:  cell_h = nw_h;
      ALU_SWA: cell_h = swa_h;
      default: cell_h = sw_h;
    endcase
  end

  // ------------------------------------------------------------- registers
  logic do_step;
  assign do_step = step_i && active_i;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      for (int i = 0; i < NUM_PRIV; i++)   priv[i] <= '0;
      for (int i = 0; i < NUM_SHARED; i++) sh[i]   <= '0;
      sv   <= 1'b0;
      ovld <= '0;
    end else begin
      ovld <= ovld & ~out_clr_i;
      if (do_step) begin
        sv <= left_v_i;
        if (cmd_i.alu == ALU_GP) begin
          if (cmd_i.dst.rtype == RT_PRIV && 32'(cmd_i.dst.idx) < NUM_PRIV) begin
            priv[PIW'(cmd_i.dst.idx)] <= gp_y;
            if (cmd_i.emit && 32'(cmd_i.dst.idx) >= OUT0)
              ovld[32'(cmd_i.dst.idx) - OUT0] <= 1'b1;
          end else if (cmd_i.dst.rtype == RT_SHARED && 32'(cmd_i.dst.idx) < NUM_SHARED) begin
            sh[SIW'(cmd_i.dst.idx)] <= gp_y;
          end
        end else if (left_v_i) begin
          priv[P_H]   <= cell_h;
          priv[P_D]   <= left_sh_i[S_H];
          if ($signed(cell_h) > $signed(priv[P_MAX])) priv[P_MAX] <= cell_h;
          sh[S_C]     <= left_sh_i[S_C];
          sh[S_H]     <= cell_h;
          if (cmd_i.alu == ALU_SWA) begin
            priv[P_E] <= swa_e;
            sh[S_F]   <= swa_f;
          end
          if (cmd_i.emit) begin
            priv[OUT0] <= cell_h;
            ovld[0]    <= 1'b1;
          end
        end
      end else if (wr_en_i) begin
        if (wr_dst_i.rtype == RT_PRIV && 32'(wr_dst_i.idx) < NUM_PRIV)
          priv[PIW'(wr_dst_i.idx)] <= wr_data_i;
        else if (wr_dst_i.rtype == RT_SHARED && 32'(wr_dst_i.idx) < NUM_SHARED)
          sh[SIW'(wr_dst_i.idx)] <= wr_data_i;
      end
    end
  end

  assign sh_o      = sh;
  assign sv_o      = sv;
  assign out_vld_o = ovld;
  always_comb for (int k = 0; k < NUM_OUT; k++) out_val_o[k] = priv[OUT0 + k];

endmodule
