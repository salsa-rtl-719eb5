// salsa_pe_subcollector: gathers output registers from a group of 32 PEs.
//
// A PE marks a result for memory by writing one of its last NUM_OUT private
// registers with the valid bit set. The sub-collector, one per 32 PEs as in
// the document, takes one such value per clock: the lowest-numbered PE first
// and, within a PE, the lowest output register first (this order is this
// design's choice). In the cycle it takes a value it pulses the matching
// out_clr_o bit, which clears the valid bit at the next edge, and pushes
// {PE index, register index, value} into a small FIFO (QDEPTH entries) that
// the PE collector drains with a valid/ready handshake.
module salsa_pe_subcollector
  import salsa_pkg::*;
#(
  parameter int unsigned PES_PER_GROUP = 32,
  parameter int unsigned GROUP_BASE    = 0,
  parameter int unsigned NUM_PRIV      = 20,
  parameter int unsigned NUM_OUT       = 5,
  parameter int unsigned QDEPTH        = 2
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic [DATA_W-1:0]  out_val_i [PES_PER_GROUP][NUM_OUT],
  input  logic [NUM_OUT-1:0] out_vld_i [PES_PER_GROUP],
  output logic [NUM_OUT-1:0] out_clr_o [PES_PER_GROUP],
  output logic               item_valid_o,
  output out_item_t          item_o,
  input  logic               item_ready_i,
  output logic               empty_o
);
  localparam int unsigned IW = $bits(out_item_t);

  logic      found;
  out_item_t pick;
  logic      q_full, q_empty;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int p = 0; p < PES_PER_GROUP; p++) out_clr_o[p] = '0;
    for (int p = 0; p < PES_PER_GROUP; p++)
      for (int k = 0; k < NUM_OUT; k++)
        if (!found && out_vld_i[p][k]) begin
          found      = 1'b1;
          pick.pe    = 16'(GROUP_BASE + p);
          pick.rix   = 8'(NUM_PRIV - NUM_OUT + k);
          pick.value = out_val_i[p][k];
          if (!q_full) out_clr_o[p][k] = 1'b1;
        end
  end

  logic [IW-1:0] q_dout;
  salsa_fifo #(.WIDTH(IW), .DEPTH(QDEPTH)) u_q (
    .clk_i, .rst_ni,
    .push_i(found && !q_full), .din_i(pick), .full_o(q_full),
    .pop_i(item_ready_i), .dout_o(q_dout), .empty_o(q_empty), .count_o());

  assign item_o       = out_item_t'(q_dout);
  assign item_valid_o = !q_empty;
  assign empty_o      = q_empty;
endmodule
