// salsa_pe_subdispatcher: routes register writes and enables to 32 PEs.
//
// The document puts a sub-dispatcher, serving 32 PEs, between the PE
// dispatcher and the PE registers to avoid routing congestion. This one
// registers a write coming from the PE dispatcher (one clock of latency) and
// raises the write enable of the addressed PE of its group, or of all of them
// for a broadcast. It also decodes the active PE range [pe_lo, pe_hi] of the
// current compute instruction into per-PE enables (combinational). GROUP_BASE
// is the index of the group's first PE. busy_o is high while a write is held.
module salsa_pe_subdispatcher
  import salsa_pkg::*;
#(
  parameter int unsigned PES_PER_GROUP = 32,
  parameter int unsigned GROUP_BASE    = 0
) (
  input  logic                     clk_i,
  input  logic                     rst_ni,
  input  logic                     wr_valid_i,
  input  reg_wr_t                  wr_i,
  input  logic [PE_W-1:0]          pe_lo_i,
  input  logic [PE_W-1:0]          pe_hi_i,
  output logic [PES_PER_GROUP-1:0] wr_en_o,
  output reg_ref_t                 wr_dst_o,
  output logic [DATA_W-1:0]        wr_data_o,
  output logic [PES_PER_GROUP-1:0] active_o,
  output logic                     busy_o
);
  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      wr_en_o   <= '0;
      wr_dst_o  <= '0;
      wr_data_o <= '0;
    end else begin
      for (int k = 0; k < PES_PER_GROUP; k++)
        wr_en_o[k] <= wr_valid_i && (wr_i.dst.rtype == RT_PRIV || wr_i.dst.rtype == RT_SHARED)
                      && (wr_i.bcast || 32'(wr_i.pe) == GROUP_BASE + k);
      wr_dst_o  <= wr_i.dst;
      wr_data_o <= wr_i.data[DATA_W-1:0];
    end
  end

  always_comb
    for (int k = 0; k < PES_PER_GROUP; k++)
      active_o[k] = (GROUP_BASE + k >= 32'(pe_lo_i)) && (GROUP_BASE + k <= 32'(pe_hi_i));

  assign busy_o = |wr_en_o;
endmodule
