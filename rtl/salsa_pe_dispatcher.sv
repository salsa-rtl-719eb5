// salsa_pe_dispatcher: entry point of load data into the compute unit.
//
// Every value the Load/Store unit brings in passes through here and, as the
// document describes, goes to a global register, to the compute FIFO, or to
// a register of one PE or of all PEs (broadcast), the latter through the PE
// sub-dispatchers. This block registers the incoming write once (one clock)
// and then drives exactly one of: the global register write port, the FIFO
// push (full 64-bit word), or the write bus to the sub-dispatchers. busy_o is
// high while a write is held. The Load/Store unit only reads a word for the
// FIFO when the FIFO has room for it, so no back-pressure is needed here.
module salsa_pe_dispatcher
  import salsa_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              wr_valid_i,
  input  reg_wr_t           wr_i,
  // global registers
  output logic              g_wr_en_o,
  output logic [REG_W-1:0]  g_wr_idx_o,
  output logic [DATA_W-1:0] g_wr_data_o,
  // compute FIFO
  output logic              fifo_push_o,
  output logic [MEM_W-1:0]  fifo_data_o,
  // sub-dispatchers
  output logic              pe_wr_valid_o,
  output reg_wr_t           pe_wr_o,
  output logic              busy_o
);
  logic    v;
  reg_wr_t r;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      v <= 1'b0;
      r <= '0;
    end else begin
      v <= wr_valid_i;
      if (wr_valid_i) r <= wr_i;
    end
  end

  assign g_wr_en_o     = v && r.dst.rtype == RT_GLOBAL;
  assign g_wr_idx_o    = r.dst.idx;
  assign g_wr_data_o   = r.data[DATA_W-1:0];
  assign fifo_push_o   = v && r.dst.rtype == RT_FIFO;
  assign fifo_data_o   = r.data;
  assign pe_wr_valid_o = v && (r.dst.rtype == RT_PRIV || r.dst.rtype == RT_SHARED);
  assign pe_wr_o       = r;
  assign busy_o        = v;
endmodule
