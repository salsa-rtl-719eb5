// salsa_global_regs: global register bank of the SALSA compute unit.
//
// NUM_GLOBAL registers of DATA_W bits that every PE reads in parallel and
// that only loads (through the PE dispatcher) write; the ALUs cannot write
// them. The alignment ALUs take their scoring constants from fixed entries
// (salsa_pkg G_*: match, mismatch, linear gap, gap open, gap extension); that
// assignment is this design's choice. One write port, written at the clock
// edge when wr_en_i is high; all registers are visible on glob_o at all
// times. Sizes follow the document (16 x 32 bits).
module salsa_global_regs
  import salsa_pkg::*;
#(
  parameter int unsigned NUM_GLOBAL = 16
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              wr_en_i,
  input  logic [REG_W-1:0]  wr_idx_i,
  input  logic [DATA_W-1:0] wr_data_i,
  output logic [DATA_W-1:0] glob_o [NUM_GLOBAL]
);
  logic [DATA_W-1:0] regs [NUM_GLOBAL];

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      for (int i = 0; i < NUM_GLOBAL; i++) regs[i] <= '0;
    end else if (wr_en_i) begin
      for (int i = 0; i < NUM_GLOBAL; i++)
        if (32'(wr_idx_i) == i) regs[i] <= wr_data_i;
    end
  end

  assign glob_o = regs;
endmodule
