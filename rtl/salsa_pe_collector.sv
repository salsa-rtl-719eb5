// salsa_pe_collector: merges the sub-collectors' outputs for the Load/Store unit.
//
// The document's PE collector receives the values gathered by the
// sub-collectors and prepares the store transactions. Here it takes at most
// one item per clock from the NUM_GROUPS sub-collector queues, choosing
// round-robin starting after the last group served (this arbitration is this
// design's choice), and pushes it into a QDEPTH-entry store queue that the
// Load/Store unit drains with a valid/ready handshake.
module salsa_pe_collector
  import salsa_pkg::*;
#(
  parameter int unsigned NUM_GROUPS = 5,
  parameter int unsigned QDEPTH     = 4
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  input  logic [NUM_GROUPS-1:0] in_valid_i,
  input  out_item_t             in_item_i [NUM_GROUPS],
  output logic [NUM_GROUPS-1:0] in_ready_o,
  output logic                  out_valid_o,
  output out_item_t             out_item_o,
  input  logic                  out_ready_i,
  output logic                  empty_o
);
  localparam int unsigned IW = $bits(out_item_t);
  localparam int unsigned GW = (NUM_GROUPS > 1) ? $clog2(NUM_GROUPS) : 1;

  logic [GW-1:0] last;
  logic          q_full, q_empty, grant_any;
  logic [GW-1:0] grant;

  always_comb begin
    grant_any  = 1'b0;
    grant      = '0;
    in_ready_o = '0;
    for (int o = 1; o <= NUM_GROUPS; o++) begin
      int unsigned g;
      g = (32'(last) + o) % NUM_GROUPS;
      if (!grant_any && in_valid_i[g]) begin
        grant_any = 1'b1;
        grant     = GW'(g);
      end
    end
    if (grant_any && !q_full) in_ready_o[grant] = 1'b1;
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni)                    last <= GW'(NUM_GROUPS - 1);
    else if (grant_any && !q_full)  last <= grant;
  end

  logic [IW-1:0] q_dout;
  salsa_fifo #(.WIDTH(IW), .DEPTH(QDEPTH)) u_q (
    .clk_i, .rst_ni,
    .push_i(grant_any && !q_full), .din_i(in_item_i[grant]), .full_o(q_full),
    .pop_i(out_ready_i), .dout_o(q_dout), .empty_o(q_empty), .count_o());

  assign out_item_o  = out_item_t'(q_dout);
  assign out_valid_o = !q_empty;
  assign empty_o     = q_empty;
endmodule
