// salsa_mem_model: behavioural model of the memory controller seen by SALSA.
//
// Not part of the design: a simulation stand-in for the cache or DRAM
// controller on the other side of SALSA's memory port. It holds WORDS 64-bit
// words (byte address bits [3 +: log2(WORDS)] select a word). A request is
// accepted when mem_req_ready is high; ready is withheld at random in about
// one cycle of READY_PCT_NOT out of 100. A read returns its data LAT cycles
// after acceptance, in order. Writes complete on acceptance. Testbenches reach
// the array `mem` hierarchically to fill and inspect it.
module salsa_mem_model #(
  parameter int unsigned WORDS         = 16384,
  parameter int unsigned LAT           = 3,
  parameter int unsigned READY_PCT_NOT = 25
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        req_valid_i,
  output logic        req_ready_o,
  input  logic        req_we_i,
  input  logic [39:0] req_addr_i,
  input  logic [63:0] req_wdata_i,
  output logic        resp_valid_o,
  output logic [63:0] resp_data_o
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [63:0] mem [WORDS];
  logic [LAT-1:0]      pipe_v;
  logic [63:0]         pipe_d [LAT];
  int unsigned         accepted_reads, accepted_writes, not_ready_cycles;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) req_ready_o <= 1'b0;
    else         req_ready_o <= ($urandom_range(99) >= READY_PCT_NOT);
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      pipe_v <= '0;
      accepted_reads <= 0;
      accepted_writes <= 0;
      not_ready_cycles <= 0;
    end else begin
      pipe_v <= {pipe_v[LAT-2:0], 1'b0};
      for (int i = LAT - 1; i > 0; i--) pipe_d[i] <= pipe_d[i-1];
      if (req_valid_i && !req_ready_o) not_ready_cycles <= not_ready_cycles + 1;
      if (req_valid_i && req_ready_o) begin
        if (req_we_i) begin
          mem[req_addr_i[3 +: AW]] <= req_wdata_i;
          accepted_writes <= accepted_writes + 1;
        end else begin
          pipe_v[0] <= 1'b1;
          pipe_d[0] <= mem[req_addr_i[3 +: AW]];
          accepted_reads <= accepted_reads + 1;
        end
      end
    end
  end

  assign resp_valid_o = pipe_v[LAT-1];
  assign resp_data_o  = pipe_d[LAT-1];
endmodule
