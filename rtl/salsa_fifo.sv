// salsa_fifo: synchronous first-in first-out buffer.
//
// SALSA places FIFOs between its pipeline stages and in front of the systolic
// array (128 entries of 64 bits). When a FIFO is full the producer must wait:
// this is the stall mechanism that keeps the stages decoupled. The buffer is a
// circular array with read and write pointers and an occupancy counter.
// Reads are show-ahead: dout holds the oldest entry whenever empty is low, and
// pop removes it at the clock edge. A push and a pop may happen in the same
// cycle, also when the FIFO is full. Default sizes follow the document's
// compute FIFO; the depths of the inter-stage FIFOs are this design's choice.
module salsa_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 128
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             push_i,
  input  logic [WIDTH-1:0] din_i,
  output logic             full_o,
  input  logic             pop_i,
  output logic [WIDTH-1:0] dout_o,
  output logic             empty_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  logic do_push, do_pop;
  assign do_pop  = pop_i && (cnt != 0);
  assign do_push = push_i && ((cnt != DEPTH[$clog2(DEPTH+1)-1:0]) || do_pop);

  assign full_o  = (cnt == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty_o = (cnt == 0);
  assign dout_o  = mem[rd_ptr];
  assign count_o = cnt;

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk_i) begin
    if (do_push) mem[wr_ptr] <= din_i;
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_push) wr_ptr <= nxt(wr_ptr);
      if (do_pop)  rd_ptr <= nxt(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  // A push into a full FIFO without a simultaneous pop is lost: flag it.
  property no_overflow;
    @(posedge clk_i) disable iff (!rst_ni) (push_i && full_o) |-> pop_i;
  endproperty
  assert property (no_overflow) else $error("salsa_fifo: push while full");

endmodule
