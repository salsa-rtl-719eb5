// salsa_data_selector: feeds the first PE of the systolic array from the FIFO.
//
// As in the document, the selector takes one 64-bit word from the compute
// FIFO into a local register and, on every array step, hands the next
// element of the chosen bit width to the first PE. Elements are taken from
// the least significant end of the word. When a word is used up (or the
// instruction's element count ends, in which case the rest of the word is
// dropped) the next word is popped from the FIFO.
//
// start_i (one cycle) loads the configuration of a compute instruction:
// feed, element count, width (1..32, a divisor of 64; 0 means 32) and a
// boundary step. While elements remain, ready_o is high only when an element
// is held, and lane_o/valid_o present it to PE 0; take_i consumes it. Once the
// count is exhausted, ready_o stays high and valid_o is low, so the array can
// keep stepping to flush the wave. Besides the element on lane 0 (S_C), this
// design drives lane 1 (S_H) with a running boundary score that grows by the
// boundary step per element (row 0 of a Needleman-Wunsch matrix), lane 2
// (S_F) with a very negative value (no vertical gap before row 1) and the
// other lanes with zero: these boundary lanes are this design's own choice.
// Lanes 2 to 5 are therefore constant outputs; they stay ports so that PE 0
// sees the same interface as every other PE.
module salsa_data_selector
  import salsa_pkg::*;
#(
  parameter int unsigned NUM_SHARED = 6
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // configuration
  input  logic              start_i,
  input  logic              feed_i,
  input  logic [15:0]       elems_i,
  input  logic [5:0]        width_i,
  input  logic [15:0]       bstep_i,
  // FIFO side
  input  logic [MEM_W-1:0]  fifo_data_i,
  input  logic              fifo_empty_i,
  output logic              fifo_pop_o,
  // array side
  output logic              ready_o,
  input  logic              take_i,
  output logic [DATA_W-1:0] lane_o [NUM_SHARED],
  output logic              valid_o
);
  logic [MEM_W-1:0]  word;
  logic              have;
  logic [6:0]        pos;
  logic [15:0]       rem;
  logic [5:0]        wid;
  logic signed [DATA_W-1:0] bacc, bstep;

  logic [6:0] w7;
  assign w7 = (wid == 6'd0) ? 7'd32 : {1'b0, wid};

  logic [MEM_W-1:0] shifted, mask;
  always_comb begin
    shifted = word >> pos;
    mask    = (64'd1 << w7) - 64'd1;
  end

  assign ready_o = (rem == 16'd0) || have;
  assign valid_o = (rem != 16'd0) && have;

  always_comb begin
    for (int i = 0; i < NUM_SHARED; i++) lane_o[i] = '0;
    lane_o[S_C] = DATA_W'(shifted & mask);
    lane_o[S_H] = bacc + bstep;
    if (NUM_SHARED > S_F) lane_o[S_F] = NEG_INF;
  end

  // next-state of the element bookkeeping
  logic        consume, last_in_word, have_n;
  logic [15:0] rem_n;
  always_comb begin
    consume      = take_i && valid_o;
    last_in_word = (32'(pos) + 2 * 32'(w7)) > MEM_W;
    rem_n        = consume ? rem - 16'd1 : rem;
    have_n       = have && !(consume && (last_in_word || rem == 16'd1));
    fifo_pop_o   = !start_i && !have_n && (rem_n != 16'd0) && !fifo_empty_i;
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      word  <= '0;
      have  <= 1'b0;
      pos   <= '0;
      rem   <= '0;
      wid   <= 6'd8;
      bacc  <= '0;
      bstep <= '0;
    end else if (start_i) begin
      rem   <= feed_i ? elems_i : 16'd0;
      wid   <= width_i;
      bacc  <= '0;
      bstep <= DATA_W'($signed(bstep_i));
      have  <= 1'b0;
      pos   <= '0;
    end else begin
      rem  <= rem_n;
      have <= have_n;
      if (consume) begin
        bacc <= bacc + bstep;
        pos  <= pos + w7;
      end
      if (fifo_pop_o) begin
        word <= fifo_data_i;
        have <= 1'b1;
        pos  <= '0;
      end
    end
  end
endmodule
