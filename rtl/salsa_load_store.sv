// salsa_load_store: the Load/Store unit of SALSA.
//
// The only block with a port to the memory controller. It executes load
// instructions and stores the values the compute unit collects:
//  * a load of count words reads them one after another from consecutive
//    64-bit addresses. Each word becomes a register write into the compute
//    unit: to the FIFO (whole word), to a global register (index advancing
//    per word), or to a PE register (PE index advancing per word, or every PE
//    at once for a broadcast). Register loads take the low 32 bits of a word,
//    or the high 32 bits if the instruction asks for it.
//  * each collected value is written as one 64-bit word
//    {pe[15:0], reg[7:0], 8'h00, value[31:0]} at the next address after the
//    store base set by OP_STBASE.
// As the document describes, the unit is busy while a memory request is in
// progress and starts no other one until it completes; this design keeps one
// transaction outstanding and, between the words of a multi-word load, gives
// pending stores priority, so a load waiting for FIFO room cannot block the
// results the array is waiting to hand off. A FIFO word is only requested
// when the FIFO has room for it and the word still in the dispatcher.
//
// The store data is the collected item itself, reformatted, so most of
// mem_req_wdata_o follows out_item_i directly and 8 of its bits are zero.
//
// Memory port: req_valid/req_ready handshake with we, addr (byte address) and
// wdata; one resp_valid beat with rdata per read, in order. ld_done_o pulses
// with ld_reg_o telling whether the finished load wrote registers.
module salsa_load_store
  import salsa_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_ni,
  // instructions from the dispatcher (K_LOAD or K_STBASE)
  input  logic              in_valid_i,
  input  instr_t            in_i,
  output logic              in_ready_o,
  // memory controller
  output logic              mem_req_valid_o,
  input  logic              mem_req_ready_i,
  output logic              mem_req_we_o,
  output logic [ADDR_W-1:0] mem_req_addr_o,
  output logic [MEM_W-1:0]  mem_req_wdata_o,
  input  logic              mem_resp_valid_i,
  input  logic [MEM_W-1:0]  mem_resp_data_i,
  // compute unit
  output logic              wr_valid_o,
  output reg_wr_t           wr_o,
  input  logic [15:0]       fifo_free_i,
  input  logic              out_valid_i,
  input  out_item_t         out_item_i,
  output logic              out_ready_o,
  // status
  output logic              busy_o,
  output logic              ld_done_o,
  output logic              ld_reg_o,
  output logic              storing_o
);
  typedef enum logic [2:0] {S_IDLE, S_LD_REQ, S_LD_WAIT, S_ST_REQ} state_e;

  state_e            state;
  logic              ld_active;
  load_cmd_t         ld;
  logic [15:0]       ld_left;
  logic [ADDR_W-1:0] st_ptr;

  logic ld_is_fifo, fifo_room;
  assign ld_is_fifo = ld.dst.rtype == RT_FIFO;
  assign fifo_room  = !ld_is_fifo || (fifo_free_i >= 16'd2);

  // A new instruction is taken only between operations.
  assign in_ready_o = (state == S_IDLE) && !ld_active && !out_valid_i;

  always_comb begin
    mem_req_valid_o = (state == S_LD_REQ) || (state == S_ST_REQ);
    mem_req_we_o    = (state == S_ST_REQ);
    mem_req_addr_o  = (state == S_ST_REQ) ? st_ptr : ld.addr;
    mem_req_wdata_o = out_word(out_item_i);
    out_ready_o     = (state == S_ST_REQ) && mem_req_ready_i;
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state      <= S_IDLE;
      ld_active  <= 1'b0;
      ld         <= '0;
      ld_left    <= '0;
      st_ptr     <= '0;
      wr_valid_o <= 1'b0;
      wr_o       <= '0;
      ld_done_o  <= 1'b0;
      ld_reg_o   <= 1'b0;
    end else begin
      wr_valid_o <= 1'b0;
      ld_done_o  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (out_valid_i) begin
            state <= S_ST_REQ;
          end else if (ld_active) begin
            if (fifo_room) state <= S_LD_REQ;
          end else if (in_valid_i) begin
            if (in_i.kind == K_STBASE) begin
              st_ptr <= in_i.base;
            end else begin
              ld        <= in_i.ld;
              ld_left   <= (in_i.ld.count == 16'd0) ? 16'd1 : in_i.ld.count;
              ld_active <= 1'b1;
            end
          end
        end
        S_LD_REQ: if (mem_req_ready_i) state <= S_LD_WAIT;
        S_LD_WAIT: if (mem_resp_valid_i) begin
          wr_valid_o  <= 1'b1;
          wr_o.dst    <= ld.dst;
          wr_o.pe     <= ld.pe;
          wr_o.bcast  <= ld.bcast;
          wr_o.data   <= (ld.high && !ld_is_fifo) ? {32'h0, mem_resp_data_i[63:32]} : mem_resp_data_i;
          ld.addr     <= ld.addr + ADDR_W'(MEM_W / 8);
          if (ld.dst.rtype == RT_GLOBAL) ld.dst.idx <= ld.dst.idx + 1'b1;
          else if (!ld.bcast)            ld.pe      <= ld.pe + 1'b1;
          ld_left <= ld_left - 16'd1;
          if (ld_left == 16'd1) begin
            ld_active <= 1'b0;
            ld_done_o <= 1'b1;
            ld_reg_o  <= !ld_is_fifo;
          end
          state <= S_IDLE;
        end
        S_ST_REQ: if (mem_req_ready_i) begin
          st_ptr <= st_ptr + ADDR_W'(MEM_W / 8);
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o    = (state != S_IDLE) || ld_active;
  assign storing_o = (state == S_ST_REQ);

  // A memory request, once raised, holds still until it is accepted.
  property req_stable;
    @(posedge clk_i) disable iff (!rst_ni)
      (mem_req_valid_o && !mem_req_ready_i) |=> (mem_req_valid_o && $stable(mem_req_addr_o) && $stable(mem_req_we_o));
  endproperty
  assert property (req_stable) else $error("salsa_load_store: request changed before it was accepted");
endmodule
