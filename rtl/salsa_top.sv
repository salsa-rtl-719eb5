// salsa_top: SALSA, a programmable systolic accelerator for sequence alignment.
//
// A four-stage pipeline, as in the document: Fetch & Decode takes commands
// from the host core, Dispatch sends each one either to the Load/Store unit
// or to the Compute unit (with its own queue in front of each), the
// Load/Store unit talks to the memory controller, and the Compute unit runs a
// linear systolic array of NUM_PE processing elements in lock-step. The
// stages are joined by FIFOs; a full FIFO stalls its producer. Loads and
// computation proceed in parallel when they do not depend on each other.
//
// Host port: cmd_valid/cmd_ready handshake carrying funct (the SALSA opcode)
// and the two 64-bit operands rs1/rs2 (encoding in salsa_pkg). busy is high
// while any instruction, load, computation or store is still in progress.
// Memory port: one 64-bit transaction at a time, mem_req_valid/ready with
// we, byte address and write data; read data returns in order on
// mem_resp_valid/mem_resp_data. Status outputs expose the array's step and
// stall decisions and the dispatcher's dependency stalls for observation.
// Default sizes are those of the document's evaluated configuration: 160 PEs
// in groups of 32, 16 global registers, 20 private registers per PE of which
// 5 are output registers, 6 shared output registers, a 128 x 64-bit input
// FIFO and a 64-bit memory port.
module salsa_top
  import salsa_pkg::*;
#(
  parameter int unsigned NUM_PE        = 160,
  parameter int unsigned PES_PER_GROUP = 32,
  parameter int unsigned NUM_GLOBAL    = 16,
  parameter int unsigned NUM_PRIV      = 20,
  parameter int unsigned NUM_OUT       = 5,
  parameter int unsigned NUM_SHARED    = 6,
  parameter int unsigned FIFO_DEPTH    = 128
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // host command channel
  input  logic              cmd_valid_i,
  output logic              cmd_ready_o,
  input  logic [6:0]        cmd_funct_i,
  input  logic [63:0]       cmd_rs1_i,
  input  logic [63:0]       cmd_rs2_i,
  output logic              busy_o,
  // memory controller
  output logic              mem_req_valid_o,
  input  logic              mem_req_ready_i,
  output logic              mem_req_we_o,
  output logic [ADDR_W-1:0] mem_req_addr_o,
  output logic [MEM_W-1:0]  mem_req_wdata_o,
  input  logic              mem_resp_valid_i,
  input  logic [MEM_W-1:0]  mem_resp_data_i,
  // status
  output logic              step_o,
  output logic              stall_data_o,
  output logic              stall_out_o,
  output logic              dep_stall_o,
  output logic [15:0]       bad_cmd_cnt_o
);
  localparam int unsigned IW = $bits(instr_t);
  localparam int unsigned CW = $bits(comp_cmd_t);

  // Fetch & Decode
  logic   fd_valid, fd_ready;
  instr_t fd_instr;

  salsa_fetch_decode u_fd (
    .clk_i, .rst_ni, .cmd_valid_i, .cmd_ready_o, .cmd_funct_i, .cmd_rs1_i, .cmd_rs2_i,
    .out_valid_o(fd_valid), .out_o(fd_instr), .out_ready_i(fd_ready), .bad_cnt_o(bad_cmd_cnt_o));

  // Dispatch and the two issue queues
  logic ls_push, ls_full, ls_empty, cu_push, cu_full, cu_empty;
  logic ls_done, ls_done_reg, ls_busy, ls_storing, disp_idle;
  logic cu_done, cu_drained, cu_idle;
  logic ls_in_ready, cu_in_ready;
  logic [IW-1:0] ls_q;
  logic [CW-1:0] cu_q;

  salsa_dispatcher u_disp (
    .clk_i, .rst_ni, .in_valid_i(fd_valid), .in_i(fd_instr), .in_ready_o(fd_ready),
    .ls_push_o(ls_push), .ls_full_i(ls_full), .ls_done_i(ls_done), .ls_done_reg_i(ls_done_reg),
    .ls_idle_i(!ls_busy && ls_empty),
    .cu_push_o(cu_push), .cu_full_i(cu_full), .cu_done_i(cu_done), .cu_drained_i(cu_drained),
    .idle_o(disp_idle), .dep_stall_o);

  salsa_fifo #(.WIDTH(IW), .DEPTH(2)) u_ls_q (
    .clk_i, .rst_ni, .push_i(ls_push), .din_i(fd_instr), .full_o(ls_full),
    .pop_i(ls_in_ready), .dout_o(ls_q), .empty_o(ls_empty), .count_o());

  salsa_fifo #(.WIDTH(CW), .DEPTH(2)) u_cu_q (
    .clk_i, .rst_ni, .push_i(cu_push), .din_i(fd_instr.cp), .full_o(cu_full),
    .pop_i(cu_in_ready), .dout_o(cu_q), .empty_o(cu_empty), .count_o());

  // Load/Store
  logic        wr_valid;
  reg_wr_t     wr;
  logic [15:0] fifo_free;
  logic        out_valid, out_ready;
  out_item_t   out_item;

  salsa_load_store u_ls (
    .clk_i, .rst_ni,
    .in_valid_i(!ls_empty), .in_i(instr_t'(ls_q)), .in_ready_o(ls_in_ready),
    .mem_req_valid_o, .mem_req_ready_i, .mem_req_we_o, .mem_req_addr_o, .mem_req_wdata_o,
    .mem_resp_valid_i, .mem_resp_data_i,
    .wr_valid_o(wr_valid), .wr_o(wr), .fifo_free_i(fifo_free),
    .out_valid_i(out_valid), .out_item_i(out_item), .out_ready_o(out_ready),
    .busy_o(ls_busy), .ld_done_o(ls_done), .ld_reg_o(ls_done_reg), .storing_o(ls_storing));

  // Compute
  salsa_compute_unit #(
    .NUM_PE(NUM_PE), .PES_PER_GROUP(PES_PER_GROUP), .NUM_GLOBAL(NUM_GLOBAL),
    .NUM_PRIV(NUM_PRIV), .NUM_OUT(NUM_OUT), .NUM_SHARED(NUM_SHARED), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_cu (
    .clk_i, .rst_ni,
    .cmd_valid_i(!cu_empty), .cmd_i(comp_cmd_t'(cu_q)), .cmd_ready_o(cu_in_ready),
    .wr_valid_i(wr_valid), .wr_i(wr), .fifo_free_o(fifo_free),
    .out_valid_o(out_valid), .out_item_o(out_item), .out_ready_i(out_ready),
    .idle_o(cu_idle), .done_o(cu_done), .drained_o(cu_drained),
    .step_o, .stall_data_o, .stall_out_o);

  assign busy_o = fd_valid || !disp_idle || !ls_empty || !cu_empty || ls_busy || ls_storing
                  || !cu_idle || !cu_drained;
endmodule
