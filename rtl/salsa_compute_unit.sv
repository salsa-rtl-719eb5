// salsa_compute_unit: the systolic compute unit of SALSA.
//
// Structure (as in the document): a PE dispatcher and one sub-dispatcher per
// 32 PEs bring load data to global registers, the input FIFO or PE registers;
// a linear array of NUM_PE PEs, each reading the shared outputs of its left
// neighbour, executes one instruction in lock-step; the input FIFO and the
// data selector stream elements into PE 0; one sub-collector per 32 PEs and a
// PE collector gather the values PEs mark valid and queue them for the
// Load/Store unit.
//
// Step controller (this design's own sequencing). A compute instruction is
// accepted from cmd_* when no register write is still travelling through the
// dispatchers. It then runs for cmd.steps array steps. A step is taken in a
// cycle unless the array must stall:
//   * data stall: the instruction feeds from the selector and the next
//     element has not yet arrived from the FIFO;
//   * output stall: the instruction writes output registers (emit) and some
//     PE still holds an output value that has not been collected, i.e. the
//     store path is slower than the array.
// With no stall, one step (one cell update per active PE) happens every
// clock. done_o pulses when the last step has been taken. fifo_free_o is the
// room left in the input FIFO, which the Load/Store unit checks before it
// reads a word for it. drained_o is high when no output is pending anywhere
// in the unit. step_o, stall_data_o and stall_out_o report the controller's
// decision each cycle.
module salsa_compute_unit
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
  // compute instructions from the dispatcher
  input  logic              cmd_valid_i,
  input  comp_cmd_t         cmd_i,
  output logic              cmd_ready_o,
  // load data from the Load/Store unit
  input  logic              wr_valid_i,
  input  reg_wr_t           wr_i,
  output logic [15:0]       fifo_free_o,
  // collected outputs to the Load/Store unit
  output logic              out_valid_o,
  output out_item_t         out_item_o,
  input  logic              out_ready_i,
  // status
  output logic              idle_o,
  output logic              done_o,
  output logic              drained_o,
  output logic              step_o,
  output logic              stall_data_o,
  output logic              stall_out_o
);
  localparam int unsigned NUM_GROUPS = (NUM_PE + PES_PER_GROUP - 1) / PES_PER_GROUP;
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  // ------------------------------------------------------------ dispatch
  logic              g_wr_en, fifo_push, pe_wr_valid, pd_busy;
  logic [REG_W-1:0]  g_wr_idx;
  logic [DATA_W-1:0] g_wr_data;
  logic [MEM_W-1:0]  fifo_din;
  reg_wr_t           pe_wr;

  salsa_pe_dispatcher u_pdisp (
    .clk_i, .rst_ni, .wr_valid_i, .wr_i,
    .g_wr_en_o(g_wr_en), .g_wr_idx_o(g_wr_idx), .g_wr_data_o(g_wr_data),
    .fifo_push_o(fifo_push), .fifo_data_o(fifo_din),
    .pe_wr_valid_o(pe_wr_valid), .pe_wr_o(pe_wr), .busy_o(pd_busy));

  logic [DATA_W-1:0] glob [NUM_GLOBAL];
  salsa_global_regs #(.NUM_GLOBAL(NUM_GLOBAL)) u_glob (
    .clk_i, .rst_ni, .wr_en_i(g_wr_en), .wr_idx_i(g_wr_idx), .wr_data_i(g_wr_data), .glob_o(glob));

  // ------------------------------------------------------ input FIFO + selector
  logic             f_full, f_empty, f_pop;
  logic [MEM_W-1:0] f_dout;
  logic [CW-1:0]    f_count;

  salsa_fifo #(.WIDTH(MEM_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk_i, .rst_ni, .push_i(fifo_push), .din_i(fifo_din), .full_o(f_full),
    .pop_i(f_pop), .dout_o(f_dout), .empty_o(f_empty), .count_o(f_count));

  assign fifo_free_o = 16'(FIFO_DEPTH - 32'(f_count));

  // ------------------------------------------------------ step controller
  comp_cmd_t   cur;
  logic        running, start;
  logic [23:0] steps_left;
  logic        sel_ready, sel_valid, step;
  logic [DATA_W-1:0] sel_lane [NUM_SHARED];
  logic        any_vld, sd_busy;

  assign cmd_ready_o = !running && !pd_busy && !sd_busy;
  assign start       = cmd_valid_i && cmd_ready_o;

  salsa_data_selector #(.NUM_SHARED(NUM_SHARED)) u_sel (
    .clk_i, .rst_ni,
    .start_i(start), .feed_i(cmd_i.feed), .elems_i(cmd_i.elems), .width_i(cmd_i.width),
    .bstep_i(cmd_i.bstep),
    .fifo_data_i(f_dout), .fifo_empty_i(f_empty), .fifo_pop_o(f_pop),
    .ready_o(sel_ready), .take_i(step), .lane_o(sel_lane), .valid_o(sel_valid));

  always_comb begin
    stall_data_o = running && !sel_ready;
    stall_out_o  = running && sel_ready && cur.emit && any_vld;
    step         = running && sel_ready && !(cur.emit && any_vld);
  end
  assign step_o = step;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      running    <= 1'b0;
      cur        <= '0;
      steps_left <= '0;
      done_o     <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (start) begin
        cur        <= cmd_i;
        steps_left <= cmd_i.steps;
        running    <= (cmd_i.steps != 24'd0);
        done_o     <= (cmd_i.steps == 24'd0);
      end else if (step) begin
        steps_left <= steps_left - 24'd1;
        if (steps_left == 24'd1) begin
          running <= 1'b0;
          done_o  <= 1'b1;
        end
      end
    end
  end

  assign idle_o = !running;

  // ------------------------------------------------------------- PE array
  logic [DATA_W-1:0]  sh     [NUM_PE][NUM_SHARED];
  logic               sv     [NUM_PE];
  logic [DATA_W-1:0]  oval   [NUM_PE][NUM_OUT];
  logic [NUM_OUT-1:0] ovld   [NUM_PE];
  logic [NUM_OUT-1:0] oclr   [NUM_PE];
  logic               wr_en  [NUM_PE];
  logic               active [NUM_PE];

  reg_ref_t           g_dst  [NUM_GROUPS];
  logic [DATA_W-1:0]  g_data [NUM_GROUPS];
  logic [NUM_GROUPS-1:0] g_busy;

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_grp
    logic [PES_PER_GROUP-1:0] en_g, act_g;
    salsa_pe_subdispatcher #(.PES_PER_GROUP(PES_PER_GROUP), .GROUP_BASE(g * PES_PER_GROUP)) u_sdisp (
      .clk_i, .rst_ni, .wr_valid_i(pe_wr_valid), .wr_i(pe_wr),
      .pe_lo_i(cur.pe_lo), .pe_hi_i(cur.pe_hi),
      .wr_en_o(en_g), .wr_dst_o(g_dst[g]), .wr_data_o(g_data[g]), .active_o(act_g),
      .busy_o(g_busy[g]));
    for (genvar k = 0; k < PES_PER_GROUP; k++) begin : g_map
      if (g * PES_PER_GROUP + k < NUM_PE) begin : g_on
        assign wr_en[g * PES_PER_GROUP + k]  = en_g[k];
        assign active[g * PES_PER_GROUP + k] = act_g[k];
      end
    end
  end
  assign sd_busy = |g_busy;

  for (genvar i = 0; i < NUM_PE; i++) begin : g_pe
    logic [DATA_W-1:0] left_sh [NUM_SHARED];
    logic              left_v;
    if (i == 0) begin : g_first
      assign left_sh = sel_lane;
      assign left_v  = sel_valid;
    end else begin : g_rest
      assign left_sh = sh[i-1];
      assign left_v  = sv[i-1];
    end
    salsa_pe #(.NUM_PRIV(NUM_PRIV), .NUM_OUT(NUM_OUT), .NUM_SHARED(NUM_SHARED),
               .NUM_GLOBAL(NUM_GLOBAL)) u_pe (
      .clk_i, .rst_ni, .cmd_i(cur), .step_i(step), .active_i(active[i]),
      .left_sh_i(left_sh), .left_v_i(left_v), .sh_o(sh[i]), .sv_o(sv[i]),
      .glob_i(glob),
      .wr_en_i(wr_en[i]), .wr_dst_i(g_dst[i / PES_PER_GROUP]), .wr_data_i(g_data[i / PES_PER_GROUP]),
      .out_val_o(oval[i]), .out_vld_o(ovld[i]), .out_clr_i(oclr[i]));
  end

  always_comb begin
    any_vld = 1'b0;
    for (int i = 0; i < NUM_PE; i++) any_vld = any_vld | (|ovld[i]);
  end

  // ------------------------------------------------------------ collection
  logic [NUM_GROUPS-1:0] sc_valid, sc_ready, sc_empty;
  out_item_t             sc_item [NUM_GROUPS];
  logic                  col_empty;

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_col
    logic [DATA_W-1:0]  v_g   [PES_PER_GROUP][NUM_OUT];
    logic [NUM_OUT-1:0] vld_g [PES_PER_GROUP];
    logic [NUM_OUT-1:0] clr_g [PES_PER_GROUP];
    for (genvar k = 0; k < PES_PER_GROUP; k++) begin : g_map
      if (g * PES_PER_GROUP + k < NUM_PE) begin : g_on
        assign v_g[k]   = oval[g * PES_PER_GROUP + k];
        assign vld_g[k] = ovld[g * PES_PER_GROUP + k];
        assign oclr[g * PES_PER_GROUP + k] = clr_g[k];
      end else begin : g_off
        for (genvar o = 0; o < NUM_OUT; o++) begin : g_o
          assign v_g[k][o] = '0;
        end
        assign vld_g[k] = '0;
      end
    end
    salsa_pe_subcollector #(.PES_PER_GROUP(PES_PER_GROUP), .GROUP_BASE(g * PES_PER_GROUP),
                            .NUM_PRIV(NUM_PRIV), .NUM_OUT(NUM_OUT)) u_scol (
      .clk_i, .rst_ni, .out_val_i(v_g), .out_vld_i(vld_g), .out_clr_o(clr_g),
      .item_valid_o(sc_valid[g]), .item_o(sc_item[g]), .item_ready_i(sc_ready[g]),
      .empty_o(sc_empty[g]));
  end

  salsa_pe_collector #(.NUM_GROUPS(NUM_GROUPS)) u_col (
    .clk_i, .rst_ni, .in_valid_i(sc_valid), .in_item_i(sc_item), .in_ready_o(sc_ready),
    .out_valid_o, .out_item_o, .out_ready_i, .empty_o(col_empty));

  assign drained_o = !any_vld && (&sc_empty) && col_empty;

endmodule
