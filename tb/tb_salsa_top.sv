// tb_salsa_top: end-to-end test of the SALSA accelerator at its default size.
//
// A host model sends SALSA commands and a behavioural memory supplies and
// receives data. Each alignment is programmed the way software would use the
// accelerator: load the scoring constants into global registers, one query
// character per PE, the boundary scores into PE registers, set the store base,
// start the compute instruction, then stream the packed database into the
// FIFO. Four algorithms run on random DNA sequences of 32 x 64 and of
// 64 x 128 characters (query x database):
//   SW  (linear gap, 2-bit packed database, every H(i,j) stored),
//   NW  (8-bit database, every H(i,j) stored, row-0 boundary from the selector),
//   SWA (affine gaps, 8-bit database, every H(i,j) stored),
//   MaxScore (SW without storing cells, then a reduction across the PEs with
//   the general-purpose ALU and one stored word).
// Results are compared with scoring matrices computed here in plain code.
// The test also counts the mechanisms: data stalls (FIFO not yet filled),
// output stalls (store path slower than the array), dispatcher dependency
// stalls, memory back-pressure, loads overlapping computation, and a
// command with an unknown opcode; each must occur at least once. For
// MaxScore it checks that the array phase took exactly N + M - 1 steps and
// never waited for the store path. Cycle counts per run are printed.
`timescale 1ns/1ps
module tb_salsa_top;
  import salsa_pkg::*;

  localparam int unsigned NPE = 160;
  localparam int MAXM = 64, MAXN = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cmd_valid = 1'b0, cmd_ready;
  logic [6:0]  cmd_funct = '0;
  logic [63:0] cmd_rs1 = '0, cmd_rs2 = '0;
  logic        busy;
  logic        mreq_v, mreq_r, mreq_we, mresp_v;
  logic [39:0] mreq_a;
  logic [63:0] mreq_d, mresp_d;
  logic        step, stall_data, stall_out, dep_stall;
  logic [15:0] bad_cnt;

  salsa_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready), .cmd_funct_i(cmd_funct),
    .cmd_rs1_i(cmd_rs1), .cmd_rs2_i(cmd_rs2), .busy_o(busy),
    .mem_req_valid_o(mreq_v), .mem_req_ready_i(mreq_r), .mem_req_we_o(mreq_we),
    .mem_req_addr_o(mreq_a), .mem_req_wdata_o(mreq_d),
    .mem_resp_valid_i(mresp_v), .mem_resp_data_i(mresp_d),
    .step_o(step), .stall_data_o(stall_data), .stall_out_o(stall_out),
    .dep_stall_o(dep_stall), .bad_cmd_cnt_o(bad_cnt));

  salsa_mem_model #(.WORDS(16384), .LAT(3), .READY_PCT_NOT(25)) u_mem (
    .clk_i(clk), .rst_ni(rst_n),
    .req_valid_i(mreq_v), .req_ready_o(mreq_r), .req_we_i(mreq_we),
    .req_addr_i(mreq_a), .req_wdata_i(mreq_d),
    .resp_valid_o(mresp_v), .resp_data_o(mresp_d));

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint n_step = 0, n_stall_data = 0, n_stall_out = 0, n_dep = 0, n_overlap = 0, n_backp = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (step)              n_step       <= n_step + 1;
      if (stall_data)        n_stall_data <= n_stall_data + 1;
      if (stall_out)         n_stall_out  <= n_stall_out + 1;
      if (dep_stall)         n_dep        <= n_dep + 1;
      if (step && mreq_v)    n_overlap    <= n_overlap + 1;
      if (mreq_v && !mreq_r) n_backp      <= n_backp + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ host side
  task automatic send(input logic [6:0] f, input logic [63:0] a, input logic [63:0] b);
    @(negedge clk);
    cmd_valid = 1'b1; cmd_funct = f; cmd_rs1 = a; cmd_rs2 = b;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  // LOAD: count words from word address wa into (type, pe, idx)
  task automatic ld(input int wa, input int count, input int pe, input int idx,
                    input int typ, input bit bc, input bit hi = 1'b0);
    logic [63:0] r2;
    r2 = '0;
    r2[15:0] = 16'(count); r2[23:16] = 8'(pe); r2[28:24] = 5'(idx);
    r2[30:29] = 2'(typ); r2[31] = bc; r2[32] = hi;
    send(7'd0, 64'(wa) << 3, r2);
  endtask

  function automatic logic [6:0] rr(int typ, int idx);
    return {2'(typ), 5'(idx)};
  endfunction

  task automatic comp(input int alu, input int op, input logic [6:0] a, input logic [6:0] b,
                      input logic [6:0] d, input bit emit, input bit feed, input int lo, input int hi,
                      input int width, input int steps, input int elems, input int bstep);
    logic [63:0] r1, r2;
    r1 = '0; r2 = '0;
    r1[1:0] = 2'(alu); r1[5:2] = 4'(op); r1[12:6] = a; r1[19:13] = b; r1[26:20] = d;
    r1[27] = emit; r1[28] = feed; r1[39:32] = 8'(lo); r1[47:40] = 8'(hi); r1[53:48] = 6'(width);
    r2[23:0] = 24'(steps); r2[39:24] = 16'(elems); r2[63:48] = 16'(bstep);
    send(7'd2, r1, r2);
  endtask

  task automatic fence_wait();
    send(7'd3, '0, '0);
    repeat (3) @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  // --------------------------------------------------------- references
  int q [MAXM], d [MAXN];
  int H [MAXM+1][MAXN+1], E [MAXM+1][MAXN+1], F [MAXM+1][MAXN+1];
  localparam int MATCH = 3, MISM = -2, GAP = 2, GOPEN = 4, GEXT = 1;
  localparam int NINF = -536870912;

  function automatic int mx(int a, int b); return a > b ? a : b; endfunction
  function automatic int sc(int a, int b); return a == b ? MATCH : MISM; endfunction

  task automatic ref_matrix(input int alg, input int M, input int N);
    for (int i = 0; i <= M; i++)
      for (int j = 0; j <= N; j++) begin
        E[i][j] = NINF; F[i][j] = NINF;
        if (i == 0 || j == 0) H[i][j] = (alg == 2) ? -(i + j) * GAP : 0;
        else if (alg == 1 || alg == 4)
          H[i][j] = mx(0, mx(H[i-1][j-1] + sc(q[i-1], d[j-1]), mx(H[i-1][j] - GAP, H[i][j-1] - GAP)));
        else if (alg == 2)
          H[i][j] = mx(H[i-1][j-1] + sc(q[i-1], d[j-1]), mx(H[i-1][j] - GAP, H[i][j-1] - GAP));
        else begin
          E[i][j] = mx(E[i][j-1] - GEXT, H[i][j-1] - GOPEN);
          F[i][j] = mx(F[i-1][j] - GEXT, H[i-1][j] - GOPEN);
          H[i][j] = mx(0, mx(H[i-1][j-1] + sc(q[i-1], d[j-1]), mx(E[i][j], F[i][j])));
        end
      end
  endtask

  // ----------------------------------------------------------- one run
  localparam int W_ZERO = 'h0, W_NINF = 'h1, W_GLOB = 'h10, W_Q = 'h100, W_PH = 'h200,
                 W_PD = 'h300, W_DB = 'h400, W_OUT = 'h1000;

  // alg: 1 SW, 2 NW, 3 SWA, 4 MaxScore
  task automatic run(input int alg, input int M, input int N, input int width);
    int words, per, nout, cnt [NPE], best, st_steps, st_data;
    longint t0, s0, sd0, so0;
    string nm;
    nm = (alg == 1) ? "SW" : (alg == 2) ? "NW" : (alg == 3) ? "SWA" : "MaxScore";
    for (int i = 0; i < M; i++) q[i] = $urandom_range(3);
    for (int j = 0; j < N; j++) d[j] = $urandom_range(3);
    ref_matrix(alg, M, N);
    // memory image
    u_mem.mem[W_ZERO] = 64'd0;
    u_mem.mem[W_NINF] = {32'd0, 32'(NINF)};
    u_mem.mem[W_GLOB + 0] = 64'(MATCH); u_mem.mem[W_GLOB + 1] = {32'd0, 32'(MISM)};
    u_mem.mem[W_GLOB + 2] = 64'(GAP);   u_mem.mem[W_GLOB + 3] = 64'(GOPEN);
    u_mem.mem[W_GLOB + 4] = 64'(GEXT);
    for (int i = 0; i < M; i++) begin
      u_mem.mem[W_Q + i]  = {32'hdead0000, 32'(q[i])};
      u_mem.mem[W_PH + i] = {32'd0, 32'(-(i + 1) * GAP)};
      u_mem.mem[W_PD + i] = {32'd0, 32'(-i * GAP)};
    end
    per = 64 / width;
    words = (N + per - 1) / per;
    for (int w = 0; w < words; w++) u_mem.mem[W_DB + w] = '0;
    for (int j = 0; j < N; j++) u_mem.mem[W_DB + j / per][(j % per) * width +: 8] = 8'(d[j]);
    for (int k = 0; k < M * N + 4; k++) u_mem.mem[W_OUT + k] = '1;

    t0 = cyc; s0 = n_step; sd0 = n_stall_data; so0 = n_stall_out;
    ld(W_GLOB, 5, 0, 0, RT_GLOBAL, 0);
    ld(W_Q, M, 0, P_Q, RT_PRIV, 0);
    if (alg == 2) begin
      ld(W_PH, M, 0, P_H, RT_PRIV, 0);
      ld(W_PD, M, 0, P_D, RT_PRIV, 0);
    end else begin
      ld(W_ZERO, 1, 0, P_H, RT_PRIV, 1);
      ld(W_ZERO, 1, 0, P_D, RT_PRIV, 1);
    end
    ld(W_ZERO, 1, 0, P_MAX, RT_PRIV, 1);
    ld(W_NINF, 1, 0, P_E, RT_PRIV, 1);
    send(7'd1, 64'(W_OUT) << 3, '0);
    comp((alg == 4) ? 1 : alg, 0, '0, '0, '0, alg != 4, 1, 0, M - 1, width,
         N + M - 1, N, (alg == 2) ? -GAP : 0);
    ld(W_DB, words, 0, 0, RT_FIFO, 0);
    if (alg == 4) begin
      // wait for the array phase to measure it on its own
      while (n_step - s0 < N + M - 1) @(negedge clk);
      st_steps = int'(n_step - s0); st_data = int'(n_stall_data - sd0);
      comp(0, GP_PASS, rr(0, P_MAX), '0, rr(1, 4), 0, 0, 0, M - 1, 8, 1, 0, 0);
      comp(0, GP_MAX, rr(0, P_MAX), rr(3, 4), rr(1, 4), 0, 0, 0, M - 1, 8, M - 1, 0, 0);
      comp(0, GP_PASS, rr(1, 4), '0, rr(0, 15), 1, 0, M - 1, M - 1, 8, 1, 0, 0);
    end
    fence_wait();
    $display("%s %0dx%0d: %0d cycles from first command to fence (%0d steps, %0d data-stall, %0d output-stall cycles)",
             nm, M, N, cyc - t0, n_step - s0, n_stall_data - sd0, n_stall_out - so0);

    if (alg == 4) begin
      best = 0;
      for (int i = 1; i <= M; i++) for (int j = 1; j <= N; j++) best = mx(best, H[i][j]);
      check(u_mem.mem[W_OUT][31:0] == 32'(best), $sformatf("MaxScore value %0d, expected %0d",
            $signed(u_mem.mem[W_OUT][31:0]), best));
      check(u_mem.mem[W_OUT][63:48] == 16'(M - 1) && u_mem.mem[W_OUT][47:40] == 8'd15,
            "MaxScore tag");
      check(u_mem.mem[W_OUT + 1] == '1, "MaxScore stored exactly one word");
      // one cell update per clock: the array phase takes steps + data stalls only
      check(st_steps == N + M - 1, "MaxScore step count");
      check(n_stall_out - so0 == 0, "MaxScore has no output stall");
    end else begin
      for (int p = 0; p < NPE; p++) cnt[p] = 0;
      nout = 0;
      for (int k = 0; k < M * N; k++) begin
        logic [63:0] w;
        int p;
        w = u_mem.mem[W_OUT + k];
        p = int'(w[63:48]);
        if (p >= M || w[47:40] != 8'd15) begin
          check(0, $sformatf("%s output %0d has bad tag %h", nm, k, w));
        end else begin
          check($signed(w[31:0]) == H[p + 1][cnt[p] + 1],
                $sformatf("%s H(%0d,%0d) = %0d, expected %0d", nm, p + 1, cnt[p] + 1,
                          $signed(w[31:0]), H[p + 1][cnt[p] + 1]));
          cnt[p]++;
        end
        nout++;
      end
      for (int p = 0; p < M; p++) check(cnt[p] == N, $sformatf("%s PE %0d emitted %0d", nm, p, cnt[p]));
      check(u_mem.mem[W_OUT + M * N] == '1, $sformatf("%s no extra outputs", nm));
    end
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    send(7'h55, '0, '0);          // unknown opcode: must be dropped
    run(1, 32, 64, 2);
    run(2, 32, 64, 8);
    run(3, 32, 64, 8);
    run(4, 32, 64, 2);
    run(1, 64, 128, 2);
    run(2, 64, 128, 8);
    run(3, 64, 128, 8);
    run(4, 64, 128, 2);
    check(bad_cnt == 16'd1, "unknown command counted");
    $display("mechanisms: steps=%0d data_stall=%0d output_stall=%0d dep_stall=%0d overlap=%0d mem_backpressure=%0d",
             n_step, n_stall_data, n_stall_out, n_dep, n_overlap, n_backp);
    check(n_stall_data > 0, "data stall happened");
    check(n_stall_out > 0, "output stall happened");
    check(n_dep > 0, "dependency stall happened");
    check(n_overlap > 0, "memory traffic overlapped computation");
    check(n_backp > 0, "memory back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
