// tb_salsa_compute_unit: the compute unit with 8 PEs in two groups of 4 and a
// 16-word FIFO, driven as the Load/Store unit would drive it.
// Runs Smith-Waterman (query of 7 characters, 40 database characters packed
// 4 bits each, active PEs 0..6) with every cell emitted, and checks all
// H(i,j) values, their tags and per-PE order as they leave the collector
// under random back-pressure. FIFO words are written while the array runs,
// so the array meets data stalls; the slow drain causes output stalls. It
// then checks a general-purpose broadcast (PASS of a global register into
// a shared register, read back through emit on one PE), fifo_free, done and
// drained.
`timescale 1ns/1ps
module tb_salsa_compute_unit;
  import salsa_pkg::*;
  localparam int NPE = 8, M = 7, N = 40, WID = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cv = 0, crdy, wv = 0, ov, ordy = 0, idle, done, drained, step, sd, so;
  comp_cmd_t cmd;
  reg_wr_t w;
  logic [15:0] ffree;
  out_item_t oi;
  salsa_compute_unit #(.NUM_PE(NPE), .PES_PER_GROUP(4), .FIFO_DEPTH(16)) dut (
    .clk_i(clk), .rst_ni(rst_n), .cmd_valid_i(cv), .cmd_i(cmd), .cmd_ready_o(crdy),
    .wr_valid_i(wv), .wr_i(w), .fifo_free_o(ffree),
    .out_valid_o(ov), .out_item_o(oi), .out_ready_i(ordy),
    .idle_o(idle), .done_o(done), .drained_o(drained), .step_o(step), .stall_data_o(sd), .stall_out_o(so));
  int checks = 0, failures = 0, n_sd = 0, n_so = 0, n_done = 0;
  always @(posedge clk) if (rst_n) begin if (sd) n_sd++; if (so) n_so++; if (done) n_done++; end
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end endtask
  function automatic int mx(int x, int y); return x > y ? x : y; endfunction

  task automatic wr(int t, int pe, int idx, bit bc, logic [63:0] data);
    @(negedge clk); wv = 1; w = '0; w.dst = reg_ref_t'({2'(t), 5'(idx)}); w.pe = 8'(pe); w.bcast = bc; w.data = data;
    @(negedge clk); wv = 0;
  endtask
  task automatic issue(comp_cmd_t c);
    @(negedge clk); cv = 1; cmd = c;
    while (!crdy) @(negedge clk);
    @(negedge clk); cv = 0;
  endtask

  int q [M], d [N], H [M+1][N+1], cnt [NPE], got;
  logic [63:0] words [10];
  initial begin
    comp_cmd_t c;
    w = '0; cmd = '0;
    for (int i = 0; i < M; i++) q[i] = $urandom_range(3);
    for (int j = 0; j < N; j++) d[j] = $urandom_range(3);
    for (int i = 0; i <= M; i++) for (int j = 0; j <= N; j++)
      H[i][j] = (i == 0 || j == 0) ? 0 :
        mx(0, mx(H[i-1][j-1] + ((q[i-1] == d[j-1]) ? 3 : -1), mx(H[i-1][j] - 2, H[i][j-1] - 2)));
    for (int k = 0; k < 10; k++) words[k] = '0;
    for (int j = 0; j < N; j++) words[j / 16][(j % 16) * 4 +: 4] = 4'(d[j]);
    repeat (3) @(negedge clk); rst_n = 1;
    check(ffree == 16, "FIFO free after reset");
    wr(RT_GLOBAL, 0, G_MATCH, 0, 3); wr(RT_GLOBAL, 0, G_MISMATCH, 0, 64'hffffffff);
    wr(RT_GLOBAL, 0, G_GAP, 0, 2);   wr(RT_GLOBAL, 0, 9, 0, 64'h77);
    for (int i = 0; i < M; i++) wr(RT_PRIV, i, P_Q, 0, 64'(q[i]));
    wr(RT_PRIV, 0, P_H, 1, 0); wr(RT_PRIV, 0, P_D, 1, 0);
    c = '0; c.alu = ALU_SW; c.emit = 1; c.feed = 1; c.pe_lo = 0; c.pe_hi = M - 1; c.width = WID;
    c.steps = N + M - 1; c.elems = N;
    issue(c);
    fork
      begin  // FIFO words arrive late and slowly
        repeat (20) @(negedge clk);
        for (int k = 0; k < 3; k++) begin wr(RT_FIFO, 0, 0, 0, words[k]); repeat (15) @(negedge clk); end
      end
      begin  // drain outputs with back-pressure
        for (int p = 0; p < NPE; p++) cnt[p] = 0;
        got = 0;
        while (got < M * N) begin
          @(negedge clk); ordy = $urandom_range(2) == 0;
          #1;
          if (ov && ordy) begin
            int p;
            p = int'(oi.pe);
            if (p >= M || oi.rix != 8'd15) check(0, "tag");
            else begin
              check($signed(oi.value) == H[p + 1][cnt[p] + 1], $sformatf("H(%0d,%0d)=%0d exp %0d", p + 1, cnt[p] + 1,
                    $signed(oi.value), H[p + 1][cnt[p] + 1]));
              cnt[p]++;
            end
            got++;
          end
        end
        @(negedge clk); ordy = 0;
      end
    join
    repeat (5) @(negedge clk);
    for (int p = 0; p < M; p++) check(cnt[p] == N, "per-PE count");
    check(idle && drained && n_done == 1, $sformatf("idle %0d drained %0d done %0d", idle, drained, n_done));
    check(n_sd > 0, "data stall seen");
    check(n_so > 0, "output stall seen");
    check(ffree == 16, "FIFO empty again");
    // general-purpose broadcast and single-PE emit
    c = '0; c.alu = ALU_GP; c.op = GP_PASS; c.a = reg_ref_t'({2'(RT_GLOBAL), 5'd9});
    c.dst = reg_ref_t'({2'(RT_SHARED), 5'd5}); c.pe_lo = 0; c.pe_hi = NPE - 1; c.steps = 1;
    issue(c);
    c = '0; c.alu = ALU_GP; c.op = GP_ADD; c.a = reg_ref_t'({2'(RT_SHARED), 5'd5});
    c.b = reg_ref_t'({2'(3), 5'd5}); c.dst = reg_ref_t'({2'(RT_PRIV), 5'd19}); c.emit = 1;
    c.pe_lo = 5; c.pe_hi = 5; c.steps = 1;
    issue(c);
    ordy = 1;
    got = 0;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      if (ov) begin
        check(oi.pe == 5 && oi.rix == 19 && oi.value == 32'hee, "GP emit from PE 5 register 19");
        got++;
      end
    end
    check(got == 1, "exactly one GP output");
    check(n_done == 3, "done per instruction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (30000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
