// tb_salsa_sw_alu: the SW cell update on random scores and characters,
// against the recurrence evaluated here.
`timescale 1ns/1ps
module tb_salsa_sw_alu;
  logic [31:0] q, c;
  logic signed [31:0] up, diag, left, mt, mm, g, h;
  salsa_sw_alu dut (.q_i(q), .c_i(c), .up_i(up), .diag_i(diag), .left_i(left),
    .match_i(mt), .mismatch_i(mm), .gap_i(g), .h_o(h));
  int checks = 0, failures = 0;
  function automatic int mx(int x, int y); return x > y ? x : y; endfunction
  initial begin
    for (int n = 0; n < 4000; n++) begin
      int e;
      q = $urandom_range(3); c = $urandom_range(3);
      up = $signed($urandom_range(200)) - 100; diag = $signed($urandom_range(200)) - 100;
      left = $signed($urandom_range(200)) - 100;
      mt = $urandom_range(5); mm = -$signed($urandom_range(5)); g = $urandom_range(6);
      #1;
      e = mx(diag + ((q == c) ? mt : mm), mx(up - g, left - g));
      if ("sw" == "sw") e = mx(e, 0);
      checks++;
      if (h !== e) begin failures++; if (failures < 10) $display("FAIL: h=%0d expected %0d", h, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
