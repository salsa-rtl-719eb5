// tb_salsa_swa_alu: the affine-gap Smith-Waterman cell (H, E and F) on random
// inputs, against Gotoh's recurrence evaluated here.
`timescale 1ns/1ps
module tb_salsa_swa_alu;
  logic [31:0] q, c;
  logic signed [31:0] uh, uf, diag, lh, le, mt, mm, go, ge, h, e, f;
  salsa_swa_alu dut (.q_i(q), .c_i(c), .up_h_i(uh), .up_f_i(uf), .diag_i(diag), .left_h_i(lh),
    .left_e_i(le), .match_i(mt), .mismatch_i(mm), .open_i(go), .ext_i(ge), .h_o(h), .e_o(e), .f_o(f));
  int checks = 0, failures = 0;
  function automatic int mx(int x, int y); return x > y ? x : y; endfunction
  initial begin
    for (int n = 0; n < 4000; n++) begin
      int ee, ef, eh;
      q = $urandom_range(3); c = $urandom_range(3);
      uh = $signed($urandom_range(100)) - 20; uf = $signed($urandom_range(100)) - 50;
      diag = $signed($urandom_range(100)) - 20; lh = $signed($urandom_range(100)) - 20;
      le = $signed($urandom_range(100)) - 50;
      mt = $urandom_range(5); mm = -$signed($urandom_range(5)); go = 2 + $urandom_range(6); ge = $urandom_range(2);
      #1;
      ee = mx(le - ge, lh - go);
      ef = mx(uf - ge, uh - go);
      eh = mx(0, mx(diag + ((q == c) ? mt : mm), mx(ee, ef)));
      checks += 3;
      if (e !== ee) begin failures++; if (failures < 10) $display("FAIL: E=%0d expected %0d", e, ee); end
      if (f !== ef) begin failures++; if (failures < 10) $display("FAIL: F=%0d expected %0d", f, ef); end
      if (h !== eh) begin failures++; if (failures < 10) $display("FAIL: H=%0d expected %0d", h, eh); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
