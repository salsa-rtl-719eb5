// tb_salsa_gp_alu: every operation of the general-purpose ALU on random and
// corner-case operands, against results computed here.
`timescale 1ns/1ps
module tb_salsa_gp_alu;
  import salsa_pkg::*;
  gp_op_e op;
  logic signed [31:0] a, b, y;
  salsa_gp_alu dut (.op_i(op), .a_i(a), .b_i(b), .y_o(y));
  int checks = 0, failures = 0;
  function automatic logic signed [31:0] expect_y(int o, logic signed [31:0] x, logic signed [31:0] z);
    case (o)
      0: return x + z;   1: return x - z;
      2: return (x >= z) ? x : z;  3: return (x <= z) ? x : z;
      4: return x & z;   5: return x | z;   6: return x ^ z;  7: return x;
      8: return (x == z) ? 1 : 0;  9: return (x < z) ? 1 : 0;
      10: return x << (z & 31);  11: return x >>> (z & 31);
      default: return x;
    endcase
  endfunction
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int o;
      o = n % 12;
      op = gp_op_e'(o);
      a = (n % 7 == 0) ? 32'sh8000_0000 : $signed($urandom);
      b = (n % 5 == 0) ? a : (n % 3 == 0) ? $signed($urandom_range(40)) - 8 : $signed($urandom);
      #1;
      checks++;
      if (y !== expect_y(o, a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL: op %0d a=%0d b=%0d y=%0d", o, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
