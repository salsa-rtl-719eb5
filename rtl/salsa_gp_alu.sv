// salsa_gp_alu: general-purpose ALU of a SALSA processing element.
//
// Every PE carries one general-purpose ALU that the program drives with
// explicit operands, next to the specialised alignment ALUs. It is purely
// combinational: the result of operation op_i on the signed 32-bit operands
// a_i and b_i appears in the same cycle. The document says only that the ALU
// is general purpose and software-programmable; the operation set (add, sub,
// max, min, bitwise and/or/xor, pass A, equal, less-than, shifts by b[4:0])
// is this design's choice.
module salsa_gp_alu
  import salsa_pkg::*;
(
  input  gp_op_e                   op_i,
  input  logic signed [DATA_W-1:0] a_i,
  input  logic signed [DATA_W-1:0] b_i,
  output logic signed [DATA_W-1:0] y_o
);
  always_comb begin
    unique case (op_i)
      GP_ADD:  y_o = a_i + b_i;
      GP_SUB:  y_o = a_i - b_i;
      GP_MAX:  y_o = (a_i > b_i) ? a_i : b_i;
      GP_MIN:  y_o = (a_i < b_i) ? a_i : b_i;
      GP_AND:  y_o = a_i & b_i;
      GP_OR:   y_o = a_i | b_i;
      GP_XOR:  y_o = a_i ^ b_i;
      GP_PASS: y_o = a_i;
      GP_EQ:   y_o = (a_i == b_i) ? 32'sd1 : 32'sd0;
      GP_LT:   y_o = (a_i < b_i) ? 32'sd1 : 32'sd0;
      GP_SHL:  y_o = a_i << b_i[4:0];
      GP_SHR:  y_o = a_i >>> b_i[4:0];
      default: y_o = a_i;
    endcase
  end
endmodule
