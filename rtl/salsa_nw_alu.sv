// salsa_nw_alu: Needleman-Wunsch (global alignment) cell update.
//
// Same data flow as the Smith-Waterman ALU (query character in the PE,
// database character and H(i-1,j) from the left neighbour, H(i-1,j-1) and
// H(i,j-1) held locally) but without the clamp at zero:
//   H(i,j) = max(diag + s(q,c), up - gap, left - gap)
// The first row and column of the matrix come from the boundary values that
// the program loads (column 0, per PE) and from the data selector (row 0).
// Combinational. The equations are the textbook ones; the document only
// names the ALU.
module salsa_nw_alu
  import salsa_pkg::*;
(
  input  logic        [DATA_W-1:0] q_i,
  input  logic        [DATA_W-1:0] c_i,
  input  logic signed [DATA_W-1:0] up_i,
  input  logic signed [DATA_W-1:0] diag_i,
  input  logic signed [DATA_W-1:0] left_i,
  input  logic signed [DATA_W-1:0] match_i,
  input  logic signed [DATA_W-1:0] mismatch_i,
  input  logic signed [DATA_W-1:0] gap_i,
  output logic signed [DATA_W-1:0] h_o
);
  logic signed [DATA_W-1:0] d, u, l, m1;
  always_comb begin
    d  = diag_i + ((q_i == c_i) ? match_i : mismatch_i);
    u  = up_i - gap_i;
    l  = left_i - gap_i;
    m1 = (d > u) ? d : u;
    h_o = (m1 > l) ? m1 : l;
  end
endmodule
