// salsa_sw_alu: Smith-Waterman cell update with a linear gap penalty.
//
// One of the three alignment ALUs the document places in every PE. In the
// systolic mapping, a PE holds one query character q and receives, each
// step, a database character c and the score "up" = H(i-1,j) of its left
// neighbour. With "diag" = H(i-1,j-1) and "left" = H(i,j-1) kept in the PE,
//   H(i,j) = max(0, diag + s(q,c), up - gap, left - gap)
// where s is the match score if q == c and the mismatch score otherwise.
// Combinational, one cell per clock. The recurrence is the textbook one; the
// document names the ALU but does not print its equations.
module salsa_sw_alu
  import salsa_pkg::*;
(
  input  logic        [DATA_W-1:0] q_i,        // query character held by the PE
  input  logic        [DATA_W-1:0] c_i,        // database character from the left
  input  logic signed [DATA_W-1:0] up_i,       // H(i-1,j)
  input  logic signed [DATA_W-1:0] diag_i,     // H(i-1,j-1)
  input  logic signed [DATA_W-1:0] left_i,     // H(i,j-1)
  input  logic signed [DATA_W-1:0] match_i,
  input  logic signed [DATA_W-1:0] mismatch_i,
  input  logic signed [DATA_W-1:0] gap_i,
  output logic signed [DATA_W-1:0] h_o
);
  logic signed [DATA_W-1:0] d, u, l, m1, m2;
  always_comb begin
    d  = diag_i + ((q_i == c_i) ? match_i : mismatch_i);
    u  = up_i - gap_i;
    l  = left_i - gap_i;
    m1 = (d > u) ? d : u;
    m2 = (l > 0) ? l : '0;
    h_o = (m1 > m2) ? m1 : m2;
  end
endmodule
