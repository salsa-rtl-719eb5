// salsa_swa_alu: Smith-Waterman cell update with affine gap penalties.
//
// Gotoh's recurrence, with gap_open the cost of a gap's first character and
// gap_ext the cost of each further one:
//   E(i,j) = max(E(i,j-1) - ext, H(i,j-1) - open)   gap along the database
//   F(i,j) = max(F(i-1,j) - ext, H(i-1,j) - open)   gap along the query
//   H(i,j) = max(0, H(i-1,j-1) + s(q,c), E(i,j), F(i,j))
// E and H(i,j-1) are kept in the PE; F(i-1,j) and H(i-1,j) arrive from the
// left neighbour's shared output registers. Combinational. The document
// names an "affine version of the Smith-Waterman" ALU; the equations and the
// meaning of the two penalties are this design's (standard) reading.
module salsa_swa_alu
  import salsa_pkg::*;
(
  input  logic        [DATA_W-1:0] q_i,
  input  logic        [DATA_W-1:0] c_i,
  input  logic signed [DATA_W-1:0] up_h_i,    // H(i-1,j)
  input  logic signed [DATA_W-1:0] up_f_i,    // F(i-1,j)
  input  logic signed [DATA_W-1:0] diag_i,    // H(i-1,j-1)
  input  logic signed [DATA_W-1:0] left_h_i,  // H(i,j-1)
  input  logic signed [DATA_W-1:0] left_e_i,  // E(i,j-1)
  input  logic signed [DATA_W-1:0] match_i,
  input  logic signed [DATA_W-1:0] mismatch_i,
  input  logic signed [DATA_W-1:0] open_i,
  input  logic signed [DATA_W-1:0] ext_i,
  output logic signed [DATA_W-1:0] h_o,
  output logic signed [DATA_W-1:0] e_o,
  output logic signed [DATA_W-1:0] f_o
);
  logic signed [DATA_W-1:0] e1, e2, f1, f2, d, m1, m2;
  always_comb begin
    e1 = left_e_i - ext_i;
    e2 = left_h_i - open_i;
    e_o = (e1 > e2) ? e1 : e2;
    f1 = up_f_i - ext_i;
    f2 = up_h_i - open_i;
    f_o = (f1 > f2) ? f1 : f2;
    d  = diag_i + ((q_i == c_i) ? match_i : mismatch_i);
    m1 = (d > e_o) ? d : e_o;
    m2 = (f_o > 0) ? f_o : '0;
    h_o = (m1 > m2) ? m1 : m2;
  end
endmodule
