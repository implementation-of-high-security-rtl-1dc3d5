// ortho_encoder: maps an A-bit data word onto its B = 2**(A-1) bit
// bi-orthogonal code word (the "Mapping" block of the transmitter).
//
// Combinational. t_data[A-2:0] selects row t_data[A-2:0] of the B x B
// Sylvester-Hadamard matrix, code bit p = parity(t_data[A-2:0] & p), and
// t_data[A-1] inverts the row. The 2**A code words have equal numbers of
// ones and zeros (except the all-zero and all-one pair) and any two differ in
// at least B/2 bits. The code length and the use of orthogonal codes follow
// the published scheme; the row assignment is this design's choice (see
// ortho_pkg).
module ortho_encoder
  import ortho_pkg::*;
#(
  parameter int unsigned A = 5,
  parameter int unsigned B = 2 ** (A - 1)
) (
  input  logic [A-1:0] t_data,
  output logic [B-1:0] t_ortho
);

  logic [B-1:0] row;     // Hadamard row before inversion

  always_comb begin
    for (int unsigned p = 0; p < B; p++) begin
      row[p] = ^(t_data[A-2:0] & (A-1)'(p));
    end
    t_ortho = row ^ {B{t_data[A-1]}};
  end

endmodule
