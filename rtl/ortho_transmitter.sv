// ortho_transmitter: the sending end of the link: encoder, encryptor and
// shift register in a row.
//
// An A-bit word offered with t_valid while t_ready is high is mapped to its
// B = 2**(A-1) bit orthogonal code (t_ortho), XORed with the current LFSR key
// (t_out) and loaded into the shift register at the clock edge; the key
// advances on that same edge. The shift register then drives the B cipher
// bits, first bit = t_out[B-1], on ser_out in the next B cycles with
// ser_valid high. t_ready is low while a frame is being sent, so one word can
// be taken every B + 1 cycles. t_ortho and t_out are combinational views of
// the word currently presented on t_data.
//
// The three-block structure follows the published transmitter; the
// valid/ready handshake is this design's own. Reset is synchronous, active
// low.
module ortho_transmitter #(
  parameter int unsigned  A    = 5,
  parameter int unsigned  B    = 2 ** (A - 1),
  parameter logic [B-1:0] SEED = B'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         t_valid,
  output logic         t_ready,
  input  logic [A-1:0] t_data,
  output logic [B-1:0] t_ortho,
  output logic [B-1:0] t_out,
  output logic         ser_out,
  output logic         ser_valid
);

  logic take;
  logic busy;

  assign t_ready = !busy;
  assign take    = t_valid && t_ready;

  ortho_encoder #(.A(A), .B(B)) u_enc (
    .t_data (t_data),
    .t_ortho(t_ortho)
  );

  ortho_encryptor #(.B(B), .SEED(SEED)) u_encr (
    .clk    (clk),
    .rst_n  (rst_n),
    .step   (take),
    .t_ortho(t_ortho),
    .t_out  (t_out),
    .key    ()
  );

  piso_shift_register #(.B(B)) u_sr (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (take),
    .din      (t_out),
    .ser_out  (ser_out),
    .ser_valid(ser_valid),
    .busy     (busy)
  );

endmodule
