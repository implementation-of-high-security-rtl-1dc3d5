// ortho_crypto_system: a complete link, transmitter to receiver.
//
// Data words of A bits are mapped to B = 2**(A-1) bit orthogonal code words,
// encrypted by XOR with an LFSR key that changes every frame, and sent one bit
// per clock. The receiver decrypts with an identical LFSR, finds the nearest
// code word by Hamming distance, and returns the data, the number of bit
// errors it corrected, and a resend request when the nearest code word is
// ambiguous.
//
// The serial line between the two ends is modelled by one XOR: chan_err high
// flips the bit on the line in that cycle, standing in for channel noise. It
// is this design's test access, not part of the published scheme.
//
// Interface: the transmitter's t_valid/t_ready/t_data with the t_ortho and
// t_out views, the line itself (ser, ser_valid), and the receiver's r_data,
// r_ortho, r_valid, r_out, count, req and overrun. Send a word only when the
// previous one has been decoded (or at least 2B + 2 cycles apart) to avoid an
// overrun. Reset is synchronous, active low.
module ortho_crypto_system
  import ortho_pkg::*;
#(
  parameter int unsigned  A    = 5,
  parameter int unsigned  B    = 2 ** (A - 1),
  parameter logic [B-1:0] SEED = B'(1),
  parameter int unsigned  CW   = $clog2(B + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // transmitter side
  input  logic          t_valid,
  output logic          t_ready,
  input  logic [A-1:0]  t_data,
  output logic [B-1:0]  t_ortho,
  output logic [B-1:0]  t_out,
  // channel
  input  logic          chan_err,
  output logic          ser,
  output logic          ser_valid,
  // receiver side
  output logic [B-1:0]  r_data,
  output logic [B-1:0]  r_ortho,
  output logic          r_valid,
  output logic [A-1:0]  r_out,
  output logic [CW-1:0] count,
  output logic          req,
  output logic          overrun
);

  logic tx_ser;

  ortho_transmitter #(.A(A), .B(B), .SEED(SEED)) u_tx (
    .clk      (clk),
    .rst_n    (rst_n),
    .t_valid  (t_valid),
    .t_ready  (t_ready),
    .t_data   (t_data),
    .t_ortho  (t_ortho),
    .t_out    (t_out),
    .ser_out  (tx_ser),
    .ser_valid(ser_valid)
  );

  assign ser = tx_ser ^ (chan_err && ser_valid);

  ortho_receiver #(.A(A), .B(B), .SEED(SEED), .CW(CW)) u_rx (
    .clk      (clk),
    .rst_n    (rst_n),
    .ser_in   (ser),
    .ser_valid(ser_valid),
    .r_data   (r_data),
    .r_ortho  (r_ortho),
    .r_valid  (r_valid),
    .r_out    (r_out),
    .count    (count),
    .req      (req),
    .overrun  (overrun)
  );

endmodule
