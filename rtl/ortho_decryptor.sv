// ortho_decryptor: removes the key stream from a received word
// (the "Decryptor" block of the receiver: an LFSR and a B-bit XOR).
//
// r_ortho = r_data ^ key, combinational. The LFSR is an lfsr_keygen with the
// same width, taps and SEED as the transmitter's, and `step` is pulsed once
// per received frame, when the frame is handed to the decoder. As long as
// both ends have seen the same number of frames since reset, the key here is
// the key the frame was encrypted with, so bit errors on the line pass
// through unchanged (XOR does not spread them) and the decoder can correct
// them.
//
// Interface: clk, rst_n (synchronous, active low), step, r_data in, r_ortho
// and the current key out.
module ortho_decryptor #(
  parameter int unsigned  B    = 16,
  parameter logic [B-1:0] SEED = B'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic [B-1:0] r_data,
  output logic [B-1:0] r_ortho,
  output logic [B-1:0] key
);

  lfsr_keygen #(.W(B), .SEED(SEED)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .step (step),
    .key  (key)
  );

  assign r_ortho = r_data ^ key;

endmodule
