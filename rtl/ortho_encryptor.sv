// ortho_encryptor: encrypts a code word with the LFSR key stream
// (the "Encryptor" block of the transmitter: an LFSR and a B-bit XOR).
//
// t_out = t_ortho ^ key, combinational, where key is the state of an
// lfsr_keygen. `step` is pulsed once for every frame the transmitter takes,
// on the same edge that loads t_out into the shift register, so each frame
// gets a fresh key. After reset the first key is SEED (1 by default, which
// turns code AAAA h into AAAB h as in the published example).
//
// Interface: clk, rst_n (synchronous, active low), step, t_ortho in, t_out
// and the current key out.
module ortho_encryptor #(
  parameter int unsigned  B    = 16,
  parameter logic [B-1:0] SEED = B'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic [B-1:0] t_ortho,
  output logic [B-1:0] t_out,
  output logic [B-1:0] key
);

  lfsr_keygen #(.W(B), .SEED(SEED)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .step (step),
    .key  (key)
  );

  assign t_out = t_ortho ^ key;

endmodule
