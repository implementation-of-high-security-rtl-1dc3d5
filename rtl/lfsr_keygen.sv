// lfsr_keygen: key-stream generator for the encryptor and the decryptor.
//
// A W-bit Fibonacci LFSR. The state itself is the key word: the encryptor and
// the decryptor each XOR a whole code word with it. The register shifts one
// place towards the MSB on every clock edge where `step` is high, bit 0
// taking the XOR of the tap bits. The taps are the TAPS parameter, the
// coefficients of the characteristic polynomial; the default is the
// maximal-length set from ortho_pkg::lfsr_taps, so the key sequence repeats
// only after 2**W - 1 steps.
//
// The transmitter and the receiver each hold one of these with the same SEED
// and step it once per frame, so both see the same key for the same frame.
// SEED = 1 reproduces the first key of the published transmitter example
// (code AAAA h encrypted to AAAB h). Stepping once per frame and the tap set
// are this design's choices.
//
// Timing: `key` is a register output; the step takes effect at the edge.
// Reset is synchronous and active low; it reloads SEED.
module lfsr_keygen
  import ortho_pkg::*;
#(
  parameter int unsigned    W    = 16,
  parameter logic [W-1:0]   SEED = W'(1),
  // Feedback polynomial: bit n-1 set for each term x^n (n = 1..W) of the
  // characteristic polynomial; the constant term is implied.
  parameter logic [W-1:0]   TAPS = W'(lfsr_taps(W))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  output logic [W-1:0] key
);

  initial assert (SEED != '0) else $error("lfsr_keygen: SEED must be non-zero");

  always_ff @(posedge clk) begin
    if (!rst_n)    key <= SEED;
    else if (step) key <= {key[W-2:0], ^(key & TAPS)};
  end

endmodule
