// ortho_receiver: the receiving end of the link: shift register, decryptor
// and decoder in a row, the mirror image of ortho_transmitter.
//
// The shift register assembles B serial bits into r_data. On the cycle
// after a frame completes, the decoder latches r_ortho = r_data ^ key and the
// receiver's LFSR advances, keeping it in step with the transmitter's.
// r_ortho shows that latched decrypted word until the next one is taken. The
// decoder then searches its table and, 2B + 2 cycles after the edge that
// sampled the last bit, pulses r_valid with the corrected data r_out, the
// number of corrected bit errors (count) and req, the resend request raised
// when the nearest code word is not unique.
//
// The decoder is busy for 2B + 1 cycles per word while a frame takes B
// cycles on the line, so frames must be spaced at least 2B + 2 cycles apart.
// A frame that completes while the decoder is still busy is dropped and
// `overrun` pulses; its key step is still taken so later frames decrypt
// correctly. The overrun flag is this design's addition. Reset is
// synchronous, active low.
module ortho_receiver
  import ortho_pkg::*;
#(
  parameter int unsigned  A    = 5,
  parameter int unsigned  B    = 2 ** (A - 1),
  parameter logic [B-1:0] SEED = B'(1),
  parameter int unsigned  CW   = $clog2(B + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ser_in,
  input  logic          ser_valid,
  output logic [B-1:0]  r_data,
  output logic [B-1:0]  r_ortho,
  output logic          r_valid,
  output logic [A-1:0]  r_out,
  output logic [CW-1:0] count,
  output logic          req,
  output logic          overrun
);

  logic         frame_done;
  logic         dec_busy;
  logic [B-1:0] decrypted;   // r_data ^ key, taken by the decoder on start

  sipo_shift_register #(.B(B)) u_sr (
    .clk       (clk),
    .rst_n     (rst_n),
    .ser_in    (ser_in),
    .ser_valid (ser_valid),
    .r_data    (r_data),
    .frame_done(frame_done)
  );

  ortho_decryptor #(.B(B), .SEED(SEED)) u_decr (
    .clk    (clk),
    .rst_n  (rst_n),
    .step   (frame_done),
    .r_data (r_data),
    .r_ortho(decrypted),
    .key    ()
  );

  ortho_decoder #(.A(A), .B(B), .CW(CW)) u_dec (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (frame_done),
    .r_ortho(decrypted),
    .word   (r_ortho),
    .busy   (dec_busy),
    .r_valid(r_valid),
    .r_out  (r_out),
    .count  (count),
    .req    (req)
  );

  assign overrun = frame_done && dec_busy;

endmodule
