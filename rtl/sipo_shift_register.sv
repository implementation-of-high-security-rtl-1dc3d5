// sipo_shift_register: the receiver's shift register, turning the serial
// bit stream back into B-bit words.
//
// Each clock edge with ser_valid high shifts ser_in into the LSB; the first
// bit of a frame ends up as bit B-1. After the B-th bit the whole word is
// copied to r_data, which holds it until the next frame is complete, and
// frame_done pulses for one cycle. Framing is by count: the receiver is in
// step with the transmitter from reset and ser_valid marks each frame bit.
// Bit order, framing and the held output word are this design's choices.
//
// Timing: r_data and frame_done change at the edge that samples the last bit.
// Reset is synchronous and active low.
module sipo_shift_register #(
  parameter int unsigned B = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ser_in,
  input  logic         ser_valid,
  output logic [B-1:0] r_data,
  output logic         frame_done
);

  logic [B-2:0]         sreg;   // first B-1 bits of the frame
  logic [$clog2(B)-1:0] got;   // bits of the current frame received

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sreg       <= '0;
      got        <= '0;
      r_data     <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (ser_valid) begin
        sreg <= {sreg[B-3:0], ser_in};
        if (got == ($clog2(B))'(B - 1)) begin
          got        <= '0;
          r_data     <= {sreg[B-2:0], ser_in};
          frame_done <= 1'b1;
        end else begin
          got <= got + 1'b1;
        end
      end
    end
  end

  // A frame completes at most once every B cycles.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) frame_done |=> !frame_done);

endmodule
