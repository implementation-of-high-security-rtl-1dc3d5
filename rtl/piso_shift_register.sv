// piso_shift_register: the transmitter's shift register, turning a B-bit
// cipher word into a serial bit stream.
//
// A `load` pulse (accepted only when not busy) captures `din`. In each of the
// B following clock cycles ser_out carries one bit, MSB (bit B-1) first, with
// ser_valid high; the register shifts on each rising edge. busy is high while
// bits remain, so a new word can be loaded in the cycle after the last bit
// (one idle cycle between frames). The published scheme only says the word is
// sent serially on rising clock edges; bit order, the ser_valid strobe and
// the gap are this design's choices.
//
// Reset is synchronous and active low.
module piso_shift_register #(
  parameter int unsigned B = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [B-1:0] din,
  output logic         ser_out,
  output logic         ser_valid,
  output logic         busy
);

  logic [B-1:0]         sreg;
  logic [$clog2(B+1)-1:0] left;   // bits still to send

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sreg <= '0;
      left <= '0;
    end else if (left == '0) begin
      if (load) begin
        sreg <= din;
        left <= ($clog2(B+1))'(B);
      end
    end else begin
      sreg <= {sreg[B-2:0], 1'b0};
      left <= left - 1'b1;
    end
  end

  assign busy      = (left != '0);
  assign ser_valid = busy;
  assign ser_out   = sreg[B-1];

endmodule
