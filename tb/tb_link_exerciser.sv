// tb_link_exerciser: drives one ortho_crypto_system of data width A end to
// end: NFRAMES random words, each with a random number (0 .. B/4-1) of bit
// errors injected on the line, every one of which must be corrected with the
// right count, no req, and a result 2B + 2 cycles after the last bit. Used by
// tb_workloads for the data widths other than the default.
module tb_link_exerciser
  import tb_ref_pkg::*;
#(
  parameter int A       = 4,
  parameter int NFRAMES = 40
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int B  = 1 << (A - 1);
  localparam int CW = $clog2(B + 1);

  logic rst_n, t_valid, t_ready, chan_err, ser, ser_valid, r_valid, req, overrun;
  logic [A-1:0]  t_data, r_out;
  logic [B-1:0]  t_ortho, t_out, r_data, r_ortho;
  logic [CW-1:0] count;

  ortho_crypto_system #(.A(A)) dut (
    .clk(clk), .rst_n(rst_n),
    .t_valid(t_valid), .t_ready(t_ready), .t_data(t_data), .t_ortho(t_ortho), .t_out(t_out),
    .chan_err(chan_err), .ser(ser), .ser_valid(ser_valid),
    .r_data(r_data), .r_ortho(r_ortho), .r_valid(r_valid), .r_out(r_out),
    .count(count), .req(req), .overrun(overrun));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (A=%0d): %s", A, what);
    end
  endtask

  initial begin
    logic [MAXB-1:0] em;
    int d, ne, lat;
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; t_valid = 1'b0; t_data = '0; chan_err = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      d  = int'($urandom_range((1 << A) - 1));
      ne = (f < 2) ? f * (B / 4 - 1) : int'($urandom_range(B / 4 - 1));
      em = ref_errmask(B, ne);
      t_data = A'(d); t_valid = 1'b1;
      @(posedge clk); #1 t_valid = 1'b0;
      for (int i = B - 1; i >= 0; i--) begin
        chan_err = em[i];
        @(posedge clk); #1;
      end
      chan_err = 1'b0;
      lat = 0;
      while (!r_valid && lat < 1000) begin
        @(posedge clk); #1 lat++;
      end
      check(lat == 2 * B + 2, $sformatf("frame %0d latency %0d", f, lat));
      check(r_out == A'(d) && count == CW'(ne) && !req && !overrun,
            $sformatf("frame %0d data %0d -> %0d, errors %0d -> %0d, req %0d", f, d, r_out, ne, count, req));
    end
    done = 1'b1;
  end
endmodule
