// tb_ortho_transmitter: sends random 5-bit words through the transmitter
// and captures the serial line. Each frame must be the reference code word
// XOR the reference key for that frame, MSB first over 16 cycles; t_ready
// must be low for exactly those 16 cycles. The first frame is the published
// example: data 01001 with the seed key 0001 h, so t_out = t_ortho ^ 0001 h.
module tb_ortho_transmitter;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n, t_valid, t_ready, ser_out, ser_valid;
  logic [4:0]  t_data;
  logic [15:0] t_ortho, t_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ortho_transmitter dut (.clk(clk), .rst_n(rst_n), .t_valid(t_valid), .t_ready(t_ready),
                         .t_data(t_data), .t_ortho(t_ortho), .t_out(t_out),
                         .ser_out(ser_out), .ser_valid(ser_valid));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXB-1:0] k, c;
    logic [15:0] got;
    int d;
    rst_n = 1'b0; t_valid = 1'b0; t_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    k = MAXB'(1);
    for (int f = 0; f < 150; f++) begin
      d = (f == 0) ? 5'b01001 : int'($urandom_range(31));
      c = ref_code(5, d);
      t_data = 5'(d); t_valid = 1'b1;
      #1 check(t_ready && !ser_valid, "ready when idle");
      check(t_ortho == c[15:0], $sformatf("frame %0d t_ortho %h exp %h", f, t_ortho, c[15:0]));
      check(t_out == (c[15:0] ^ k[15:0]), $sformatf("frame %0d t_out %h", f, t_out));
      if (f == 0) check(t_out == (t_ortho ^ 16'h0001), "first key is 0001");
      @(posedge clk); #1 t_valid = 1'b1; t_data = ~t_data;   // offered while busy: not taken
      got = '0;
      for (int i = 0; i < 16; i++) begin
        check(ser_valid && !t_ready, $sformatf("frame %0d bit %0d strobe", f, i));
        got = {got[14:0], ser_out};
        @(posedge clk); #1;
      end
      t_valid = 1'b0;
      check(got == (c[15:0] ^ k[15:0]), $sformatf("frame %0d line %h exp %h", f, got, c[15:0] ^ k[15:0]));
      k = ref_lfsr_next(16, k);
      repeat ($urandom_range(2)) begin
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
