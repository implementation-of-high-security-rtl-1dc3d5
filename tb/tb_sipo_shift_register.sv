// tb_sipo_shift_register: sends random 16-bit frames bit by bit, MSB first,
// with random idle cycles between the bits, and checks that frame_done
// pulses exactly once per frame, on the edge of the last bit, with r_data
// equal to the frame, and that r_data holds between frames.
module tb_sipo_shift_register;
  logic clk = 1'b0;
  logic rst_n, ser_in, ser_valid;
  logic [15:0] r_data;
  logic frame_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sipo_shift_register dut (.clk(clk), .rst_n(rst_n), .ser_in(ser_in), .ser_valid(ser_valid),
                           .r_data(r_data), .frame_done(frame_done));

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
    logic [15:0] w, prev;
    rst_n = 1'b0; ser_in = 1'b0; ser_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    prev = '0;
    for (int f = 0; f < 100; f++) begin
      w = 16'($urandom);
      for (int i = 15; i >= 0; i--) begin
        if ($urandom_range(3) == 0) begin
          ser_valid = 1'b0; ser_in = 1'($urandom);
          @(posedge clk); #1 check(!frame_done && r_data == prev, "idle cycle");
        end
        ser_valid = 1'b1; ser_in = w[i];
        @(posedge clk); #1;
        if (i != 0) check(!frame_done && r_data == prev, $sformatf("frame %0d bit %0d no done", f, i));
      end
      check(frame_done, $sformatf("frame %0d done pulse", f));
      check(r_data == w, $sformatf("frame %0d r_data %h exp %h", f, r_data, w));
      prev = w;
      ser_valid = 1'b0;
      @(posedge clk); #1 check(!frame_done && r_data == w, "done is one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
