// tb_piso_shift_register: loads random words at random times and checks
// that each is sent MSB first over exactly B cycles with ser_valid high,
// that busy blocks a load during a frame, and that ser_valid is low when idle.
module tb_piso_shift_register;
  logic clk = 1'b0;
  logic rst_n, load;
  logic [15:0] din;
  logic ser_out, ser_valid, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  piso_shift_register dut (.clk(clk), .rst_n(rst_n), .load(load), .din(din),
                           .ser_out(ser_out), .ser_valid(ser_valid), .busy(busy));

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
    logic [15:0] w, got;
    rst_n = 1'b0; load = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1 check(!ser_valid && !busy, "idle after reset");
    for (int f = 0; f < 100; f++) begin
      repeat ($urandom_range(3)) begin
        @(posedge clk); #1 check(!ser_valid, "ser_valid low while idle");
      end
      w = 16'($urandom);
      din = w; load = 1'b1;
      @(posedge clk); #1 load = 1'b0;
      got = '0;
      for (int i = 0; i < 16; i++) begin
        check(ser_valid && busy, $sformatf("frame %0d bit %0d valid", f, i));
        got = {got[14:0], ser_out};
        if (i == 5) begin
          // a load during a frame must be ignored
          din = ~w; load = 1'b1;
        end
        @(posedge clk); #1 load = 1'b0;
      end
      check(got == w, $sformatf("frame %0d sent %h exp %h", f, got, w));
      check(!busy && !ser_valid, "idle after B bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
