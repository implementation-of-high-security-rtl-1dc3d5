// tb_lfsr_keygen: checks the key generator against a reference LFSR.
// The 16-bit instance (default parameters) is compared step by step with
// random step enables, must start at the seed, hold when not stepped, and
// return to the seed after exactly 2**16 - 1 steps and not before. An 8-bit
// instance is checked for period 255 as well.
module tb_lfsr_keygen;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic step16, step8;
  logic [15:0] key16;
  logic [7:0]  key8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr_keygen dut16 (.clk(clk), .rst_n(rst_n), .step(step16), .key(key16));
  lfsr_keygen #(.W(8), .SEED(8'h5A)) dut8 (.clk(clk), .rst_n(rst_n), .step(step8), .key(key8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXB-1:0] exp;
    int period;
    rst_n = 1'b0; step16 = 1'b0; step8 = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1 check(key16 == 16'h0001, "16-bit key starts at seed 0001");
    check(key8 == 8'h5A, "8-bit key starts at seed");
    exp = MAXB'(16'h0001);
    for (int i = 0; i < 300; i++) begin
      step16 = 1'($urandom_range(1));
      @(posedge clk);
      if (step16) exp = ref_lfsr_next(16, exp);
      #1 check(key16 == exp[15:0], $sformatf("step %0d key %h exp %h", i, key16, exp[15:0]));
    end
    // period of the 16-bit sequence
    rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1; step16 = 1'b1;
    period = 0;
    do begin
      @(posedge clk); #1 period++;
    end while (key16 != 16'h0001 && period < 70000);
    check(period == 65535, $sformatf("16-bit period %0d", period));
    step16 = 1'b0;
    // period of the 8-bit sequence
    step8 = 1'b1; period = 0;
    do begin
      @(posedge clk); #1 period++;
    end while (key8 != 8'h5A && period < 1000);
    check(period == 255, $sformatf("8-bit period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
