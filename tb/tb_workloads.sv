// tb_workloads: runs the link at the other data widths of the evaluated
// set, 4, 6, 7 and 8 bits (8-, 32-, 64- and 128-bit codes), each through
// tb_link_exerciser: random words carrying up to B/4 - 1 line errors (1, 7,
// 15 and 31 errors) must all be corrected, each in 2B + 2 cycles.
module tb_workloads;
  logic clk = 1'b0;
  logic d4, d6, d7, d8;
  int c4, c6, c7, c8, f4, f6, f7, f8;
  int checks, failures;

  always #5 clk = ~clk;

  tb_link_exerciser #(.A(4), .NFRAMES(60)) w4 (.clk(clk), .done(d4), .checks(c4), .failures(f4));
  tb_link_exerciser #(.A(6), .NFRAMES(40)) w6 (.clk(clk), .done(d6), .checks(c6), .failures(f6));
  tb_link_exerciser #(.A(7), .NFRAMES(30)) w7 (.clk(clk), .done(d7), .checks(c7), .failures(f7));
  tb_link_exerciser #(.A(8), .NFRAMES(20)) w8 (.clk(clk), .done(d8), .checks(c8), .failures(f8));

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c6 + c7 + c8, f4 + f6 + f7 + f8 + 1);
    $finish;
  end

  initial begin
    wait (d4 && d6 && d7 && d8);
    checks   = c4 + c6 + c7 + c8;
    failures = f4 + f6 + f7 + f8;
    $display("widths 4/6/7/8: checks %0d/%0d/%0d/%0d failures %0d/%0d/%0d/%0d", c4, c6, c7, c8, f4, f6, f7, f8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
