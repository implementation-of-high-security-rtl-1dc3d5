// tb_ortho_encoder: checks every code word of the default (A=5, B=16)
// encoder and of A=4 and A=8 instances against a reference built by
// Sylvester doubling, and checks the code properties directly: every word
// except the all-zero/all-one pair is balanced and any two words differ in
// at least B/2 bits.
module tb_ortho_encoder;
  import tb_ref_pkg::*;

  logic [4:0]   d5;  logic [15:0]  c5;
  logic [3:0]   d4;  logic [7:0]   c4;
  logic [7:0]   d8;  logic [127:0] c8;
  logic [15:0]  all5 [32];
  int checks = 0, failures = 0;

  ortho_encoder dut5 (.t_data(d5), .t_ortho(c5));
  ortho_encoder #(.A(4)) dut4 (.t_data(d4), .t_ortho(c4));
  ortho_encoder #(.A(8)) dut8 (.t_data(d8), .t_ortho(c8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXB-1:0] r;
    for (int v = 0; v < 32; v++) begin
      d5 = 5'(v); #1;
      r = ref_code(5, v);
      check(c5 == r[15:0], $sformatf("A=5 data %0d code %h exp %h", v, c5, r[15:0]));
      all5[v] = c5;
      if (v != 0 && v != 16) check($countones(c5) == 8, $sformatf("A=5 data %0d unbalanced", v));
    end
    for (int i = 0; i < 32; i++)
      for (int j = i + 1; j < 32; j++)
        check(ref_dist(MAXB'(all5[i]), MAXB'(all5[j]), 16) >= 8, $sformatf("distance %0d-%0d", i, j));
    for (int v = 0; v < 16; v++) begin
      d4 = 4'(v); #1;
      r = ref_code(4, v);
      check(c4 == r[7:0], $sformatf("A=4 data %0d", v));
    end
    for (int v = 0; v < 256; v++) begin
      d8 = 8'(v); #1;
      r = ref_code(8, v);
      check(c8 == r[127:0], $sformatf("A=8 data %0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
