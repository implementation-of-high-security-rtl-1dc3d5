// tb_ortho_decryptor: drives random received words and random frame steps
// into the decryptor and checks r_ortho against word ^ reference key; the
// first frame AAAB h with the seed key 0001 h must give back AAAA h.
module tb_ortho_decryptor;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n, step;
  logic [15:0] t_ortho, t_out, key;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ortho_decryptor dut (.clk(clk), .rst_n(rst_n), .step(step), .r_data(t_ortho), .r_ortho(t_out), .key(key));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXB-1:0] k;
    rst_n = 1'b0; step = 1'b0; t_ortho = 16'hAAAB;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1 check(t_out == 16'hAAAA, $sformatf("first frame AAAB -> %h", t_out));
    k = MAXB'(1);
    for (int i = 0; i < 500; i++) begin
      step = 1'($urandom_range(1));
      @(posedge clk);
      if (step) k = ref_lfsr_next(16, k);
      t_ortho = 16'($urandom);
      #1 check(t_out == (t_ortho ^ k[15:0]), $sformatf("i=%0d t_out %h exp %h", i, t_out, t_ortho ^ k[15:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
