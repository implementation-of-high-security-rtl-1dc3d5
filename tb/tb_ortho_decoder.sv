// tb_ortho_decoder: feeds the decoder (A=5, B=16) code words with 0..3 bit
// errors, which must be corrected with the right error count and no req,
// words with 4 errors and fully random words, which must match a brute-force
// nearest-code reference (first minimum, its distance, and whether the
// minimum is shared). It checks that results appear exactly 2**A + 1 edges
// after the start edge and that a start while busy is ignored. An A=4
// instance (B=8, one correctable error) is run the same way.
module tb_ortho_decoder;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;
  int n_req = 0;

  always #5 clk = ~clk;

  // A = 5 instance
  logic        start5, busy5, v5, req5;
  logic [15:0] w5;
  logic [4:0]  out5;
  logic [4:0]  cnt5;
  ortho_decoder dut5 (.clk(clk), .rst_n(rst_n), .start(start5), .r_ortho(w5), .word(), .busy(busy5),
                      .r_valid(v5), .r_out(out5), .count(cnt5), .req(req5));

  // A = 4 instance
  logic        start4, busy4, v4, req4;
  logic [7:0]  w4;
  logic [3:0]  out4;
  logic [3:0]  cnt4;
  ortho_decoder #(.A(4)) dut4 (.clk(clk), .rst_n(rst_n), .start(start4), .r_ortho(w4), .word(), .busy(busy4),
                               .r_valid(v4), .r_out(out4), .count(cnt4), .req(req4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // brute-force reference
  task automatic ref_decode(input int a, input logic [MAXB-1:0] w,
                            output int best, output int mind, output bit tie);
    int b;
    b = 1 << (a - 1);
    mind = b + 1; best = 0; tie = 0;
    for (int i = 0; i < (1 << a); i++) begin
      int d;
      d = ref_dist(w, ref_code(a, i), b);
      if (d < mind) begin
        mind = d; best = i; tie = 0;
      end else if (d == mind) tie = 1;
    end
  endtask

  task automatic run5(input logic [15:0] w, input string tag);
    int best, mind, lat;
    bit tie;
    ref_decode(5, MAXB'(w), best, mind, tie);
    w5 = w; start5 = 1'b1;
    @(posedge clk); #1 start5 = 1'b0; w5 = ~w;   // word must be latched
    lat = 0;
    while (!v5 && lat < 100) begin
      if (lat == 3) start5 = 1'b1;             // ignored while busy
      @(posedge clk); #1 lat++;
      start5 = 1'b0;
    end
    check(lat == 33, $sformatf("%s latency %0d", tag, lat));
    check(out5 == 5'(best) && cnt5 == 5'(mind) && req5 == tie,
          $sformatf("%s w=%h out %0d/%0d cnt %0d/%0d req %0d/%0d", tag, w, out5, best, cnt5, mind, req5, tie));
    if (req5) n_req++;
    @(posedge clk); #1 check(!v5 && !busy5, "idle after result");
  endtask

  task automatic run4(input logic [7:0] w, input string tag);
    int best, mind;
    bit tie;
    ref_decode(4, MAXB'(w), best, mind, tie);
    w4 = w; start4 = 1'b1;
    @(posedge clk); #1 start4 = 1'b0;
    while (!v4) @(posedge clk);
    #1 check(out4 == 4'(best) && cnt4 == 4'(mind) && req4 == tie,
             $sformatf("%s w=%h out %0d/%0d cnt %0d/%0d req %0d/%0d", tag, w, out4, best, cnt4, mind, req4, tie));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXB-1:0] c, e;
    rst_n = 1'b0; start5 = 1'b0; start4 = 1'b0; w5 = '0; w4 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // the word AAAA h (code of data 1 here) clean and with the two errors of
    // the published 8AA8 h receiver example
    run5(16'hAAAA, "AAAA");
    check(out5 == 5'd1 && cnt5 == 5'd0 && !req5, "AAAA h decodes to 1 with no errors");
    run5(16'h8AA8, "8AA8");
    check(out5 == 5'd1 && cnt5 == 5'd2 && !req5, "8AA8 h decodes to 1 with two errors");
    // correctable words: data must come back, count = number of errors
    for (int n = 0; n < 200; n++) begin
      int d, ne;
      d  = int'($urandom_range(31));
      ne = n % 4;
      c  = ref_code(5, d);
      e  = ref_errmask(16, ne);
      run5(16'(c ^ e), $sformatf("corr%0d", n));
      check(out5 == 5'(d) && cnt5 == 5'(ne) && !req5, $sformatf("data %0d with %0d errors", d, ne));
    end
    // four errors and random words: compare with the reference
    for (int n = 0; n < 100; n++) begin
      c = ref_code(5, int'($urandom_range(31))) ^ ref_errmask(16, 4);
      run5(16'(c), $sformatf("four%0d", n));
    end
    for (int n = 0; n < 100; n++) run5(16'($urandom), $sformatf("rand%0d", n));
    check(n_req > 0, "req raised at least once");
    // A = 4: one error corrected
    for (int n = 0; n < 60; n++) begin
      int d;
      d = int'($urandom_range(15));
      c = ref_code(4, d) ^ ref_errmask(8, n % 2);
      run4(8'(c), $sformatf("a4_%0d", n));
      check(out4 == 4'(d) && cnt4 == 4'(n % 2) && !req4, "A=4 corrected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
