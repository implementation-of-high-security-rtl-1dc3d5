// tb_ortho_receiver: sends frames built by the reference model (code word
// XOR frame key XOR an error pattern) into the receiver, bit by bit. With
// 0..3 errors the data must come back with count = errors and no req;
// other words are compared with a brute-force nearest-code reference. The
// result must appear exactly 2B + 2 = 34 cycles after the edge that takes the
// last bit. One frame is sent while the decoder is busy: it must raise
// overrun, be dropped, and the frames after it must still decrypt.
module tb_ortho_receiver;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n, ser_in, ser_valid, r_valid, req, overrun;
  logic [15:0] r_data, r_ortho;
  logic [4:0]  r_out, count;
  int checks = 0, failures = 0;
  int n_overrun = 0, n_req = 0, n_corr = 0;
  logic [MAXB-1:0] k;

  always #5 clk = ~clk;

  ortho_receiver dut (.clk(clk), .rst_n(rst_n), .ser_in(ser_in), .ser_valid(ser_valid),
                      .r_data(r_data), .r_ortho(r_ortho), .r_valid(r_valid), .r_out(r_out),
                      .count(count), .req(req), .overrun(overrun));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && overrun) n_overrun++;

  task automatic send(input logic [15:0] w);
    for (int i = 15; i >= 0; i--) begin
      ser_valid = 1'b1; ser_in = w[i];
      @(posedge clk); #1;
    end
    ser_valid = 1'b0;
  endtask

  task automatic ref_decode(input logic [MAXB-1:0] w, output int best, output int mind, output bit tie);
    mind = 99; best = 0; tie = 0;
    for (int i = 0; i < 32; i++) begin
      int dd;
      dd = ref_dist(w, ref_code(5, i), 16);
      if (dd < mind) begin
        mind = dd; best = i; tie = 0;
      end else if (dd == mind) tie = 1;
    end
  endtask

  task automatic frame(input int d, input int ne, input bit random_word, input string tag);
    logic [MAXB-1:0] c;
    int lat, best, mind;
    bit tie;
    c = random_word ? MAXB'(16'($urandom)) : (ref_code(5, d) ^ ref_errmask(16, ne));
    ref_decode(c, best, mind, tie);
    send(16'(c ^ k));
    k = ref_lfsr_next(16, k);
    lat = 0;   // edges counted from the one that took the last bit
    while (!r_valid && lat < 200) begin
      @(posedge clk); #1 lat++;
    end
    check(lat == 34, $sformatf("%s latency %0d", tag, lat));
    check(r_ortho == 16'(c), $sformatf("%s r_ortho %h exp %h", tag, r_ortho, 16'(c)));
    check(r_out == 5'(best) && count == 5'(mind) && req == tie,
          $sformatf("%s out %0d/%0d cnt %0d/%0d req %0d/%0d", tag, r_out, best, count, mind, req, tie));
    if (!random_word && ne < 4) begin
      check(r_out == 5'(d) && count == 5'(ne) && !req, $sformatf("%s corrected", tag));
      if (ne > 0) n_corr++;
    end
    if (req) n_req++;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; ser_in = 1'b0; ser_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    k = MAXB'(1);
    for (int n = 0; n < 120; n++) frame(int'($urandom_range(31)), n % 4, 1'b0, $sformatf("f%0d", n));
    for (int n = 0; n < 60; n++)  frame(int'($urandom_range(31)), 4, 1'b0, $sformatf("four%0d", n));
    for (int n = 0; n < 40; n++)  frame(0, 0, 1'b1, $sformatf("rand%0d", n));
    // overrun: two frames back to back; the second is dropped
    send(16'(ref_code(5, 3) ^ k)); k = ref_lfsr_next(16, k);
    @(posedge clk); #1;
    check(n_overrun == 0, "no overrun yet");
    send(16'(ref_code(5, 7) ^ k)); k = ref_lfsr_next(16, k);
    @(posedge clk); #1;
    check(n_overrun == 1, $sformatf("overrun seen %0d", n_overrun));
    while (!r_valid) @(posedge clk);
    #1 check(r_out == 5'd3 && count == 0, "first of the pair decoded");
    for (int n = 0; n < 20; n++) frame(int'($urandom_range(31)), n % 4, 1'b0, $sformatf("after%0d", n));
    check(n_req > 0, "req seen");
    check(n_corr > 0, "correction seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
