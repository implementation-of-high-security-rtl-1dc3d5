// tb_ortho_crypto_system: end-to-end test of the whole link at its default
// size (5-bit data, 16-bit code and key).
//
// Random data words are sent through transmitter, channel and receiver while
// chan_err flips chosen bits on the line. Every word sent with 0..3 flipped
// bits must arrive intact with count equal to the flips and no req; words
// with 4 flips must either arrive intact or raise req, as a brute-force
// reference says. The result must come 2B + 2 = 34 cycles after the last bit.
// The test also checks the published transmitter example (data 01001, key
// 0001 h), that the key changes from frame to frame, and provokes one
// overrun. Each mechanism (clean frame, corrected frame, resend request,
// overrun, key change) is counted and must occur at least once.
module tb_ortho_crypto_system;
  import tb_ref_pkg::*;

  localparam int A = 5;
  localparam int B = 16;

  logic clk = 1'b0;
  logic rst_n, t_valid, t_ready, chan_err, ser, ser_valid, r_valid, req, overrun;
  logic [A-1:0] t_data, r_out;
  logic [B-1:0] t_ortho, t_out, r_data, r_ortho;
  logic [4:0]   count;
  int checks = 0, failures = 0;
  int n_clean = 0, n_corrected = 0, n_req = 0, n_overrun = 0, n_keychange = 0;
  logic [B-1:0] last_key;

  always #5 clk = ~clk;

  ortho_crypto_system dut (
    .clk(clk), .rst_n(rst_n),
    .t_valid(t_valid), .t_ready(t_ready), .t_data(t_data), .t_ortho(t_ortho), .t_out(t_out),
    .chan_err(chan_err), .ser(ser), .ser_valid(ser_valid),
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

  task automatic ref_decode(input logic [MAXB-1:0] w, output int best, output int mind, output bit tie);
    mind = 99; best = 0; tie = 0;
    for (int i = 0; i < (1 << A); i++) begin
      int dd;
      dd = ref_dist(w, ref_code(A, i), B);
      if (dd < mind) begin
        mind = dd; best = i; tie = 0;
      end else if (dd == mind) tie = 1;
    end
  endtask

  // Send one word with the given error mask on the line and check the result.
  task automatic xfer(input int d, input logic [MAXB-1:0] emask, input string tag);
    int ne, lat, best, mind;
    bit tie;
    logic [B-1:0] key;
    ne = ref_dist(emask, '0, B);
    ref_decode(ref_code(A, d) ^ emask, best, mind, tie);
    while (!t_ready) begin
      @(posedge clk); #1;
    end
    t_data = A'(d); t_valid = 1'b1;
    #1 key = t_out ^ t_ortho;
    if (key != last_key) n_keychange++;
    last_key = key;
    @(posedge clk); #1 t_valid = 1'b0;
    for (int i = B - 1; i >= 0; i--) begin
      check(ser_valid, $sformatf("%s bit strobe", tag));
      chan_err = emask[i];
      @(posedge clk); #1;
    end
    chan_err = 1'b0;
    lat = 0;
    while (!r_valid && lat < 200) begin
      @(posedge clk); #1 lat++;
    end
    check(lat == 2 * B + 2, $sformatf("%s latency %0d", tag, lat));
    check(r_ortho == B'(ref_code(A, d) ^ emask), $sformatf("%s r_ortho %h", tag, r_ortho));
    check(r_out == A'(best) && count == 5'(mind) && req == tie,
          $sformatf("%s out %0d/%0d cnt %0d/%0d req %0d/%0d", tag, r_out, best, count, mind, req, tie));
    if (ne < B / 4) begin
      check(r_out == A'(d) && count == 5'(ne) && !req, $sformatf("%s: %0d errors corrected", tag, ne));
      if (ne == 0) n_clean++; else n_corrected++;
    end else begin
      check(req || r_out == A'(d), $sformatf("%s: 4 errors neither corrected nor flagged", tag));
    end
    if (req) n_req++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXB-1:0] c;
    rst_n = 1'b0; t_valid = 1'b0; t_data = '0; chan_err = 1'b0; last_key = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // published transmitter example: data 01001, first key 0001 h
    t_data = 5'b01001;
    #1 c = ref_code(A, 9);
    check(t_ortho == c[B-1:0] && t_out == (c[B-1:0] ^ 16'h0001), "first frame: t_out = t_ortho ^ 0001");
    xfer(9, '0, "example");
    // 0..3 errors
    for (int n = 0; n < 200; n++)
      xfer(int'($urandom_range(31)), ref_errmask(B, n % 4), $sformatf("f%0d", n));
    // 4 errors: corrected or resend requested
    for (int n = 0; n < 100; n++)
      xfer(int'($urandom_range(31)), ref_errmask(B, 4), $sformatf("four%0d", n));
    // overrun: the next word is offered as soon as the transmitter is free
    while (!t_ready) @(posedge clk);
    #1 t_data = 5'd1; t_valid = 1'b1;
    @(posedge clk); #1 t_data = 5'd2;
    while (!t_ready) @(posedge clk);
    @(posedge clk); #1 t_valid = 1'b0;
    repeat (80) @(posedge clk);
    #1 check(n_overrun == 1, $sformatf("one overrun, saw %0d", n_overrun));
    // the link keeps its keys in step after the dropped frame
    for (int n = 0; n < 20; n++)
      xfer(int'($urandom_range(31)), ref_errmask(B, n % 4), $sformatf("after%0d", n));
    check(n_clean > 0, "clean frames");
    check(n_corrected > 0, "corrected frames");
    check(n_req > 0, "resend requests");
    check(n_keychange > 100, "key changes per frame");
    $display("mechanisms: clean=%0d corrected=%0d req=%0d overrun=%0d keychange=%0d",
             n_clean, n_corrected, n_req, n_overrun, n_keychange);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
