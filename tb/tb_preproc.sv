// tb_preproc: sends an 8b/10b stream with a random bit offset into one
// channel and checks that idles are removed, data bytes and end-of-frame
// marks reach the FIFO in order, busy-on/busy-off drive chip_busy, a code
// error and a running-disparity error are counted, a disabled channel stores nothing, and a FIFO overrun
// sets overflow. Also checks the latency from the last bit of a character
// to the FIFO (2 clocks).
module tb_preproc;
  import roc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic enable = 1, sdi, rd_en = 0;
  fifo_word_t rd_data;
  logic empty, almost_full, locked, chip_busy, overflow;
  logic [7:0] err_cnt;
  logic raw_mode = 0, raw_bit = 0;
  logic link_sdo;
  int checks = 0, failures = 0;
  fifo_word_t exp_q[$];

  pix_link_model #(.PHASE(7)) chip (.clk, .sdo(link_sdo));
  assign sdi = raw_mode ? raw_bit : link_sdo;

  preproc #(.FIFO_DEPTH(16), .FIFO_AF(12)) dut (
    .clk, .rst_n, .enable, .sdi, .rd_en, .rd_data, .empty, .almost_full,
    .locked, .chip_busy, .overflow, .err_cnt);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drain();
    while (!empty) begin
      @(negedge clk);
      check(exp_q.size() > 0, "unexpected FIFO word");
      if (exp_q.size() > 0) begin
        check(rd_data == exp_q[0], $sformatf("FIFO word %h exp %h", rd_data, exp_q[0]));
        void'(exp_q.pop_front());
      end
      rd_en = 1;
      @(negedge clk);
      rd_en = 0;
    end
  endtask

  task automatic wait_sent();
    while (chip.pending() > 0) @(posedge clk);
    repeat (40) @(posedge clk);
  endtask

  initial begin
    int s0, n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (200) @(posedge clk);
    check(locked, "locked on idles");
    check(empty, "idles not stored");
    // a frame with idles mixed in
    for (int f = 0; f < 5; f++) begin
      int n = $urandom_range(0, 10);
      for (int i = 0; i < n; i++) begin
        logic [7:0] b = 8'($urandom);
        chip.push(1'b0, b);
        exp_q.push_back('{eof: 1'b0, d: b});
        if ($urandom_range(0, 2) == 0) chip.push(1'b1, C_IDLE);
      end
      chip.push(1'b1, C_EOF);
      exp_q.push_back('{eof: 1'b1, d: 8'h00});
      wait_sent();
      drain();
    end
    check(exp_q.size() == 0, "all words received");
    // busy on / off
    chip.push(1'b1, C_BUSY_ON);
    wait_sent();
    check(chip_busy, "busy-on sets chip_busy");
    check(empty, "busy not stored");
    chip.push(1'b1, C_BUSY_OFF);
    wait_sent();
    check(!chip_busy, "busy-off clears chip_busy");
    // latency: from the clock edge that samples a character's last bit
    // until the FIFO shows it (two clocks)
    chip.push(1'b0, 8'h3A);
    exp_q.push_back('{eof: 1'b0, d: 8'h3A});
    s0 = chip.sent;
    while (chip.sent == s0) @(posedge clk);   // one clock after the model loaded it
    repeat (9) @(posedge clk);                // edge that samples its last bit
    n = 0;
    do begin @(negedge clk); n++; end while (empty && n < 20);
    check(n == 3, $sformatf("latency %0d", n - 1));
    drain();
    // a K code the link does not use is an error, not data
    chip.push(1'b1, K23_7);
    wait_sent();
    check(err_cnt == 1, "unused K code counted");
    // a data byte in the wrong disparity: counted, still stored
    chip.push_bad_disparity(1'b0, 8'h03);   // D3.0: unbalanced in both forms
    exp_q.push_back('{eof: 1'b0, d: 8'h03});
    wait_sent();
    check(err_cnt == 2, $sformatf("disparity error counted (%0d)", err_cnt));
    drain();
    check(empty, "unused K code not stored");
    // disabled channel stores nothing
    enable = 0;
    chip.push(1'b0, 8'h55); chip.push(1'b1, C_EOF);
    wait_sent();
    check(empty, "disabled channel stores nothing");
    enable = 1;
    // overrun: 20 words into a 16-deep FIFO
    check(!overflow, "no overflow yet");
    for (int i = 0; i < 20; i++) chip.push(1'b0, 8'(i));
    wait_sent();
    check(almost_full, "almost full");
    check(overflow, "overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
