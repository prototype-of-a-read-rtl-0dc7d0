// tb_reassembly: one complete lane, checked at its serial output. A
// receiver model aligns and decodes sdo; the packages are compared with ones
// built here. Also fills the trigger ID FIFO past its depth while the lane
// waits for data, checking almost_full and the lost-trigger count, and checks
// that a full 10-bit character leaves every 10 clocks (400 Mb/s at 400 MHz).
module tb_reassembly;
  import roc_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0;
  logic trig_push = 0;
  logic [TID_W-1:0] trig_id = '0;
  logic [N_CH-1:0] map = 8'b1000_0010;
  logic [N_CH-1:0] ch_valid, ch_rd;
  fifo_word_t [N_CH-1:0] ch_data;
  logic [N_CH-1:0][7:0] chip_id;
  logic [N_CH-1:0] chip_busy = '0;
  logic roc_busy = 0;
  logic sdo, tfifo_af;
  logic [15:0] tid_lost, pkt_cnt, stall_cnt, busy_ins_cnt;
  int checks = 0, failures = 0;
  fifo_word_t chq[N_CH][$];
  char_t exp_q[$];

  reassembly #(.TFIFO_DEPTH(16), .TFIFO_AF(12)) dut (
    .clk, .rst_n, .tick, .trig_push, .trig_id, .map, .ch_valid, .ch_data, .ch_rd,
    .chip_id, .chip_busy, .roc_busy, .sdo, .tfifo_af, .tid_lost, .pkt_cnt,
    .stall_cnt, .busy_ins_cnt);

  lane_monitor mon (.clk, .sdi(sdo));

  always #5 clk = ~clk;
  for (genvar i = 0; i < N_CH; i++) assign chip_id[i] = 8'hC0 + 8'(i);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int div = 0;
  always @(posedge clk) begin
    div  <= (div == 9) ? 0 : div + 1;
    tick <= (div == 8);
  end

  always @(posedge clk)
    if (rst_n)
      for (int i = 0; i < N_CH; i++)
        if (ch_rd[i] && chq[i].size() > 0) void'(chq[i].pop_front());
  always @(negedge clk)
    for (int i = 0; i < N_CH; i++) begin
      ch_valid[i] = chq[i].size() > 0;
      ch_data[i]  = ch_valid[i] ? chq[i][0] : '0;
    end

  function automatic char_t K(input logic [7:0] b); return '{k: 1'b1, d: b}; endfunction
  function automatic char_t D(input logic [7:0] b); return '{k: 1'b0, d: b}; endfunction

  task automatic push_trig(input logic [15:0] t);
    @(negedge clk); trig_push = 1; trig_id = t;
    @(negedge clk); trig_push = 0;
  endtask

  task automatic add_package(input logic [15:0] t);
    exp_q.push_back(K(C_SOP)); exp_q.push_back(D(t[15:8])); exp_q.push_back(D(t[7:0]));
    for (int ch = 0; ch < N_CH; ch++)
      if (map[ch]) begin
        int n = $urandom_range(0, 5);
        exp_q.push_back(K(C_CHIP)); exp_q.push_back(D(chip_id[ch]));
        for (int i = 0; i < n; i++) begin
          logic [7:0] b = 8'($urandom);
          chq[ch].push_back('{eof: 1'b0, d: b});
          exp_q.push_back(D(b));
        end
        chq[ch].push_back('{eof: 1'b1, d: 8'h00});
      end
    exp_q.push_back(K(C_EOP));
  endtask

  initial begin
    int w0, guard;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (200) @(posedge clk);
    check(mon.locked, "receiver locked on idles");
    // rate: one word per 10 clocks
    w0 = mon.words;
    repeat (1000) @(posedge clk);
    check(mon.words - w0 == 100, $sformatf("100 characters in 1000 clocks (%0d)", mon.words - w0));
    // 20 triggers while no data are cached: the FIFO (16) overflows
    for (int t = 0; t < 20; t++) push_trig(16'h1000 + 16'(t));
    repeat (20) @(posedge clk);
    check(tfifo_af, "trigger FIFO almost full");
    check(tid_lost == 3, $sformatf("3 triggers lost (%0d)", tid_lost));
    // the first trigger was taken; 16 remain
    for (int t = 0; t < 17; t++) add_package(16'h1000 + 16'(t));
    guard = 0;
    while (mon.got.size() < exp_q.size() && guard < 100000) begin @(posedge clk); guard++; end
    repeat (50) @(posedge clk);
    check(mon.got.size() == exp_q.size(), $sformatf("%0d chars, expected %0d", mon.got.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < mon.got.size(); i++)
      check(mon.got[i] == exp_q[i], $sformatf("char %0d got %h exp %h", i, mon.got[i], exp_q[i]));
    check(mon.errors == 0, "no code errors on the line");
    check(pkt_cnt == 17, "17 packages");
    check(!tfifo_af, "trigger FIFO drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
