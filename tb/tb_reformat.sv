// tb_reformat: drives one packet builder from modelled channel FIFOs and a
// modelled trigger ID FIFO and compares the character stream (idles
// removed) with packages built here: SOP, trigger ID, per mapped channel
// CHIP + chip ID + data, EOP. Covers preloaded data, stalls while waiting for
// a chip, busy-on/busy-off insertion between packages and during a stall, and
// the rate of one character per tick.
module tb_reformat;
  import roc_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0;
  logic [N_CH-1:0] map = 8'b0010_0101;
  logic [N_CH-1:0] ch_valid, ch_rd;
  fifo_word_t [N_CH-1:0] ch_data;
  logic [N_CH-1:0][7:0] chip_id;
  logic tid_valid, tid_rd;
  logic [TID_W-1:0] tid;
  logic [N_CH-1:0] chip_busy = '0;
  logic roc_busy = 0;
  logic out_valid;
  char_t out_char;
  logic [15:0] pkt_cnt, stall_cnt, busy_ins_cnt;
  int checks = 0, failures = 0;

  fifo_word_t chq[N_CH][$];
  logic [TID_W-1:0] tq[$];
  char_t got[$], exp_q[$];
  int ticks = 0, outs = 0;

  reformat dut (.clk, .rst_n, .tick, .map, .ch_valid, .ch_data, .ch_rd, .chip_id,
                .tid_valid, .tid, .tid_rd, .chip_busy, .roc_busy, .out_valid, .out_char,
                .pkt_cnt, .stall_cnt, .busy_ins_cnt);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar i = 0; i < N_CH; i++) assign chip_id[i] = 8'h30 + 8'(i);

  // tick generator: one clock in ten
  int div = 0;
  always @(posedge clk) begin
    div  <= (div == 9) ? 0 : div + 1;
    tick <= (div == 8);
  end

  // FIFO models, output capture
  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N_CH; i++)
        if (ch_rd[i]) begin
          if (chq[i].size() == 0) begin failures++; $display("FAIL pop of empty ch %0d", i); end
          else void'(chq[i].pop_front());
        end
      if (tid_rd) void'(tq.pop_front());
      if (tick) ticks++;
      if (out_valid) begin
        outs++;
        if (!(out_char.k && out_char.d == C_IDLE)) got.push_back(out_char);
      end
    end
  end
  always @(negedge clk) begin
    for (int i = 0; i < N_CH; i++) begin
      ch_valid[i] = chq[i].size() > 0;
      ch_data[i]  = ch_valid[i] ? chq[i][0] : '0;
    end
    tid_valid = tq.size() > 0;
    tid = tid_valid ? tq[0] : '0;
  end

  function automatic char_t K(input logic [7:0] b); return '{k: 1'b1, d: b}; endfunction
  function automatic char_t D(input logic [7:0] b); return '{k: 1'b0, d: b}; endfunction

  // queue a frame of n random bytes for channel ch and append to expected
  task automatic frame(input int ch, input int n, input bit hdr = 1);
    if (hdr) begin
      exp_q.push_back(K(C_CHIP));
      exp_q.push_back(D(chip_id[ch]));
    end
    for (int i = 0; i < n; i++) begin
      logic [7:0] b = 8'($urandom);
      chq[ch].push_back('{eof: 1'b0, d: b});
      exp_q.push_back(D(b));
    end
    chq[ch].push_back('{eof: 1'b1, d: 8'h00});
  endtask

  task automatic head(input logic [15:0] t);
    exp_q.push_back(K(C_SOP));
    exp_q.push_back(D(t[15:8]));
    exp_q.push_back(D(t[7:0]));
  endtask

  task automatic compare(input string what);
    int guard = 0;
    while (got.size() < exp_q.size() && guard < 20000) begin @(posedge clk); guard++; end
    repeat (100) @(posedge clk);
    check(got.size() == exp_q.size(), $sformatf("%s: %0d chars, expected %0d", what, got.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < got.size(); i++)
      check(got[i] == exp_q[i], $sformatf("%s: char %0d got %h exp %h", what, i, got[i], exp_q[i]));
    got.delete();
    exp_q.delete();
  endtask

  initial begin
    int s0, t0, o0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1: three triggers with data already cached
    for (int t = 0; t < 3; t++) begin
      head(16'h0100 + 16'(t));
      tq.push_back(16'h0100 + 16'(t));
      frame(0, $urandom_range(0, 6));
      frame(2, $urandom_range(0, 6));
      frame(5, $urandom_range(0, 6));
      exp_q.push_back(K(C_EOP));
    end
    t0 = ticks; o0 = outs;
    compare("preloaded");
    check(pkt_cnt == 3, "three packages");
    check(outs - o0 == ticks - t0, "one character per tick");
    // 2: data arrive late: the lane stalls
    s0 = stall_cnt;
    head(16'hBEEF);
    tq.push_back(16'hBEEF);
    frame(0, 3);
    repeat (300) @(posedge clk);
    frame(2, 2);
    repeat (300) @(posedge clk);
    frame(5, 0);
    exp_q.push_back(K(C_EOP));
    compare("stalled");
    check(stall_cnt > s0, "stall counted");
    // 3: busy changes between packages
    chip_busy[2] = 1;
    repeat (60) @(posedge clk);
    chip_busy[7] = 1;        // not mapped to this lane: no report
    repeat (60) @(posedge clk);
    roc_busy = 1;
    repeat (60) @(posedge clk);
    chip_busy = '0; roc_busy = 0;
    exp_q = '{K(C_BUSY_ON), D(8'h00), D(8'h04),
              K(C_BUSY_ON), D(8'h01), D(8'h04),
              K(C_BUSY_OFF), D(8'h00), D(8'h00)};
    compare("busy between packages");
    check(busy_ins_cnt == 3, "three busy reports");
    // 4: busy change while the lane waits for chip 0
    tq.push_back(16'h0007);
    repeat (100) @(posedge clk);
    chip_busy[0] = 1;
    repeat (100) @(posedge clk);
    exp_q = '{K(C_SOP), D(8'h00), D(8'h07), K(C_CHIP), D(8'h30),
              K(C_BUSY_ON), D(8'h00), D(8'h01)};
    frame(0, 2, 0);
    frame(2, 1);
    frame(5, 1);
    exp_q.push_back(K(C_EOP));
    repeat (300) @(posedge clk);
    chip_busy[0] = 0;
    exp_q.push_back(K(C_BUSY_OFF)); exp_q.push_back(D(8'h00)); exp_q.push_back(D(8'h00));
    compare("busy during stall");
    // 5: empty map: package holds only the header
    map = '0;
    tq.push_back(16'h0A0B);
    exp_q = '{K(C_SOP), D(8'h0A), D(8'h0B), K(C_EOP)};
    compare("no channel mapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
