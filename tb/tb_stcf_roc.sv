// tb_stcf_roc: end-to-end test of the read-out controller at its default
// sizes. Eight pixel-chip link models (each with its own word phase) answer
// every trigger opcode they see on trig_out with an event frame; eight lane
// receivers decode the output lanes. The configuration is loaded through
// CRC-protected commands: channels 0 and 1 share lane 0, channel 2 goes to
// lane 1, channels 3..7 to lanes 3..7, lane 2 is unused. Every package on
// every lane is compared with one built here from the frames sent. The test
// counts, and requires at least once: a trigger sent as opcode, two channels
// merged into one lane, a lane stalled waiting for a chip, a chip busy-on
// reported in the stream, ROC busy from an almost full channel FIFO, a
// trigger vetoed by busy, a command rejected for its FCS, a command for
// another controller ignored, and a chip command re-sent to the chips.
module tb_stcf_roc;
  import roc_pkg::*;
  import cmd_frame_pkg::*;

  localparam logic [7:0] ADDR = 8'h21;

  logic clk = 0, rst_n = 0;
  logic [N_CH-1:0] sdi;
  logic clk40_out, trig_out, pix_cmd_sdo, cmd_fwd_sdo, busy_out, chip_busy_any;
  logic trig_in = 0, cmd_sdi = 0;
  logic [N_LANE-1:0] sdo;
  roc_cfg_t cfg;
  logic [N_CH-1:0] ch_locked, ch_overflow;
  logic [N_CH-1:0][7:0] ch_err_cnt;
  logic [N_LANE-1:0][15:0] lane_pkt_cnt, lane_stall_cnt, lane_busy_ins_cnt, lane_tid_lost;
  logic [15:0] trig_acc_cnt, trig_veto_cnt, trig_lost_cnt, cmd_ok_cnt, crc_err_cnt,
               pix_cmd_cnt, busy_on_cnt;
  int checks = 0, failures = 0;

  stcf_roc dut (
    .clk, .rst_n, .roc_addr(ADDR), .sdi, .clk40_out, .trig_out, .pix_cmd_sdo,
    .trig_in, .cmd_sdi, .cmd_fwd_sdo, .sdo, .busy_out, .chip_busy_any, .cfg,
    .ch_locked, .ch_overflow, .ch_err_cnt, .lane_pkt_cnt, .lane_stall_cnt,
    .lane_busy_ins_cnt, .lane_tid_lost, .trig_acc_cnt, .trig_veto_cnt, .trig_lost_cnt,
    .cmd_ok_cnt, .crc_err_cnt, .pix_cmd_cnt, .busy_on_cnt);

  always #5 clk = ~clk;   // 400 MHz in the design's terms; the unit is arbitrary here

  for (genvar i = 0; i < N_CH; i++) begin : g_chip
    pix_link_model #(.PHASE(3 * i + 1)) chip (.clk, .sdo(sdi[i]));
  end
  for (genvar j = 0; j < N_LANE; j++) begin : g_mon
    lane_monitor mon (.clk, .sdi(sdo[j]));
  end

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

  // ------------------------------------------------------------ chip side
  logic [2:0] dest [N_CH] = '{3'd0, 3'd0, 3'd1, 3'd3, 3'd4, 3'd5, 3'd6, 3'd7};
  char_t exp_q[N_LANE][$];
  int n_trig = 0;
  int len_override[N_CH];   // >= 0 forces the next frame length of a channel
  logic [7:0] op_sr;
  int op_bits = 0;

  function automatic char_t K(input logic [7:0] b); return '{k: 1'b1, d: b}; endfunction
  function automatic char_t D(input logic [7:0] b); return '{k: 1'b0, d: b}; endfunction

  // every chip answers a trigger opcode with one frame
  task automatic answer_trigger(input int n);
    for (int j = 0; j < N_LANE; j++) begin
      bit any = 0;
      for (int i = 0; i < N_CH; i++) if (dest[i] == 3'(j)) any = 1;
      if (any) begin
        exp_q[j].push_back(K(C_SOP));
        exp_q[j].push_back(D(8'(n >> 8)));
        exp_q[j].push_back(D(8'(n)));
      end
    end
    for (int i = 0; i < N_CH; i++) begin
      int len = (len_override[i] >= 0) ? len_override[i] : $urandom_range(0, 6);
      len_override[i] = -1;
      // chip 3 answers trigger 2 late: its lane has to wait
      if (i == 3 && n == 2) repeat (30) g_chip_push(i, 1'b1, C_IDLE);
      exp_q[dest[i]].push_back(K(C_CHIP));
      exp_q[dest[i]].push_back(D(8'h40 + 8'(i)));
      for (int b = 0; b < len; b++) begin
        logic [7:0] v = 8'($urandom);
        g_chip_push(i, 1'b0, v);
        exp_q[dest[i]].push_back(D(v));
      end
      g_chip_push(i, 1'b1, C_EOF);
    end
    for (int j = 0; j < N_LANE; j++)
      if (exp_q[j].size() > 0 && j != 2) exp_q[j].push_back(K(C_EOP));
  endtask

  task automatic g_chip_push(input int i, input logic k, input logic [7:0] b);
    case (i)
      0: g_chip[0].chip.push(k, b);
      1: g_chip[1].chip.push(k, b);
      2: g_chip[2].chip.push(k, b);
      3: g_chip[3].chip.push(k, b);
      4: g_chip[4].chip.push(k, b);
      5: g_chip[5].chip.push(k, b);
      6: g_chip[6].chip.push(k, b);
      default: g_chip[7].chip.push(k, b);
    endcase
  endtask

  // trigger opcode receiver of the chips: 8 bits starting with a 1
  always @(posedge clk) begin
    if (rst_n) begin
      if (op_bits == 0 && trig_out) begin
        op_sr   = 8'h01;
        op_bits = 1;
      end else if (op_bits > 0) begin
        op_sr = {op_sr[6:0], trig_out};
        op_bits++;
        if (op_bits == 8) begin
          op_bits = 0;
          if (op_sr == cfg.trig_opcode) begin
            answer_trigger(n_trig);
            n_trig++;
          end else begin
            failures++;
            $display("FAIL unknown opcode %h", op_sr);
          end
        end
      end
    end
  end

  // --------------------------------------------------------- command side
  task automatic send_frame(input logic [55:0] f);
    for (int i = 55; i >= 0; i--) begin
      @(posedge clk40_out); #1 cmd_sdi = f[i];
    end
    repeat (4) begin @(posedge clk40_out); #1 cmd_sdi = 0; end
  endtask

  task automatic fire_trigger();
    @(negedge clk) trig_in = 1;
    repeat (20) @(negedge clk);
    trig_in = 0;
    repeat (20) @(negedge clk);
  endtask

  task automatic wait_not_busy();
    int g = 0;
    while (busy_out && g < 50000) begin @(posedge clk); g++; end
  endtask

  // --------------------------------------------------------------- checks
  int busy_reports[N_LANE];

  task automatic compare_lanes();
    for (int j = 0; j < N_LANE; j++) begin
      char_t got[$];
      // strip busy reports: K28.2 / K28.3 and the two bytes after them
      for (int i = 0; i < g_mon_got_size(j); i++) begin
        char_t c = g_mon_get(j, i);
        if (c.k && (c.d == C_BUSY_ON || c.d == C_BUSY_OFF)) begin
          busy_reports[j]++;
          i += 2;
        end else got.push_back(c);
      end
      check(got.size() == exp_q[j].size(),
            $sformatf("lane %0d: %0d chars, expected %0d", j, got.size(), exp_q[j].size()));
      for (int i = 0; i < got.size() && i < exp_q[j].size(); i++)
        if (got[i] != exp_q[j][i]) begin
          check(0, $sformatf("lane %0d char %0d got %h exp %h", j, i, got[i], exp_q[j][i]));
          break;
        end
    end
  endtask

  function automatic int g_mon_got_size(input int j);
    case (j)
      0: return g_mon[0].mon.got.size(); 1: return g_mon[1].mon.got.size();
      2: return g_mon[2].mon.got.size(); 3: return g_mon[3].mon.got.size();
      4: return g_mon[4].mon.got.size(); 5: return g_mon[5].mon.got.size();
      6: return g_mon[6].mon.got.size(); default: return g_mon[7].mon.got.size();
    endcase
  endfunction
  function automatic char_t g_mon_get(input int j, input int i);
    case (j)
      0: return g_mon[0].mon.got[i]; 1: return g_mon[1].mon.got[i];
      2: return g_mon[2].mon.got[i]; 3: return g_mon[3].mon.got[i];
      4: return g_mon[4].mon.got[i]; 5: return g_mon[5].mon.got[i];
      6: return g_mon[6].mon.got[i]; default: return g_mon[7].mon.got[i];
    endcase
  endfunction
  function automatic int mon_errors();
    return g_mon[0].mon.errors + g_mon[1].mon.errors + g_mon[2].mon.errors +
           g_mon[3].mon.errors + g_mon[4].mon.errors + g_mon[5].mon.errors +
           g_mon[6].mon.errors + g_mon[7].mon.errors;
  endfunction

  // ----------------------------------------------------------------- main
  initial begin
    int stalls, busy_ins, vetoes0, n_busy_before;
    foreach (len_override[i]) len_override[i] = -1;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (300) @(posedge clk);
    check(&ch_locked, "all links locked");
    // configuration
    for (int i = 0; i < N_CH; i++)
      send_frame(make_frame(ADDR, 8'h10 + 8'(i), {8'h40 + 8'(i), 5'b0, dest[i]}));
    send_frame(make_frame(ADDR, 8'h00, 16'h00FF, 1));           // bad FCS
    send_frame(make_frame(ADDR + 1, 8'h00, 16'h0000));          // another controller
    send_frame(make_frame(8'hFF, 8'hC4, 16'hABCD));             // chip command, broadcast
    check(cfg.ch_dest[1] == 3'd0 && cfg.chip_id[7] == 8'h47, "configuration loaded");
    check(cfg.ch_en == 8'hFF, "bad frame and foreign frame ignored");
    check(crc_err_cnt == 1 && cmd_ok_cnt == 9, "command counters");
    // normal triggers
    for (int t = 0; t < 10; t++) begin
      wait_not_busy();
      fire_trigger();
      repeat ($urandom_range(300, 1500)) @(posedge clk);
    end
    // chip 4 busy for a while
    g_chip[4].chip.push(1'b1, C_BUSY_ON);
    repeat (300) @(posedge clk);
    check(busy_out, "chip busy reaches busy_out");
    vetoes0 = trig_veto_cnt;
    fire_trigger();                               // vetoed by chip busy
    g_chip[4].chip.push(1'b1, C_BUSY_OFF);
    wait_not_busy();
    // large frames on channels 0 and 1 (same lane): channel 1's FIFO fills
    len_override[0] = 60;
    len_override[1] = 60;
    n_busy_before = busy_on_cnt;
    fire_trigger();
    begin
      int g = 0;
      while (!busy_out && g < 5000) begin @(posedge clk); g++; end
    end
    check(busy_out, "ROC busy from an almost full FIFO");
    fire_trigger();                               // vetoed by ROC busy
    wait_not_busy();
    for (int t = 0; t < 5; t++) begin
      wait_not_busy();
      fire_trigger();
      repeat ($urandom_range(300, 1500)) @(posedge clk);
    end
    // drain
    repeat (5000) @(posedge clk);
    compare_lanes();
    check(mon_errors() == 0, "no code errors on the lanes");
    check(ch_overflow == '0, "no FIFO overflow");
    check(ch_err_cnt == '0, "no input code errors");
    check(lane_tid_lost == '0, "no trigger IDs lost");
    check(trig_acc_cnt == 16'(n_trig), "every accepted trigger reached the chips");
    for (int j = 0; j < N_LANE; j++)
      check(lane_pkt_cnt[j] == ((j == 2) ? 0 : n_trig), $sformatf("lane %0d package count", j));
    stalls = 0; busy_ins = 0;
    for (int j = 0; j < N_LANE; j++) begin
      stalls += lane_stall_cnt[j];
      busy_ins += lane_busy_ins_cnt[j];
    end
    $display("mechanisms: triggers=%0d vetoed=%0d stalls=%0d busy_reports=%0d roc_busy_edges=%0d crc_rejects=%0d chip_cmds=%0d",
             n_trig, trig_veto_cnt, stalls, busy_ins, busy_on_cnt, crc_err_cnt, pix_cmd_cnt);
    check(n_trig >= 1, "trigger opcode sent");
    check(lane_pkt_cnt[0] >= 1, "two channels merged into lane 0");
    check(stalls >= 1, "lane stalled waiting for a chip");
    check(busy_reports[4] >= 2, "chip busy-on/busy-off reported on lane 4");
    check(busy_on_cnt > n_busy_before, "ROC busy raised");
    check(trig_veto_cnt >= vetoes0 + 2, "triggers vetoed while busy");
    check(crc_err_cnt >= 1, "command rejected for its FCS");
    check(pix_cmd_cnt >= 1, "chip command re-sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
