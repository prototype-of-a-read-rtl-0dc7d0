// tb_roc_modes: runs the read-out controller, at its default sizes, through
// several configurations and trigger intervals, the way a test system would
// exercise the chip: (A) one chip per lane, opcode triggers at short
// intervals; (B) all eight chips merged into one lane, direct trigger
// forwarding, long intervals; (C) two groups of four chips on two lanes, one
// channel disabled, a new trigger opcode. The configuration is changed by
// commands between runs, after the lanes have drained. Every package is
// compared with the frames the chip models sent.
module tb_roc_modes;
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
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ chip side
  logic [2:0] dest [N_CH] = '{3'd0, 3'd0, 3'd1, 3'd3, 3'd4, 3'd5, 3'd6, 3'd7};
  char_t exp_q[N_LANE][$];
  int n_trig = 0;
  logic [7:0] op_sr;
  int op_bits = 0;

  function automatic char_t K(input logic [7:0] b); return '{k: 1'b1, d: b}; endfunction
  function automatic char_t D(input logic [7:0] b); return '{k: 1'b0, d: b}; endfunction

  // every chip answers a trigger with one frame; frames of disabled
  // channels are sent but not expected at the output
  logic en [N_CH] = '{default: 1'b1};
  task automatic answer_trigger(input int n);
    bit any[N_LANE];
    for (int j = 0; j < N_LANE; j++) begin
      any[j] = 0;
      for (int i = 0; i < N_CH; i++) if (en[i] && dest[i] == 3'(j)) any[j] = 1;
      if (any[j]) begin
        exp_q[j].push_back(K(C_SOP));
        exp_q[j].push_back(D(8'(n >> 8)));
        exp_q[j].push_back(D(8'(n)));
      end
    end
    for (int i = 0; i < N_CH; i++) begin
      int len = $urandom_range(0, 6);
      if (en[i]) begin
        exp_q[dest[i]].push_back(K(C_CHIP));
        exp_q[dest[i]].push_back(D(8'h40 + 8'(i)));
      end
      for (int b = 0; b < len; b++) begin
        logic [7:0] v = 8'($urandom);
        g_chip_push(i, 1'b0, v);
        if (en[i]) exp_q[dest[i]].push_back(D(v));
      end
      g_chip_push(i, 1'b1, C_EOF);
    end
    for (int j = 0; j < N_LANE; j++)
      if (any[j]) exp_q[j].push_back(K(C_EOP));
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

  // trigger receiver of the chips: a one-clock pulse in direct mode, or
  // 8 bits starting with a 1 in opcode mode
  always @(posedge clk) begin
    if (rst_n) begin
      if (cfg.trig_mode == TRIG_DIRECT) begin
        if (trig_out) begin
          answer_trigger(n_trig);
          n_trig++;
        end
      end else if (op_bits == 0 && trig_out) begin
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

  task automatic configure(input logic [2:0] d[N_CH], input logic [7:0] ch_en,
                          input logic [15:0] trig_ctrl, input logic [7:0] opcode);
    for (int i = 0; i < N_CH; i++) begin
      dest[i] = d[i];
      en[i]   = ch_en[i];
      send_frame(make_frame(ADDR, 8'h10 + 8'(i), {8'h40 + 8'(i), 5'b0, d[i]}));
    end
    send_frame(make_frame(ADDR, 8'h00, {8'h00, ch_en}));
    send_frame(make_frame(ADDR, 8'h21, {8'h00, opcode}));
    send_frame(make_frame(ADDR, 8'h20, trig_ctrl));
    check(cfg.ch_en == ch_en && cfg.trig_opcode == opcode, "configuration loaded");
  endtask

  // fire n triggers spaced lo..hi clocks, then let everything drain and
  // compare all lanes
  task automatic run(input string name, input int n, input int lo, input int hi);
    int n0 = n_trig;
    for (int t = 0; t < n; t++) begin
      wait_not_busy();
      fire_trigger();
      repeat ($urandom_range(lo, hi)) @(posedge clk);
    end
    repeat (6000) @(posedge clk);
    compare_lanes();
    for (int j = 0; j < N_LANE; j++) begin
      g_mon_clear(j);
      exp_q[j].delete();
    end
    check(n_trig - n0 == n, $sformatf("%s: %0d of %0d triggers reached the chips", name, n_trig - n0, n));
    $display("%s: %0d triggers", name, n_trig - n0);
  endtask

  task automatic g_mon_clear(input int j);
    case (j)
      0: g_mon[0].mon.got.delete(); 1: g_mon[1].mon.got.delete();
      2: g_mon[2].mon.got.delete(); 3: g_mon[3].mon.got.delete();
      4: g_mon[4].mon.got.delete(); 5: g_mon[5].mon.got.delete();
      6: g_mon[6].mon.got.delete(); default: g_mon[7].mon.got.delete();
    endcase
  endtask

  initial begin
    logic [2:0] d[N_CH];
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (300) @(posedge clk);
    check(&ch_locked, "all links locked");
    // A: one chip per lane, opcode triggers, short intervals
    d = '{3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6, 3'd7};
    configure(d, 8'hFF, 16'h0005, 8'hA5);
    run("A one-to-one, opcode, short intervals", 20, 100, 250);
    // B: all chips into lane 5, direct triggers, long intervals
    d = '{default: 3'd5};
    configure(d, 8'hFF, 16'h0004, 8'hA5);
    run("B eight-to-one, direct, long intervals", 6, 1500, 2500);
    // C: two groups of four, channel 6 disabled, another opcode
    d = '{3'd0, 3'd0, 3'd0, 3'd0, 3'd7, 3'd7, 3'd7, 3'd7};
    configure(d, 8'hBF, 16'h0005, 8'hC3);
    run("C two groups, one channel off, opcode 0xC3", 10, 400, 900);
    check(ch_overflow == '0 && ch_err_cnt == '0 && lane_tid_lost == '0, "no loss");
    check(mon_errors() == 0, "no code errors on the lanes");
    check(trig_veto_cnt == 0, "no trigger vetoed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
