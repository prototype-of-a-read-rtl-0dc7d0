// tb_ctc: checks the 40 MHz clock (period 10, five clocks high) and tick,
// then one command through the CTC (setting direct trigger mode) and one
// trigger forwarded with the new mode, and a chip command on pix_cmd_sdo.
module tb_ctc;
  import roc_pkg::*;
  import cmd_frame_pkg::*;
  logic clk = 0, rst_n = 0, cmd_sdi = 0, trig_in = 0, busy = 0;
  logic [7:0] roc_addr = 8'h11;
  logic tick, clk40_out, trig_out, trig_push, cmd_fwd_sdo, pix_cmd_sdo;
  roc_cfg_t cfg;
  logic [TID_W-1:0] trig_id;
  logic [15:0] trig_acc_cnt, trig_veto_cnt, trig_lost_cnt, cmd_ok_cnt, crc_err_cnt, pix_cmd_cnt;
  int checks = 0, failures = 0;

  ctc dut (.clk, .rst_n, .roc_addr, .cmd_sdi, .trig_in, .busy, .tick, .clk40_out, .cfg,
           .trig_out, .trig_push, .trig_id, .cmd_fwd_sdo, .pix_cmd_sdo, .trig_acc_cnt,
           .trig_veto_cnt, .trig_lost_cnt, .cmd_ok_cnt, .crc_err_cnt, .pix_cmd_cnt);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // change cmd_sdi right after clk40_out rises; the CTC samples it one clock later
  task automatic send_frame(input logic [55:0] f);
    for (int i = 55; i >= 0; i--) begin
      @(posedge clk40_out); #1 cmd_sdi = f[i];
    end
    repeat (4) begin @(posedge clk40_out); #1 cmd_sdi = 0; end
  endtask

  initial begin
    int hi, ticks, pix_seen;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    hi = 0; ticks = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      hi += clk40_out;
      ticks += tick;
      if (tick) check(clk40_out, "clk40 high in the tick clock");
    end
    check(hi == 50, $sformatf("clk40 duty %0d/100", hi));
    check(ticks == 10, "one tick in ten clocks");
    // default mode is opcode: one trigger sends opcode 0xA5
    @(negedge clk) trig_in = 1;
    for (int b = 7; b >= 0; b--) begin
      @(negedge clk);
      check(trig_out == cfg_default().trig_opcode[b], "opcode bit");
    end
    trig_in = 0;
    // switch to direct mode by command
    send_frame(make_frame(8'h11, 8'h20, 16'h0000));
    check(cfg.trig_mode == TRIG_DIRECT, "mode set by command");
    @(negedge clk) trig_in = 1;
    @(negedge clk);
    check(trig_out && trig_push && trig_id == 1, "direct trigger forwarded");
    trig_in = 0;
    // chip command
    pix_seen = 0;
    fork
      send_frame(make_frame(8'h11, 8'hA0, 16'h5555));
      begin
        repeat (1500) begin @(negedge clk); pix_seen += pix_cmd_sdo; end
      end
    join
    check(pix_cmd_cnt == 1 && pix_seen > 0, "chip command re-sent");
    check(crc_err_cnt == 0 && cmd_ok_cnt == 2, "command counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
