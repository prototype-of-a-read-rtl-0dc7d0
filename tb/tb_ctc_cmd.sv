// tb_ctc_cmd: sends command frames bit by bit and checks register writes,
// rejection of frames with a bad FCS and of frames for another address,
// broadcast, re-sending of chip commands on pix_cmd_sdo (bit exact), and the
// one-tick repeat of the input on cmd_fwd_sdo.
module tb_ctc_cmd;
  import roc_pkg::*;
  import cmd_frame_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0, cmd_sdi = 0;
  logic [7:0] roc_addr = 8'h05;
  roc_cfg_t cfg;
  logic cmd_fwd_sdo, pix_cmd_sdo;
  logic [15:0] cmd_ok_cnt, crc_err_cnt, pix_cmd_cnt;
  int checks = 0, failures = 0;
  logic prev_sdi = 0;
  logic [63:0] pix_bits = '0;
  int fwd_err = 0;

  ctc_cmd dut (.clk, .rst_n, .tick, .cmd_sdi, .roc_addr, .cfg, .cmd_fwd_sdo,
               .pix_cmd_sdo, .cmd_ok_cnt, .crc_err_cnt, .pix_cmd_cnt);

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

  int div = 0;
  always @(posedge clk) begin
    div  <= (div == 9) ? 0 : div + 1;
    tick <= (div == 8);
  end

  // the forward output and the chip command output, sampled one clock after
  // each tick (when they have just been updated)
  logic tick_d = 0;
  always @(posedge clk) begin
    tick_d <= tick;
    if (tick) prev_sdi <= cmd_sdi;
    if (tick_d && rst_n) begin
      if (cmd_fwd_sdo !== prev_sdi) fwd_err++;
      pix_bits <= {pix_bits[62:0], pix_cmd_sdo};
    end
  end

  task automatic send_bit(input logic b);
    @(negedge clk) cmd_sdi = b;
    do @(posedge clk); while (!tick);
  endtask

  task automatic send_frame(input logic [55:0] f);
    for (int i = 55; i >= 0; i--) send_bit(f[i]);
    repeat (8) send_bit(1'b0);
  endtask

  initial begin
    roc_cfg_t d;
    logic [55:0] f;
    bit found;
    repeat (3) @(posedge clk);
    rst_n = 1;
    d = cfg_default();
    check(cfg == d, "reset configuration");
    repeat (5) send_bit(1'b0);
    // channel enable
    send_frame(make_frame(8'h05, 8'h00, 16'h00F3));
    check(cfg.ch_en == 8'hF3, "ch_en written");
    // channel 6: chip ID 0x9A, lane 2
    send_frame(make_frame(8'h05, 8'h16, 16'h9A02));
    check(cfg.chip_id[6] == 8'h9A && cfg.ch_dest[6] == 3'd2, "channel 6 written");
    check(cfg.chip_id[5] == 8'h05 && cfg.ch_dest[5] == 3'd5, "channel 5 untouched");
    // trigger mode / veto, opcode
    send_frame(make_frame(8'h05, 8'h20, 16'h0000));
    check(cfg.trig_mode == TRIG_DIRECT && !cfg.busy_veto, "trigger control written");
    send_frame(make_frame(8'hFF, 8'h21, 16'h00C3));
    check(cfg.trig_opcode == 8'hC3, "broadcast written");
    check(cmd_ok_cnt == 4, "four good commands");
    // bad FCS: rejected
    send_frame(make_frame(8'h05, 8'h00, 16'h0011, 1));
    check(cfg.ch_en == 8'hF3, "bad frame not applied");
    check(crc_err_cnt == 1, "bad frame counted");
    // another controller's address: ignored
    send_frame(make_frame(8'h06, 8'h00, 16'h0022));
    check(cfg.ch_en == 8'hF3, "other address not applied");
    check(cmd_ok_cnt == 4 && crc_err_cnt == 1, "other address not counted");
    // chip command: re-sent on pix_cmd_sdo
    f = make_frame(8'h05, 8'h83, 16'h1234);
    send_frame(f);
    // the frame leaves within 60 ticks; stop when its last bit is in pix_bits
    found = 0;
    for (int t = 0; t < 70 && !found; t++) begin
      send_bit(1'b0);
      if (pix_bits[55:0] == f) found = 1;
    end
    check(pix_cmd_cnt == 1, "chip command counted");
    check(found, "chip command re-sent bit exact");
    check(cfg.ch_en == 8'hF3, "chip command does not write registers");
    check(fwd_err == 0, "forward output repeats the input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
