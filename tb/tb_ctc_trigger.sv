// tb_ctc_trigger: directed checks of direct forwarding (one-clock latency),
// opcode sending (MSB first, first bit one clock after the edge), trigger
// numbering, busy veto, the off mode, and triggers lost while an opcode is
// still being sent.
module tb_ctc_trigger;
  import roc_pkg::*;
  logic clk = 0, rst_n = 0, trig_in = 0, busy = 0, busy_veto = 1;
  trig_mode_e mode = TRIG_DIRECT;
  logic [7:0] opcode = 8'hB4;
  logic trig_out, trig_push;
  logic [TID_W-1:0] trig_id;
  logic [15:0] acc_cnt, veto_cnt, lost_cnt;
  int checks = 0, failures = 0;

  ctc_trigger dut (.clk, .rst_n, .trig_in, .mode, .opcode, .busy, .busy_veto,
                   .trig_out, .trig_push, .trig_id, .acc_cnt, .veto_cnt, .lost_cnt);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // raise trig_in at a falling edge; returns at the next falling edge, i.e.
  // one clock after the rising edge that sees it
  task automatic pulse_start();
    @(negedge clk) trig_in = 1;
    @(negedge clk);
  endtask

  task automatic idle(input int n);
    @(negedge clk) trig_in = 0;
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // direct forwarding
    idle(3);
    check(trig_out == 0, "quiet before");
    pulse_start();
    check(trig_out == 1 && trig_push == 1 && trig_id == 0, "direct: out, push, id 0");
    @(negedge clk);
    check(trig_out == 0 && trig_push == 0, "direct: one clock pulse even with trig_in held");
    idle(3);
    // opcode
    mode = TRIG_OPCODE;
    pulse_start();
    check(trig_push == 1 && trig_id == 1, "opcode: push, id 1");
    for (int b = 7; b >= 0; b--) begin
      check(trig_out == opcode[b], $sformatf("opcode bit %0d", b));
      if (b == 5) begin trig_in = 0; @(negedge clk); trig_in = 1; end  // second edge while sending
      else @(negedge clk);
    end
    check(trig_out == 0, "line low after opcode");
    check(lost_cnt == 1 && acc_cnt == 2, "trigger during opcode lost");
    idle(5);
    // busy veto
    busy = 1;
    pulse_start();
    check(trig_out == 0 && trig_push == 0, "vetoed while busy");
    check(veto_cnt == 1, "veto counted");
    idle(10);
    busy_veto = 0;
    pulse_start();
    check(trig_push == 1 && trig_id == 2, "busy ignored when veto disabled");
    idle(10);
    busy = 0;
    // off mode
    mode = TRIG_OFF;
    pulse_start();
    check(trig_push == 0 && veto_cnt == 2, "off mode blocks");
    idle(3);
    check(acc_cnt == 3, "three accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
