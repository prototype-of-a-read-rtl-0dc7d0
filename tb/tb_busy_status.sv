// tb_busy_status: directed checks of the busy combination, the channel
// enable mask and the busy-on edge counter.
module tb_busy_status;
  import roc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [N_CH-1:0] ch_en = '1, chip_busy = '0, fifo_af = '0;
  logic [N_LANE-1:0] tfifo_af = '0;
  logic roc_busy, chip_busy_any, busy_out;
  logic [15:0] busy_on_cnt;
  int checks = 0, failures = 0;

  busy_status dut (.clk, .rst_n, .ch_en, .chip_busy, .fifo_af, .tfifo_af,
                   .roc_busy, .chip_busy_any, .busy_out, .busy_on_cnt);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // apply inputs, wait for the two register stages, check the outputs
  task automatic apply(input logic [N_CH-1:0] en, cb, af, input logic [N_LANE-1:0] taf);
    logic exp_roc, exp_chip;
    @(negedge clk);
    ch_en = en; chip_busy = cb; fifo_af = af; tfifo_af = taf;
    exp_roc  = |(af & en) || |taf;
    exp_chip = |(cb & en);
    @(negedge clk);
    check(roc_busy == exp_roc, "roc_busy");
    check(chip_busy_any == exp_chip, "chip_busy_any");
    @(negedge clk);
    check(busy_out == (exp_roc || exp_chip), "busy_out");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    apply('1, '0, '0, '0);
    apply('1, 8'h10, '0, '0);       // one chip busy
    apply('1, '0, '0, '0);
    apply(8'hEF, 8'h10, '0, '0);    // busy chip disabled: ignored
    apply('1, '0, 8'h02, '0);       // channel FIFO almost full
    apply(8'hFD, '0, 8'h02, '0);    // its channel disabled
    apply('1, '0, '0, 8'h80);       // lane trigger FIFO almost full
    apply('1, '0, '0, '0);
    check(busy_on_cnt == 3, "three busy-on edges");
    for (int n = 0; n < 100; n++)
      apply(8'($urandom), 8'($urandom) & 8'($urandom), 8'($urandom) & 8'($urandom) & 8'($urandom),
            8'($urandom) & 8'($urandom) & 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
