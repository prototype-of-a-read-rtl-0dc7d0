// tb_serializer: loads random words every 10 clocks and checks that the
// bits appear on sdo MSB first, starting the clock after the load.
module tb_serializer;
  logic clk = 0, rst_n = 0, load = 0, sdo;
  logic [9:0] din = '0;
  int checks = 0, failures = 0;

  serializer dut (.clk, .rst_n, .load, .din, .sdo);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (sdo !== 1'b0) failures++;
    for (int n = 0; n < 200; n++) begin
      w = 10'($urandom);
      load = 1; din = w;
      @(negedge clk);
      load = 0;
      for (int b = 9; b >= 0; b--) begin
        checks++;
        if (sdo !== w[b]) begin failures++; $display("FAIL word %0d bit %0d", n, b); end
        if (b != 0) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
