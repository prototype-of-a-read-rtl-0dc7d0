// tb_sync_fifo: random push/pop against a queue model; checks data order,
// empty/full/almost_full and count, and that a full FIFO refuses writes.
module tb_sync_fifo;
  localparam int W = 9, DEPTH = 8, AF = 6;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full, af;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.W(W), .DEPTH(DEPTH), .AF_LEVEL(AF)) dut (
    .clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .full,
    .almost_full(af), .count);

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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      check(af == (q.size() >= AF), "almost_full");
      check(count == q.size(), "count");
      if (q.size() > 0) check(rd_data == q[0], "head data");
      // bias towards filling in the first half, draining in the second
      wr_en   = (n < 2000) ? ($urandom_range(0, 3) != 0) && !full : ($urandom_range(0, 3) == 0) && !full;
      rd_en   = (n < 2000) ? ($urandom_range(0, 3) == 0) && !empty : ($urandom_range(0, 3) != 0) && !empty;
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
      wr_en = 0; rd_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
