// tb_enc8b10b: checks the encoder against known code words, checks DC
// balance (running disparity stays within +-1 and matches rd), the run
// length limit of 5 on the concatenated stream, and that every byte and
// every valid K code decodes back to itself.
module tb_enc8b10b;
  import roc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  char_t in_char = '0;
  logic out_valid, rd;
  logic [9:0] code;
  int checks = 0, failures = 0;
  int disp = -1;          // running disparity as -1 / +1
  int run = 0;
  logic last_bit = 1'b0;

  enc8b10b dut (.clk, .rst_n, .in_valid, .in_char, .out_valid, .code, .rd);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t code=%b", what, $time, code); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one character, return the code word, and check stream properties
  task automatic send(input logic k, input logic [7:0] b, output logic [9:0] c);
    logic [9:0] d;
    int ones;
    @(negedge clk);
    in_valid = 1; in_char = '{k: k, d: b};
    @(negedge clk);
    in_valid = 0;
    check(out_valid, "out_valid after one clock");
    c = code;
    ones = $countones(c);
    check(ones >= 4 && ones <= 6, "4..6 ones");
    disp = disp + 2 * ones - 10;
    check(disp == -1 || disp == 1, "running disparity bounded");
    check(rd == (disp == 1), "rd output");
    for (int i = 9; i >= 0; i--) begin
      if (c[i] == last_bit) run++; else run = 1;
      last_bit = c[i];
      check(run <= 5, "run length");
    end
    d = dec8b10b_f(c);
    check(d[9] == 1'b0 && d[8] == k && d[7:0] == b, "decodes back");
  endtask

  initial begin
    logic [9:0] c;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // known words: K28.5 from RD-, then from RD+
    send(1'b1, 8'hBC, c); check(c == 10'b0011111010, "K28.5 RD-");
    send(1'b1, 8'hBC, c); check(c == 10'b1100000101, "K28.5 RD+");
    // now RD-: D21.5 (balanced), D0.0, D17.7 (A7 form at RD-)
    send(1'b0, 8'hB5, c); check(c == 10'b1010101010, "D21.5");
    send(1'b0, 8'h00, c); check(c == 10'b1001110100, "D0.0 RD-");
    // D0.0 left RD- (100111 -> +, 0100 -> -)
    send(1'b0, 8'hF1, c); check(c == 10'b1000110111, "D17.7 RD- uses A7");
    send(1'b1, 8'h1C, c); check(c == 10'b1100001011, "K28.0 RD+");
    for (int i = 0; i < 256; i++) send(1'b0, 8'(i), c);
    for (int i = 0; i < 2000; i++) send(1'b0, 8'($urandom), c);
    for (int y = 0; y < 8; y++) begin
      send(1'b1, {3'(y), 5'd28}, c);
      send(1'b0, 8'($urandom), c);
    end
    send(1'b1, K23_7, c); send(1'b1, K27_7, c); send(1'b1, K29_7, c); send(1'b1, 8'hFE, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
