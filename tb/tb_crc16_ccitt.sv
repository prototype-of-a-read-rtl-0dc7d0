// tb_crc16_ccitt: checks the CRC of "123456789" (0x29B1 for the 0xFFFF
// preset, MSB-first, no final inversion), the zero residue after appending
// the CRC, and random messages against a bit-by-bit reference written here.
module tb_crc16_ccitt;
  logic clk = 0, rst_n = 0, init = 0, en = 0, din = 0;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  crc16_ccitt dut (.clk, .rst_n, .init, .en, .din, .crc);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic shift_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      @(negedge clk); en = 1; din = b[i];
    end
    @(negedge clk); en = 0;
  endtask

  function automatic logic [15:0] ref_crc(input logic [7:0] m[], input int n);
    logic [15:0] r = 16'hFFFF;
    for (int i = 0; i < n; i++)
      for (int j = 7; j >= 0; j--) begin
        logic fb = r[15] ^ m[i][j];
        r = r << 1;
        if (fb) r = r ^ 16'h1021;
      end
    return r;
  endfunction

  task automatic do_init();
    @(negedge clk); init = 1; @(negedge clk); init = 0;
  endtask

  initial begin
    string s = "123456789";
    logic [7:0] m[];
    logic [15:0] c;
    repeat (2) @(posedge clk);
    rst_n = 1;
    do_init();
    for (int i = 0; i < 9; i++) shift_byte(s[i]);
    checks++; if (crc !== 16'h29B1) begin failures++; $display("FAIL check value %h", crc); end
    shift_byte(8'h29); shift_byte(8'hB1);
    checks++; if (crc !== 16'h0000) begin failures++; $display("FAIL residue %h", crc); end
    for (int t = 0; t < 50; t++) begin
      int n = $urandom_range(1, 12);
      m = new[n];
      foreach (m[i]) m[i] = 8'($urandom);
      do_init();
      foreach (m[i]) shift_byte(m[i]);
      c = ref_crc(m, n);
      checks++; if (crc !== c) begin failures++; $display("FAIL random %h %h", crc, c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
