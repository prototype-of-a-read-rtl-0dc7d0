// lane_monitor: behavioural receiver for one output lane, for testbenches.
// Aligns on the K28.5 comma, decodes every 10-bit word and queues every
// character that is not an idle in got[]. Decode errors after lock are
// counted in errors.
module lane_monitor
  import roc_pkg::*;
(
  input logic clk,
  input logic sdi
);
  char_t      got[$];
  logic [9:0] sr = '0;
  bit         locked = 0;
  int         cnt = 0;
  int         errors = 0;
  int         words = 0;

  task automatic take(input logic [9:0] w);
    logic [9:0] d;
    d = dec8b10b_f(w);
    words++;
    if (d[9]) errors++;
    else if (!(d[8] && d[7:0] == C_IDLE)) got.push_back('{k: d[8], d: d[7:0]});
  endtask

  always @(posedge clk) begin
    logic [9:0] n;
    n = {sr[8:0], sdi};
    sr <= n;
    if (n == COMMA_NEG || n == COMMA_POS) begin
      locked = 1;
      cnt = 0;
      take(n);
    end else if (locked) begin
      cnt++;
      if (cnt == 10) begin
        cnt = 0;
        take(n);
      end
    end
  end
endmodule
