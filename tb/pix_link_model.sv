// pix_link_model: behavioural model of one pixel chip's serial output, for
// testbenches. Characters queued with push() are 8b/10b coded (own running
// disparity) and sent MSB first, one bit per clock, one character every 10
// clocks; K28.5 idles fill the gaps. push_bad_disparity() injects a
// running-disparity error for receiver tests. PHASE delays the first character so
// that links need not be word-aligned to each other.
module pix_link_model
  import roc_pkg::*;
#(
  parameter int PHASE = 0
) (
  input  logic clk,
  output logic sdo
);
  char_t      q[$];
  bit         badq[$];     // send this character in the wrong disparity
  logic [9:0] sr = '0;
  logic       rd = 1'b0;
  int         bitn = 0;
  int         wait_n = PHASE;
  int         sent = 0;

  task automatic push(input logic k, input logic [7:0] b);
    q.push_back('{k: k, d: b});
    badq.push_back(1'b0);
  endtask

  // send a character coded for the opposite running disparity, without
  // advancing the model's own disparity: one disparity error at the receiver
  task automatic push_bad_disparity(input logic k, input logic [7:0] b);
    q.push_back('{k: k, d: b});
    badq.push_back(1'b1);
  endtask

  function automatic int pending();
    return q.size();
  endfunction

  assign sdo = sr[9];

  always @(posedge clk) begin
    if (wait_n > 0) begin
      wait_n <= wait_n - 1;
    end else if (bitn == 0) begin
      char_t c;
      logic [10:0] e;
      bit bad;
      bad = (badq.size() > 0) ? badq.pop_front() : 1'b0;
      c = (q.size() > 0) ? q.pop_front() : '{k: 1'b1, d: C_IDLE};
      e = enc8b10b_f(c.k, c.d, rd ^ bad);
      rd   <= bad ? rd : e[10];
      sr   <= e[9:0];
      bitn <= 9;
      if (!(c.k && c.d == C_IDLE)) sent <= sent + 1;
    end else begin
      sr   <= {sr[8:0], 1'b0};
      bitn <= bitn - 1;
    end
  end
endmodule
