// busy_status: collects the busy sources of the controller into the busy
// line sent to the backend.
//
// The document shows a busy status block fed by the channel FIFOs, the chips'
// busy information and the lanes, driving a line towards the optical
// transceiver. Here: roc_busy is set while any enabled channel FIFO or any
// lane trigger ID FIFO is almost full; chip_busy_any while any enabled chip
// reports busy; busy_out, the OR of both, is registered. busy_on_cnt counts
// rising edges of busy_out.
module busy_status
  import roc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_CH-1:0]   ch_en,
  input  logic [N_CH-1:0]   chip_busy,
  input  logic [N_CH-1:0]   fifo_af,
  input  logic [N_LANE-1:0] tfifo_af,
  output logic              roc_busy,
  output logic              chip_busy_any,
  output logic              busy_out,
  output logic [15:0]       busy_on_cnt
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      roc_busy      <= 1'b0;
      chip_busy_any <= 1'b0;
      busy_out      <= 1'b0;
      busy_on_cnt   <= '0;
    end else begin
      roc_busy      <= |(fifo_af & ch_en) || |tfifo_af;
      chip_busy_any <= |(chip_busy & ch_en);
      busy_out      <= roc_busy || chip_busy_any;
      if (!busy_out && (roc_busy || chip_busy_any)) busy_on_cnt <= busy_on_cnt + 1'b1;
    end
  end
endmodule
