// reassembly: one data reorganization lane of the controller.
//
// Chain as drawn in the document: trigger ID FIFO -> reformat (with busy
// insertion) -> 8b/10b coding -> serializer -> LVDS TX (off-chip pad, not in
// RTL). trig_push writes a trigger ID into the FIFO (dropped and counted
// in tid_lost when full). Every tick the reformat emits one character, which
// is coded one clock later and loaded into the serializer the clock after,
// so the first bit of a character leaves sdo three clocks after the tick.
// With ticks every 10 clocks the lane sends 400 Mb/s.
module reassembly
  import roc_pkg::*;
#(
  parameter int TFIFO_DEPTH = 16,
  parameter int TFIFO_AF    = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  tick,
  input  logic                  trig_push,
  input  logic [TID_W-1:0]      trig_id,
  input  logic [N_CH-1:0]       map,
  input  logic [N_CH-1:0]       ch_valid,
  input  fifo_word_t [N_CH-1:0] ch_data,
  output logic [N_CH-1:0]       ch_rd,
  input  logic [N_CH-1:0][7:0]  chip_id,
  input  logic [N_CH-1:0]       chip_busy,
  input  logic                  roc_busy,
  output logic                  sdo,
  output logic                  tfifo_af,
  output logic [15:0]           tid_lost,
  output logic [15:0]           pkt_cnt,
  output logic [15:0]           stall_cnt,
  output logic [15:0]           busy_ins_cnt
);
  logic             t_empty, t_full, t_rd;
  logic [TID_W-1:0] t_data;
  logic [$clog2(TFIFO_DEPTH):0] t_count;
  logic             c_valid;
  char_t            c_char;
  logic             e_valid;
  logic [9:0]       e_code;
  logic             e_rd;

  sync_fifo #(.W(TID_W), .DEPTH(TFIFO_DEPTH), .AF_LEVEL(TFIFO_AF)) u_tfifo (
    .clk, .rst_n,
    .wr_en      (trig_push && !t_full),
    .wr_data    (trig_id),
    .rd_en      (t_rd),
    .rd_data    (t_data),
    .empty      (t_empty),
    .full       (t_full),
    .almost_full(tfifo_af),
    .count      (t_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tid_lost <= '0;
    else if (trig_push && t_full) tid_lost <= tid_lost + 1'b1;
  end

  reformat u_reformat (
    .clk, .rst_n, .tick,
    .map, .ch_valid, .ch_data, .ch_rd, .chip_id,
    .tid_valid   (!t_empty),
    .tid         (t_data),
    .tid_rd      (t_rd),
    .chip_busy, .roc_busy,
    .out_valid   (c_valid),
    .out_char    (c_char),
    .pkt_cnt, .stall_cnt, .busy_ins_cnt
  );

  enc8b10b u_enc (
    .clk, .rst_n,
    .in_valid (c_valid),
    .in_char  (c_char),
    .out_valid(e_valid),
    .code     (e_code),
    .rd       (e_rd)
  );

  serializer u_ser (
    .clk, .rst_n,
    .load(e_valid),
    .din (e_code),
    .sdo
  );
endmodule
