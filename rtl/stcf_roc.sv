// stcf_roc: top level of the read-out controller.
//
// Eight pixel-chip links (sdi, 400 Mb/s 8b/10b each) enter eight
// preprocessing channels that align, decode, drop idles, extract chip busy
// and cache the event data. A configurable crossbar routes each channel to
// one of eight reassembly lanes; a lane builds one package per trigger from
// the channels routed to it and sends it 8b/10b coded at 400 Mb/s on sdo. The
// CTC block provides the 40 MHz chip clock, forwards or encodes triggers
// (trig_in -> trig_out) and numbers them for the lanes, and checks and decodes
// CRC-protected commands (cmd_sdi) into the configuration, passing chip
// commands on pix_cmd_sdo and all commands down the chain on cmd_fwd_sdo. The
// busy status block drives busy_out to the backend and feeds ROC busy to the
// lanes and the trigger veto. The structure follows the document's block
// diagram; the LVDS pads are outside this module (serial lines are single
// ended here).
//
// Clocking: one 400 MHz clock (clk) for everything, active-low asynchronous
// reset rst_n. Status counters are brought out for monitoring.
module stcf_roc
  import roc_pkg::*;
#(
  parameter int FIFO_DEPTH  = 64,
  parameter int FIFO_AF     = 48,
  parameter int TFIFO_DEPTH = 16,
  parameter int TFIFO_AF    = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [7:0]               roc_addr,
  // pixel chips
  input  logic [N_CH-1:0]          sdi,
  output logic                     clk40_out,
  output logic                     trig_out,
  output logic                     pix_cmd_sdo,
  // backend
  input  logic                     trig_in,
  input  logic                     cmd_sdi,
  output logic                     cmd_fwd_sdo,
  output logic [N_LANE-1:0]        sdo,
  output logic                     busy_out,
  output logic                     chip_busy_any,
  // status
  output roc_cfg_t                 cfg,
  output logic [N_CH-1:0]          ch_locked,
  output logic [N_CH-1:0]          ch_overflow,
  output logic [N_CH-1:0][7:0]     ch_err_cnt,
  output logic [N_LANE-1:0][15:0]  lane_pkt_cnt,
  output logic [N_LANE-1:0][15:0]  lane_stall_cnt,
  output logic [N_LANE-1:0][15:0]  lane_busy_ins_cnt,
  output logic [N_LANE-1:0][15:0]  lane_tid_lost,
  output logic [15:0]              trig_acc_cnt,
  output logic [15:0]              trig_veto_cnt,
  output logic [15:0]              trig_lost_cnt,
  output logic [15:0]              cmd_ok_cnt,
  output logic [15:0]              crc_err_cnt,
  output logic [15:0]              pix_cmd_cnt,
  output logic [15:0]              busy_on_cnt
);
  logic                         tick;
  logic                         trig_push;
  logic [TID_W-1:0]             trig_id;
  logic                         roc_busy;

  logic [N_CH-1:0]              ch_empty, ch_af, ch_busy, ch_rd;
  fifo_word_t [N_CH-1:0]        ch_data;

  logic [N_LANE-1:0][N_CH-1:0]       lane_map, lane_valid, lane_rd;
  fifo_word_t [N_LANE-1:0][N_CH-1:0] lane_data;
  logic [N_LANE-1:0]                 tfifo_af;

  ctc u_ctc (
    .clk, .rst_n, .roc_addr, .cmd_sdi, .trig_in,
    .busy(busy_out),
    .tick, .clk40_out, .cfg, .trig_out, .trig_push, .trig_id,
    .cmd_fwd_sdo, .pix_cmd_sdo,
    .trig_acc_cnt, .trig_veto_cnt, .trig_lost_cnt,
    .cmd_ok_cnt, .crc_err_cnt, .pix_cmd_cnt
  );

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    preproc #(.FIFO_DEPTH(FIFO_DEPTH), .FIFO_AF(FIFO_AF)) u_pre (
      .clk, .rst_n,
      .enable     (cfg.ch_en[i]),
      .sdi        (sdi[i]),
      .rd_en      (ch_rd[i]),
      .rd_data    (ch_data[i]),
      .empty      (ch_empty[i]),
      .almost_full(ch_af[i]),
      .locked     (ch_locked[i]),
      .chip_busy  (ch_busy[i]),
      .overflow   (ch_overflow[i]),
      .err_cnt    (ch_err_cnt[i])
    );
  end

  crossbar u_xbar (
    .ch_en     (cfg.ch_en),
    .ch_dest   (cfg.ch_dest),
    .ch_valid  (~ch_empty),
    .ch_data   (ch_data),
    .ch_rd     (ch_rd),
    .lane_map  (lane_map),
    .lane_valid(lane_valid),
    .lane_data (lane_data),
    .lane_rd   (lane_rd)
  );

  for (genvar j = 0; j < N_LANE; j++) begin : g_lane
    reassembly #(.TFIFO_DEPTH(TFIFO_DEPTH), .TFIFO_AF(TFIFO_AF)) u_lane (
      .clk, .rst_n, .tick,
      .trig_push   (trig_push && |lane_map[j]),
      .trig_id     (trig_id),
      .map         (lane_map[j]),
      .ch_valid    (lane_valid[j]),
      .ch_data     (lane_data[j]),
      .ch_rd       (lane_rd[j]),
      .chip_id     (cfg.chip_id),
      .chip_busy   (ch_busy),
      .roc_busy    (roc_busy),
      .sdo         (sdo[j]),
      .tfifo_af    (tfifo_af[j]),
      .tid_lost    (lane_tid_lost[j]),
      .pkt_cnt     (lane_pkt_cnt[j]),
      .stall_cnt   (lane_stall_cnt[j]),
      .busy_ins_cnt(lane_busy_ins_cnt[j])
    );
  end

  busy_status u_busy (
    .clk, .rst_n,
    .ch_en        (cfg.ch_en),
    .chip_busy    (ch_busy),
    .fifo_af      (ch_af),
    .tfifo_af     (tfifo_af),
    .roc_busy     (roc_busy),
    .chip_busy_any(chip_busy_any),
    .busy_out     (busy_out),
    .busy_on_cnt  (busy_on_cnt)
  );
endmodule
