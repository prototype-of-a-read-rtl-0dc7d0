// reformat: packet builder of one reassembly lane, with busy insertion.
//
// For every trigger ID taken from the lane's trigger ID FIFO the lane builds
// one package, visiting the channels the crossbar maps to it in circular
// order (lowest index first), as the document describes:
//
//   SOP  TID[15:8]  TID[7:0]  { CHIP  chip_id  data ... }  EOP
//
// where SOP/CHIP/EOP are K27.7/K23.7/K29.7 and the braces repeat per mapped
// channel. A channel's part ends when its FIFO delivers the eof mark of the
// chip's frame. The busy state of the lane, {ROC busy, busy flags of its
// chips}, is inserted into the stream when it changes, as busy-on (K28.2,
// something busy) or busy-off (K28.3, nothing busy) followed by two data
// bytes: {7'b0, roc_busy} and the chip busy mask. Insertion happens between
// packages or while the lane waits for data inside one. A K28.5 idle fills
// every other slot. The document gives the fields; the codes, byte order and
// insertion points are this design's own.
//
// Timing: one character per tick (every 10 clocks for a 400 Mb/s lane),
// registered, out_valid high for one clock. FIFO pops (tid_rd, ch_rd) are
// one-clock pulses in the clock after the tick; ticks must be at least two
// clocks apart.
module reformat
  import roc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    tick,
  // channels routed to this lane
  input  logic [N_CH-1:0]         map,
  input  logic [N_CH-1:0]         ch_valid,
  input  fifo_word_t [N_CH-1:0]   ch_data,
  output logic [N_CH-1:0]         ch_rd,
  input  logic [N_CH-1:0][7:0]    chip_id,
  // trigger ID FIFO
  input  logic                    tid_valid,
  input  logic [TID_W-1:0]        tid,
  output logic                    tid_rd,
  // busy sources
  input  logic [N_CH-1:0]         chip_busy,
  input  logic                    roc_busy,
  // character output
  output logic                    out_valid,
  output char_t                   out_char,
  // statistics
  output logic [15:0]             pkt_cnt,
  output logic [15:0]             stall_cnt,
  output logic [15:0]             busy_ins_cnt
);
  localparam int CW = $clog2(N_CH);

  typedef enum logic [2:0] {
    S_IDLE, S_BSY1, S_BSY2, S_TIDH, S_TIDL, S_HDR, S_CID, S_DATA
  } state_e;

  state_e            st, ret;
  logic [N_CH:0]     bstat, bsent;
  logic [TID_W-1:0]  tid_q;
  logic [CW-1:0]     ch_cur;
  logic [CW:0]       start;
  logic              nf;
  logic [CW-1:0]     nidx;

  assign bstat = {roc_busy, chip_busy & map};

  // Next mapped channel at or after 'start'.
  assign start = (st == S_DATA) ? (CW+1)'(ch_cur) + 1'b1 : '0;
  always_comb begin
    nf   = 1'b0;
    nidx = '0;
    for (int i = N_CH - 1; i >= 0; i--) begin
      if (map[i] && (CW+1)'(i) >= start) begin
        nf   = 1'b1;
        nidx = CW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      ret          <= S_IDLE;
      bsent        <= '0;
      tid_q        <= '0;
      ch_cur       <= '0;
      out_valid    <= 1'b0;
      out_char     <= '{k: 1'b1, d: C_IDLE};
      ch_rd        <= '0;
      tid_rd       <= 1'b0;
      pkt_cnt      <= '0;
      stall_cnt    <= '0;
      busy_ins_cnt <= '0;
    end else begin
      out_valid <= 1'b0;
      ch_rd     <= '0;
      tid_rd    <= 1'b0;
      if (tick) begin
        out_valid <= 1'b1;
        out_char  <= '{k: 1'b1, d: C_IDLE};
        unique case (st)
          S_IDLE: begin
            if (bstat != bsent) begin
              out_char     <= '{k: 1'b1, d: (|bstat) ? C_BUSY_ON : C_BUSY_OFF};
              bsent        <= bstat;
              ret          <= S_IDLE;
              st           <= S_BSY1;
              busy_ins_cnt <= busy_ins_cnt + 1'b1;
            end else if (tid_valid) begin
              out_char <= '{k: 1'b1, d: C_SOP};
              tid_q    <= tid;
              tid_rd   <= 1'b1;
              st       <= S_TIDH;
            end
          end
          S_BSY1: begin
            out_char <= '{k: 1'b0, d: {7'b0, bsent[N_CH]}};
            st       <= S_BSY2;
          end
          S_BSY2: begin
            out_char <= '{k: 1'b0, d: 8'(bsent[N_CH-1:0])};
            st       <= ret;
          end
          S_TIDH: begin
            out_char <= '{k: 1'b0, d: tid_q[15:8]};
            st       <= S_TIDL;
          end
          S_TIDL: begin
            out_char <= '{k: 1'b0, d: tid_q[7:0]};
            st       <= S_HDR;
          end
          S_CID: begin
            out_char <= '{k: 1'b0, d: chip_id[ch_cur]};
            st       <= S_DATA;
          end
          S_HDR, S_DATA: begin
            if (st == S_DATA && map[ch_cur] && ch_valid[ch_cur] && !ch_data[ch_cur].eof) begin
              out_char      <= '{k: 1'b0, d: ch_data[ch_cur].d};
              ch_rd[ch_cur] <= 1'b1;
            end else if (st == S_DATA && map[ch_cur] && !ch_valid[ch_cur]) begin
              // waiting for the chip's data: idle, or report a busy change
              if (bstat != bsent) begin
                out_char     <= '{k: 1'b1, d: (|bstat) ? C_BUSY_ON : C_BUSY_OFF};
                bsent        <= bstat;
                ret          <= S_DATA;
                st           <= S_BSY1;
                busy_ins_cnt <= busy_ins_cnt + 1'b1;
              end else begin
                stall_cnt <= stall_cnt + 1'b1;
              end
            end else begin
              // channel part finished (or entering the channel loop)
              if (st == S_DATA && map[ch_cur]) ch_rd[ch_cur] <= 1'b1;  // pop eof
              if (nf) begin
                out_char <= '{k: 1'b1, d: C_CHIP};
                ch_cur   <= nidx;
                st       <= S_CID;
              end else begin
                out_char <= '{k: 1'b1, d: C_EOP};
                st       <= S_IDLE;
                pkt_cnt  <= pkt_cnt + 1'b1;
              end
            end
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end
endmodule
