// ctc_cmd: control command receiver and decoder of the CTC block.
//
// The document has the backend send control commands carrying a frame check
// sequence, verified with the CCITT CRC-16 before the configuration is
// decoded; commands go on to the pixel chips and to the controller's own
// modules, and configuration is passed on to further controllers on the same
// readout unit. The framing here is this design's own: one bit per tick on
// cmd_sdi (the 40 MHz rate), MSB first, a frame being
//
//   0x7E  dest  addr  data[15:8]  data[7:0]  fcs[15:8]  fcs[7:0]
//
// with the FCS computed over dest..data. A frame whose FCS checks and whose
// dest equals roc_addr or 0xFF is executed: addr < 0x80 writes a local
// register (map below), addr >= 0x80 re-sends the whole frame, sync byte
// included, to the pixel chips on pix_cmd_sdo. Bad frames are counted in
// crc_err_cnt and dropped. cmd_fwd_sdo repeats cmd_sdi one tick later for
// the next controller of the chain.
//
// Register map: 0x00 channel enable [7:0]; 0x10+i channel i {chip ID
// [15:8], lane [2:0]}; 0x20 {busy veto [2], trigger mode [1:0]}; 0x21
// trigger opcode [7:0]. Reset values are roc_pkg::cfg_default().
module ctc_cmd
  import roc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  logic        cmd_sdi,
  input  logic [7:0]  roc_addr,
  output roc_cfg_t    cfg,
  output logic        cmd_fwd_sdo,
  output logic        pix_cmd_sdo,
  output logic [15:0] cmd_ok_cnt,
  output logic [15:0] crc_err_cnt,
  output logic [15:0] pix_cmd_cnt
);
  typedef enum logic [1:0] {S_HUNT, S_RECV, S_CHECK} state_e;

  localparam int FRAME_BITS = 48;

  state_e                 st;
  logic [7:0]             sh;
  logic [FRAME_BITS-1:0]  frame;
  logic [5:0]             bcnt;
  logic                   crc_init, crc_en;
  logic [15:0]            crc;
  logic [FRAME_BITS+7:0]  pix_sr;
  logic [5:0]             pix_cnt;

  logic [7:0]  f_dest, f_addr;
  logic [15:0] f_data;
  assign f_dest = frame[47:40];
  assign f_addr = frame[39:32];
  assign f_data = frame[31:16];

  assign crc_init = tick && st == S_HUNT;
  assign crc_en   = tick && st == S_RECV;

  crc16_ccitt u_crc (
    .clk, .rst_n,
    .init(crc_init),
    .en  (crc_en),
    .din (cmd_sdi),
    .crc (crc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_HUNT;
      sh          <= '0;
      frame       <= '0;
      bcnt        <= '0;
      cfg         <= cfg_default();
      cmd_fwd_sdo <= 1'b0;
      pix_cmd_sdo <= 1'b0;
      pix_sr      <= '0;
      pix_cnt     <= '0;
      cmd_ok_cnt  <= '0;
      crc_err_cnt <= '0;
      pix_cmd_cnt <= '0;
    end else begin
      if (tick) begin
        cmd_fwd_sdo <= cmd_sdi;
        // pixel chip command output
        if (pix_cnt != 0) begin
          pix_cmd_sdo <= pix_sr[FRAME_BITS+7];
          pix_sr      <= {pix_sr[FRAME_BITS+6:0], 1'b0};
          pix_cnt     <= pix_cnt - 1'b1;
        end else begin
          pix_cmd_sdo <= 1'b0;
        end
      end
      unique case (st)
        S_HUNT: if (tick) begin
          sh <= {sh[6:0], cmd_sdi};
          if ({sh[6:0], cmd_sdi} == CMD_SYNC) begin
            st   <= S_RECV;
            bcnt <= '0;
          end
        end
        S_RECV: if (tick) begin
          frame <= {frame[FRAME_BITS-2:0], cmd_sdi};
          bcnt  <= bcnt + 1'b1;
          if (bcnt == 6'(FRAME_BITS - 1)) st <= S_CHECK;
        end
        S_CHECK: begin
          st <= S_HUNT;
          sh <= '0;
          if (crc != 16'h0000) begin
            crc_err_cnt <= crc_err_cnt + 1'b1;
          end else if (f_dest == roc_addr || f_dest == CMD_BROADCAST) begin
            cmd_ok_cnt <= cmd_ok_cnt + 1'b1;
            if (f_addr[7]) begin
              if (pix_cnt == 0) begin
                pix_sr      <= {CMD_SYNC, frame};
                pix_cnt     <= 6'(FRAME_BITS + 8);
                pix_cmd_cnt <= pix_cmd_cnt + 1'b1;
              end
            end else begin
              if (f_addr == 8'h00) cfg.ch_en <= f_data[N_CH-1:0];
              for (int i = 0; i < N_CH; i++) begin
                if (f_addr == 8'(8'h10 + i)) begin
                  cfg.chip_id[i] <= f_data[15:8];
                  cfg.ch_dest[i] <= f_data[2:0];
                end
              end
              if (f_addr == 8'h20) begin
                cfg.trig_mode <= trig_mode_e'(f_data[1:0]);
                cfg.busy_veto <= f_data[2];
              end
              if (f_addr == 8'h21) cfg.trig_opcode <= f_data[7:0];
            end
          end
        end
        default: st <= S_HUNT;
      endcase
    end
  end
endmodule
