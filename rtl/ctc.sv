// ctc: clock, trigger and control block of the controller.
//
// Per the document the CTC supplies the 40 MHz main clock to the pixel chips,
// forwards triggers and distributes control commands. The core runs on the
// 400 MHz bit clock; a divide-by-10 counter gives tick (one clock in ten,
// the 40 MHz character and command-bit strobe) and clk40_out (40 MHz,
// 50 % duty, high in the tick clock and the four clocks after it). Trigger handling is
// in ctc_trigger, command reception and configuration in ctc_cmd.
module ctc
  import roc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       roc_addr,
  input  logic             cmd_sdi,
  input  logic             trig_in,
  input  logic             busy,
  output logic             tick,
  output logic             clk40_out,
  output roc_cfg_t         cfg,
  output logic             trig_out,
  output logic             trig_push,
  output logic [TID_W-1:0] trig_id,
  output logic             cmd_fwd_sdo,
  output logic             pix_cmd_sdo,
  output logic [15:0]      trig_acc_cnt,
  output logic [15:0]      trig_veto_cnt,
  output logic [15:0]      trig_lost_cnt,
  output logic [15:0]      cmd_ok_cnt,
  output logic [15:0]      crc_err_cnt,
  output logic [15:0]      pix_cmd_cnt
);
  logic [3:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div       <= '0;
      tick      <= 1'b0;
      clk40_out <= 1'b0;
    end else begin
      div       <= (div == 4'd9) ? '0 : div + 1'b1;
      tick      <= (div == 4'd8);
      clk40_out <= (div >= 4'd8) || (div <= 4'd2);
    end
  end

  ctc_trigger u_trig (
    .clk, .rst_n, .trig_in,
    .mode     (cfg.trig_mode),
    .opcode   (cfg.trig_opcode),
    .busy,
    .busy_veto(cfg.busy_veto),
    .trig_out, .trig_push, .trig_id,
    .acc_cnt  (trig_acc_cnt),
    .veto_cnt (trig_veto_cnt),
    .lost_cnt (trig_lost_cnt)
  );

  ctc_cmd u_cmd (
    .clk, .rst_n, .tick, .cmd_sdi, .roc_addr, .cfg,
    .cmd_fwd_sdo, .pix_cmd_sdo, .cmd_ok_cnt, .crc_err_cnt, .pix_cmd_cnt
  );
endmodule
