// ctc_trigger: trigger forwarding and encoding of the CTC block.
//
// The document has the CTC decode the external trigger quickly and, depending
// on the configured mode, forward it or encode it into a trigger opcode for
// the pixel chips, with the trigger delay kept small. This design works on
// the 400 MHz core clock: a rising edge of trig_in is a trigger. It is
// accepted unless the mode is off or busy is high with busy_veto set (busy
// information adjusting the CTC's working state), and counted as lost when it
// arrives while an opcode is still being sent. On acceptance:
//   TRIG_DIRECT  trig_out pulses for one clock, one clock after the edge;
//   TRIG_OPCODE  the 8-bit opcode is sent MSB first on trig_out, one bit per
//                clock, its first bit one clock after the edge.
// Each accepted trigger is numbered from 0 (trig_id) and announced with a
// one-clock trig_push, one clock after the edge, for the lanes' trigger ID
// FIFOs.
module ctc_trigger
  import roc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             trig_in,
  input  trig_mode_e       mode,
  input  logic [7:0]       opcode,
  input  logic             busy,
  input  logic             busy_veto,
  output logic             trig_out,
  output logic             trig_push,
  output logic [TID_W-1:0] trig_id,
  output logic [15:0]      acc_cnt,
  output logic [15:0]      veto_cnt,
  output logic [15:0]      lost_cnt
);
  logic       trig_d;
  logic       edge_det, sending, vetoed, accept;
  logic [6:0] osr;
  logic [2:0] ocnt;
  logic [TID_W-1:0] next_id;

  assign edge_det = trig_in && !trig_d;
  assign sending  = (ocnt != 0);
  assign vetoed   = edge_det && (mode == TRIG_OFF || mode == TRIG_OFF2 || (busy_veto && busy));
  assign accept   = edge_det && !vetoed && !(mode == TRIG_OPCODE && sending);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_d    <= 1'b0;
      trig_out  <= 1'b0;
      trig_push <= 1'b0;
      trig_id   <= '0;
      next_id   <= '0;
      osr       <= '0;
      ocnt      <= '0;
      acc_cnt   <= '0;
      veto_cnt  <= '0;
      lost_cnt  <= '0;
    end else begin
      trig_d    <= trig_in;
      trig_push <= accept;
      trig_out  <= 1'b0;
      if (accept) begin
        trig_id <= next_id;
        next_id <= next_id + 1'b1;
        acc_cnt <= acc_cnt + 1'b1;
        if (mode == TRIG_OPCODE) begin
          trig_out <= opcode[7];
          osr      <= opcode[6:0];
          ocnt     <= 3'd7;
        end else begin
          trig_out <= 1'b1;
        end
      end else if (sending) begin
        trig_out <= osr[6];
        osr      <= {osr[5:0], 1'b0};
        ocnt     <= ocnt - 1'b1;
      end
      if (vetoed) veto_cnt <= veto_cnt + 1'b1;
      if (edge_det && !vetoed && mode == TRIG_OPCODE && sending) lost_cnt <= lost_cnt + 1'b1;
    end
  end
endmodule
