// crossbar: combinational full-mesh router from the channel FIFOs to the
// reassembly lanes.
//
// As in the document, any of the N_CH preprocessing channels can feed any of
// the N_LANE reassembly lanes, chosen by configuration, and the block holds no
// state. Configuration here is one destination lane (ch_dest) and one enable
// bit (ch_en) per channel, so a channel belongs to at most one lane while a
// lane may collect several channels. For each lane the crossbar presents the
// map of channels it serves, each such channel's FIFO head and its non-empty
// flag; a lane's read strobe for a channel reaches that channel's FIFO only
// when the channel is mapped to that lane.
module crossbar
  import roc_pkg::*;
(
  input  logic [N_CH-1:0]                    ch_en,
  input  logic [N_CH-1:0][2:0]               ch_dest,
  // channel side
  input  logic [N_CH-1:0]                    ch_valid,
  input  fifo_word_t [N_CH-1:0]              ch_data,
  output logic [N_CH-1:0]                    ch_rd,
  // lane side
  output logic [N_LANE-1:0][N_CH-1:0]        lane_map,
  output logic [N_LANE-1:0][N_CH-1:0]        lane_valid,
  output fifo_word_t [N_LANE-1:0][N_CH-1:0]  lane_data,
  input  logic [N_LANE-1:0][N_CH-1:0]        lane_rd
);
  always_comb begin
    ch_rd = '0;
    for (int j = 0; j < N_LANE; j++) begin
      for (int i = 0; i < N_CH; i++) begin
        lane_map[j][i]   = ch_en[i] && (ch_dest[i] == 3'(j));
        lane_valid[j][i] = lane_map[j][i] && ch_valid[i];
        lane_data[j][i]  = lane_map[j][i] ? ch_data[i] : '0;
        if (lane_map[j][i] && lane_rd[j][i]) ch_rd[i] = 1'b1;
      end
    end
  end
endmodule
