// tb_crossbar: random configurations, FIFO flags, data and read strobes;
// every output is compared with the routing worked out here.
module tb_crossbar;
  import roc_pkg::*;
  logic [N_CH-1:0] ch_en, ch_valid, ch_rd;
  logic [N_CH-1:0][2:0] ch_dest;
  fifo_word_t [N_CH-1:0] ch_data;
  logic [N_LANE-1:0][N_CH-1:0] lane_map, lane_valid, lane_rd;
  fifo_word_t [N_LANE-1:0][N_CH-1:0] lane_data;
  int checks = 0, failures = 0;

  crossbar dut (.ch_en, .ch_dest, .ch_valid, .ch_data, .ch_rd,
                .lane_map, .lane_valid, .lane_data, .lane_rd);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      ch_en    = 8'($urandom);
      ch_valid = 8'($urandom);
      for (int i = 0; i < N_CH; i++) begin
        ch_dest[i] = 3'($urandom);
        ch_data[i] = 9'($urandom);
      end
      for (int j = 0; j < N_LANE; j++) lane_rd[j] = 8'($urandom);
      #1;
      for (int i = 0; i < N_CH; i++) begin
        logic exp_rd;
        exp_rd = ch_en[i] && lane_rd[ch_dest[i]][i];
        checks++;
        if (ch_rd[i] !== exp_rd) begin failures++; $display("FAIL ch_rd %0d", i); end
        for (int j = 0; j < N_LANE; j++) begin
          logic m;
          m = ch_en[i] && (int'(ch_dest[i]) == j);
          checks++;
          if (lane_map[j][i] !== m || lane_valid[j][i] !== (m && ch_valid[i]) ||
              (m && lane_data[j][i] !== ch_data[i])) begin
            failures++; $display("FAIL lane %0d ch %0d", j, i);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
