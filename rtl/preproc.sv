// preproc: serial data preprocessing and cache for one pixel-chip link.
//
// Follows the document's chain: the 400 Mb/s serial line is converted to
// 10-bit words and aligned (deser_align), each word is 8b/10b decoded, idle
// characters are removed, busy information is extracted, and the remaining
// data are cached in a FIFO for the crossbar. The character meanings are this
// design's own: K28.5 idle (dropped), K28.2 / K28.3 chip busy-on / busy-off
// (update chip_busy, not stored), K28.0 end of the chip's event frame (stored
// as an eof mark), data bytes stored as they are. Other K codes and code
// errors are dropped and counted in err_cnt. The running disparity of the
// link is tracked from the first unbalanced word after lock; a word whose
// disparity does not fit it is counted in err_cnt too but still used, since it
// decoded. A word arriving while the FIFO
// is full is dropped and sets the sticky overflow flag. With enable low the
// channel stores nothing.
//
// Latency: a character is readable from the FIFO two clocks after the clock
// edge that samples its last bit.
module preproc
  import roc_pkg::*;
#(
  parameter int FIFO_DEPTH = 64,
  parameter int FIFO_AF    = 48
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       sdi,
  // FIFO read side
  input  logic       rd_en,
  output fifo_word_t rd_data,
  output logic       empty,
  output logic       almost_full,
  // status
  output logic       locked,
  output logic       chip_busy,
  output logic       overflow,
  output logic [7:0] err_cnt
);
  logic       wv;
  logic [9:0] word;
  logic [7:0] realign_cnt;
  logic [9:0] dec;
  logic       derr, dk;
  logic [7:0] db;
  logic       wr_en;
  logic       rd_known, rd_pos;
  logic [3:0] ones;
  logic       disp_err;
  fifo_word_t wr_data;
  logic       full;
  logic [$clog2(FIFO_DEPTH):0] count;

  deser_align u_deser (
    .clk, .rst_n, .sdi,
    .word_valid (wv),
    .word       (word),
    .locked     (locked),
    .realign_cnt(realign_cnt)
  );

  assign dec  = dec8b10b_f(word);
  assign derr = dec[9];
  assign dk   = dec[8];
  assign db   = dec[7:0];

  // running disparity check: +2 words need negative disparity before them,
  // -2 words positive; other counts of ones are never valid
  assign ones     = 4'($countones(word));
  assign disp_err = (ones < 4 || ones > 6) ||
                    (rd_known && ((ones == 6 && rd_pos) || (ones == 4 && !rd_pos)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_known <= 1'b0;
      rd_pos   <= 1'b0;
    end else if (wv && ones != 5) begin
      rd_known <= 1'b1;
      rd_pos   <= (ones > 5);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en     <= 1'b0;
      wr_data   <= '0;
      chip_busy <= 1'b0;
      overflow  <= 1'b0;
      err_cnt   <= '0;
    end else begin
      wr_en <= 1'b0;
      if (wv && enable) begin
        if ((derr || disp_err) && err_cnt != 8'hFF) err_cnt <= err_cnt + 1'b1;
        if (derr || (dk && !(db == C_IDLE || db == C_EOF ||
                             db == C_BUSY_ON || db == C_BUSY_OFF))) begin
          if (!derr && !disp_err && err_cnt != 8'hFF) err_cnt <= err_cnt + 1'b1;
        end else if (dk && db == C_BUSY_ON) begin
          chip_busy <= 1'b1;
        end else if (dk && db == C_BUSY_OFF) begin
          chip_busy <= 1'b0;
        end else if (!(dk && db == C_IDLE)) begin
          wr_en   <= 1'b1;
          wr_data <= '{eof: dk, d: dk ? 8'h00 : db};
        end
      end
      if (wr_en && full) overflow <= 1'b1;
    end
  end

  sync_fifo #(.W($bits(fifo_word_t)), .DEPTH(FIFO_DEPTH), .AF_LEVEL(FIFO_AF)) u_fifo (
    .clk, .rst_n,
    .wr_en      (wr_en && !full),
    .wr_data    (wr_data),
    .rd_en      (rd_en),
    .rd_data    (rd_data),
    .empty      (empty),
    .full       (full),
    .almost_full(almost_full),
    .count      (count)
  );
endmodule
