// deser_align: serial-to-parallel converter with comma word alignment.
//
// The document has the preprocessing stage convert the 400 Mb/s stream to
// 10-bit words and align them. This design shifts one bit per 400 MHz clock
// into a 10-bit register and looks for the K28.5 comma in either disparity.
// A comma sets the word boundary (and locked); after that a word is emitted
// every 10 clocks. A comma seen at another phase realigns the boundary and
// counts in realign_cnt. word_valid is a one-clock strobe; word holds the
// code with its first received bit in bit 9.
module deser_align
  import roc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sdi,
  output logic       word_valid,
  output logic [9:0] word,
  output logic       locked,
  output logic [7:0] realign_cnt
);
  logic [9:0] sr;
  logic [3:0] cnt;
  logic [9:0] sr_next;
  logic       comma;

  assign sr_next = {sr[8:0], sdi};
  assign comma   = (sr_next == COMMA_NEG) || (sr_next == COMMA_POS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr          <= '0;
      cnt         <= '0;
      word        <= '0;
      word_valid  <= 1'b0;
      locked      <= 1'b0;
      realign_cnt <= '0;
    end else begin
      sr         <= sr_next;
      word_valid <= 1'b0;
      if (comma) begin
        if (locked && cnt != 4'd9 && realign_cnt != 8'hFF)
          realign_cnt <= realign_cnt + 1'b1;
        cnt        <= '0;
        locked     <= 1'b1;
        word       <= sr_next;
        word_valid <= 1'b1;
      end else if (cnt == 4'd9) begin
        cnt        <= '0;
        word       <= sr_next;
        word_valid <= locked;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
