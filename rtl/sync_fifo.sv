// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used twice in the controller: as the per-channel cache that holds
// preprocessed chip data, and as the per-lane trigger ID FIFO. The document
// names both FIFOs; depth, width, the almost-full threshold and the
// first-word-fall-through read are this design's own choices.
//
// Interface: wr_en writes wr_data when not full; rd_data always shows the
// oldest word while empty is low, and rd_en removes it. count, full, empty
// and almost_full (count >= AF_LEVEL) are registered state. A write and a
// read may happen in the same cycle. Writing when full or reading when empty
// is a caller error and is caught by assertions.
module sync_fifo #(
  parameter int W        = 9,
  parameter int DEPTH    = 64,
  parameter int AF_LEVEL = 48
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic         almost_full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      if (do_wr && !do_rd) count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  assign rd_data     = mem[rp];
  assign empty       = (count == 0);
  assign full        = (count == (AW+1)'(DEPTH));
  assign almost_full = (count >= (AW+1)'(AF_LEVEL));

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
