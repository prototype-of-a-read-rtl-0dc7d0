// crc16_ccitt: bit-serial CCITT CRC-16 (polynomial x^16 + x^12 + x^5 + 1,
// 0x1021), used to check the frame check sequence of control commands.
//
// The document names the CCITT 16-bit CRC; the preset value 0xFFFF, MSB-first
// bit order and the absence of a final inversion are this design's choices
// (the common "CRC-16/CCITT-FALSE" variant). init presets the register; each
// clock with en shifts in one bit. Shifting a message followed by its own CRC
// (MSB first) leaves crc == 0, which is how the command decoder checks a frame.
module crc16_ccitt (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic        din,
  output logic [15:0] crc
);
  localparam logic [15:0] POLY = 16'h1021;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) crc <= 16'hFFFF;
    else if (init) crc <= 16'hFFFF;
    else if (en) crc <= {crc[14:0], 1'b0} ^ ((crc[15] ^ din) ? POLY : 16'h0000);
  end
endmodule
