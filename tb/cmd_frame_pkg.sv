// cmd_frame_pkg: testbench helpers that build serial command frames for the
// controller: 0x7E, dest, addr, data[15:8], data[7:0], fcs[15:8], fcs[7:0],
// with the CCITT CRC-16 (preset 0xFFFF, MSB first) over dest..data.
package cmd_frame_pkg;
  function automatic logic [15:0] crc16(input logic [31:0] msg);
    logic [15:0] r = 16'hFFFF;
    for (int j = 31; j >= 0; j--) begin
      logic fb;
      fb = r[15] ^ msg[j];
      r = r << 1;
      if (fb) r = r ^ 16'h1021;
    end
    return r;
  endfunction

  // 56-bit frame, sent MSB first; bad_fcs flips one FCS bit
  function automatic logic [55:0] make_frame(input logic [7:0] dest, input logic [7:0] addr,
                                             input logic [15:0] data, input bit bad_fcs = 0);
    logic [31:0] m;
    logic [15:0] f;
    m = {dest, addr, data};
    f = crc16(m) ^ (bad_fcs ? 16'h0010 : 16'h0000);
    return {8'h7E, m, f};
  endfunction
endpackage
