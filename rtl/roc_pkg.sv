// roc_pkg: types, constants and 8b/10b coding functions shared by the
// read-out controller.
//
// The controller concentrates eight 400 Mb/s 8b/10b serial links from pixel
// chips into eight 400 Mb/s 8b/10b output lanes. Eight channels, eight lanes,
// the 400 Mb/s line rate, 8b/10b coding, the 40 MHz chip clock and the CCITT
// CRC-16 follow the document. The control characters, the packet layout, the
// register map and the 16-bit trigger ID are this design's own choices.
//
// 10-bit code words are held as code[9:0] = {a,b,c,d,e,i,f,g,h,j}: bit 9 ('a')
// is sent first on the line. Bytes are HGFEDCBA with 'A' in bit 0, so the 5b
// part is byte[4:0] and the 3b part byte[7:5].
package roc_pkg;

  localparam int N_CH   = 8;   // preprocessing channels (one per pixel chip)
  localparam int N_LANE = 8;   // reassembly / output lanes
  localparam int TID_W  = 16;  // trigger ID width

  // Control characters (byte value, sent with the K flag set).
  localparam logic [7:0] K28_0 = 8'h1C;
  localparam logic [7:0] K28_2 = 8'h5C;
  localparam logic [7:0] K28_3 = 8'h7C;
  localparam logic [7:0] K28_5 = 8'hBC;
  localparam logic [7:0] K23_7 = 8'hF7;
  localparam logic [7:0] K27_7 = 8'hFB;
  localparam logic [7:0] K29_7 = 8'hFD;

  // Meaning of the control characters on the input links (from the chips)
  // and on the output lanes (to the optical transceiver).
  localparam logic [7:0] C_IDLE     = K28_5;  // filler, removed on input
  localparam logic [7:0] C_EOF      = K28_0;  // end of a chip's event frame
  localparam logic [7:0] C_BUSY_ON  = K28_2;  // busy-on
  localparam logic [7:0] C_BUSY_OFF = K28_3;  // busy-off
  localparam logic [7:0] C_SOP      = K27_7;  // start of package
  localparam logic [7:0] C_CHIP     = K23_7;  // chip header, chip ID follows
  localparam logic [7:0] C_EOP      = K29_7;  // end of package

  // K28.5 in both disparities: the comma used for word alignment.
  localparam logic [9:0] COMMA_NEG = 10'b0011111010;
  localparam logic [9:0] COMMA_POS = 10'b1100000101;

  // Serial command frame: sync byte, then dest, addr, data[15:8], data[7:0],
  // fcs[15:8], fcs[7:0].
  localparam logic [7:0] CMD_SYNC      = 8'h7E;
  localparam logic [7:0] CMD_BROADCAST = 8'hFF;

  typedef struct packed {
    logic       k;
    logic [7:0] d;
  } char_t;

  // Word cached in a channel FIFO: a data byte or an end-of-frame mark.
  typedef struct packed {
    logic       eof;
    logic [7:0] d;
  } fifo_word_t;

  typedef enum logic [1:0] {
    TRIG_DIRECT = 2'd0,  // trigger line forwarded as is
    TRIG_OPCODE = 2'd1,  // each trigger sent as an 8-bit opcode
    TRIG_OFF    = 2'd2,  // triggers blocked
    TRIG_OFF2   = 2'd3
  } trig_mode_e;

  // Configuration written by the command decoder.
  typedef struct packed {
    logic [N_CH-1:0]         ch_en;       // reg 0x00
    logic [N_CH-1:0][2:0]    ch_dest;     // reg 0x10+i bits [2:0]
    logic [N_CH-1:0][7:0]    chip_id;     // reg 0x10+i bits [15:8]
    trig_mode_e              trig_mode;   // reg 0x20 bits [1:0]
    logic                    busy_veto;   // reg 0x20 bit 2
    logic [7:0]              trig_opcode; // reg 0x21 bits [7:0]
  } roc_cfg_t;

  function automatic roc_cfg_t cfg_default();
    roc_cfg_t c;
    c.ch_en = '1;
    for (int i = 0; i < N_CH; i++) begin
      c.ch_dest[i] = 3'(i);
      c.chip_id[i] = 8'(i);
    end
    c.trig_mode   = TRIG_OPCODE;
    c.busy_veto   = 1'b1;
    c.trig_opcode = 8'hA5;
    return c;
  endfunction

  // ---------------------------------------------------------------- 8b/10b
  // 5b/6b table, form used when the running disparity is negative.
  function automatic logic [5:0] tab6(input logic [4:0] x);
    unique case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b table, negative-disparity form; alt7 selects the A7 code.
  function automatic logic [3:0] tab4(input logic [2:0] y, input logic alt7);
    unique case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return alt7 ? 4'b0111 : 4'b1110;
    endcase
  endfunction

  function automatic logic is_valid_k(input logic [7:0] b);
    return (b[4:0] == 5'd28) ||
           (b[7:5] == 3'd7 && (b[4:0] == 5'd23 || b[4:0] == 5'd27 ||
                               b[4:0] == 5'd29 || b[4:0] == 5'd30));
  endfunction

  // Encode one character. rd is the running disparity before it (1 = +).
  // Returns {rd_after, code[9:0]}.
  function automatic logic [10:0] enc8b10b_f(input logic k, input logic [7:0] b,
                                             input logic rd);
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] s6;
    logic [3:0] s4;
    logic       rd1, bal6, bal4, alt7;
    logic [9:0] code;
    x = b[4:0];
    y = b[7:5];
    if (k) begin
      // Build the negative-disparity form, then invert it all for rd = +.
      s6 = (x == 5'd28) ? 6'b001111 : tab6(x);
      s4 = tab4(y, y == 3'd7);
      bal4 = ($countones(s4) == 2);
      if (!bal4 || y == 3'd3) s4 = ~s4;
      code = {s6, s4};
      if (rd) code = ~code;
    end else begin
      s6   = tab6(x);
      bal6 = ($countones(s6) == 3);
      if (rd && (!bal6 || x == 5'd7)) s6 = ~s6;
      rd1  = rd ^ !bal6;
      alt7 = (y == 3'd7) &&
             ((!rd1 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
              ( rd1 && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
      s4   = tab4(y, alt7);
      bal4 = ($countones(s4) == 2);
      if (rd1 && (!bal4 || y == 3'd3)) s4 = ~s4;
      code = {s6, s4};
    end
    return {rd ^ ($countones(code) != 5), code};
  endfunction

  // Decode one code word. Returns {err, k, byte}. Running disparity is not
  // checked; an unknown sub-block or an invalid K code sets err.
  function automatic logic [9:0] dec8b10b_f(input logic [9:0] code);
    logic [5:0] s6;
    logic [3:0] s4;
    logic [4:0] x;
    logic [2:0] y;
    logic       f6, f4, k, a7;
    s6 = code[9:4];
    s4 = code[3:0];
    x = '0; y = '0; f6 = 1'b0; f4 = 1'b0; k = 1'b0; a7 = 1'b0;
    if (s6 == 6'b001111 || s6 == 6'b110000) begin
      k  = 1'b1;
      x  = 5'd28;
      f6 = 1'b1;
      if (s6 == 6'b110000) s4 = ~s4;
    end else begin
      for (int i = 0; i < 32; i++) begin
        logic [5:0] t;
        t = tab6(5'(i));
        if (s6 == t || (s6 == ~t && ($countones(t) != 3 || i == 7))) begin
          x  = 5'(i);
          f6 = 1'b1;
        end
      end
    end
    for (int j = 0; j < 8; j++) begin
      logic [3:0] t;
      t = tab4(3'(j), 1'b0);
      if (s4 == t || (s4 == ~t && ($countones(t) != 2 || j == 3))) begin
        y  = 3'(j);
        f4 = 1'b1;
      end
    end
    if (s4 == 4'b0111 || s4 == 4'b1000) begin
      y  = 3'd7;
      f4 = 1'b1;
      a7 = 1'b1;
    end
    if (!k && a7 && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30))
      k = 1'b1;
    return {!(f6 && f4), k, y, x};
  endfunction

endpackage
