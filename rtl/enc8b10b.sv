// enc8b10b: registered 8b/10b encoder (the "Coding" stage of a lane).
//
// The document states that the output data are 8b/10b coded before
// serialization; the standard 8b/10b code is used here. Each in_valid
// character (K flag plus byte) is encoded with the current running
// disparity, which then advances. The code word appears on code one cycle
// later with out_valid. Running disparity resets to negative.
module enc8b10b
  import roc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  char_t      in_char,
  output logic       out_valid,
  output logic [9:0] code,
  output logic       rd
);
  logic [10:0] e;
  assign e = enc8b10b_f(in_char.k, in_char.d, rd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd        <= 1'b0;
      out_valid <= 1'b0;
      code      <= COMMA_NEG;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        code <= e[9:0];
        rd   <= e[10];
      end
    end
  end

  a_k_valid: assert property (@(posedge clk) disable iff (!rst_n)
                              in_valid && in_char.k |-> is_valid_k(in_char.d));
endmodule
