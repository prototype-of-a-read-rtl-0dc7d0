// serializer: 10-bit parallel to serial converter of a lane.
//
// The document has each lane send its coded words through a
// parallel-to-serial stage at 400 Mb/s. Here the core clock is the 400 MHz
// bit clock: load takes a 10-bit code word (bit 9 first on the line), and one
// bit leaves on sdo per clock. The caller loads exactly every 10 clocks; the
// first bit of a word is on sdo in the clock after load. After reset the
// line is low until the first load.
module serializer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [9:0] din,
  output logic       sdo
);
  logic [9:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else if (load) sr <= din;
    else sr <= {sr[8:0], 1'b0};
  end

  assign sdo = sr[9];
endmodule
