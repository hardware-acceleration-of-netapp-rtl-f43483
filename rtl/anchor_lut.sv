// anchor_lut: 256-entry lookup table of the anchor hash, 8-bit address in,
// WIDTH-bit value out, read synchronously like an FPGA block ROM (data one
// clock after the address, while `en` is high).
//
// The algorithm uses six of these: an input table and an exit table for each
// of its three hash lanes (8x64, 8x61 and 8x59 in the design description).
// With EXIT=0 the table holds input_lut(LANE, b); with EXIT=1 it holds the same
// value rotated left by WINDOW mod WIDTH, which exactly cancels the entry of
// that byte once the lane has rotated WINDOW times. The values themselves are
// this design's choice (a fixed mixing function, see anchor_pkg).
module anchor_lut
  import anchor_pkg::*;
#(
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned LANE   = 0,
  parameter bit          EXIT   = 1'b0,
  parameter int unsigned WINDOW = anchor_pkg::WINDOW_LEN
) (
  input  logic             clk,
  input  logic             en,
  input  logic [7:0]       addr,
  output logic [WIDTH-1:0] data
);

  logic [WIDTH-1:0] rom [256];

  initial begin
    for (int i = 0; i < 256; i++) begin
      rom[i] = EXIT ? WIDTH'(exit_lut(LANE, 8'(i), WIDTH, WINDOW))
                    : WIDTH'(input_lut(LANE, 8'(i), WIDTH));
    end
  end

  always_ff @(posedge clk) begin
    if (en) data <= rom[addr];
  end

endmodule
