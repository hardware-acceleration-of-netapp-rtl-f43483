// ddr_mem_model: behavioural stand-in for the card's local memory (DDR2
// controller and DIMMs) as seen through the simple synchronous port of
// mem_ctrl_if: one 128-bit word per 16 bytes, write in the clock mem_en and
// mem_we are high, read data one clock after mem_en. Contents start at zero.
// Only WORDS words exist; the address wraps.
module ddr_mem_model #(
  parameter int unsigned AW    = 24,
  parameter int unsigned WORDS = 8192
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [127:0]  wdata,
  output logic [127:0]  rdata
);
  logic [127:0] mem [WORDS];
  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
    rdata = '0;
  end
  always @(posedge clk) begin
    if (en) begin
      if (we) mem[addr % WORDS] <= wdata;
      else    rdata <= mem[addr % WORDS];
    end
  end
endmodule
