// cachemem: cache block store that feeds plaintext blocks to the encrypt path.
//
// DEPTH blocks of BLK_W bits (16 x 128 by default, from the 4-bit addressc port and
// the 128-bit data_outc port of the design's top level). One write port, written on
// the rising clock edge when we is high, and one asynchronous read port, so dout
// follows addr in the same cycle. The array is cleared by rst (active high,
// asynchronous) so every block reads as a defined value; the port list and the reset
// behaviour are this design's own choice.
module cachemem
  import randshift_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [BLK_W-1:0] wdata,
  input  logic [AW-1:0]    addr,
  output logic [BLK_W-1:0] dout
);

  logic [BLK_W-1:0] mem [DEPTH];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign dout = mem[addr];

endmodule
