// brlshftr: registered rotational barrel shifter built from multiplexer stages.
//
// RandShift rotates an encrypted block so that its bits line up with the values of the
// row's stuck-at cells. The shifter is a log2(WIDTH)-stage multiplexer network: stage k
// rotates by 2^k when bit k of amt is set. dir = 0 rotates left (used when writing),
// dir = 1 rotates right by the same amount (used when reading, to undo the write
// rotation). The result is captured in an output register on the rising clock edge
// when en (the checker's ShiftEnable) is high, so q is valid one cycle after en.
// A multiplexer-built barrel shifter with a clock follows the design's block diagram;
// the direction input and the output register are this design's own reading of it.
module brlshftr #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned SH_W  = $clog2(WIDTH)
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             dir,
  input  logic [SH_W-1:0]  amt,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] stage [SH_W+1];

  always_comb begin
    stage[0] = d;
    for (int k = 0; k < SH_W; k++) begin
      if (!amt[k])  stage[k+1] = stage[k];
      else if (dir) stage[k+1] = WIDTH'({stage[k], stage[k]} >> (2**k));           // rotate right
      else          stage[k+1] = WIDTH'({stage[k], stage[k]} >> (WIDTH - 2**k)); // rotate left
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (en) q <= stage[SH_W];
  end

endmodule
