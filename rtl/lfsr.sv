// lfsr: pattern generator of the MRSR unit, a WIDTH-bit Fibonacci LFSR.
//
// Each rising clock edge with en high shifts the register left by one and feeds in the
// XOR of the tap bits (1-based positions TAP_A..TAP_D; the defaults 128,126,101,99 give
// a maximal-length sequence for 128 bits). rst (asynchronous, active high) loads SEED,
// which must be non-zero. q is the whole register (doutf on the top level), so a new
// 128-bit pattern appears every clock. The document names the LFSR inside the MRSR and
// shows a new 128-bit value each clock; width, taps and seed are this design's own.
module lfsr #(
  parameter int unsigned       WIDTH = 128,
  parameter int unsigned       TAP_A = 128,
  parameter int unsigned       TAP_B = 126,
  parameter int unsigned       TAP_C = 101,
  parameter int unsigned       TAP_D = 99,
  parameter logic [WIDTH-1:0]  SEED  = WIDTH'(1)
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] q
);

  logic fb;
  assign fb = q[TAP_A-1] ^ q[TAP_B-1] ^ q[TAP_C-1] ^ q[TAP_D-1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= SEED;
    else if (en) q <= {q[WIDTH-2:0], fb};
  end

endmodule
