// misr: multiple-input signature register of the MRSR unit.
//
// On each rising clock edge with en high the register shifts left by one with the same
// feedback polynomial as the LFSR (taps TAP_A..TAP_D, 1-based) and XORs in the WIDTH-bit
// parallel input d: sig <= {sig[W-2:0], fb} ^ d. After a run of inputs, sig is a
// compact signature of the whole sequence. rst (asynchronous, active high) clears it.
// The document names the MISR and shows it fed in parallel by the LFSR; the polynomial,
// the reset value and the input combination are this design's own choices.
module misr #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned TAP_A = 128,
  parameter int unsigned TAP_B = 126,
  parameter int unsigned TAP_C = 101,
  parameter int unsigned TAP_D = 99
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] sig
);

  logic fb;
  assign fb = sig[TAP_A-1] ^ sig[TAP_B-1] ^ sig[TAP_C-1] ^ sig[TAP_D-1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     sig <= '0;
    else if (en) sig <= {sig[WIDTH-2:0], fb} ^ d;
  end

endmodule
