// mrsr: the MRSR unit of the second design variant, an LFSR feeding a MISR.
//
// The block takes the data leaving the encrypt/decrypt unit (encrypted data on a write,
// decrypted data on a read, chosen by the multiplexer in front of it) and compresses
// it, mixed with the free-running LFSR pattern, into a 128-bit signature that is
// returned to the OTP side. Every rising clock edge with en high: the LFSR steps, and
// the MISR absorbs d ^ pattern, where pattern is the LFSR value before the step.
// pattern (doutf) and signature are outputs. rst (asynchronous, active high) restarts
// both registers. The document gives the structure (LFSR into MISR, result to the OTP
// block); how the data input enters the MISR is this design's own choice.
module mrsr
  import randshift_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [BLK_W-1:0] d,
  output logic [BLK_W-1:0] pattern,
  output logic [BLK_W-1:0] signature
);

  lfsr #(.WIDTH(BLK_W)) u_lfsr (
    .clk (clk),
    .rst (rst),
    .en  (en),
    .q   (pattern)
  );

  misr #(.WIDTH(BLK_W)) u_misr (
    .clk (clk),
    .rst (rst),
    .en  (en),
    .d   (d ^ pattern),
    .sig (signature)
  );

endmodule
