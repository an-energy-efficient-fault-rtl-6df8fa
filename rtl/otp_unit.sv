// otp_unit: the encrypt/decrypt (OTP) unit of RandShift.
//
// Data is kept in memory XORed with a one-time pad: pad = AES-256(key, seed), where the
// seed combines the row's write counter and its address (counter in bits 127:96, address
// in the low bits, XORed together). Because the counter changes on every write, a row
// never reuses a pad, and the stored bits look random, which RandShift relies on.
// A multiplexer chooses the cache block (mode wr = 1, encrypt) or the memory block
// (wr = 0, decrypt); after XOR with the pad, a demultiplexer delivers the result on
// enc_data or dec_data. Each output holds its value until the next operation of its
// kind.
//
// Interface and timing: key_load latches key_in into the AES key register. start (while
// ready) latches wr, counter, address and the selected block and starts AES; valid
// pulses 15 cycles after start (14 AES rounds plus the output register), with the new
// enc_data or dec_data visible in the same cycle. The structure (AES module, XOR,
// block multiplexer, WR/RD demultiplexer) follows the design's block diagram; the seed
// layout and the output register are this design's own choices.
module otp_unit
  import randshift_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              key_load,
  input  logic [KEY_W-1:0]  key_in,
  input  logic              start,
  input  logic              wr,
  input  logic [CTR_W-1:0]  counter,
  input  logic [ADDR_W-1:0] addr,
  input  logic [BLK_W-1:0]  cache_blk,
  input  logic [BLK_W-1:0]  mem_blk,
  output logic              ready,
  output logic              valid,
  output logic [BLK_W-1:0]  enc_data,
  output logic [BLK_W-1:0]  dec_data
);

  logic             aes_ready, aes_valid;
  logic [BLK_W-1:0] pad, seed, blk_q;
  logic             wr_q;

  assign seed = {counter, {(BLK_W-CTR_W){1'b0}}} ^ BLK_W'(addr);

  aes_core u_aes (
    .clk          (clk),
    .rst          (rst),
    .key_load     (key_load),
    .key_in       (key_in),
    .start        (start),
    .block_in     (seed),
    .ready        (aes_ready),
    .result       (pad),
    .result_valid (aes_valid)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      blk_q    <= '0;
      wr_q     <= 1'b0;
      enc_data <= '0;
      dec_data <= '0;
      valid    <= 1'b0;
    end else begin
      valid <= aes_valid;
      if (start && aes_ready) begin
        wr_q  <= wr;
        blk_q <= wr ? cache_blk : mem_blk;
      end
      if (aes_valid) begin
        if (wr_q) enc_data <= blk_q ^ pad;
        else      dec_data <= blk_q ^ pad;
      end
    end
  end

  assign ready = aes_ready;

  a_start_when_ready: assert property (@(posedge clk) disable iff (rst) start |-> aes_ready);

endmodule
