// aes_core: iterative AES-256 encipher core that produces the one-time pad (OTP).
//
// RandShift encrypts memory blocks in counter style: the AES core enciphers a seed
// built from the line's write counter and its address, and the 128-bit result is the
// pad that is XORed with the data. Deciphering data therefore needs the same encipher
// operation, so this core only enciphers, with a 256-bit key (the key size the design
// runs with). The algorithm is the one of FIPS-197; its realisation here is this
// design's own: one round per clock, S-boxes computed from the GF(2^8) inverse, and
// the key schedule expanded on the fly in a 256-bit window (eight words), so no
// round-key memory is needed.
//
// Interface
//   key_load  : latches key_in into the key register (clear on rst, enable = key_load),
//               which drives the core's 256-bit key.
//   start     : latches block_in and begins a new encipherment (ignored while busy).
//   ready     : high when idle and able to accept start.
//   result    : ciphertext, held until the next start; result_valid is a one-cycle pulse.
// Timing: start in cycle 0 -> result_valid in cycle NR (14), i.e. 14 cycles of latency.
module aes_core
  import randshift_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             key_load,
  input  logic [KEY_W-1:0] key_in,
  input  logic             start,
  input  logic [BLK_W-1:0] block_in,
  output logic             ready,
  output logic [BLK_W-1:0] result,
  output logic             result_valid
);

  localparam int unsigned NR = 14;  // rounds of AES-256

  logic [KEY_W-1:0] key_reg;        // core_key
  logic [KEY_W-1:0] kwin;           // words w[4(r-1) .. 4(r-1)+7] while round r runs
  logic [BLK_W-1:0] state;
  logic [3:0]       round;          // round being computed, 1..NR
  logic [7:0]       rcon;
  logic             busy;

  // ---------------- key register ----------------
  always_ff @(posedge clk or posedge rst) begin
    if (rst)           key_reg <= '0;
    else if (key_load) key_reg <= key_in;
  end

  // ---------------- round function ----------------
  function automatic logic [7:0] byte_of(input logic [BLK_W-1:0] s, input int unsigned i);
    return s[BLK_W-1-8*i -: 8];
  endfunction

  function automatic logic [31:0] mixcol(input logic [31:0] c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  logic [BLK_W-1:0] sr_q;    // after SubBytes and ShiftRows
  logic [BLK_W-1:0] mc_q;    // after MixColumns
  logic [BLK_W-1:0] rkey;    // round key of the round being computed
  logic [BLK_W-1:0] next_w;  // next four key words
  logic [31:0]      tmp;

  always_comb begin
    // byte (row r, column c) is byte index 4c+r; ShiftRows takes it from column c+r
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr_q[BLK_W-1-8*(4*c+r) -: 8] = sbox(byte_of(state, 4*((c+r)%4)+r));
    for (int c = 0; c < 4; c++)
      mc_q[BLK_W-1-32*c -: 32] = mixcol(sr_q[BLK_W-1-32*c -: 32]);
  end

  // Round r uses words w[4r..4r+3], the low half of the window w[4(r-1)..4(r-1)+7].
  assign rkey = kwin[BLK_W-1:0];

  // Next four words w[4r+4..4r+7]: the first depends on the word index modulo 8.
  always_comb begin
    if (round[0]) tmp = subword({kwin[23:0], kwin[31:24]}) ^ {rcon, 24'h0};  // index % 8 == 0
    else          tmp = subword(kwin[31:0]);                                // index % 8 == 4
    next_w[127:96] = kwin[255:224] ^ tmp;
    next_w[95:64]  = kwin[223:192] ^ next_w[127:96];
    next_w[63:32]  = kwin[191:160] ^ next_w[95:64];
    next_w[31:0]   = kwin[159:128] ^ next_w[63:32];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state        <= '0;
      kwin         <= '0;
      round        <= '0;
      rcon         <= 8'h01;
      busy         <= 1'b0;
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          state <= block_in ^ key_reg[KEY_W-1 -: BLK_W];  // initial AddRoundKey
          kwin  <= key_reg;
          round <= 4'd1;
          rcon  <= 8'h01;
          busy  <= 1'b1;
        end
      end else begin
        kwin <= {kwin[BLK_W-1:0], next_w};
        if (round[0]) rcon <= xtime(rcon);
        if (round == 4'(NR)) begin
          result       <= sr_q ^ rkey;   // last round has no MixColumns
          result_valid <= 1'b1;
          busy         <= 1'b0;
        end else begin
          state <= mc_q ^ rkey;
          round <= round + 4'd1;
        end
      end
    end
  end

  assign ready = !busy;

endmodule
