// randshift_pkg: sizes and arithmetic shared by the RandShift secure-memory design.
//
// The design stores AES-encrypted 128-bit blocks in a nonvolatile main memory whose
// cells may be stuck at 0 or 1. The constants below fix the block width (the AES block
// size, 128 bits), the 256-bit AES key, and the 16-entry cache and memory arrays
// addressed by 4-bit addresses, as shown on the top-level symbol of the design.
// The AES helper functions (GF(2^8) multiply and the S-box, computed from the
// multiplicative inverse and the FIPS-197 affine map rather than stored as a table)
// are used by aes_core.
package randshift_pkg;

  localparam int unsigned BLK_W  = 128;  // AES block and memory word width
  localparam int unsigned KEY_W  = 256;  // AES-256 key
  localparam int unsigned ADDR_W = 4;    // addressc[3:0] / addressm[3:0]
  localparam int unsigned CTR_W  = 32;   // per-row write counter (own choice)

  // multiply by x in GF(2^8) modulo x^8+x^4+x^3+x+1
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // multiplicative inverse as a^254 (0 maps to 0)
  function automatic logic [7:0] ginv(input logic [7:0] a);
    logic [7:0] a2, a4, a8, a16, a32, a64, a128, r;
    a2   = gmul(a, a);
    a4   = gmul(a2, a2);
    a8   = gmul(a4, a4);
    a16  = gmul(a8, a8);
    a32  = gmul(a16, a16);
    a64  = gmul(a32, a32);
    a128 = gmul(a64, a64);
    // 254 = 128+64+32+16+8+4+2
    r = gmul(a128, a64);
    r = gmul(r, a32);
    r = gmul(r, a16);
    r = gmul(r, a8);
    r = gmul(r, a4);
    r = gmul(r, a2);
    return r;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] b;
    b = ginv(a);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  function automatic logic [31:0] subword(input logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

endpackage
