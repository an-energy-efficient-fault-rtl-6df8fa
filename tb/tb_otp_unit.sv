// tb_otp_unit: checks the encrypt/decrypt unit. The pad is taken from a separate AES
// core instance in the testbench enciphering the expected seed (counter in bits 127:96
// XOR address); encryption must give block ^ pad on enc_data, decryption of that result
// with the same counter and address must give the block back on dec_data, a new counter
// must change the pad, and valid must come 15 cycles after start.
module tb_otp_unit;
  import randshift_pkg::*;
  logic clk = 1'b0, rst = 1'b1, key_load = 1'b0, start = 1'b0, wr = 1'b0;
  logic [KEY_W-1:0] key_in = '0;
  logic [CTR_W-1:0] counter = '0;
  logic [ADDR_W-1:0] addr = '0;
  logic [BLK_W-1:0] cache_blk = '0, mem_blk = '0, enc_data, dec_data;
  logic ready, valid;
  // reference pad generator
  logic r_start = 1'b0, r_ready, r_valid;
  logic [BLK_W-1:0] r_in = '0, r_pad;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  otp_unit dut (.*);
  aes_core u_ref (.clk(clk), .rst(rst), .key_load(key_load), .key_in(key_in), .start(r_start),
                  .block_in(r_in), .ready(r_ready), .result(r_pad), .result_valid(r_valid));

  function automatic logic [BLK_W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic ref_pad(input logic [CTR_W-1:0] c, input logic [ADDR_W-1:0] a, output logic [BLK_W-1:0] p);
    @(negedge clk); r_in = {c, 96'h0} | {124'h0, a}; r_start = 1'b1;
    @(negedge clk); r_start = 1'b0;
    while (!r_valid) @(negedge clk);
    p = r_pad;
  endtask

  task automatic op(input logic w, input logic [CTR_W-1:0] c, input logic [ADDR_W-1:0] a,
                    input logic [BLK_W-1:0] blk);
    int lat;
    @(negedge clk);
    wr = w; counter = c; addr = a;
    if (w) begin cache_blk = blk; mem_blk = rnd(); end
    else   begin mem_blk = blk; cache_blk = rnd(); end
    start = 1'b1;
    @(negedge clk); start = 1'b0; cache_blk = rnd(); mem_blk = rnd(); counter = $urandom;
    lat = 0;  // clock edges after the one that took start
    while (!valid && lat < 100) begin @(negedge clk); lat++; end
    checks++; if (lat != 15) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    logic [BLK_W-1:0] p1, p2, b, e1, e2;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    key_in = {rnd(), rnd()}; key_load = 1'b1;
    @(negedge clk); key_load = 1'b0;
    for (int t = 0; t < 4; t++) begin
      logic [CTR_W-1:0] c;
      logic [ADDR_W-1:0] a;
      c = $urandom; a = 4'($urandom);
      b = rnd();
      ref_pad(c, a, p1);
      op(1'b1, c, a, b);
      e1 = enc_data;
      checks++; if (e1 !== (b ^ p1)) begin failures++; $display("FAIL encrypt"); end
      op(1'b0, c, a, e1);
      checks++; if (dec_data !== b) begin failures++; $display("FAIL decrypt"); end
      checks++; if (enc_data !== e1) begin failures++; $display("FAIL enc_data not held"); end
      op(1'b1, c + 1, a, b);
      e2 = enc_data;
      ref_pad(c + 1, a, p2);
      checks++; if (e2 !== (b ^ p2) || e2 === e1) begin failures++; $display("FAIL new counter pad"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
