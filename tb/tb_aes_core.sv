// tb_aes_core: checks the AES-256 encipher core against published known-answer vectors
// (FIPS-197 appendix C.3 and the NIST SP 800-38A ECB-AES256 vectors) and checks that the
// result arrives 14 clock cycles after start, one round per cycle.
module tb_aes_core;
  import randshift_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic key_load = 1'b0, start = 1'b0;
  logic [KEY_W-1:0] key_in = '0;
  logic [BLK_W-1:0] block_in = '0, result;
  logic ready, result_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_core dut (.*);

  task automatic run(input logic [KEY_W-1:0] k, input logic [BLK_W-1:0] pt, input logic [BLK_W-1:0] ct);
    int lat;
    @(negedge clk);
    key_in = k; key_load = 1'b1;
    @(negedge clk);
    key_load = 1'b0;
    checks++;
    if (!ready) begin failures++; $display("FAIL ready not high"); end
    block_in = pt; start = 1'b1;
    @(negedge clk);
    start = 1'b0; block_in = '0;
    lat = 0;  // clock edges after the one that took start
    while (!result_valid) begin @(negedge clk); lat++; end
    checks++;
    if (result !== ct) begin failures++; $display("FAIL ct %h expected %h", result, ct); end
    checks++;
    if (lat != 14) begin failures++; $display("FAIL latency %0d expected 14", lat); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f,
        128'h00112233445566778899aabbccddeeff, 128'h8ea2b7ca516745bfeafc49904b496089);
    run(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4,
        128'h6bc1bee22e409f96e93d7e117393172a, 128'hf3eed1bdb5d2a03c064b5a7e3db181f8);
    run(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4,
        128'hae2d8a571e03ac9c9eb76fac45af8e51, 128'h591ccb10d410ed26dc5ba74a31362870);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
