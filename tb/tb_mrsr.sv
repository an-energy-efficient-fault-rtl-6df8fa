// tb_mrsr: runs the MRSR with random data and checks the pattern output against the
// LFSR recurrence and the signature against a bit-level MISR model fed with
// data XOR pattern, computed in the testbench.
module tb_mrsr;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [127:0] d = '0, pattern, signature;
  logic [127:0] rp, rs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mrsr dut (.*);

  function automatic logic [127:0] step(input logic [127:0] s, input logic [127:0] x);
    logic [127:0] n;
    n[0] = s[127] ^ s[125] ^ s[100] ^ s[98];
    for (int i = 1; i < 128; i++) n[i] = s[i-1];
    return n ^ x;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    rp = 128'd1; rs = '0;
    checks++; if (pattern !== rp || signature !== rs) begin failures++; $display("FAIL reset"); end
    for (int k = 0; k < 300; k++) begin
      d = {$urandom, $urandom, $urandom, $urandom};
      en = (k % 5 != 4);
      @(negedge clk);
      if (en) begin
        rs = step(rs, d ^ rp);
        rp = step(rp, '0);
      end
      checks++;
      if (pattern !== rp || signature !== rs) begin failures++; if (failures < 5) $display("FAIL step %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
