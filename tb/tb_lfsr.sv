// tb_lfsr: compares the LFSR with a reference recurrence computed in the testbench
// (each new bit is the XOR of the bits 128, 126, 101 and 99 places back), checks the
// seed after reset and that the register holds while en is low.
module tb_lfsr;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [127:0] q;
  logic [127:0] expq;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  lfsr dut (.*);

  initial begin
    logic [2047:0] seq;   // seq[k] = k-th bit of the stream; q[b] after n steps is seq[n+127-b]
    repeat (2) @(negedge clk);
    rst = 1'b0;
    checks++; if (q !== 128'd1) begin failures++; $display("FAIL seed"); end
    seq = '0; seq[127] = 1'b1;   // seed 1: only q[0] set
    for (int i = 128; i < 2048; i++) seq[i] = seq[i-128] ^ seq[i-126] ^ seq[i-101] ^ seq[i-99];
    en = 1'b1;
    for (int n = 1; n <= 1900; n++) begin
      @(negedge clk);
      if (n % 7 == 0) begin
        en = 1'b0;
        @(negedge clk);
        en = 1'b1;
      end
      for (int b = 0; b < 128; b++) expq[b] = seq[n + 127 - b];
      checks++; if (q !== expq) begin failures++; if (failures < 5) $display("FAIL step %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
