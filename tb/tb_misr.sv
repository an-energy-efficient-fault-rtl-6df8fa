// tb_misr: feeds random words into the MISR and compares the signature, step by step,
// with a reference computed bit by bit in the testbench; also checks the hold on en low
// and that a single flipped input bit changes the final signature.
module tb_misr;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [127:0] d = '0, sig;
  logic [127:0] ref_sig, words [200];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  misr dut (.*);

  function automatic logic [127:0] step(input logic [127:0] s, input logic [127:0] x);
    logic [127:0] n;
    n[0] = s[127] ^ s[125] ^ s[100] ^ s[98];
    for (int i = 1; i < 128; i++) n[i] = s[i-1];
    return n ^ x;
  endfunction

  task automatic run(output logic [127:0] final_sig);
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    ref_sig = '0;
    for (int k = 0; k < 200; k++) begin
      d = words[k]; en = (k % 9 != 8);
      @(negedge clk);
      if (en) ref_sig = step(ref_sig, words[k]);
      checks++; if (sig !== ref_sig) begin failures++; if (failures < 5) $display("FAIL word %0d", k); end
    end
    en = 1'b0;
    final_sig = sig;
  endtask

  initial begin
    logic [127:0] s1, s2;
    for (int k = 0; k < 200; k++) words[k] = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(negedge clk);
    run(s1);
    words[100][17] = ~words[100][17];
    run(s2);
    checks++; if (s1 === s2) begin failures++; $display("FAIL signature did not change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
