// tb_rowverifier: feeds verify cycles with read-back data corrupted by a hidden stuck-at
// map and checks that the learned fault map equals exactly the stuck cells that
// disagreed with some written value, with their stuck values, and that verify_ok is
// correct.
module tb_rowverifier;
  import randshift_pkg::*;
  logic clk = 1'b0, rst = 1'b1, verify = 1'b0, verify_ok;
  logic [3:0] addr = '0;
  logic [BLK_W-1:0] wdata = '0, rdata = '0, fault_mask, fault_val;
  logic [BLK_W-1:0] hmask [16], hval [16], seen [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  rowverifier dut (.*);

  function automatic logic [BLK_W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) begin
      hmask[i] = rnd() & rnd() & rnd(); hval[i] = rnd() & hmask[i]; seen[i] = '0;
    end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 64; k++) begin
      int i;
      logic [BLK_W-1:0] w, r;
      i = $urandom % 16;
      w = rnd();
      r = (w & ~hmask[i]) | hval[i];
      @(negedge clk); addr = 4'(i); verify = 1'b1; wdata = w; rdata = r; #1;
      checks++; if (verify_ok !== (w == r)) begin failures++; $display("FAIL verify_ok"); end
      seen[i] = seen[i] | (w ^ r);
      @(negedge clk); verify = 1'b0; #1;
      checks++;
      if (fault_mask !== seen[i] || fault_val !== (hval[i] & seen[i])) begin
        failures++; $display("FAIL map row %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
