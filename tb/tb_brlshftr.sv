// tb_brlshftr: checks every rotation amount in both directions against a bit-by-bit
// reference, the one-cycle register delay, and that q holds while en is low.
module tb_brlshftr;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, dir = 1'b0;
  logic [6:0] amt = '0;
  logic [127:0] d = '0, q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  brlshftr dut (.*);

  function automatic logic [127:0] ref_rot(input logic [127:0] x, input int n, input logic right);
    logic [127:0] y;
    for (int i = 0; i < 128; i++)
      if (right) y[i] = x[(i + n) % 128];
      else       y[(i + n) % 128] = x[i];
    return y;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int r = 0; r < 2; r++)
      for (int n = 0; n < 128; n++) begin
        logic [127:0] x;
        x = {$urandom, $urandom, $urandom, $urandom};
        @(negedge clk); en = 1'b1; dir = r[0]; amt = 7'(n); d = x;
        @(negedge clk); en = 1'b0; d = ~x; amt = 7'(n + 1);
        checks++;
        if (q !== ref_rot(x, n, r[0])) begin failures++; $display("FAIL dir %0d amt %0d", r, n); end
        @(negedge clk);
        checks++;
        if (q !== ref_rot(x, n, r[0])) begin failures++; $display("FAIL hold dir %0d amt %0d", r, n); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
