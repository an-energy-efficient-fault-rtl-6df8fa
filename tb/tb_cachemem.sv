// tb_cachemem: writes random blocks to every cache entry, then reads them all back
// against a copy kept by the testbench; also checks reset clears the array and that a
// write with we low changes nothing.
module tb_cachemem;
  import randshift_pkg::*;
  logic clk = 1'b0, rst = 1'b1, we = 1'b0;
  logic [3:0] waddr = '0, addr = '0;
  logic [BLK_W-1:0] wdata = '0, dout;
  logic [BLK_W-1:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  cachemem dut (.*);

  function automatic logic [BLK_W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i); #1;
      checks++; if (dout !== '0) begin failures++; $display("FAIL reset entry %0d", i); end
    end
    for (int i = 0; i < 16; i++) begin
      model[i] = rnd();
      @(negedge clk); we = 1'b1; waddr = 4'(i); wdata = model[i];
    end
    @(negedge clk); we = 1'b0; waddr = 4'd3; wdata = rnd();
    @(negedge clk);
    for (int i = 15; i >= 0; i--) begin
      addr = 4'(i); #1;
      checks++; if (dout !== model[i]) begin failures++; $display("FAIL entry %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
