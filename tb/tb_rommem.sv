// tb_rommem: checks the main-memory model: data and metadata written and read back per
// row, and stuck-at cells that ignore writes and read their frozen value.
module tb_rommem;
  import randshift_pkg::*;
  logic clk = 1'b0, rst = 1'b1, we = 1'b0, inj_we = 1'b0;
  logic [3:0] addr = '0;
  logic [BLK_W-1:0] wdata = '0, inj_mask = '0, inj_val = '0, rdata;
  logic [6:0] wshift = '0, rshift;
  logic [CTR_W-1:0] wctr = '0, rctr;
  logic [BLK_W-1:0] mdata [16], mmask [16], mval [16];
  logic [6:0] msh [16];
  logic [CTR_W-1:0] mctr [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  rommem dut (.*);

  function automatic logic [BLK_W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // stuck cells on the even rows
    for (int i = 0; i < 16; i++) begin
      mmask[i] = (i % 2 == 0) ? (rnd() & rnd() & rnd()) : '0;
      mval[i]  = rnd() & mmask[i];
      @(negedge clk); addr = 4'(i); inj_we = 1'b1; inj_mask = mmask[i];
      inj_val = mval[i];
    end
    @(negedge clk); inj_we = 1'b0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 16; i++) begin
        mdata[i] = rnd(); msh[i] = 7'($urandom); mctr[i] = $urandom;
        @(negedge clk); we = 1'b1; addr = 4'(i); wdata = mdata[i]; wshift = msh[i]; wctr = mctr[i];
      end
      @(negedge clk); we = 1'b0;
      for (int i = 0; i < 16; i++) begin
        logic [BLK_W-1:0] exp;
        exp = 0;
        for (int b = 0; b < BLK_W; b++) exp[b] = mmask[i][b] ? mval[i][b] : mdata[i][b];
        addr = 4'(i); #1;
        checks++; if (rdata !== exp) begin failures++; $display("FAIL row %0d data", i); end
        checks++; if (rshift !== msh[i] || rctr !== mctr[i]) begin failures++; $display("FAIL row %0d meta", i); end
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
