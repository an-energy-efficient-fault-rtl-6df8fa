// tb_fault_checker: drives the checker with a behavioural shifter in the testbench and
// random stuck-at maps. For each search the expected outcome is the smallest rotation
// whose bits agree with every stuck cell (or a failure when none does); the checks cover
// the outcome, the reported shift count, and the timing of one candidate per cycle.
module tb_fault_checker;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [127:0] q = '0, fault_mask = '0, fault_val = '0;
  logic shift_en, check_result, wr_enable, wr_fail, busy;
  logic [6:0] shift_amt, shift_count;
  logic [127:0] data;
  int checks = 0, failures = 0, n_fit = 0, n_fail = 0, n_nonzero = 0;

  always #5 clk = ~clk;
  fault_checker dut (.*);

  function automatic logic [127:0] rotl(input logic [127:0] x, input int n);
    logic [127:0] y;
    for (int i = 0; i < 128; i++) y[(i + n) % 128] = x[i];
    return y;
  endfunction

  // behavioural stand-in for the barrel shifter
  always_ff @(posedge clk) if (shift_en) q <= rotl(data, int'(shift_amt));

  function automatic logic [127:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic search(input int nfaults);
    int exp_s, cyc;
    logic [127:0] m;
    data = rnd();
    m = '0;
    for (int k = 0; k < nfaults; k++) m[$urandom % 128] = 1'b1;
    fault_mask = m;
    fault_val  = rnd() & m;
    exp_s = -1;
    for (int s = 0; s < 128 && exp_s < 0; s++)
      if (((rotl(data, s) ^ fault_val) & fault_mask) == '0) exp_s = s;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 0;
    while (!wr_enable && !wr_fail && cyc < 200) begin @(negedge clk); cyc++; end
    checks++;
    if (exp_s >= 0) begin
      n_fit++;
      if (exp_s > 0) n_nonzero++;
      if (!wr_enable || !check_result) begin failures++; $display("FAIL no fit, expected %0d", exp_s); end
      checks++; if (int'(shift_count) != exp_s || cyc != exp_s) begin
        failures++; $display("FAIL shift %0d cyc %0d expected %0d", shift_count, cyc, exp_s); end
    end else begin
      n_fail++;
      if (!wr_fail) begin failures++; $display("FAIL expected wr_fail"); end
      checks++; if (cyc != 127) begin failures++; $display("FAIL fail after %0d cycles", cyc); end
    end
    @(negedge clk);
    checks++; if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 40; t++) search(t % 10);
    for (int t = 0; t < 5; t++) search(40);
    checks++;
    if (n_fit == 0 || n_fail == 0 || n_nonzero == 0) begin
      failures++; $display("FAIL coverage fit=%0d fail=%0d nonzero=%0d", n_fit, n_fail, n_nonzero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
