// tb_fault_rate: RandShift at a stuck-at fault incidence of 1e-2 per cell, at the
// design's default sizes. Every cell of the 16 rows is stuck independently with
// probability 1/100 (to a random value); each row is then written 20 times with fresh
// random blocks and read back after every write. Checks: every successful write reads
// back as the plaintext, its stored bits agree with every stuck cell, and the number of
// failed writes stays near its expectation. A write to a row with k stuck cells fails
// only when none of the 128 rotations of a random-looking block fits, with probability
// (1 - 2^-k)^128 (about 3e-8 for k = 3, 0.13 for k = 6); the test allows twice the
// expected count plus 4. Prints the counts of rotations used, repeated searches and
// failures.
module tb_fault_rate;
  import randshift_pkg::*;

  localparam int ROWS = 16, WRITES = 20;

  logic clk = 1'b0, rst = 1'b1, rst1 = 1'b1;
  logic [KEY_W-1:0] key_in = '0;
  logic load_i = 1'b0, wr = 1'b0, enable = 1'b0, decrpt_i = 1'b0, wr1 = 1'b0, inj_we = 1'b0;
  logic [ADDR_W-1:0] addressc = '0, addressm = '0;
  logic [BLK_W-1:0] data_in = '0, inj_mask = '0, inj_val = '0;
  logic [BLK_W-1:0] data_outc, data_outm, data_out, data_o, doutf, mrsr_sig;
  logic check_result, wr_enable, wr_fail, busy, done;
  logic [6:0] shift_count;

  logic [BLK_W-1:0] smask [ROWS], sval [ROWS];
  int checks = 0, failures = 0, n_ok = 0, n_fail = 0, n_retry = 0, n_shifted = 0, n_stuck = 0;
  int wr_pulses;

  always #5 clk = ~clk;
  topmodule dut (.*);
  always @(posedge clk) if (wr_enable) wr_pulses++;

  function automatic logic [BLK_W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0; rst1 = 1'b0;
    @(negedge clk); key_in = {rnd(), rnd()}; load_i = 1'b1;
    @(negedge clk); load_i = 1'b0;
    for (int m = 0; m < ROWS; m++) begin
      smask[m] = '0;
      for (int b = 0; b < BLK_W; b++) if ($urandom % 100 == 0) smask[m][b] = 1'b1;
      sval[m] = rnd() & smask[m];
      n_stuck += $countones(smask[m]);
      @(negedge clk); addressm = 4'(m); inj_mask = smask[m]; inj_val = sval[m]; inj_we = 1'b1;
      @(negedge clk); inj_we = 1'b0;
    end
    for (int w = 0; w < WRITES; w++) begin
      for (int m = 0; m < ROWS; m++) begin
        logic [BLK_W-1:0] blk;
        logic failed;
        int cyc;
        blk = rnd();
        @(negedge clk); addressc = 4'(m); data_in = blk; wr = 1'b1;
        @(negedge clk); wr = 1'b0;
        @(negedge clk); addressc = 4'(m); addressm = 4'(m); decrpt_i = 1'b0; enable = 1'b1; wr_pulses = 0;
        @(negedge clk); enable = 1'b0;
        failed = 1'b0; cyc = 0;
        while (!done && cyc < 3000) begin if (wr_fail) failed = 1'b1; @(negedge clk); cyc++; end
        check(done, "write-back finished");
        if (failed) begin n_fail++; continue; end
        n_ok++;
        if (wr_pulses > 1) n_retry++;
        if (shift_count != 0) n_shifted++;
        check(((data_outm ^ sval[m]) & smask[m]) == '0, "stored row agrees with the stuck cells");
        @(negedge clk); addressm = 4'(m); decrpt_i = 1'b1; enable = 1'b1;
        @(negedge clk); enable = 1'b0; decrpt_i = 1'b0;
        cyc = 0;
        while (!done && cyc < 100) begin @(negedge clk); cyc++; end
        check(data_out === blk, $sformatf("row %0d write %0d reads back", m, w));
      end
    end
    $display("stuck cells=%0d of %0d, writes ok=%0d failed=%0d, rotated=%0d, repeated searches=%0d",
             n_stuck, ROWS * BLK_W, n_ok, n_fail, n_shifted, n_retry);
    begin
      real expect_fail;
      expect_fail = 0.0;
      for (int m = 0; m < ROWS; m++)
        expect_fail += WRITES * ((1.0 - 1.0 / real'(2 ** $countones(smask[m]))) ** 128);
      $display("expected failed writes %f", expect_fail);
      check(real'(n_fail) <= 2.0 * expect_fail + 4.0, "failed writes near the expected count");
    end
    check(n_shifted > 0, "some writes needed a rotation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
