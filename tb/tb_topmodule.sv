// tb_topmodule: end-to-end test of the RandShift write/read path and the MRSR unit, at
// the design's default sizes (16 cache blocks, 16 memory rows of 128 bits, AES-256).
//
// A reference AES core in the testbench produces the expected pads. The test fills the
// cache, writes blocks back to rows with no stuck cells, with a few stuck cells (so that
// the first verify read finds faults, the row verifier learns them and a non-zero
// rotation is chosen) and with every cell stuck (so the write fails), reads rows back
// through the inverse rotation and decryption, with and without refilling the cache,
// and reloads the key. It checks the stored row bit by bit against
// rotate(block ^ pad) with stuck cells forced, the decrypted data, the counter-driven
// pad change on rewrites, the cycle counts of a fault-free write (19) and of a read
// (17), and the MRSR pattern and signature against bit-level models. Each mechanism
// (zero rotation, non-zero rotation, verify retry, write failure, read, cache refill,
// key reload) is counted and must occur.
module tb_topmodule;
  import randshift_pkg::*;

  logic clk = 1'b0, rst = 1'b1, rst1 = 1'b1;
  logic [KEY_W-1:0] key_in = '0;
  logic load_i = 1'b0, wr = 1'b0, enable = 1'b0, decrpt_i = 1'b0, wr1 = 1'b0, inj_we = 1'b0;
  logic [ADDR_W-1:0] addressc = '0, addressm = '0;
  logic [BLK_W-1:0] data_in = '0, inj_mask = '0, inj_val = '0;
  logic [BLK_W-1:0] data_outc, data_outm, data_out, data_o, doutf, mrsr_sig;
  localparam int WORD_W = 128;              // words rotated independently
  localparam int NW     = BLK_W / WORD_W;
  localparam int SWW    = $clog2(WORD_W);
  logic check_result, wr_enable, wr_fail, busy, done;
  logic [NW*SWW-1:0] shift_count;

  // reference pad generator
  logic r_start = 1'b0, r_ready, r_valid, r_load = 1'b0;
  logic [BLK_W-1:0] r_in = '0, r_pad;

  int checks = 0, failures = 0;
  int n_lanediff = 0;
  int n_shift0 = 0, n_shiftnz = 0, n_retry = 0, n_fail = 0, n_read = 0, n_refill = 0, n_rekey = 0;
  int wr_pulses;
  logic tb_last_wr = 1'b0;   // kind of the last operation started (1 = write-back)

  logic [BLK_W-1:0] cache_m [16];
  logic [BLK_W-1:0] row_plain [16];
  logic             row_valid [16];
  logic [CTR_W-1:0] row_ctr [16];
  logic [BLK_W-1:0] smask [16], sval [16];

  always #5 clk = ~clk;

  topmodule dut (.*);

  aes_core u_ref (.clk(clk), .rst(rst), .key_load(r_load), .key_in(key_in), .start(r_start),
                  .block_in(r_in), .ready(r_ready), .result(r_pad), .result_valid(r_valid));

  always @(posedge clk) if (wr_enable) wr_pulses++;

  function automatic logic [BLK_W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // rotate every word left by its own amount from the packed shift counts
  function automatic logic [BLK_W-1:0] rotw(input logic [BLK_W-1:0] x, input logic [NW*SWW-1:0] sc);
    logic [BLK_W-1:0] y;
    for (int w = 0; w < NW; w++) begin
      int n;
      n = int'(sc[w*SWW +: SWW]);
      for (int i = 0; i < WORD_W; i++) y[w*WORD_W + (i + n) % WORD_W] = x[w*WORD_W + i];
    end
    return y;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic ref_pad(input logic [CTR_W-1:0] c, input logic [ADDR_W-1:0] a, output logic [BLK_W-1:0] p);
    @(negedge clk); r_in = {c, 96'h0} | {124'h0, a}; r_start = 1'b1;
    @(negedge clk); r_start = 1'b0;
    while (!r_valid) @(negedge clk);
    p = r_pad;
  endtask

  task automatic load_key(input logic [KEY_W-1:0] k);
    @(negedge clk); key_in = k; load_i = 1'b1; r_load = 1'b1;
    @(negedge clk); load_i = 1'b0; r_load = 1'b0;
  endtask

  task automatic fill(input int c, input logic [BLK_W-1:0] b);
    @(negedge clk); addressc = 4'(c); data_in = b; wr = 1'b1;
    @(negedge clk); wr = 1'b0; data_in = rnd();
    cache_m[c] = b;
  endtask

  task automatic inject(input int m, input int nfaults, input logic all);
    logic [BLK_W-1:0] msk;
    msk = '0;
    if (all) msk = '1;
    else for (int k = 0; k < nfaults; k++) msk[$urandom % BLK_W] = 1'b1;
    smask[m] = msk; sval[m] = rnd() & msk;
    @(negedge clk); addressm = 4'(m); inj_mask = msk; inj_val = sval[m]; inj_we = 1'b1;
    @(negedge clk); inj_we = 1'b0;
  endtask

  // write-back of cache block c to row m; returns 1 on success
  task automatic write_back(input int c, input int m, output logic ok);
    int cyc;
    logic failed;
    logic [BLK_W-1:0] pad, exp_row;
    @(negedge clk); addressc = 4'(c); addressm = 4'(m); decrpt_i = 1'b0; enable = 1'b1;
    wr_pulses = 0; failed = 1'b0;
    @(negedge clk); enable = 1'b0; addressc = 4'($urandom); addressm = 4'($urandom); tb_last_wr = 1'b1;
    cyc = 0;  // clock edges after the one that took enable
    while (!done && cyc < 3000) begin
      if (wr_fail) failed = 1'b1;
      @(negedge clk); cyc++;
    end
    check(done, "write-back finished");
    ok = !failed;
    if (failed) begin
      // a failed search after an earlier pass already wrote the row: its counter moved on
      if (wr_pulses > 0) begin row_ctr[m] = row_ctr[m] + 1; row_valid[m] = 1'b0; end
      n_fail++;
      return;
    end
    row_ctr[m] = row_ctr[m] + 1;
    ref_pad(row_ctr[m], 4'(m), pad);
    check(data_o === (cache_m[c] ^ pad), "encrypted block is block ^ pad(counter, address)");
    if (wr_pulses > 1) n_retry++;
    check(wr_pulses > 0, "row written");
    if (shift_count == 0) n_shift0++; else n_shiftnz++;
    for (int w = 1; w < NW; w++)
      if (shift_count[w*SWW +: SWW] != shift_count[0 +: SWW]) begin n_lanediff++; break; end
    if (smask[m] == '0) check(cyc == 19, $sformatf("fault-free write-back takes 19 cycles, took %0d", cyc));
    // stored row: rotated ciphertext, stuck cells at their value (they must agree)
    exp_row = rotw(data_o, shift_count);
    addressm = 4'(m); #1;
    check(data_outm === exp_row, "stored row is the rotated ciphertext");
    check(((exp_row ^ sval[m]) & smask[m]) == '0, "rotation agrees with every stuck cell");
    row_plain[m] = cache_m[c];
    row_valid[m] = 1'b1;
  endtask

  task automatic read_row(input int m, input int c, input logic refill);
    int cyc;
    @(negedge clk); addressm = 4'(m); addressc = 4'(c); decrpt_i = 1'b1; wr1 = refill; enable = 1'b1;
    @(negedge clk); enable = 1'b0; decrpt_i = 1'b0; wr1 = 1'b0; addressm = 4'($urandom); tb_last_wr = 1'b0;
    cyc = 0;  // clock edges after the one that took enable
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    check(cyc == 17, $sformatf("read takes 17 cycles, took %0d", cyc));
    check(data_out === row_plain[m], $sformatf("read of row %0d returns the plaintext", m));
    n_read++;
    if (refill) begin
      addressc = 4'(c); #1;
      check(data_outc === row_plain[m], "read refilled the cache block");
      cache_m[c] = row_plain[m];
      n_refill++;
    end
  endtask

  // MRSR reference: compare every clock after rst1 is released
  logic [BLK_W-1:0] rp, rs;
  logic             mrsr_on = 1'b0;
  int               mrsr_checks = 0, mrsr_bad = 0;
  function automatic logic [BLK_W-1:0] step(input logic [BLK_W-1:0] s, input logic [BLK_W-1:0] x);
    logic [BLK_W-1:0] n;
    n[0] = s[127] ^ s[125] ^ s[100] ^ s[98];
    for (int i = 1; i < BLK_W; i++) n[i] = s[i-1];
    return n ^ x;
  endfunction
  always @(posedge clk) begin
    if (mrsr_on) begin
      logic [BLK_W-1:0] din;
      din = tb_last_wr ? data_o : data_out;   // multiplexer in front of the MRSR
      rs <= step(rs, din ^ rp);
      rp <= step(rp, '0);
    end
  end
  always @(negedge clk) begin
    if (mrsr_on) begin
      mrsr_checks++;
      if (doutf !== rp || mrsr_sig !== rs) mrsr_bad++;
    end
  end

  initial begin
    logic ok;
    logic [BLK_W-1:0] first_ct;
    for (int i = 0; i < 16; i++) begin
      row_ctr[i] = '0; smask[i] = '0; sval[i] = '0; row_valid[i] = 1'b0; cache_m[i] = '0;
    end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    rp = 128'd1; rs = '0;
    rst1 = 1'b0; mrsr_on = 1'b1;
    load_key({rnd(), rnd()});
    for (int c = 0; c < 8; c++) fill(c, rnd());

    // fault-free row
    write_back(0, 0, ok);
    check(ok, "fault-free write-back succeeds");
    first_ct = data_o;
    read_row(0, 9, 1'b1);
    // rewrite the same data: the counter moves, so the ciphertext changes
    write_back(0, 0, ok);
    check(ok && data_o !== first_ct, "rewrite uses a fresh pad");
    read_row(0, 10, 1'b0);

    // rows with a few stuck cells, written several times
    for (int m = 1; m < 12; m++) begin
      inject(m, 2 + (m % 6), 1'b0);
      for (int r = 0; r < 3; r++) begin
        write_back((m + r) % 8, m, ok);
        if (ok) read_row(m, 8 + (m % 8), r == 1);
      end
    end

    // a row with every cell stuck cannot be written
    inject(12, 0, 1'b1);
    write_back(1, 12, ok);
    check(!ok, "row with every cell stuck reports a write failure");

    // new key: rows written before are no longer readable, new writes are
    load_key({rnd(), rnd()});
    n_rekey++;
    write_back(2, 13, ok);
    check(ok, "write-back after key reload");
    read_row(13, 14, 1'b1);

    check(mrsr_checks > 100 && mrsr_bad == 0, $sformatf("MRSR pattern/signature mismatches %0d of %0d", mrsr_bad, mrsr_checks));

    $display("mechanisms: shift0=%0d shift>0=%0d retry=%0d wr_fail=%0d read=%0d refill=%0d rekey=%0d",
             n_shift0, n_shiftnz, n_retry, n_fail, n_read, n_refill, n_rekey);
    check(n_shift0 > 0, "zero rotation used");
    check(n_shiftnz > 0, "non-zero rotation used");
    check(n_retry > 0, "verify found new faults and the search was repeated");
    check(n_fail > 0, "write failure reported");
    if (NW > 1) check(n_lanediff > 0, "words of one row rotated by different amounts");
    check(n_read > 0 && n_refill > 0 && n_rekey > 0, "reads, cache refills and key reload happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
