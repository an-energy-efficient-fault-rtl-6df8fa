// topmodule: RandShift, a stuck-at fault tolerant secure write/read path for a
// nonvolatile main memory, side by side with the MRSR signature unit.
//
// Cells of a phase-change main memory wear out and get stuck at 0 or 1. Data stored
// there is encrypted with an AES one-time pad, so it looks random; RandShift rotates the
// encrypted block until every known stuck cell of the target row happens to receive the
// value it is stuck at, and stores the rotation with the row. Reading undoes the
// rotation and the pad. Only a barrel shifter and a comparator are added to the
// encryption path.
//
// Operations (one at a time; busy is high while one runs, done pulses at its end):
//   wr (idle)              cache fill: data_in -> cache block addressc.
//   load_i                 key_in -> AES key register.
//   enable, decrpt_i = 0   write-back: the cache block addressc is encrypted with the pad
//                          of (row counter + 1, addressm); the checker searches the
//                          rotation that fits the row's known stuck cells; the rotated
//                          block, the rotation and the new counter are written to row
//                          addressm; a verify read follows, and newly found stuck cells
//                          are learned and the search restarted. wr_enable pulses on each
//                          row write; wr_fail pulses if no rotation fits (the row is left
//                          to a stronger correction scheme; if an earlier pass already
//                          wrote it, it holds that pass's data and the new counter).
//   enable, decrpt_i = 1   read: row addressm is rotated back, decrypted and shown on
//                          data_out; with wr1 = 1 the plaintext is also written to cache
//                          block addressc.
//   inj_we (idle)          sets the stuck-at cells of row addressm (fault injection).
// The MRSR unit runs every clock: its LFSR pattern is doutf and it compresses the
// encrypt/decrypt unit's output (data_o on writes, data_out on reads) into mrsr_sig.
// rst (asynchronous, active high) resets the RandShift path, rst1 the MRSR unit.
//
// Words: the block is cut into NW = BLK_W / WORD_W words, each rotated on its own by a
// lane with its own barrel shifter and checker (word-level RandShift). With the default
// WORD_W = 128 a row holds one word, so word level and row level coincide; WORD_W = 64
// gives two independently rotated words. The row is written once every lane has found a
// fitting rotation; if any lane finds none, the write fails. shift_count holds the lanes'
// rotations, lane 0 in the low bits.
//
// Timing (cycles counted from the clock edge that samples enable to the one that
// raises done): a write-back whose first search succeeds at rotation s (the largest over
// the lanes) takes 19 + s cycles (16 for the pad, 1 to start the search, s + 1
// candidates, 1 to write and verify); each repeated search after a failed verify adds 3 + s' cycles. A read takes
// 17 cycles (1 to undo the rotation, 16 for the pad).
//
// The structure (OTP unit with AES, XOR and multiplexers; barrel shifter, checker and row
// verifier; cache and main memory; the MRSR) and the port names follow the design's
// block diagrams and top-level symbol. The operation encoding of the control inputs,
// the added ports (data_in, fault injection, status outputs) and the verify-and-retry
// sequence are this design's own choices.
module topmodule
  import randshift_pkg::*;
#(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned WORD_W = 128,
  parameter int unsigned STEP   = 1,
  parameter int unsigned NW     = BLK_W / WORD_W,
  parameter int unsigned SWW    = $clog2(WORD_W),
  parameter int unsigned SH_W   = NW * SWW
)(
  input  logic              clk,
  input  logic              rst,
  input  logic              rst1,
  input  logic [KEY_W-1:0]  key_in,
  input  logic              load_i,
  input  logic [ADDR_W-1:0] addressc,
  input  logic [ADDR_W-1:0] addressm,
  input  logic              wr,
  input  logic [BLK_W-1:0]  data_in,
  input  logic              enable,
  input  logic              decrpt_i,
  input  logic              wr1,
  input  logic              inj_we,
  input  logic [BLK_W-1:0]  inj_mask,
  input  logic [BLK_W-1:0]  inj_val,
  output logic [BLK_W-1:0]  data_outc,
  output logic [BLK_W-1:0]  data_outm,
  output logic              check_result,
  output logic [BLK_W-1:0]  data_out,
  output logic [BLK_W-1:0]  data_o,
  output logic              wr_enable,
  output logic              wr_fail,
  output logic [SH_W-1:0]   shift_count,
  output logic              busy,
  output logic              done,
  output logic [BLK_W-1:0]  doutf,
  output logic [BLK_W-1:0]  mrsr_sig
);

  typedef enum logic [2:0] {
    T_IDLE, T_W_OTP, T_W_START, T_W_CHK, T_W_VER, T_R_SHIFT, T_R_OTP
  } tstate_t;

  tstate_t           state;
  logic [ADDR_W-1:0] am_q, ac_q;
  logic [CTR_W-1:0]  ctr_q;
  logic              wr1_q;
  logic              last_wr;

  // memory side
  logic [ADDR_W-1:0] maddr, caddr;
  logic [BLK_W-1:0]  m_rdata;
  logic [SH_W-1:0]   m_rshift;
  logic [CTR_W-1:0]  m_rctr;
  logic              m_we;
  // cache write port
  logic              c_we;
  logic [ADDR_W-1:0] c_waddr;
  logic [BLK_W-1:0]  c_wdata;
  // OTP unit
  logic              otp_start, otp_wr, otp_ready, otp_valid;
  logic [CTR_W-1:0]  otp_ctr;
  logic [BLK_W-1:0]  enc_data, dec_data;
  // shifter input select (DSel) and the lanes
  logic              dsel;            // 1: memory row (read), 0: encrypted data (write)
  logic              rd_shift;        // read: load the un-rotated row into the shifters
  logic [BLK_W-1:0]  sh_d, sh_q;
  logic              chk_start;
  logic [NW-1:0]     l_fit, l_fail, l_fits_now, l_busy;
  logic [NW-1:0]     l_done_q, l_fail_q;
  logic [NW-1:0]     l_done_now, l_fail_now;
  logic              all_done, any_fail;
  // row verifier
  logic              verify, verify_ok;
  logic [BLK_W-1:0]  fault_mask, fault_val;

  logic idle;
  assign idle  = (state == T_IDLE);
  assign maddr = idle ? addressm : am_q;
  assign caddr = idle ? addressc : ac_q;

  // a lane is finished once its checker has reported a fit or a failure
  assign l_done_now = l_done_q | l_fit | l_fail;
  assign l_fail_now = l_fail_q | l_fail;
  assign all_done   = (state == T_W_CHK) && (&l_done_now);
  assign any_fail   = |l_fail_now;

  // ---------------- control ----------------
  always_comb begin
    otp_start = 1'b0;
    otp_wr    = 1'b0;
    otp_ctr   = m_rctr;
    chk_start = 1'b0;
    m_we      = 1'b0;
    wr_fail   = 1'b0;
    verify    = 1'b0;
    dsel      = 1'b0;
    rd_shift  = 1'b0;
    c_we      = 1'b0;
    c_waddr   = addressc;
    c_wdata   = data_in;
    case (state)
      T_IDLE: begin
        if (enable && !decrpt_i) begin
          otp_start = 1'b1;
          otp_wr    = 1'b1;
          otp_ctr   = m_rctr + 1'b1;
        end else if (enable && decrpt_i) begin
          dsel     = 1'b1;
          rd_shift = 1'b1;
        end else if (wr) begin
          c_we = 1'b1;
        end
      end
      T_W_START: chk_start = 1'b1;
      T_W_CHK: begin
        m_we    = all_done && !any_fail;
        wr_fail = all_done && any_fail;
      end
      T_W_VER:   verify = 1'b1;
      T_R_SHIFT: otp_start = 1'b1;
      T_R_OTP: begin
        c_we    = otp_valid && wr1_q;
        c_waddr = ac_q;
        c_wdata = dec_data;
      end
      default: ;
    endcase
  end

  assign sh_d         = dsel ? m_rdata : enc_data;
  assign wr_enable    = m_we;
  assign check_result = (state == T_W_CHK) && (&(l_done_q | l_fits_now));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= T_IDLE;
      am_q     <= '0;
      ac_q     <= '0;
      ctr_q    <= '0;
      wr1_q    <= 1'b0;
      done     <= 1'b0;
      last_wr  <= 1'b0;
      l_done_q <= '0;
      l_fail_q <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        T_IDLE: begin
          am_q  <= addressm;
          ac_q  <= addressc;
          wr1_q <= wr1;
          if (enable && !decrpt_i) begin
            ctr_q   <= m_rctr + 1'b1;
            last_wr <= 1'b1;
            state   <= T_W_OTP;
          end else if (enable && decrpt_i) begin
            last_wr <= 1'b0;
            state   <= T_R_SHIFT;
          end
        end
        T_W_OTP:   if (otp_valid) state <= T_W_START;
        T_W_START: begin
          l_done_q <= '0;
          l_fail_q <= '0;
          state    <= T_W_CHK;
        end
        T_W_CHK: begin
          l_done_q <= l_done_now;
          l_fail_q <= l_fail_now;
          if (all_done) begin
            if (any_fail) begin
              done  <= 1'b1;
              state <= T_IDLE;
            end else begin
              state <= T_W_VER;
            end
          end
        end
        T_W_VER: begin
          if (verify_ok) begin
            done  <= 1'b1;
            state <= T_IDLE;
          end else begin
            state <= T_W_START;   // faults learned this cycle: search again
          end
        end
        T_R_SHIFT: state <= T_R_OTP;
        T_R_OTP: if (otp_valid) begin
          done  <= 1'b1;
          state <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  assign busy = !idle;

  // ---------------- word lanes: barrel shifter + checker per word ----------------
  for (genvar i = 0; i < NW; i++) begin : g_lane
    logic             c_shift_en;
    logic [SWW-1:0]   c_shift_amt;
    logic             sh_en, sh_dir;
    logic [SWW-1:0]   sh_amt;

    assign sh_en  = rd_shift | c_shift_en;
    assign sh_dir = rd_shift;
    assign sh_amt = rd_shift ? m_rshift[i*SWW +: SWW] : c_shift_amt;

    brlshftr #(.WIDTH(WORD_W)) a4 (
      .clk (clk),
      .rst (rst),
      .en  (sh_en),
      .dir (sh_dir),
      .amt (sh_amt),
      .d   (sh_d[i*WORD_W +: WORD_W]),
      .q   (sh_q[i*WORD_W +: WORD_W])
    );

    fault_checker #(.WIDTH(WORD_W), .STEP(STEP)) a6 (
      .clk          (clk),
      .rst          (rst),
      .start        (chk_start),
      .q            (sh_q[i*WORD_W +: WORD_W]),
      .fault_mask   (fault_mask[i*WORD_W +: WORD_W]),
      .fault_val    (fault_val[i*WORD_W +: WORD_W]),
      .shift_en     (c_shift_en),
      .shift_amt    (c_shift_amt),
      .shift_count  (shift_count[i*SWW +: SWW]),
      .check_result (l_fits_now[i]),
      .wr_enable    (l_fit[i]),
      .wr_fail      (l_fail[i]),
      .busy         (l_busy[i])
    );
  end

  // ---------------- storage, OTP and row verifier ----------------
  cachemem #(.DEPTH(DEPTH)) a2 (
    .clk   (clk),
    .rst   (rst),
    .we    (c_we),
    .waddr (c_waddr),
    .wdata (c_wdata),
    .addr  (caddr),
    .dout  (data_outc)
  );

  rommem #(.DEPTH(DEPTH), .SH_W(SH_W)) a3 (
    .clk      (clk),
    .rst      (rst),
    .addr     (maddr),
    .we       (m_we),
    .wdata    (sh_q),
    .wshift   (shift_count),
    .wctr     (ctr_q),
    .inj_we   (inj_we && idle),
    .inj_mask (inj_mask),
    .inj_val  (inj_val),
    .rdata    (m_rdata),
    .rshift   (m_rshift),
    .rctr     (m_rctr)
  );
  assign data_outm = m_rdata;

  otp_unit u_otp (
    .clk       (clk),
    .rst       (rst),
    .key_load  (load_i && idle),
    .key_in    (key_in),
    .start     (otp_start),
    .wr        (otp_wr),
    .counter   (otp_ctr),
    .addr      (maddr),
    .cache_blk (data_outc),
    .mem_blk   (sh_q),
    .ready     (otp_ready),
    .valid     (otp_valid),
    .enc_data  (enc_data),
    .dec_data  (dec_data)
  );
  assign data_o   = enc_data;
  assign data_out = dec_data;

  rowverifier #(.DEPTH(DEPTH)) a5 (
    .clk        (clk),
    .rst        (rst),
    .addr       (maddr),
    .verify     (verify),
    .wdata      (sh_q),
    .rdata      (m_rdata),
    .verify_ok  (verify_ok),
    .fault_mask (fault_mask),
    .fault_val  (fault_val)
  );

  // MRSR: the multiplexer picks the encrypted or decrypted data of the last operation
  mrsr u_mrsr (
    .clk       (clk),
    .rst       (rst1),
    .en        (1'b1),
    .d         (last_wr ? enc_data : dec_data),
    .pattern   (doutf),
    .signature (mrsr_sig)
  );

  a_word_split:      assert final (NW * WORD_W == BLK_W);
  a_otp_start_ready: assert property (@(posedge clk) disable iff (rst) otp_start |-> otp_ready);
  a_chk_idle_start:  assert property (@(posedge clk) disable iff (rst) chk_start |-> l_busy == '0);
  a_one_outcome:     assert property (@(posedge clk) disable iff (rst) !(wr_enable && wr_fail));

endmodule
