// fault_checker: searches for the rotation that lets a block be stored on a row with stuck cells.
//
// RandShift relies on encrypted data looking random: some rotation of the block will,
// with high probability, put a matching bit on every stuck-at cell of the row, so the
// stuck cells then hold correct data. It steps the shift count through
// 0, STEP, 2*STEP, ... and for each candidate compares the barrel shifter's output q
// with the row's known faults: the candidate fits when ((q ^ fault_val) & fault_mask)
// is zero. On a fit it pulses wr_enable and holds the rotation in shift_count; after
// the last candidate without a fit it pulses wr_fail, leaving the row to a stronger
// correction scheme.
//
// Interface and timing: start (one cycle, while idle) begins a search. The checker
// drives the shifter through shift_en/shift_amt; q holds the candidate one cycle
// later, so each candidate takes one clock. check_result is high while the current
// candidate fits. A search ends at most NPOS cycles after start. The document gives
// the checker's outputs (Wr_Fail, Wr_Enable, Shift Count, ShiftEnable); the stepping
// order and one-candidate-per-cycle timing are this design's own choices.
module fault_checker
  import randshift_pkg::*;
#(
  parameter int unsigned WIDTH = BLK_W,
  parameter int unsigned STEP  = 1,
  parameter int unsigned SH_W  = $clog2(WIDTH),
  parameter int unsigned NPOS  = WIDTH / STEP
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] q,
  input  logic [WIDTH-1:0] fault_mask,
  input  logic [WIDTH-1:0] fault_val,
  output logic             shift_en,
  output logic [SH_W-1:0]  shift_amt,
  output logic [SH_W-1:0]  shift_count,
  output logic             check_result,
  output logic             wr_enable,
  output logic             wr_fail,
  output logic             busy
);

  typedef enum logic [0:0] {C_IDLE, C_CHECK} cstate_t;
  cstate_t state;
  logic [SH_W:0] idx;      // candidate number being checked
  logic          fits;
  logic          last;

  assign fits         = (((q ^ fault_val) & fault_mask) == '0);
  assign last         = (idx == (SH_W+1)'(NPOS - 1));
  assign check_result = (state == C_CHECK) && fits;
  assign busy         = (state == C_CHECK);
  assign wr_enable    = (state == C_CHECK) && fits;
  assign wr_fail      = (state == C_CHECK) && !fits && last;

  always_comb begin
    shift_en  = 1'b0;
    shift_amt = '0;
    if (state == C_IDLE && start) begin
      shift_en = 1'b1;
    end else if (state == C_CHECK && !fits && !last) begin
      shift_en  = 1'b1;
      shift_amt = SH_W'((32'(idx) + 1) * STEP);
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= C_IDLE;
      idx   <= '0;
    end else begin
      case (state)
        C_IDLE: if (start) begin
          state <= C_CHECK;
          idx   <= '0;
        end
        C_CHECK: begin
          if (fits || last) state <= C_IDLE;
          else              idx   <= idx + 1'b1;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign shift_count = SH_W'(32'(idx) * STEP);

  a_one_outcome: assert property (@(posedge clk) disable iff (rst) !(wr_enable && wr_fail));

endmodule
