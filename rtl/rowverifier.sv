// rowverifier: keeps, per memory row, where the stuck-at cells are and what they hold.
//
// The checker needs the location and the value of every known defect in the row being
// written. This block keeps that knowledge as two bit-vectors per row: fault_mask
// (1 = the cell is known to be stuck) and fault_val (the value it is stuck at). It
// learns them by verify-after-write: when verify is high, the data just written
// (wdata) is compared with what the row reads back (rdata); every differing bit is a
// stuck cell, stuck at the value read back, and is added to the row's map on the
// rising clock edge. verify_ok reports, in the same cycle, that the read-back matched.
// A stuck cell that happens to hold the written value is harmless for that write and
// is learned later, when a write disagrees with it.
//
// Interface: addr selects the row for both the lookup (asynchronous) and the update.
// rst (asynchronous, active high) forgets all faults. The document gives the block's
// role; the verify-after-write learning is this design's own choice.
module rowverifier
  import randshift_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
)(
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    addr,
  input  logic             verify,
  input  logic [BLK_W-1:0] wdata,
  input  logic [BLK_W-1:0] rdata,
  output logic             verify_ok,
  output logic [BLK_W-1:0] fault_mask,
  output logic [BLK_W-1:0] fault_val
);

  logic [BLK_W-1:0] fmask [DEPTH];
  logic [BLK_W-1:0] fval  [DEPTH];
  logic [BLK_W-1:0] diff;

  assign diff      = wdata ^ rdata;
  assign verify_ok = (diff == '0);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) begin
        fmask[i] <= '0;
        fval[i]  <= '0;
      end
    end else if (verify) begin
      fmask[addr] <= fmask[addr] | diff;
      fval[addr]  <= (fval[addr] & ~diff) | (rdata & diff);
    end
  end

  assign fault_mask = fmask[addr];
  assign fault_val  = fval[addr];

endmodule
