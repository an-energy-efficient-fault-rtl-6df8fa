// rommem: logical model of the nonvolatile (phase-change) main memory with stuck-at cells.
//
// Each of DEPTH rows holds one BLK_W-bit word plus the row's metadata: the rotation
// (shift count) RandShift used when writing it and the row's write counter, which
// seeds the one-time pad. Worn-out cells are modelled as a per-row stuck-at map
// (stuck_mask marks a stuck cell, stuck_val its frozen value) set through the inj_*
// port, standing in for cell wear-out. A stuck cell ignores writes and always reads its
// frozen value: rdata = (array & ~mask) | (val & mask). The metadata cells are taken
// as fault-free.
//
// Interface: one row address for both ports (addressm). Writes of data and metadata on
// the rising edge when we is high; reads are asynchronous. rst (asynchronous, active
// high) clears data, metadata and the fault map. Storing the shift count and counter
// beside the row, and this fault model, are this design's own choices.
module rommem
  import randshift_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter int unsigned SH_W  = $clog2(BLK_W)
)(
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    addr,
  // write port
  input  logic             we,
  input  logic [BLK_W-1:0] wdata,
  input  logic [SH_W-1:0]  wshift,
  input  logic [CTR_W-1:0] wctr,
  // stuck-at fault injection for row addr
  input  logic             inj_we,
  input  logic [BLK_W-1:0] inj_mask,
  input  logic [BLK_W-1:0] inj_val,
  // read port
  output logic [BLK_W-1:0] rdata,
  output logic [SH_W-1:0]  rshift,
  output logic [CTR_W-1:0] rctr
);

  logic [BLK_W-1:0] cells [DEPTH];
  logic [BLK_W-1:0] smask [DEPTH];
  logic [BLK_W-1:0] sval  [DEPTH];
  logic [SH_W-1:0]  shift [DEPTH];
  logic [CTR_W-1:0] ctr   [DEPTH];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) begin
        cells[i] <= '0;
        smask[i] <= '0;
        sval[i]  <= '0;
        shift[i] <= '0;
        ctr[i]   <= '0;
      end
    end else begin
      if (we) begin
        cells[addr] <= wdata;
        shift[addr] <= wshift;
        ctr[addr]   <= wctr;
      end
      if (inj_we) begin
        smask[addr] <= inj_mask;
        sval[addr]  <= inj_val & inj_mask;
      end
    end
  end

  assign rdata  = (cells[addr] & ~smask[addr]) | (sval[addr] & smask[addr]);
  assign rshift = shift[addr];
  assign rctr   = ctr[addr];

endmodule
