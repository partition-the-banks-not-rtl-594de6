// indirection_table: age-indexed table (INT) of an unordered LSQ partition.
//
// The partition hands out slots from a free list, so a slot says nothing
// about an instruction's age. This table, indexed by age (one entry per
// position of the 256-entry memory window), records the slot an
// instruction received, whether the entry is valid and whether it is a
// store. Commit looks up a store's slot by its age; the store forwarding
// scan does the same for each matching store. Two read ports and one
// write port, as drawn for the design; reads are combinational, the write
// and the invalidations take effect at the next clock edge.
// Whole blocks are invalidated in one cycle (commit or flush), and the
// valid-store bits of one block are presented as a vector so that commit
// can walk a block's stores in age order.
// Port counts and depth follow the design; the per-entry valid/type bits
// and the block-wide invalidate are this implementation's choices.
module indirection_table
  import lsq_pkg::*;
#(
  parameter int unsigned LSQ_ENTRIES = 48,
  localparam int unsigned SLOT_W = $clog2(LSQ_ENTRIES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // write port: record slot of a newly arrived instruction
  input  logic                  wr_en,
  input  age_t                  wr_age,
  input  logic [SLOT_W-1:0]     wr_slot,
  input  logic                  wr_store,
  // two read ports
  input  age_t                  rd_age   [2],
  output logic [SLOT_W-1:0]     rd_slot  [2],
  output logic                  rd_valid [2],
  output logic                  rd_store [2],
  // invalidate every entry of the blocks set in the mask
  input  logic [NUM_BLOCKS-1:0] clr_blk_mask,
  // valid stores of one block, bit i = lsid i
  input  blk_t                  scan_blk,
  output logic [LSID_PER_BLOCK-1:0] scan_store_vec
);

  logic [SLOT_W-1:0] slot_q  [WINDOW];
  logic [WINDOW-1:0] valid_q;
  logic [WINDOW-1:0] store_q;

  always_ff @(posedge clk) begin
    if (wr_en) slot_q[wr_age] <= wr_slot;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      store_q <= '0;
    end else begin
      for (int unsigned b = 0; b < NUM_BLOCKS; b++) begin
        if (clr_blk_mask[b]) valid_q[b*LSID_PER_BLOCK +: LSID_PER_BLOCK] <= '0;
      end
      if (wr_en) begin
        valid_q[wr_age] <= 1'b1;
        store_q[wr_age] <= wr_store;
      end
    end
  end

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      rd_slot[p]  = slot_q[rd_age[p]];
      rd_valid[p] = valid_q[rd_age[p]];
      rd_store[p] = store_q[rd_age[p]];
    end
    scan_store_vec = valid_q[scan_blk*LSID_PER_BLOCK +: LSID_PER_BLOCK]
                   & store_q[scan_blk*LSID_PER_BLOCK +: LSID_PER_BLOCK];
  end

endmodule
