// overflow_counter: occupancy counting and overflow detection of an LSQ
// partition.
//
// NUM_BLOCKS+1 counters: one per in-flight block counts the instructions
// of that block held in the partition, and a cumulative counter holds the
// total. When a block commits or is flushed, its count is subtracted from
// the total in the same cycle and the block counter is cleared. The
// partition is full for speculative instructions once the total reaches
// LSQ_ENTRIES - RESERVED, and full for the non-speculative block once it
// reaches LSQ_ENTRIES; with RESERVED = 0 (the default, which the document
// found as good as reserving) both coincide. The counter structure and the
// reservation scheme follow the document; the encoding is this design's.
module overflow_counter
  import lsq_pkg::*;
#(
  parameter int unsigned LSQ_ENTRIES = 48,
  parameter int unsigned RESERVED = 0,
  localparam int unsigned CNT_W = $clog2(LSQ_ENTRIES + 1),
  localparam int unsigned BCNT_W = $clog2(LSID_PER_BLOCK + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  inc_en,
  input  blk_t                  inc_blk,
  input  logic [NUM_BLOCKS-1:0] dealloc_mask,
  output logic [CNT_W-1:0]      total,
  output logic                  full_spec,
  output logic                  full_nonspec
);

  logic [BCNT_W-1:0] blk_cnt_q [NUM_BLOCKS];
  logic [CNT_W-1:0]  total_q;
  logic [CNT_W-1:0]  sub;

  always_comb begin
    sub = '0;
    for (int b = 0; b < NUM_BLOCKS; b++)
      if (dealloc_mask[b]) sub += CNT_W'(blk_cnt_q[b]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      total_q <= '0;
      for (int b = 0; b < NUM_BLOCKS; b++) blk_cnt_q[b] <= '0;
    end else begin
      total_q <= total_q - sub + CNT_W'(inc_en);
      for (int b = 0; b < NUM_BLOCKS; b++) begin
        if (dealloc_mask[b])                    blk_cnt_q[b] <= '0;
        else if (inc_en && inc_blk == blk_t'(b)) blk_cnt_q[b] <= blk_cnt_q[b] + 1'b1;
      end
    end
  end

  assign total        = total_q;
  assign full_spec    = total_q >= CNT_W'(LSQ_ENTRIES - RESERVED);
  assign full_nonspec = total_q >= CNT_W'(LSQ_ENTRIES);

  assert property (@(posedge clk) disable iff (!rst_n)
                   inc_en |-> !dealloc_mask[inc_blk])
    else $error("overflow_counter: insert into a block being deallocated");

endmodule
