// bloom_filters: per-block load and store Bloom filters of an LSQ partition.
//
// Each in-flight block owns one load filter and one store filter of
// BF_BITS bits. An arriving instruction sets one bit, chosen by a hash of
// its doubleword address, in its own block's filter of its own kind. A
// lookup tests the same bit in the filters of a caller-chosen set of
// blocks: a load tests the store filters of blocks that can hold older
// stores, a store tests the load filters of blocks that can hold younger
// loads. A miss means no CAM search is needed. Filters are flash-cleared
// a whole block at a time when the block commits or is flushed, which is
// why there is one filter per block. Lookup is combinational; insert and
// clear act at the clock edge (clear wins).
// Per-block split, flash clearing and 32-bit filters follow the document;
// the single hash (XOR fold of two 5-bit fields of the doubleword
// address) is this design's choice.
module bloom_filters
  import lsq_pkg::*;
#(
  parameter int unsigned BF_BITS = 32,
  localparam int unsigned IDX_W = $clog2(BF_BITS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ins_en,
  input  logic                  ins_store,
  input  blk_t                  ins_blk,
  input  addr_t                 ins_addr,
  input  addr_t                 q_addr,
  input  logic [NUM_BLOCKS-1:0] q_load_blks,   // load filters to test
  input  logic [NUM_BLOCKS-1:0] q_store_blks,  // store filters to test
  output logic                  q_load_hit,
  output logic                  q_store_hit,
  input  logic [NUM_BLOCKS-1:0] clr_blk_mask
);

  logic [BF_BITS-1:0] ld_bf_q [NUM_BLOCKS];
  logic [BF_BITS-1:0] st_bf_q [NUM_BLOCKS];

  function automatic logic [IDX_W-1:0] bf_hash(addr_t a);
    logic [ADDR_W-OFF_W-1:0] d;
    d = dw_addr(a);
    return d[IDX_W-1:0] ^ d[2*IDX_W-1:IDX_W];
  endfunction

  logic [IDX_W-1:0] ins_idx, q_idx;
  assign ins_idx = bf_hash(ins_addr);
  assign q_idx   = bf_hash(q_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_BLOCKS; b++) begin
        ld_bf_q[b] <= '0;
        st_bf_q[b] <= '0;
      end
    end else begin
      if (ins_en) begin
        if (ins_store) st_bf_q[ins_blk][ins_idx] <= 1'b1;
        else           ld_bf_q[ins_blk][ins_idx] <= 1'b1;
      end
      for (int b = 0; b < NUM_BLOCKS; b++) begin
        if (clr_blk_mask[b]) begin
          ld_bf_q[b] <= '0;
          st_bf_q[b] <= '0;
        end
      end
    end
  end

  always_comb begin
    q_load_hit  = 1'b0;
    q_store_hit = 1'b0;
    for (int b = 0; b < NUM_BLOCKS; b++) begin
      q_load_hit  |= q_load_blks[b]  & ld_bf_q[b][q_idx];
      q_store_hit |= q_store_blks[b] & st_bf_q[b][q_idx];
    end
  end

endmodule
