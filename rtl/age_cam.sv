// age_cam: age-table CAM (AT-CAM) of one LSQ partition.
//
// Holds the age (memory sequence number) of the instruction in each slot.
// Unlike an equality CAM, a search returns, for every slot, whether its
// age is older than, equal to or younger than the key. Ages are
// {block slot, lsid} with block slots reused circularly, so both sides are
// first made relative to the oldest in-flight block (head_blk) and then
// compared. The same search also reports the slots whose block equals the
// key's block, which block deallocation uses. One write, one read and one
// search port; the write is clocked, search and read are combinational.
// The three-way compare is the document's; the relative-age arithmetic and
// the block-equality output are this design's choices.
module age_cam
  import lsq_pkg::*;
#(
  parameter int unsigned LSQ_ENTRIES = 48,
  localparam int unsigned SLOT_W = $clog2(LSQ_ENTRIES)
) (
  input  logic                   clk,
  input  logic                   wr_en,
  input  logic [SLOT_W-1:0]      wr_slot,
  input  age_t                   wr_age,
  input  blk_t                   head_blk,
  input  age_t                   search_age,
  output logic [LSQ_ENTRIES-1:0] older,     // slot age < key
  output logic [LSQ_ENTRIES-1:0] equal,
  output logic [LSQ_ENTRIES-1:0] younger,   // slot age > key
  output logic [LSQ_ENTRIES-1:0] same_blk,
  input  logic [SLOT_W-1:0]      rd_slot,
  output age_t                   rd_age,
  output age_t                   ages [LSQ_ENTRIES]  // every slot's age
);

  age_t age_q [LSQ_ENTRIES];

  always_ff @(posedge clk) begin
    if (wr_en) age_q[wr_slot] <= wr_age;
  end

  age_t key_rel;
  assign key_rel = rel_age(search_age, head_blk);

  always_comb begin
    for (int i = 0; i < LSQ_ENTRIES; i++) begin
      age_t r;
      r           = rel_age(age_q[i], head_blk);
      older[i]    = r < key_rel;
      equal[i]    = r == key_rel;
      younger[i]  = r > key_rel;
      same_blk[i] = age_blk(age_q[i]) == age_blk(search_age);
    end
  end

  assign rd_age = age_q[rd_slot];
  assign ages   = age_q;

endmodule
