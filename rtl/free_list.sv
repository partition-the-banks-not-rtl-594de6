// free_list: pool of free slots of one LSQ partition.
//
// Entries of the unordered LSQ are handed out from a pool as instructions
// arrive and returned when they commit or are flushed, so the slot number
// carries no age information. The pool is a bit vector (1 = free); the
// lowest free slot is offered combinationally on alloc_slot/alloc_ok and
// taken when alloc_en is high at a clock edge. Any set of slots can be
// returned in one cycle through free_mask (a flush frees many at once).
// A slot freed and allocated in the same cycle cannot happen because only
// free slots are offered. The bit-vector/lowest-first policy is this
// design's choice; the document only calls it a pool of free entries.
module free_list #(
  parameter int unsigned LSQ_ENTRIES = 48,
  localparam int unsigned SLOT_W = $clog2(LSQ_ENTRIES)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   alloc_en,
  output logic                   alloc_ok,
  output logic [SLOT_W-1:0]      alloc_slot,
  input  logic [LSQ_ENTRIES-1:0] free_mask,
  output logic [LSQ_ENTRIES-1:0] free_vec,
  output logic [$clog2(LSQ_ENTRIES+1)-1:0] num_free
);

  logic [LSQ_ENTRIES-1:0] free_q;

  always_comb begin
    alloc_ok   = 1'b0;
    alloc_slot = '0;
    for (int i = LSQ_ENTRIES - 1; i >= 0; i--) begin
      if (free_q[i]) begin
        alloc_ok   = 1'b1;
        alloc_slot = SLOT_W'(i);
      end
    end
    num_free = '0;
    for (int i = 0; i < LSQ_ENTRIES; i++) num_free += free_q[i];
  end

  assign free_vec = free_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      free_q <= '1;
    end else begin
      free_q <= free_q | free_mask;
      if (alloc_en && alloc_ok) free_q[alloc_slot] <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   alloc_en |-> alloc_ok)
    else $error("free_list: allocation from an empty pool");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (free_mask & free_q) == '0)
    else $error("free_list: freeing a slot that is already free");

endmodule
