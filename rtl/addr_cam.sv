// addr_cam: address CAM of one LSQ partition.
//
// One 48-bit address per slot, with one write, one search and one read
// port as drawn for the partition. A search compares the doubleword part
// of the key (bits 47:3) with every slot and returns a match vector in the
// same cycle; which slots are occupied is known to the caller (the free
// list), which masks the result. The write takes effect at the clock edge,
// the read port is combinational. Doubleword-granularity matching, with
// byte overlap resolved later from the stored offset and size, is this
// design's choice.
module addr_cam
  import lsq_pkg::*;
#(
  parameter int unsigned LSQ_ENTRIES = 48,
  localparam int unsigned SLOT_W = $clog2(LSQ_ENTRIES)
) (
  input  logic                   clk,
  input  logic                   wr_en,
  input  logic [SLOT_W-1:0]      wr_slot,
  input  addr_t                  wr_addr,
  input  addr_t                  search_addr,
  output logic [LSQ_ENTRIES-1:0] match,
  input  logic [SLOT_W-1:0]      rd_slot,
  output addr_t                  rd_addr
);

  addr_t addr_q [LSQ_ENTRIES];

  always_ff @(posedge clk) begin
    if (wr_en) addr_q[wr_slot] <= wr_addr;
  end

  always_comb begin
    for (int i = 0; i < LSQ_ENTRIES; i++)
      match[i] = (dw_addr(addr_q[i]) == dw_addr(search_addr));
  end

  assign rd_addr = addr_q[rd_slot];

endmodule
