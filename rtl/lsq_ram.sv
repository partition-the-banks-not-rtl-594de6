// lsq_ram: data RAM of one LSQ partition.
//
// One 69-bit word per slot: for a store the 64-bit value, its size and its
// byte offset in the doubleword; for a load the same fields with the load's
// target tag in place of the value. One write port (clocked) and two
// combinational read ports, one used by store forwarding and one by store
// commit. Port counts and the 69-bit width are as drawn for the design;
// the split of the word into fields is this design's choice.
module lsq_ram
  import lsq_pkg::*;
#(
  parameter int unsigned LSQ_ENTRIES = 48,
  localparam int unsigned SLOT_W = $clog2(LSQ_ENTRIES)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [SLOT_W-1:0] wr_slot,
  input  ram_word_t         wr_data,
  input  logic [SLOT_W-1:0] rd_slot [2],
  output ram_word_t         rd_data [2]
);

  ram_word_t mem_q [LSQ_ENTRIES];

  always_ff @(posedge clk) begin
    if (wr_en) mem_q[wr_slot] <= wr_data;
  end

  always_comb begin
    for (int p = 0; p < 2; p++) rd_data[p] = mem_q[rd_slot[p]];
  end

endmodule
