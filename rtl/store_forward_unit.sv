// store_forward_unit: store-to-load forwarding for an unordered LSQ
// partition.
//
// Because slots are unordered, a load cannot find "the youngest older
// matching store" by position. Instead, in the cycle the load arrives
// (start), every slot holding an older store to the same doubleword
// (cand_slots, from the address CAM and the age CAM) sets the bit of its
// age in a WINDOW-bit matching vector. From the next cycle on, the vector
// is scanned backwards in age, starting just below the load: each cycle
// the youngest remaining matching store is taken, its slot is looked up in
// the indirection table by age, its word is read from the LSQ RAM, and
// those of its bytes that the load needs and that no younger store has
// already supplied are copied into the result. The scan ends when every
// byte the load needs has been supplied or no matching store is left.
// Numbering the arrival cycle 0, a load that visits K >= 1 stores has done
// (a one-cycle pulse) in cycle K+1; with no candidate it ends in cycle 2. Bytes with fwd_mask = 0 must come from the cache.
// The matching vector and backwards scan follow the document; stopping
// early once all bytes are supplied is this design's reading of "when all
// of the load data has been received".
module store_forward_unit
  import lsq_pkg::*;
#(
  parameter int unsigned LSQ_ENTRIES = 48,
  localparam int unsigned SLOT_W = $clog2(LSQ_ENTRIES)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  blk_t                   head_blk,
  // load arrival
  input  logic                   start,
  input  age_t                   ld_age,
  input  logic [OFF_W-1:0]       ld_off,
  input  logic [1:0]             ld_size,
  input  logic [LSQ_ENTRIES-1:0] cand_slots,
  input  age_t                   slot_ages [LSQ_ENTRIES],
  // abort (the load's block was flushed)
  input  logic                   abort,
  // indirection table and RAM read port
  output age_t                   int_rd_age,
  input  logic [SLOT_W-1:0]      int_rd_slot,
  output logic [SLOT_W-1:0]      ram_rd_slot,
  input  ram_word_t              ram_rd_data,
  // result
  output logic                   busy,
  output logic                   done,
  output age_t                   done_age,
  output data_t                  fwd_data,
  output bmask_t                 fwd_mask,
  output logic [LSID_W+2:0]      stores_visited
);

  logic [WINDOW-1:0] mvec_q;      // bit = relative age of a matching store
  logic              busy_q;
  age_t              age_q;
  bmask_t            need_q;      // bytes still to be supplied
  data_t             data_q;
  bmask_t            got_q;
  logic [LSID_W+2:0] visits_q;

  // youngest remaining matching store (highest relative age)
  logic              any_q;
  logic [AGE_W-1:0]  pick_rel;
  always_comb begin
    any_q    = 1'b0;
    pick_rel = '0;
    for (int i = 0; i < WINDOW; i++) begin
      if (mvec_q[i]) begin
        any_q    = 1'b1;
        pick_rel = AGE_W'(i);
      end
    end
  end

  assign int_rd_age  = pick_rel + age_t'({head_blk, {LSID_W{1'b0}}});
  assign ram_rd_slot = int_rd_slot;

  // bytes of the picked store, placed in doubleword lanes
  bmask_t st_mask, take;
  data_t  st_lanes;
  always_comb begin
    st_mask  = byte_mask(ram_rd_data.off, ram_rd_data.size);
    st_lanes = ram_rd_data.data << (8 * ram_rd_data.off);
    take     = st_mask & need_q;
  end

  // matching vector of a new load: one bit per relative age of a candidate
  logic [WINDOW-1:0] start_vec;
  always_comb begin
    start_vec = '0;
    for (int s = 0; s < LSQ_ENTRIES; s++)
      if (cand_slots[s]) start_vec[rel_age(slot_ages[s], head_blk)] = 1'b1;
  end

  bmask_t need_n;
  assign need_n = need_q & ~take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mvec_q   <= '0;
      busy_q   <= 1'b0;
      age_q    <= '0;
      need_q   <= '0;
      data_q   <= '0;
      got_q    <= '0;
      visits_q <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (abort) begin
        busy_q <= 1'b0;
        mvec_q <= '0;
      end else if (start) begin
        mvec_q   <= start_vec;
        busy_q   <= 1'b1;
        age_q    <= ld_age;
        need_q   <= byte_mask(ld_off, ld_size);
        data_q   <= '0;
        got_q    <= '0;
        visits_q <= '0;
      end else if (busy_q) begin
        if (!any_q || need_q == '0) begin
          busy_q <= 1'b0;
          done   <= 1'b1;
        end else begin
          for (int b = 0; b < BYTES; b++)
            if (take[b]) data_q[8*b +: 8] <= st_lanes[8*b +: 8];
          got_q    <= got_q | take;
          need_q   <= need_n;
          visits_q <= visits_q + 1'b1;
          mvec_q[pick_rel] <= 1'b0;
          if (need_n == '0 || mvec_q == (WINDOW'(1) << pick_rel)) begin
            busy_q <= 1'b0;
            done   <= 1'b1;
          end
        end
      end
    end
  end

  assign busy           = busy_q;
  assign done_age       = age_q;
  assign fwd_data       = data_q;
  assign fwd_mask       = got_q;
  assign stores_visited = visits_q;

endmodule
