// lsq_bank: one unordered, address-interleaved load/store queue partition.
//
// Every load and store whose cache line maps to this bank enters here, in
// whatever order it executes. An arriving instruction takes any free slot
// (free_list); its address goes to the address CAM, its age to the age CAM
// (AT-CAM), its value or target to the RAM, and the slot number to the
// age-indexed indirection table. Per-block Bloom filters decide whether an
// associative search is needed at all:
//   * load:  if the store filters of its own and older blocks hit, the CAM
//            and AT-CAM find older stores to the same doubleword and the
//            store_forward_unit collects their bytes (bank busy meanwhile);
//            otherwise the load is answered in the next cycle with nothing
//            forwarded.
//   * store: if the load filters of its own and younger blocks hit, the
//            CAM and AT-CAM find younger loads to the same doubleword; if
//            any, a violation is reported with the age of the oldest one.
// Commit of the non-speculative block walks that block's stores in age
// order through the indirection table, one per cycle, handing each to the
// cache write port, then frees all of the block's slots, its Bloom filters
// and its counter in one cycle. A flush frees every slot whose age is at
// or after the first flushed block (an AT-CAM search) in one cycle.
// overflow_counter reports full (per-block and cumulative counters); the
// flow control in front of the bank must not present an instruction that
// does not fit.
//
// Interface timing: in_ready is high only when the bank is idle and no
// commit or flush is being requested; an instruction is taken when
// in_valid && in_ready at a clock edge. Load responses and violations are
// registered (one cycle after arrival, or when forwarding ends). commit
// and flush are one-cycle requests: a commit is remembered and started
// once the bank is idle, a flush acts at once; commit_done pulses when the
// block has been released (2 + number of the block's stores in this bank
// cycles after the request when the bank is idle).
// Structure follows the document; the byte-level details, the
// doubleword-granularity violation check and the FSM are this design's.
module lsq_bank
  import lsq_pkg::*;
#(
  parameter int unsigned LSQ_ENTRIES = 48,
  parameter int unsigned RESERVED = 0,
  parameter int unsigned BF_BITS = 32,
  localparam int unsigned SLOT_W = $clog2(LSQ_ENTRIES),
  localparam int unsigned CNT_W = $clog2(LSQ_ENTRIES + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  blk_t                  head_blk,      // oldest (non-speculative) block
  // arriving memory instruction
  input  logic                  in_valid,
  input  mem_req_t              in_req,
  output logic                  in_ready,
  output logic                  full_spec,
  output logic                  full_nonspec,
  output logic [CNT_W-1:0]      occupancy,
  // load response: bytes forwarded from older stores
  output logic                  ld_valid,
  output age_t                  ld_age,
  output data_t                 ld_data,
  output bmask_t                ld_mask,
  // ordering violation: a store found a younger matching load
  output logic                  viol_valid,
  output age_t                  viol_age,      // oldest violating load
  // block commit and store write-back to the cache bank
  input  logic                  commit_valid,
  input  blk_t                  commit_blk,
  output logic                  commit_done,
  output logic                  st_valid,
  output addr_t                 st_addr,
  output data_t                 st_data,
  output logic [1:0]            st_size,
  // flush of blocks flush_blk and younger
  input  logic                  flush_valid,
  input  blk_t                  flush_blk,
  // activity: an associative search was performed this cycle
  output logic                  cam_search,
  output logic                  bf_filtered
);

  typedef enum logic [1:0] {S_IDLE, S_FWD, S_COMMIT, S_DEALLOC} state_e;
  state_e state_q;

  // ---------------------------------------------------------------- status
  logic [LSQ_ENTRIES-1:0] is_store_q;   // per-slot type (status column)
  logic [LSQ_ENTRIES-1:0] free_vec, occupied, free_mask;
  logic                   alloc_ok;
  logic [SLOT_W-1:0]      alloc_slot;
  logic [$clog2(LSQ_ENTRIES+1)-1:0] num_free;
  assign occupied = ~free_vec;

  logic accept;
  logic commit_req_q;   // commit requested, not yet started
  assign in_ready = (state_q == S_IDLE) && !commit_valid && !commit_req_q && !flush_valid;
  assign accept   = in_valid && in_ready;

  // ------------------------------------------------------------- flush mask
  logic [NUM_BLOCKS-1:0] flush_blks;
  always_comb begin
    for (int b = 0; b < NUM_BLOCKS; b++)
      flush_blks[b] = flush_valid &&
                      (blk_t'(blk_t'(b) - head_blk) >= blk_t'(flush_blk - head_blk));
  end

  // --------------------------------------------------------- commit state
  blk_t                      cblk_q;
  logic [LSID_PER_BLOCK-1:0] cpend_q;
  logic [LSID_PER_BLOCK-1:0] scan_store_vec;
  logic [LSID_W-1:0]         clsid;
  always_comb begin
    clsid = '0;
    for (int i = LSID_PER_BLOCK - 1; i >= 0; i--)
      if (cpend_q[i]) clsid = LSID_W'(i);
  end

  // ------------------------------------------------------------ AT-CAM key
  age_t cam_key;
  always_comb begin
    if (flush_valid)              cam_key = {flush_blk, {LSID_W{1'b0}}};
    else if (state_q == S_DEALLOC) cam_key = {cblk_q, {LSID_W{1'b0}}};
    else                          cam_key = in_req.age;
  end

  // -------------------------------------------------------------- storage
  logic [LSQ_ENTRIES-1:0] addr_match, older, equal, younger, same_blk;
  age_t                   slot_ages [LSQ_ENTRIES];
  age_t                   at_rd_age;
  addr_t                  cam_rd_addr;
  logic [SLOT_W-1:0]      int_rd_slot [2];
  logic                   int_rd_valid [2];
  logic                   int_rd_store [2];
  age_t                   int_rd_age [2];
  logic [SLOT_W-1:0]      ram_rd_slot [2];
  ram_word_t              ram_rd_data [2];
  logic [NUM_BLOCKS-1:0]  dealloc_blks;

  free_list #(.LSQ_ENTRIES(LSQ_ENTRIES)) u_free (
    .clk, .rst_n,
    .alloc_en  (accept),
    .alloc_ok,
    .alloc_slot,
    .free_mask,
    .free_vec,
    .num_free
  );

  addr_cam #(.LSQ_ENTRIES(LSQ_ENTRIES)) u_cam (
    .clk,
    .wr_en       (accept),
    .wr_slot     (alloc_slot),
    .wr_addr     (in_req.addr),
    .search_addr (in_req.addr),
    .match       (addr_match),
    .rd_slot     (int_rd_slot[1]),
    .rd_addr     (cam_rd_addr)
  );

  age_cam #(.LSQ_ENTRIES(LSQ_ENTRIES)) u_atcam (
    .clk,
    .wr_en      (accept),
    .wr_slot    (alloc_slot),
    .wr_age     (in_req.age),
    .head_blk,
    .search_age (cam_key),
    .older, .equal, .younger, .same_blk,
    .rd_slot    (alloc_slot),
    .rd_age     (at_rd_age),
    .ages       (slot_ages)
  );

  ram_word_t wr_word;
  assign wr_word = '{data: in_req.data, size: in_req.size,
                     off: in_req.addr[OFF_W-1:0]};

  lsq_ram #(.LSQ_ENTRIES(LSQ_ENTRIES)) u_ram (
    .clk,
    .wr_en   (accept),
    .wr_slot (alloc_slot),
    .wr_data (wr_word),
    .rd_slot (ram_rd_slot),
    .rd_data (ram_rd_data)
  );

  indirection_table #(.LSQ_ENTRIES(LSQ_ENTRIES)) u_int (
    .clk, .rst_n,
    .wr_en          (accept),
    .wr_age         (in_req.age),
    .wr_slot        (alloc_slot),
    .wr_store       (in_req.is_store),
    .rd_age         (int_rd_age),
    .rd_slot        (int_rd_slot),
    .rd_valid       (int_rd_valid),
    .rd_store       (int_rd_store),
    .clr_blk_mask   (dealloc_blks),
    .scan_blk       (cblk_q),
    .scan_store_vec
  );

  // Bloom filter lookup: which blocks are older-or-same / younger-or-same
  logic [NUM_BLOCKS-1:0] older_blks, younger_blks;
  logic                  bf_ld_hit, bf_st_hit;
  always_comb begin
    for (int b = 0; b < NUM_BLOCKS; b++) begin
      older_blks[b]   = blk_t'(blk_t'(b) - head_blk) <= blk_t'(age_blk(in_req.age) - head_blk);
      younger_blks[b] = blk_t'(blk_t'(b) - head_blk) >= blk_t'(age_blk(in_req.age) - head_blk);
    end
  end

  bloom_filters #(.BF_BITS(BF_BITS)) u_bf (
    .clk, .rst_n,
    .ins_en       (accept),
    .ins_store    (in_req.is_store),
    .ins_blk      (age_blk(in_req.age)),
    .ins_addr     (in_req.addr),
    .q_addr       (in_req.addr),
    .q_load_blks  (younger_blks),
    .q_store_blks (older_blks),
    .q_load_hit   (bf_ld_hit),
    .q_store_hit  (bf_st_hit),
    .clr_blk_mask (dealloc_blks)
  );

  overflow_counter #(.LSQ_ENTRIES(LSQ_ENTRIES), .RESERVED(RESERVED)) u_ovf (
    .clk, .rst_n,
    .inc_en       (accept),
    .inc_blk      (age_blk(in_req.age)),
    .dealloc_mask (dealloc_blks),
    .total        (occupancy),
    .full_spec,
    .full_nonspec
  );

  // ------------------------------------------------------ forwarding unit
  logic need_search;
  assign need_search = accept && (in_req.is_store ? bf_ld_hit : bf_st_hit);
  assign cam_search  = need_search;
  assign bf_filtered = accept && !need_search;

  logic [LSQ_ENTRIES-1:0] fwd_cand, viol_cand;
  assign fwd_cand  = addr_match & older & occupied & is_store_q;
  assign viol_cand = addr_match & younger & occupied & ~is_store_q;

  logic       fwd_start, fwd_busy, fwd_done, fwd_abort;
  age_t       fwd_age;
  data_t      fwd_data;
  bmask_t     fwd_mask;
  logic [LSID_W+2:0] fwd_visits;
  assign fwd_start = need_search && !in_req.is_store;
  assign fwd_abort = flush_blks[age_blk(fwd_age)] && state_q == S_FWD;

  store_forward_unit #(.LSQ_ENTRIES(LSQ_ENTRIES)) u_fwd (
    .clk, .rst_n,
    .head_blk,
    .start       (fwd_start),
    .ld_age      (in_req.age),
    .ld_off      (in_req.addr[OFF_W-1:0]),
    .ld_size     (in_req.size),
    .cand_slots  (fwd_cand),
    .slot_ages,
    .abort       (fwd_abort),
    .int_rd_age  (int_rd_age[0]),
    .int_rd_slot (int_rd_slot[0]),
    .ram_rd_slot (ram_rd_slot[0]),
    .ram_rd_data (ram_rd_data[0]),
    .busy        (fwd_busy),
    .done        (fwd_done),
    .done_age    (fwd_age),
    .fwd_data,
    .fwd_mask,
    .stores_visited (fwd_visits)
  );

  // commit read path: age -> INT port 1 -> slot -> RAM port 1 and CAM read
  assign int_rd_age[1]  = {cblk_q, clsid};
  assign ram_rd_slot[1] = int_rd_slot[1];

  // oldest violating younger load
  logic viol_any;
  age_t viol_oldest;
  always_comb begin
    viol_any    = 1'b0;
    viol_oldest = '0;
    for (int s = 0; s < LSQ_ENTRIES; s++) begin
      if (viol_cand[s] &&
          (!viol_any || rel_age(slot_ages[s], head_blk) < rel_age(viol_oldest, head_blk))) begin
        viol_any    = 1'b1;
        viol_oldest = slot_ages[s];
      end
    end
  end

  // ---------------------------------------------------------- free masks
  always_comb begin
    dealloc_blks = '0;
    free_mask    = '0;
    if (flush_valid) begin
      dealloc_blks = flush_blks;
      free_mask    = (equal | younger) & occupied;
    end else if (state_q == S_DEALLOC) begin
      dealloc_blks = NUM_BLOCKS'(1) << cblk_q;
      free_mask    = same_blk & occupied;
    end
  end

  // ----------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      is_store_q  <= '0;
      cblk_q      <= '0;
      cpend_q     <= '0;
      commit_req_q <= 1'b0;
      ld_valid    <= 1'b0;
      ld_age      <= '0;
      ld_data     <= '0;
      ld_mask     <= '0;
      viol_valid  <= 1'b0;
      viol_age    <= '0;
      commit_done <= 1'b0;
      st_valid    <= 1'b0;
      st_addr     <= '0;
      st_data     <= '0;
      st_size     <= '0;
    end else begin
      ld_valid    <= 1'b0;
      viol_valid  <= 1'b0;
      commit_done <= 1'b0;
      st_valid    <= 1'b0;

      if (accept) is_store_q[alloc_slot] <= in_req.is_store;
      if (commit_valid) begin
        cblk_q       <= commit_blk;
        commit_req_q <= 1'b1;
      end

      // load without a possible forwarding store: answer now
      if (accept && !in_req.is_store && !need_search) begin
        ld_valid <= 1'b1;
        ld_age   <= in_req.age;
        ld_data  <= '0;
        ld_mask  <= '0;
      end
      if (accept && in_req.is_store && need_search && viol_any) begin
        viol_valid <= 1'b1;
        viol_age   <= viol_oldest;
      end
      if (fwd_done) begin
        ld_valid <= 1'b1;
        ld_age   <= fwd_age;
        ld_data  <= fwd_data;
        ld_mask  <= fwd_mask;
      end

      unique case (state_q)
        S_IDLE: begin
          if (flush_valid) begin
            state_q <= S_IDLE;
          end else if (commit_req_q) begin
            commit_req_q <= 1'b0;
            cpend_q      <= scan_store_vec;
            state_q      <= S_COMMIT;
          end else if (fwd_start) begin
            state_q <= S_FWD;
          end
        end
        S_FWD: begin
          if (fwd_abort || fwd_done) state_q <= S_IDLE;
        end
        S_COMMIT: begin
          if (cpend_q == '0) begin
            state_q <= S_DEALLOC;
          end else begin
            st_valid <= 1'b1;
            st_addr  <= cam_rd_addr;
            st_data  <= ram_rd_data[1].data;
            st_size  <= ram_rd_data[1].size;
            cpend_q[clsid] <= 1'b0;
          end
        end
        S_DEALLOC: begin
          if (!flush_valid) begin
            commit_done <= 1'b1;
            state_q     <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ assertions
  assert property (@(posedge clk) disable iff (!rst_n)
                   accept |-> alloc_ok)
    else $error("lsq_bank: instruction presented to a full partition");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q == S_COMMIT) |-> int_rd_store[1] || cpend_q == '0)
    else $error("lsq_bank: commit read a non-store entry");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q inside {S_COMMIT, S_DEALLOC} && flush_valid) |-> !flush_blks[cblk_q])
    else $error("lsq_bank: flush of a committing block");
  assert property (@(posedge clk) disable iff (!rst_n)
                   commit_valid |-> !commit_req_q && !(state_q inside {S_COMMIT, S_DEALLOC}))
    else $error("lsq_bank: commit requested while a commit is in progress");

endmodule
