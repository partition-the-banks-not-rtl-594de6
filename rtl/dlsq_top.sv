// dlsq_top: distributed, address-interleaved load/store queue with
// virtual-channel overflow handling.
//
// The memory-ordering hardware of a large-window processor (256 loads and
// stores in flight, in 8 blocks of 32) is split into NUM_BANKS partitions
// by cache-line address, the same interleaving as the level-1 data cache
// banks, so each load or store is ordered only against the instructions
// of its own partition. Each partition is a small unordered LSQ (lsq_bank,
// LSQ_ENTRIES slots, far fewer than the 256 a worst-case partition would
// need). Overflow is handled in the network in front of it (vc_channel):
// speculative instructions that meet a full partition wait in their
// virtual channel, and only a non-speculative instruction that meets a
// full partition asks for a pipeline flush.
//
// Datapath: NUM_PORTS execution-side ports -> bank_xbar (line
// interleaving, VC choice by block) -> per bank vc_channel -> lsq_bank.
// The global control that owns block order (head_blk), decides commit and
// performs flushes is outside this module: it receives the violation and
// overflow requests and drives commit_*/flush_*. acc_* tells it, per
// partition, which instruction entered the LSQ this cycle (a block is
// complete once all its instructions have entered and its loads have been
// answered). commit_done pulses (one cycle) once
// every partition has written back the committed block's stores and
// released its entries. Store write-backs (st_*) and load forwarding
// results (ld_*) go to the data cache banks, which are not part of this
// module. Default sizes: 4 partitions of 48 entries, no reserved entries,
// two-flit VCs and 32-bit Bloom filters, the configuration the document
// recommends; 4 injection ports and 64-byte lines are this design's.
module dlsq_top
  import lsq_pkg::*;
#(
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned NUM_PORTS = 4,
  parameter int unsigned LSQ_ENTRIES = 48,
  parameter int unsigned RESERVED = 0,
  parameter int unsigned VC_DEPTH = 2,
  parameter int unsigned BF_BITS = 32,
  parameter int unsigned LINE_BYTES = 64,
  localparam int unsigned CNT_W = $clog2(LSQ_ENTRIES + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  blk_t       head_blk,
  // memory instructions from the execution units
  input  logic       port_valid [NUM_PORTS],
  input  mem_req_t   port_req   [NUM_PORTS],
  output logic       port_ready [NUM_PORTS],
  // block commit / flush from the global control
  input  logic       commit_valid,
  input  blk_t       commit_blk,
  output logic       commit_done,
  input  logic       flush_valid,
  input  blk_t       flush_blk,
  // per partition results
  output logic       acc_valid  [NUM_BANKS],   // instruction entered the LSQ
  output age_t       acc_age    [NUM_BANKS],
  output logic       ld_valid   [NUM_BANKS],
  output age_t       ld_age     [NUM_BANKS],
  output data_t      ld_data    [NUM_BANKS],
  output bmask_t     ld_mask    [NUM_BANKS],
  output logic       viol_valid [NUM_BANKS],
  output age_t       viol_age   [NUM_BANKS],
  output logic       st_valid   [NUM_BANKS],
  output addr_t      st_addr    [NUM_BANKS],
  output data_t      st_data    [NUM_BANKS],
  output logic [1:0] st_size    [NUM_BANKS],
  output logic       ovf_flush  [NUM_BANKS],
  output age_t       ovf_age    [NUM_BANKS],
  // activity
  output logic       spec_stall [NUM_BANKS],
  output logic       promoted   [NUM_BANKS],
  output logic       cam_search [NUM_BANKS],
  output logic       bf_filtered[NUM_BANKS],
  output logic [CNT_W-1:0] occupancy [NUM_BANKS]
);

  logic     x_valid [NUM_BANKS][2];
  mem_req_t x_req   [NUM_BANKS][2];
  logic     x_ready [NUM_BANKS][2];

  bank_xbar #(
    .NUM_PORTS (NUM_PORTS),
    .NUM_BANKS (NUM_BANKS),
    .LINE_BYTES(LINE_BYTES)
  ) u_xbar (
    .clk, .rst_n, .head_blk,
    .in_valid  (port_valid),
    .in_req    (port_req),
    .in_ready  (port_ready),
    .out_valid (x_valid),
    .out_req   (x_req),
    .out_ready (x_ready)
  );

  logic [NUM_BANKS-1:0] done_q, bank_done;

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    logic     l_valid, l_ready, full_spec, full_nonspec;
    mem_req_t l_req;

    vc_channel #(.VC_DEPTH(VC_DEPTH)) u_vc (
      .clk, .rst_n, .head_blk,
      .in_valid         (x_valid[b]),
      .in_req           (x_req[b]),
      .in_ready         (x_ready[b]),
      .out_valid        (l_valid),
      .out_req          (l_req),
      .out_ready        (l_ready),
      .lsq_full_spec    (full_spec),
      .lsq_full_nonspec (full_nonspec),
      .ovf_flush        (ovf_flush[b]),
      .ovf_age          (ovf_age[b]),
      .flush_valid, .flush_blk,
      .spec_stall       (spec_stall[b]),
      .promoted         (promoted[b])
    );

    assign acc_valid[b] = l_valid && l_ready;
    assign acc_age[b]   = l_req.age;

    lsq_bank #(
      .LSQ_ENTRIES (LSQ_ENTRIES),
      .RESERVED    (RESERVED),
      .BF_BITS     (BF_BITS)
    ) u_lsq (
      .clk, .rst_n, .head_blk,
      .in_valid     (l_valid),
      .in_req       (l_req),
      .in_ready     (l_ready),
      .full_spec, .full_nonspec,
      .occupancy    (occupancy[b]),
      .ld_valid     (ld_valid[b]),
      .ld_age       (ld_age[b]),
      .ld_data      (ld_data[b]),
      .ld_mask      (ld_mask[b]),
      .viol_valid   (viol_valid[b]),
      .viol_age     (viol_age[b]),
      .commit_valid, .commit_blk,
      .commit_done  (bank_done[b]),
      .st_valid     (st_valid[b]),
      .st_addr      (st_addr[b]),
      .st_data      (st_data[b]),
      .st_size      (st_size[b]),
      .flush_valid, .flush_blk,
      .cam_search   (cam_search[b]),
      .bf_filtered  (bf_filtered[b])
    );
  end

  // all partitions released the committed block; commit_done is high in the
  // same cycle as the last partition's (registered) done pulse, so the
  // global control can move head_blk before that partition takes its next
  // request and the waiting flits of the new head block are promoted
  assign commit_done = (done_q | bank_done) == '1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           done_q <= '0;
    else if (commit_done) done_q <= '0;
    else                  done_q <= done_q | bank_done;
  end

endmodule
