// vc_channel: virtual-channel flow control in front of one LSQ partition.
//
// The last operand-network hop into a memory partition, split into two
// virtual channels of VC_DEPTH flits each: VC0 carries instructions of the
// non-speculative (oldest) block, VC1 those of speculative blocks. Each
// cycle one instruction is offered to the LSQ partition:
//   * VC0 has priority. If its head finds the partition full (for the
//     non-speculative block), waiting could deadlock, so ovf_flush is
//     raised (level, with the age of the instruction) until the pipeline
//     flush arrives.
//   * Otherwise the VC1 head is offered, unless the partition is full for
//     speculative instructions: then it simply stays in the network and
//     VC1 stops accepting flits once its buffer is full (backpressure,
//     spec_stall pulses each such cycle).
// Promotion: when the non-speculative block commits, head_blk advances;
// VC0 flits that still belong to an older block are nullified and VC1
// flits of the new head block are moved into VC0, oldest first, as space
// allows (one per cycle). A flush removes the flits of flushed blocks.
// Upstream uses on/off flow control: in_ready[v] says VC v has space at
// the clock edge; a flit is written when in_valid[v] && in_ready[v].
// The two channels, their priority, backpressure, promotion and the
// two-flit depth follow the document; the single-promotion-per-cycle rule
// and the signal encoding are this design's choices.
module vc_channel
  import lsq_pkg::*;
#(
  parameter int unsigned VC_DEPTH = 2,
  localparam int unsigned CW = $clog2(VC_DEPTH + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  blk_t                  head_blk,
  // from the network: [0] non-speculative VC, [1] speculative VC
  input  logic                  in_valid [2],
  input  mem_req_t              in_req   [2],
  output logic                  in_ready [2],
  // to the LSQ partition
  output logic                  out_valid,
  output mem_req_t              out_req,
  input  logic                  out_ready,
  input  logic                  lsq_full_spec,
  input  logic                  lsq_full_nonspec,
  // overflow of the non-speculative block
  output logic                  ovf_flush,
  output age_t                  ovf_age,
  // flush of blocks flush_blk and younger
  input  logic                  flush_valid,
  input  blk_t                  flush_blk,
  // events
  output logic                  spec_stall,
  output logic                  promoted
);

  mem_req_t       q_q   [2][VC_DEPTH];
  logic [CW-1:0]  cnt_q [2];

  // offer to the LSQ
  logic v0_head, v1_head, pop0, pop1;
  assign v0_head = cnt_q[0] != '0;
  assign v1_head = cnt_q[1] != '0;

  always_comb begin
    out_valid = 1'b0;
    out_req   = q_q[0][0];
    ovf_flush = 1'b0;
    ovf_age   = q_q[0][0].age;
    spec_stall = 1'b0;
    if (v0_head) begin
      if (lsq_full_nonspec) ovf_flush = 1'b1;
      else                  out_valid = 1'b1;
    end else if (v1_head) begin
      out_req = q_q[1][0];
      if (lsq_full_spec) spec_stall = 1'b1;
      else               out_valid  = 1'b1;
    end
  end

  assign pop0 = out_valid && out_ready && v0_head;
  assign pop1 = out_valid && out_ready && !v0_head;

  function automatic logic flushed(age_t a, logic fv, blk_t fb, blk_t hb);
    return fv && (blk_t'(age_blk(a) - hb) >= blk_t'(fb - hb));
  endfunction

  always_comb begin
    for (int v = 0; v < 2; v++)
      in_ready[v] = cnt_q[v] < CW'(VC_DEPTH);
  end

  // next state: keep survivors in order, promote, append arrivals
  mem_req_t      q_n   [2][VC_DEPTH];
  logic [CW-1:0] cnt_n [2];
  logic          promo;
  always_comb begin
    logic [CW-1:0] k0, k1;
    logic          moved;
    mem_req_t      pm;
    for (int v = 0; v < 2; v++)
      for (int i = 0; i < VC_DEPTH; i++) q_n[v][i] = q_q[v][i];
    k0 = '0;
    k1 = '0;
    moved = 1'b0;
    pm = q_q[1][0];
    // VC0 survivors
    for (int i = 0; i < VC_DEPTH; i++) begin
      if (CW'(i) < cnt_q[0] && !(pop0 && i == 0) &&
          age_blk(q_q[0][i].age) == head_blk &&
          !flushed(q_q[0][i].age, flush_valid, flush_blk, head_blk)) begin
        q_n[0][k0] = q_q[0][i];
        k0 = k0 + 1'b1;
      end
    end
    // VC1 survivors, taking out the oldest flit of the head block
    for (int i = 0; i < VC_DEPTH; i++) begin
      if (CW'(i) < cnt_q[1] && !(pop1 && i == 0) &&
          !flushed(q_q[1][i].age, flush_valid, flush_blk, head_blk)) begin
        if (!moved && age_blk(q_q[1][i].age) == head_blk) begin
          moved = 1'b1;
          pm    = q_q[1][i];
        end else begin
          q_n[1][k1] = q_q[1][i];
          k1 = k1 + 1'b1;
        end
      end
    end
    // promotion only when VC0 has room after this cycle's arrival
    promo = 1'b0;
    if (moved) begin
      if (k0 + CW'(in_valid[0] && in_ready[0]) < CW'(VC_DEPTH)) begin
        promo = 1'b1;
        q_n[0][k0] = pm;
        k0 = k0 + 1'b1;
      end else begin
        // no room: keep it at the front of VC1 (it is the oldest there)
        for (int i = VC_DEPTH - 1; i > 0; i--) q_n[1][i] = q_n[1][i-1];
        q_n[1][0] = pm;
        k1 = k1 + 1'b1;
      end
    end
    // arrivals
    if (in_valid[0] && in_ready[0] &&
        !flushed(in_req[0].age, flush_valid, flush_blk, head_blk)) begin
      q_n[0][k0] = in_req[0];
      k0 = k0 + 1'b1;
    end
    if (in_valid[1] && in_ready[1] &&
        !flushed(in_req[1].age, flush_valid, flush_blk, head_blk)) begin
      q_n[1][k1] = in_req[1];
      k1 = k1 + 1'b1;
    end
    cnt_n[0] = k0;
    cnt_n[1] = k1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q[0] <= '0;
      cnt_q[1] <= '0;
    end else begin
      cnt_q[0] <= cnt_n[0];
      cnt_q[1] <= cnt_n[1];
    end
  end

  always_ff @(posedge clk) begin
    for (int v = 0; v < 2; v++)
      for (int i = 0; i < VC_DEPTH; i++) q_q[v][i] <= q_n[v][i];
  end

  assign promoted = promo;

endmodule
