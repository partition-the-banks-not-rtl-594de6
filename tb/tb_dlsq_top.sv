// tb_dlsq_top: end-to-end test of the distributed LSQ at its default
// sizes (4 partitions x 48 entries, two-flit virtual channels).
//
// The testbench plays the rest of the processor: the execution units that
// issue loads and stores out of order (from a random in-flight block,
// the non-speculative block first once a port has been refused for more
// than 8 cycles), the global control that keeps 8 blocks of
// 32 memory instructions in flight, commits the oldest block once all of
// its instructions have entered the LSQ and its loads are answered, and
// flushes on an ordering violation (from the violating load's block) or
// on an overflow of the non-speculative block (everything, then only the
// oldest block is issued until it commits), and the data cache (a memory
// model updated by committed stores and read for the bytes a load did not
// get by forwarding).
//
// Checks: at every commit, each load of the block must have returned the
// value sequential execution gives, the cache must hold what sequential
// execution wrote, and the number of written stores must match. Four
// workloads of 24 blocks run: MIX (random loads and stores to a few lines
// of every partition), the two load-only microbenchmarks TYP (each block's
// 32 loads spread 8 per partition) and WC (every load to partition 0, so up
// to 256 in flight for 48 entries), and SEQ (loads and stores to partition
// 0, blocks issued in order, so the next block's requests wait in the
// speculative VC while the oldest block commits). Every
// mechanism must occur at least once: Bloom-filtered arrival, CAM search,
// forwarding, violation flush, speculative stall in the VC, promotion,
// overflow flush, commit.
module tb_dlsq_top;
  import lsq_pkg::*;
  localparam int B = 4, P = 4;
  localparam int BLOCKS_PER_RUN = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  blk_t head_blk, commit_blk, flush_blk;
  logic port_valid [P], port_ready [P];
  mem_req_t port_req [P];
  logic commit_valid, commit_done, flush_valid;
  logic ld_valid [B], viol_valid [B], st_valid [B], ovf_flush [B], acc_valid [B];
  age_t ld_age [B], viol_age [B], ovf_age [B], acc_age [B];
  data_t ld_data [B], st_data [B];
  bmask_t ld_mask [B];
  addr_t st_addr [B];
  logic [1:0] st_size [B];
  logic spec_stall [B], promoted [B], cam_search [B], bf_filtered [B];
  logic [$clog2(49)-1:0] occupancy [B];

  dlsq_top dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------------------------------------------------- memory model
  data_t mem [logic [44:0]];      // the cache, written by committed stores
  data_t ref_mem [logic [44:0]];  // sequential reference
  function automatic data_t init_val(logic [44:0] d);
    return {d[31:0] ^ 32'h5a5a_1234, d[31:0]};
  endfunction
  function automatic data_t rd(ref data_t m [logic [44:0]], logic [44:0] d);
    return m.exists(d) ? m[d] : init_val(d);
  endfunction
  function automatic data_t apply(data_t w, mem_req_t s);
    for (int b = 0; b < 8; b++)
      if (byte_mask(s.addr[2:0], s.size)[b]) w[8*b +: 8] = s.data[8*(b - int'(s.addr[2:0])) +: 8];
    return w;
  endfunction

  // ------------------------------------------------------------ workload
  mem_req_t ops   [NUM_BLOCKS][LSID_PER_BLOCK];
  int       st    [NUM_BLOCKS][LSID_PER_BLOCK];  // 0 wait,1 sent,2 in LSQ,3 answered
  data_t    lval  [NUM_BLOCKS][LSID_PER_BLOCK];
  int       held  [P];                           // op index held by port, -1 none
  int       blocked [P];                         // cycles the port's op was refused
  int       head_dyn, tail_dyn, total_blocks, wc_mode;
  logic     throttle;

  function automatic mem_req_t gen(int slot, int lsid);
    mem_req_t r;
    int line, bank;
    r = '0;
    r.age = age_t'(slot * LSID_PER_BLOCK + lsid);
    r.is_store = (wc_mode == 0 || wc_mode == 3) && (($urandom % 3) == 0);
    r.size = 2'($urandom % 4);
    bank = (wc_mode >= 2) ? 0 : (wc_mode == 1) ? lsid % B : $urandom % B;
    line = (wc_mode == 0) ? $urandom % 3 : (wc_mode == 3) ? lsid : lsid / B;
    r.addr = addr_t'(48'h4000 + line * 256 + bank * 64 + ($urandom % 2) * 8 + $urandom % 8);
    while ((int'(r.addr[2:0]) + (1 << r.size)) > 8) r.addr = r.addr - 1;
    r.data = {$urandom, $urandom};
    return r;
  endfunction

  task automatic new_block(int dyn);
    int s;
    s = dyn % NUM_BLOCKS;
    for (int l = 0; l < LSID_PER_BLOCK; l++) begin
      ops[s][l] = gen(s, l); st[s][l] = 0; lval[s][l] = '0;
    end
  endtask

  function automatic int rel(int slot);
    return (slot - head_dyn % NUM_BLOCKS + NUM_BLOCKS) % NUM_BLOCKS;
  endfunction
  function automatic logic in_flight(int slot);
    return rel(slot) < tail_dyn - head_dyn;
  endfunction

  // ------------------------------------------------------------ counters
  int n_filt = 0, n_search = 0, n_fwd = 0, n_viol = 0, n_stall = 0, n_promo = 0;
  int n_ovf = 0, n_commit = 0, n_st = 0;
  always @(posedge clk) if (rst_n)
    for (int b = 0; b < B; b++) begin
      if (bf_filtered[b]) n_filt++;
      if (cam_search[b]) n_search++;
      if (spec_stall[b]) n_stall++;
      if (promoted[b]) n_promo++;
    end

  // ------------------------------------------------------------ flush
  task automatic do_flush(int from_rel);
    int fs;
    fs = (head_dyn + from_rel) % NUM_BLOCKS;
    flush_valid = 1; flush_blk = blk_t'(fs);
    for (int r = from_rel; r < tail_dyn - head_dyn; r++) begin
      int s;
      s = (head_dyn + r) % NUM_BLOCKS;
      for (int l = 0; l < LSID_PER_BLOCK; l++) begin st[s][l] = 0; lval[s][l] = '0; end
    end
    for (int p = 0; p < P; p++) held[p] = -1;
  endtask

  // ------------------------------------------------------------ one run
  // mode 0 MIX: random loads and stores over all partitions, few lines
  // mode 1 TYP: 32 loads per block, 8 to each partition
  // mode 2 WC : 32 loads per block, all to partition 0
  // mode 3 SEQ: loads and stores to partition 0, blocks issued in order, so
  //             the next block's requests wait in the speculative channel
  //             while the head block commits and are promoted afterwards
  task automatic run(int wc, output int cycles);
    int committing, commit_wait, stores_expected;
    wc_mode = wc;
    head_dyn = 0; tail_dyn = 0; throttle = 0; committing = 0;
    total_blocks = BLOCKS_PER_RUN;
    head_blk = '0;
    while (tail_dyn < NUM_BLOCKS) begin new_block(tail_dyn); tail_dyn++; end
    cycles = 0;
    while (head_dyn < total_blocks && cycles < 200000) begin
      int flush_rel;
      cycles++;
      // results of the cycle that just ended (registered outputs)
      for (int b = 0; b < B; b++) begin
        if (ld_valid[b] && in_flight(age_blk(ld_age[b]))) begin
          int s, l;
          s = age_blk(ld_age[b]); l = int'(ld_age[b][LSID_W-1:0]);
          if (st[s][l] == 2) begin
            data_t w;
            w = rd(mem, dw_addr(ops[s][l].addr));
            for (int k = 0; k < 8; k++) if (ld_mask[b][k]) w[8*k +: 8] = ld_data[b][8*k +: 8];
            lval[s][l] = w; st[s][l] = 3;
            if (ld_mask[b] != '0) n_fwd++;
          end
        end
        if (st_valid[b]) begin
          mem_req_t s;
          s.addr = st_addr[b]; s.size = st_size[b]; s.data = st_data[b];
          mem[dw_addr(st_addr[b])] = apply(rd(mem, dw_addr(st_addr[b])), s);
          n_st++;
        end
      end
      // commit / completion of the head block
      if (committing) begin
        if (commit_done) begin
          int s;
          s = head_dyn % NUM_BLOCKS;
          check(n_st - commit_wait == stores_expected, $sformatf("number of stores written %0d expected %0d dyn %0d", n_st - commit_wait, stores_expected, head_dyn));
          // loads against sequential execution, then update the reference
          for (int l = 0; l < LSID_PER_BLOCK; l++) begin
            mem_req_t o;
            o = ops[s][l];
            if (o.is_store) ref_mem[dw_addr(o.addr)] = apply(rd(ref_mem, dw_addr(o.addr)), o);
            else begin
              data_t e;
              bmask_t m;
              e = rd(ref_mem, dw_addr(o.addr)); m = byte_mask(o.addr[2:0], o.size);
              for (int k = 0; k < 8; k++)
                if (m[k]) check(lval[s][l][8*k +: 8] == e[8*k +: 8],
                                $sformatf("load dyn %0d lsid %0d byte %0d", head_dyn, l, k));
            end
          end
          for (int l = 0; l < LSID_PER_BLOCK; l++)
            check(rd(mem, dw_addr(ops[s][l].addr)) == rd(ref_mem, dw_addr(ops[s][l].addr)), "cache contents");
          n_commit++;
          committing = 0; throttle = 0;
          head_dyn++;
          head_blk = blk_t'(head_dyn % NUM_BLOCKS);
          if (tail_dyn < total_blocks) begin new_block(tail_dyn); tail_dyn++; end
        end
      end
      flush_valid = 0; commit_valid = 0;
      // flush requests
      flush_rel = NUM_BLOCKS;
      for (int b = 0; b < B; b++) begin
        if (viol_valid[b] && in_flight(age_blk(viol_age[b]))) begin
          n_viol++;
          if (rel(age_blk(viol_age[b])) < flush_rel) flush_rel = rel(age_blk(viol_age[b]));
          if (rel(age_blk(viol_age[b])) == 0 && !committing) throttle = 1;
        end
        if (ovf_flush[b] && !committing) begin
          n_ovf++; flush_rel = 0; throttle = 1;
        end
      end
      if (flush_rel < NUM_BLOCKS && !committing) do_flush(flush_rel);
      // start the commit of a complete head block
      if (!committing && !flush_valid) begin
        int s, done_cnt;
        s = head_dyn % NUM_BLOCKS; done_cnt = 0;
        for (int l = 0; l < LSID_PER_BLOCK; l++) if (st[s][l] == 3) done_cnt++;
        if (done_cnt == LSID_PER_BLOCK) begin
          committing = 1; commit_valid = 1; commit_blk = blk_t'(s);
          commit_wait = n_st; stores_expected = 0;
          for (int l = 0; l < LSID_PER_BLOCK; l++) stores_expected += ops[s][l].is_store;
        end
      end
      // pick new ops: non-speculative first, then random speculative;
      // after a flush that hit the head block, the head block alone is
      // issued one instruction at a time in program order (forward progress)
      for (int p = 0; p < P; p++) begin
        int pick;
        pick = -1;
        if (throttle) begin
          int s;
          logic busy;
          s = head_dyn % NUM_BLOCKS; busy = 0;
          for (int l = 0; l < LSID_PER_BLOCK; l++) if (st[s][l] == 1) busy = 1;
          if (p == 0 && !busy && !committing)
            for (int l = 0; l < LSID_PER_BLOCK; l++)
              if (st[s][l] == 0) begin pick = s * 32 + l; break; end
        end else
        for (int r = 0; r < 2 * (tail_dyn - head_dyn) && pick < 0; r++) begin
          int s, start;
          if (r > 0 && throttle) break;
          // a port refused for many cycles tries the non-speculative block first
          s = (head_dyn + ((wc_mode == 3) ? r / 2 :
                           (r == 0 && blocked[p] > 8) ? 0 : $urandom % (tail_dyn - head_dyn))) % NUM_BLOCKS;
          if (!in_flight(s)) continue;
          start = (wc_mode == 3) ? 0 : $urandom % 32;
          for (int k = 0; k < 32; k++) begin
            int l;
            l = (start + k) % 32;
            if (st[s][l] == 0) begin
              logic taken;
              taken = 0;
              for (int q = 0; q < p; q++) if (held[q] == s * 32 + l) taken = 1;
              if (!taken) begin pick = s * 32 + l; break; end
            end
          end
        end
        if (flush_valid) pick = -1;     // nothing issued during a flush
        held[p] = pick;
        port_valid[p] = pick >= 0;
        if (pick >= 0) port_req[p] = ops[pick / 32][pick % 32];
      end
      #1;
      // ports whose op is taken at the coming edge
      for (int p = 0; p < P; p++) begin
        blocked[p] = (held[p] >= 0 && !port_ready[p]) ? blocked[p] + 1 : 0;
        if (held[p] >= 0 && port_valid[p] && port_ready[p]) st[held[p] / 32][held[p] % 32] = 1;
      end
      // instructions entering the LSQ at the coming edge
      for (int b = 0; b < B; b++)
        if (acc_valid[b]) begin
          int s, l;
          s = age_blk(acc_age[b]); l = int'(acc_age[b][LSID_W-1:0]);
          if (st[s][l] == 1) st[s][l] = ops[s][l].is_store ? 3 : 2;
        end
      @(negedge clk);
    end
    for (int p = 0; p < P; p++) port_valid[p] = 0;
    flush_valid = 0; commit_valid = 0;
    check(head_dyn == total_blocks, $sformatf("all %0d blocks committed (%0d)", total_blocks, head_dyn));
    repeat (4) @(negedge clk);
    for (int b = 0; b < B; b++) check(occupancy[b] == 0, "partitions empty at the end");
  endtask

  initial begin
    int c_mix, c_typ, c_wc, c_seq;
    for (int p = 0; p < P; p++) begin port_valid[p] = 0; port_req[p] = '0; held[p] = -1; blocked[p] = 0; end
    commit_valid = 0; flush_valid = 0; commit_blk = '0; flush_blk = '0; head_blk = '0;
    repeat (2) @(posedge clk); rst_n = 0; #1; rst_n = 1; @(negedge clk);
    run(0, c_mix);
    run(1, c_typ);
    run(2, c_wc);
    run(3, c_seq);
    $display("%0d blocks each: MIX %0d cycles, TYP %0d cycles, WC %0d cycles, SEQ %0d cycles",
             BLOCKS_PER_RUN, c_mix, c_typ, c_wc, c_seq);
    $display("filtered=%0d searches=%0d forwards=%0d violations=%0d spec_stalls=%0d promotions=%0d overflow_flushes=%0d commits=%0d stores=%0d",
             n_filt, n_search, n_fwd, n_viol, n_stall, n_promo, n_ovf, n_commit, n_st);
    check(n_filt > 0, "Bloom filter skipped a search");
    check(n_search > 0, "associative search");
    check(n_fwd > 0, "store-to-load forwarding");
    check(n_viol > 0, "ordering violation flush");
    check(n_stall > 0, "speculative backpressure in the VC");
    check(n_promo > 0, "VC promotion");
    check(n_ovf > 0, "overflow flush");
    check(n_commit == 4 * BLOCKS_PER_RUN, "commits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
