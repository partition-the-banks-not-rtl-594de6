// tb_bloom_filters: self-checking test of the per-block Bloom filters.
// A reference keeps, per block and kind, the set of filter bits implied
// by the hash (XOR of doubleword-address bits 4:0 and 9:5) and the exact
// list of inserted addresses. Checks: lookups equal the reference bits,
// an inserted address always hits (no false negatives), flash clear
// empties exactly the chosen blocks.
module tb_bloom_filters;
  import lsq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ins_en, ins_store, q_load_hit, q_store_hit;
  blk_t ins_blk;
  addr_t ins_addr, q_addr;
  logic [NUM_BLOCKS-1:0] q_load_blks, q_store_blks, clr_blk_mask;

  bloom_filters #(.BF_BITS(32)) dut (.*);

  logic [31:0] m_ld [NUM_BLOCKS], m_st [NUM_BLOCKS];
  addr_t last_ins [NUM_BLOCKS][2];
  logic  has_ins  [NUM_BLOCKS][2];
  int    hits = 0, misses = 0;

  function automatic int h(addr_t a);
    return int'(a[7:3] ^ a[12:8]);
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ins_en = 0; clr_blk_mask = '0; q_load_blks = '0; q_store_blks = '0;
    ins_store = 0; ins_blk = '0; ins_addr = '0; q_addr = '0;
    for (int b = 0; b < NUM_BLOCKS; b++) begin
      m_ld[b] = '0; m_st[b] = '0; has_ins[b][0] = 0; has_ins[b][1] = 0;
    end
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int it = 0; it < 5000; it++) begin
      int k;
      ins_en = $urandom % 2; ins_store = $urandom % 2; ins_blk = blk_t'($urandom);
      ins_addr = addr_t'({$urandom, $urandom});
      clr_blk_mask = ($urandom % 32 == 0) ? NUM_BLOCKS'(1 << ($urandom % NUM_BLOCKS)) : '0;
      q_load_blks = NUM_BLOCKS'($urandom); q_store_blks = NUM_BLOCKS'($urandom);
      // half the lookups use an address inserted earlier
      k = $urandom % NUM_BLOCKS;
      if ($urandom % 2 && has_ins[k][1]) begin
        q_addr = last_ins[k][1]; q_store_blks[k] = 1;
      end else q_addr = addr_t'({$urandom, $urandom});
      #1;
      begin
        logic el, es;
        el = 0; es = 0;
        for (int b = 0; b < NUM_BLOCKS; b++) begin
          el |= q_load_blks[b] & m_ld[b][h(q_addr)];
          es |= q_store_blks[b] & m_st[b][h(q_addr)];
        end
        check(q_load_hit == el, "load filter lookup");
        check(q_store_hit == es, "store filter lookup");
        if (q_addr == last_ins[k][1] && has_ins[k][1] && q_store_blks[k])
          check(q_store_hit, "no false negative");
        if (es) hits++; else misses++;
      end
      @(negedge clk);
      if (ins_en) begin
        if (ins_store) m_st[ins_blk][h(ins_addr)] = 1; else m_ld[ins_blk][h(ins_addr)] = 1;
        last_ins[ins_blk][ins_store] = ins_addr; has_ins[ins_blk][ins_store] = 1;
      end
      for (int b = 0; b < NUM_BLOCKS; b++)
        if (clr_blk_mask[b]) begin
          m_ld[b] = '0; m_st[b] = '0; has_ins[b][0] = 0; has_ins[b][1] = 0;
        end
    end
    check(hits > 0 && misses > 0, "both hits and misses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
