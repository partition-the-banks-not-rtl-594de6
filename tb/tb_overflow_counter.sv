// tb_overflow_counter: self-checking test of the per-block and cumulative
// occupancy counters, with 4 entries reserved for the non-speculative
// block (the document's example of 4 reserved out of 16 or 32). Random
// inserts and block deallocations are compared with a reference count;
// the full flags must switch at 44 (speculative) and 48 (non-speculative).
module tb_overflow_counter;
  import lsq_pkg::*;
  localparam int unsigned N = 48, R = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic inc_en, full_spec, full_nonspec;
  blk_t inc_blk;
  logic [NUM_BLOCKS-1:0] dealloc_mask;
  logic [$clog2(N+1)-1:0] total;

  overflow_counter #(.LSQ_ENTRIES(N), .RESERVED(R)) dut (.*);

  int cnt [NUM_BLOCKS];
  int sum, seen_spec_full = 0, seen_full = 0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    inc_en = 0; inc_blk = '0; dealloc_mask = '0;
    for (int b = 0; b < NUM_BLOCKS; b++) cnt[b] = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int it = 0; it < 6000; it++) begin
      sum = 0; for (int b = 0; b < NUM_BLOCKS; b++) sum += cnt[b];
      check(total == sum, $sformatf("total %0d vs %0d", total, sum));
      check(full_spec == (sum >= N - R), "full_spec");
      check(full_nonspec == (sum >= N), "full_nonspec");
      if (sum >= N - R) seen_spec_full++;
      if (sum >= N) seen_full++;
      inc_blk = blk_t'($urandom);
      inc_en  = (sum < N) && cnt[inc_blk] < LSID_PER_BLOCK && ($urandom % 8 != 0);
      dealloc_mask = ($urandom % 40 == 0) ? NUM_BLOCKS'(1 << ($urandom % NUM_BLOCKS)) : '0;
      if (inc_en) dealloc_mask[inc_blk] = 0;
      @(negedge clk);
      for (int b = 0; b < NUM_BLOCKS; b++) if (dealloc_mask[b]) cnt[b] = 0;
      if (inc_en) cnt[inc_blk]++;
    end
    check(seen_spec_full > 0 && seen_full > 0, "overflow reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
