// tb_store_forward_unit: self-checking test of the matching-vector scan.
// The testbench plays the indirection table and the RAM. Each trial puts
// K older stores (random sizes and offsets in one doubleword) and some
// unrelated slots in the partition, starts a load, and compares the
// forwarded bytes with a reference that, byte by byte, takes the youngest
// older store covering it. It also checks the latency: a load that visits
// V stores finishes V+1 cycles after it arrives (done V clock edges after
// the arrival edge, one edge when there is nothing to visit).
module tb_store_forward_unit;
  import lsq_pkg::*;
  localparam int unsigned N = 48;
  localparam int unsigned SW = $clog2(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  blk_t head_blk;
  logic start, abort, busy, done;
  age_t ld_age, int_rd_age, done_age;
  logic [OFF_W-1:0] ld_off;
  logic [1:0] ld_size;
  logic [N-1:0] cand_slots;
  age_t slot_ages [N];
  logic [SW-1:0] int_rd_slot, ram_rd_slot;
  ram_word_t ram_rd_data;
  data_t fwd_data;
  bmask_t fwd_mask;
  logic [LSID_W+2:0] stores_visited;

  store_forward_unit #(.LSQ_ENTRIES(N)) dut (.*);

  int        int_tab [WINDOW];
  ram_word_t ram [N];
  assign int_rd_slot = SW'(int_tab[int_rd_age]);
  assign ram_rd_data = ram[ram_rd_slot];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int max_visits = 0;

  initial begin
    start = 0; abort = 0; head_blk = '0; ld_age = '0; ld_off = '0; ld_size = '0;
    cand_slots = '0;
    for (int s = 0; s < N; s++) begin slot_ages[s] = '0; ram[s] = '0; end
    for (int a = 0; a < WINDOW; a++) int_tab[a] = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      int k, lrel, order [$], used [int];
      bmask_t need, got;
      data_t  exp;
      int     visits, edges;
      order.delete(); used.delete();
      head_blk = blk_t'($urandom);
      lrel = 40 + $urandom % (WINDOW - 40);
      ld_age = age_t'(lrel + head_blk * LSID_PER_BLOCK);
      ld_off = 3'($urandom); ld_size = 2'($urandom % 4);
      while ((int'(ld_off) + (1 << ld_size)) > 8) ld_off = ld_off - 1;
      k = (t % 5 == 0) ? 0 : $urandom % 12;
      if (t % 7 == 0) k = 30;
      cand_slots = '0;
      // fill all slots with unrelated ages first
      for (int s = 0; s < N; s++) slot_ages[s] = age_t'($urandom);
      for (int i = 0; i < k; i++) begin
        int s, r;
        do s = $urandom % N; while (cand_slots[s]);
        do r = $urandom % lrel; while (used.exists(r));
        used[r] = 1;
        cand_slots[s] = 1;
        slot_ages[s] = age_t'(r + head_blk * LSID_PER_BLOCK);
        int_tab[slot_ages[s]] = s;
        ram[s].data = {$urandom, $urandom};
        ram[s].size = (t % 3 == 0) ? 2'd0 : 2'($urandom % 4);
        ram[s].off  = 3'($urandom);
        while ((int'(ram[s].off) + (1 << ram[s].size)) > 8) ram[s].off = ram[s].off - 1;
        order.push_back(r);
      end
      order.rsort();
      // reference: youngest older store first
      need = byte_mask(ld_off, ld_size); got = '0; exp = '0; visits = 0;
      foreach (order[i]) begin
        int s;
        bmask_t m;
        if (need == '0) break;
        s = int_tab[age_t'(order[i] + head_blk * LSID_PER_BLOCK)];
        m = byte_mask(ram[s].off, ram[s].size);
        visits++;
        for (int b = 0; b < 8; b++)
          if (m[b] && need[b]) begin
            exp[8*b +: 8] = ram[s].data[8*(b - ram[s].off) +: 8];
            got[b] = 1; need[b] = 0;
          end
      end
      start = 1;
      @(negedge clk);
      start = 0;
      edges = 1;
      while (!done && edges < 100) begin @(negedge clk); edges++; end
      check(done, "done seen");
      check(done_age == ld_age, "age");
      check(fwd_mask == got, $sformatf("mask %b vs %b (k=%0d)", fwd_mask, got, k));
      for (int b = 0; b < 8; b++)
        if (got[b]) check(fwd_data[8*b +: 8] == exp[8*b +: 8], "forwarded byte");
      check(stores_visited == visits, $sformatf("visited %0d vs %0d", stores_visited, visits));
      check(edges == ((visits == 0) ? 2 : visits + 1), $sformatf("latency %0d edges for %0d stores k=%0d need=%b", edges, visits, k, need));
      if (visits > max_visits) max_visits = visits;
      @(negedge clk);
    end
    check(max_visits >= 4, "multi-store scans exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
