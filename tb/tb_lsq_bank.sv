// tb_lsq_bank: self-checking test of one unordered LSQ partition.
// A reference model keeps the instructions present in the partition.
//  A: random loads and stores of random blocks, arriving out of age order,
//     to three doublewords with random sizes/offsets. Every load's
//     forwarded bytes are checked (per byte, youngest older store); every
//     store's violation report is checked (oldest younger load to the same
//     doubleword). Bloom-filtered and searched arrivals must both occur.
//  B: commit of the head block: its stores must come out in age order
//     with their address, data and size, and its entries be released.
//  C: flush of the younger half of the window: entries must be released
//     and a later load must not see flushed stores.
//  D: fill the partition and check the full flags at 48 entries.
module tb_lsq_bank;
  import lsq_pkg::*;
  localparam int unsigned N = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  blk_t head_blk;
  logic in_valid, in_ready, full_spec, full_nonspec;
  mem_req_t in_req;
  logic [$clog2(N+1)-1:0] occupancy;
  logic ld_valid, viol_valid, commit_valid, commit_done, st_valid, flush_valid;
  logic cam_search, bf_filtered;
  age_t ld_age, viol_age;
  data_t ld_data, st_data;
  bmask_t ld_mask;
  blk_t commit_blk, flush_blk;
  addr_t st_addr;
  logic [1:0] st_size;

  lsq_bank #(.LSQ_ENTRIES(N)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference contents
  mem_req_t present [$];
  int n_search = 0, n_filtered = 0, n_viol = 0, n_fwd = 0;
  always @(posedge clk) begin
    if (cam_search) n_search++;
    if (bf_filtered) n_filtered++;
  end

  function automatic int pos(age_t a);
    return int'(rel_age(a, head_blk));
  endfunction

  // watch outputs between a send and its result
  logic   got_ld, got_viol;
  age_t   got_ld_age, got_viol_age;
  data_t  got_ld_data;
  bmask_t got_ld_mask;
  always @(posedge clk) begin
    if (ld_valid) begin got_ld <= 1; got_ld_age <= ld_age; got_ld_data <= ld_data; got_ld_mask <= ld_mask; end
    if (viol_valid) begin got_viol <= 1; got_viol_age <= viol_age; end
  end

  task automatic send(mem_req_t r);
    bmask_t need, em; data_t ed; int vpos; age_t vage; logic vexp;
    // expected results from the reference
    need = byte_mask(r.addr[2:0], r.size); em = '0; ed = '0;
    vexp = 0; vpos = WINDOW; vage = '0;
    if (!r.is_store) begin
      for (int b = 0; b < 8; b++) begin
        int best; best = -1;
        if (!need[b]) continue;
        foreach (present[i])
          if (present[i].is_store && dw_addr(present[i].addr) == dw_addr(r.addr) &&
              pos(present[i].age) < pos(r.age) &&
              byte_mask(present[i].addr[2:0], present[i].size)[b] &&
              (best < 0 || pos(present[i].age) > pos(present[best].age)))
            best = i;
        if (best >= 0) begin
          em[b] = 1;
          ed[8*b +: 8] = present[best].data[8*(b - int'(present[best].addr[2:0])) +: 8];
        end
      end
    end else begin
      foreach (present[i])
        if (!present[i].is_store && dw_addr(present[i].addr) == dw_addr(r.addr) &&
            pos(present[i].age) > pos(r.age) && pos(present[i].age) < vpos) begin
          vexp = 1; vpos = pos(present[i].age); vage = present[i].age;
        end
    end
    got_ld = 0; got_viol = 0;
    in_valid = 1; in_req = r;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk); in_valid = 0;
    present.push_back(r);
    if (!r.is_store) begin
      int waitc; waitc = 0;
      while (!got_ld && waitc < 60) begin @(negedge clk); waitc++; end
      check(got_ld && got_ld_age == r.age, "load answered");
      check(got_ld_mask == em, $sformatf("forward mask %b expected %b", got_ld_mask, em));
      for (int b = 0; b < 8; b++)
        if (em[b]) check(got_ld_data[8*b +: 8] == ed[8*b +: 8], "forwarded byte");
      if (em != '0) n_fwd++;
    end else begin
      @(negedge clk); @(negedge clk);
      check(got_viol == vexp, $sformatf("violation flag %b expected %b", got_viol, vexp));
      if (vexp) begin check(got_viol_age == vage, "violating load age"); n_viol++; end
    end
    @(negedge clk);
  endtask

  function automatic mem_req_t rnd_req(int blk, int lsid);
    mem_req_t r;
    r.age = age_t'(blk * LSID_PER_BLOCK + lsid);
    r.is_store = $urandom % 2;
    r.size = 2'($urandom % 4);
    r.addr = addr_t'(48'h1000 + ($urandom % 3) * 64 * 4 + $urandom % 8);
    while ((int'(r.addr[2:0]) + (1 << r.size)) > 8) r.addr = r.addr - 1;
    r.data = {$urandom, $urandom};
    return r;
  endfunction

  initial begin
    int used [int];
    in_valid = 0; in_req = '0; commit_valid = 0; flush_valid = 0;
    commit_blk = '0; flush_blk = '0; head_blk = '0;
    repeat (2) @(posedge clk); rst_n = 0; #1; rst_n = 1; @(negedge clk);

    // A: 40 random instructions out of order
    for (int i = 0; i < 40; i++) begin
      int blk, lsid;
      do begin blk = $urandom % NUM_BLOCKS; lsid = $urandom % LSID_PER_BLOCK; end
      while (used.exists(blk * 32 + lsid));
      used[blk * 32 + lsid] = 1;
      send(rnd_req(blk, lsid));
    end
    check(occupancy == present.size(), "occupancy after A");
    check(n_search > 0 && n_filtered > 0, "Bloom filter both filtered and passed");
    check(n_fwd > 0, "some load was forwarded");
    check(n_viol > 0, "some violation was detected");

    // B: commit block 0
    begin
      mem_req_t exp_st [$];
      int got, n0;
      foreach (present[i]) if (age_blk(present[i].age) == 0 && present[i].is_store) exp_st.push_back(present[i]);
      exp_st.sort(x) with (x.age);
      n0 = 0; foreach (present[i]) if (age_blk(present[i].age) == 0) n0++;
      commit_valid = 1; commit_blk = 0; @(negedge clk); commit_valid = 0;
      got = 0;
      for (int c = 0; c < 80 && !commit_done; c++) begin
        if (st_valid) begin
          if (got < exp_st.size()) begin
            check(st_addr == exp_st[got].addr && st_data == exp_st[got].data &&
                  st_size == exp_st[got].size, $sformatf("committed store %0d", got));
          end
          got++;
        end
        @(negedge clk);
      end
      check(commit_done, "commit done");
      check(got == exp_st.size(), $sformatf("stores written %0d expected %0d", got, exp_st.size()));
      present = present.find(x) with (age_blk(x.age) != 0);
      head_blk = 1;
      @(negedge clk);
      check(occupancy == present.size(), "occupancy after commit");
    end

    // C: flush blocks 5..0 (relative to head 1: blocks 5,6,7,0)
    flush_valid = 1; flush_blk = 5; @(negedge clk); flush_valid = 0;
    present = present.find(x) with (int'(blk_t'(age_blk(x.age) - 1)) < 4);
    @(negedge clk);
    check(occupancy == present.size(), $sformatf("occupancy after flush %0d vs %0d", occupancy, present.size()));
    // re-use of flushed ages: a load in block 7 sees only blocks 1..4 stores
    used.delete();
    foreach (present[i]) used[present[i].age] = 1;
    for (int i = 0; i < 10; i++) begin
      mem_req_t r;
      r = rnd_req(7, i);
      r.is_store = 0;
      send(r);
    end

    // D: fill the partition
    for (int i = 0; i < 60 && !full_spec; i++) begin
      int blk, lsid;
      do begin blk = 1 + $urandom % 4; lsid = $urandom % LSID_PER_BLOCK; end
      while (used.exists(blk * 32 + lsid));
      used[blk * 32 + lsid] = 1;
      send(rnd_req(blk, lsid));
    end
    check(full_spec && full_nonspec && occupancy == N, "partition full at 48 entries");
    check(present.size() == N, "reference agrees on 48");
    $display("searches=%0d filtered=%0d forwards=%0d violations=%0d", n_search, n_filtered, n_fwd, n_viol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
