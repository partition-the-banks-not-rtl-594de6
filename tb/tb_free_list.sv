// tb_free_list: self-checking test of the LSQ slot pool.
// Allocates every slot (expects lowest-free-first), checks that the pool
// reports empty, then runs random allocate/free traffic against a
// bit-vector reference model, checking the offered slot and the count.
module tb_free_list;
  localparam int unsigned N = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic alloc_en, alloc_ok;
  logic [$clog2(N)-1:0] alloc_slot;
  logic [N-1:0] free_mask, free_vec;
  logic [$clog2(N+1)-1:0] num_free;

  free_list #(.LSQ_ENTRIES(N)) dut (.*);

  logic [N-1:0] model;
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int lowest(logic [N-1:0] v);
    for (int i = 0; i < N; i++) if (v[i]) return i;
    return -1;
  endfunction

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    alloc_en = 0; free_mask = '0; model = '1;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < N; i++) begin
      check(alloc_ok && alloc_slot == i, $sformatf("alloc %0d got %0d", i, alloc_slot));
      alloc_en = 1; @(negedge clk); model[i] = 0;
    end
    alloc_en = 0;
    check(!alloc_ok && num_free == 0, "pool empty after N allocations");
    for (int it = 0; it < 3000; it++) begin
      logic [N-1:0] fm;
      fm = '0;
      for (int i = 0; i < N; i++) if (!model[i] && ($urandom % 8 == 0)) fm[i] = 1;
      free_mask = fm;
      alloc_en  = ($urandom % 2 == 1) && (model != '0);
      #1;
      check(alloc_ok == (model != '0), "alloc_ok");
      if (model != '0) check(alloc_slot == lowest(model), "lowest free slot");
      check(free_vec == model, "free vector");
      check(num_free == $countones(model), "count");
      @(negedge clk);
      if (alloc_en) model[lowest(model)] = 0;
      model |= fm;
    end
    free_mask = '0; alloc_en = 0; #1;
    check(free_vec == model, "final vector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
