// tb_vc_channel: self-checking test of the two virtual channels in front
// of an LSQ partition. Directed phases check: backpressure of speculative
// flits at a full partition (and VC1 filling up to two flits), priority of
// the non-speculative channel, the flush request when a non-speculative
// flit meets a full partition, flush removal of flits, and promotion of
// flits of the new head block from VC1 to VC0 when the head block
// commits. A random phase checks that every flit is delivered exactly
// once and in order within its block.
module tb_vc_channel;
  import lsq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  blk_t head_blk, flush_blk;
  logic in_valid [2], in_ready [2];
  mem_req_t in_req [2];
  logic out_valid, out_ready, lsq_full_spec, lsq_full_nonspec;
  mem_req_t out_req;
  logic ovf_flush, flush_valid, spec_stall, promoted;
  age_t ovf_age;

  vc_channel #(.VC_DEPTH(2)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic mem_req_t mk(int blk, int lsid);
    mem_req_t r;
    r = '0; r.age = age_t'(blk * 32 + lsid); r.addr = addr_t'(lsid * 8);
    return r;
  endfunction

  task automatic push(int v, mem_req_t r);
    in_valid[v] = 1; in_req[v] = r;
    #1;
    while (!in_ready[v]) begin @(negedge clk); #1; end
    @(negedge clk); in_valid[v] = 0;
  endtask

  int n_promo = 0;
  always @(posedge clk) if (promoted) n_promo++;

  initial begin
    in_valid[0] = 0; in_valid[1] = 0; in_req[0] = '0; in_req[1] = '0;
    out_ready = 1; lsq_full_spec = 0; lsq_full_nonspec = 0;
    flush_valid = 0; flush_blk = '0; head_blk = '0;
    repeat (2) @(posedge clk); rst_n = 0; #1; rst_n = 1; @(negedge clk);

    // 1: speculative flits wait at a full partition
    lsq_full_spec = 1;
    push(1, mk(2, 0)); push(1, mk(2, 1));
    #1;
    check(!out_valid && spec_stall, "speculative flit held back");
    check(!in_ready[1] && in_ready[0], "VC1 full, VC0 free");
    // 2: non-speculative flit bypasses them
    in_valid[0] = 1; in_req[0] = mk(0, 5); @(negedge clk); in_valid[0] = 0; #1;
    check(out_valid && out_req.age == mk(0, 5).age, "non-speculative flit first");
    @(negedge clk); #1;
    check(!out_valid, "VC0 drained");
    // 3: non-speculative flit at a full partition asks for a flush
    lsq_full_nonspec = 1;
    in_valid[0] = 1; in_req[0] = mk(0, 7); @(negedge clk); in_valid[0] = 0; #1;
    check(ovf_flush && ovf_age == mk(0, 7).age && !out_valid, "overflow flush request");
    flush_valid = 1; flush_blk = 0; @(negedge clk); flush_valid = 0; #1;
    check(!ovf_flush && in_ready[0] && in_ready[1] && !out_valid, "flush emptied both channels");
    lsq_full_nonspec = 0;
    // 4: promotion on commit of block 0
    push(1, mk(1, 3)); push(1, mk(1, 4));
    #1;
    check(!out_valid && !in_ready[1], "block 1 flits wait in VC1");
    head_blk = 1;                      // block 0 committed
    @(negedge clk); #1;
    check(n_promo == 1 && out_valid && out_req.age == mk(1, 3).age, "first flit promoted and offered");
    @(negedge clk); #1;
    check(n_promo == 2 && out_valid && out_req.age == mk(1, 4).age, "second flit promoted in order");
    @(negedge clk); #1;
    check(!out_valid && in_ready[0] && in_ready[1], "all promoted flits delivered");
    lsq_full_spec = 0;

    // 5: random traffic, no overflow
    begin
      int sent [NUM_BLOCKS], rcvd [NUM_BLOCKS];
      for (int b = 0; b < NUM_BLOCKS; b++) begin sent[b] = 0; rcvd[b] = 0; end
      head_blk = 1;
      for (int c = 0; c < 3000; c++) begin
        for (int v = 0; v < 2; v++) begin
          int b;
          b = (v == 0) ? 1 : 2 + $urandom % 3;
          in_valid[v] = ($urandom % 2) && sent[b] < 32;
          in_req[v] = mk(b, sent[b]);
        end
        out_ready = $urandom % 4 != 0;
        #1;
        if (out_valid && out_ready) begin
          int b;
          b = age_blk(out_req.age);
          check(out_req.age[4:0] == rcvd[b], "in-order delivery per block");
          rcvd[b]++;
        end
        for (int v = 0; v < 2; v++) if (in_valid[v] && in_ready[v]) sent[(v == 0) ? 1 : age_blk(in_req[v].age)]++;
        @(negedge clk);
      end
      in_valid[0] = 0; in_valid[1] = 0; out_ready = 1;
      repeat (10) begin
        #1;
        if (out_valid) begin rcvd[age_blk(out_req.age)]++; end
        @(negedge clk);
      end
      for (int b = 1; b < 5; b++) check(sent[b] == rcvd[b] && sent[b] > 0, $sformatf("block %0d delivered %0d of %0d", b, rcvd[b], sent[b]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
