// tb_bank_xbar: self-checking test of the line-interleaved steering.
// Four ports present random instructions; every delivered instruction
// must appear on the partition given by address bits 7:6 (64-byte lines,
// four partitions) and on VC0 exactly when it belongs to the head block;
// each port's instructions must all be delivered once, in port order.
// A contention phase (all ports to one partition and channel) checks
// round-robin fairness: each port is served once every four cycles.
module tb_bank_xbar;
  import lsq_pkg::*;
  localparam int P = 4, B = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  blk_t head_blk;
  logic in_valid [P], in_ready [P];
  mem_req_t in_req [P];
  logic out_valid [B][2], out_ready [B][2];
  mem_req_t out_req [B][2];

  bank_xbar #(.NUM_PORTS(P), .NUM_BANKS(B), .LINE_BYTES(64)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int seq [P];
  function automatic mem_req_t mk(int p, int n);
    mem_req_t r;
    r = '0;
    r.age  = age_t'($urandom);
    r.addr = addr_t'({$urandom, $urandom});
    r.data = data_t'({p[7:0], n[23:0]});   // tag: port and sequence
    return r;
  endfunction

  initial begin
    int delivered, gap [P], last [P];
    head_blk = 3;
    for (int p = 0; p < P; p++) begin in_valid[p] = 0; in_req[p] = '0; seq[p] = 0; end
    for (int b = 0; b < B; b++) for (int v = 0; v < 2; v++) out_ready[b][v] = 0;
    repeat (2) @(posedge clk); rst_n = 0; #1; rst_n = 1; @(negedge clk);
    for (int p = 0; p < P; p++) begin in_valid[p] = 1; in_req[p] = mk(p, 0); end
    delivered = 0;
    for (int c = 0; c < 4000; c++) begin
      for (int b = 0; b < B; b++) for (int v = 0; v < 2; v++) out_ready[b][v] = $urandom % 3 != 0;
      #1;
      for (int b = 0; b < B; b++) for (int v = 0; v < 2; v++) if (out_valid[b][v]) begin
        int p, n;
        p = int'(out_req[b][v].data[31:24]); n = int'(out_req[b][v].data[23:0]);
        check(out_ready[b][v], "grant only with space");
        check(int'(out_req[b][v].addr[7:6]) == b, "line interleaving");
        check((age_blk(out_req[b][v].age) == head_blk) == (v == 0), "VC choice");
        check(p < P && n == seq[p] && in_ready[p], "delivered the port's current instruction");
        delivered++;
      end
      @(negedge clk);
      for (int p = 0; p < P; p++) if (in_ready[p]) begin seq[p]++; in_req[p] = mk(p, seq[p]); end
    end
    check(delivered == seq[0] + seq[1] + seq[2] + seq[3] && delivered > 1000, "every instruction delivered once");
    // contention: all ports -> partition 2, VC1
    for (int p = 0; p < P; p++) begin last[p] = -1; gap[p] = 0; end
    for (int b = 0; b < B; b++) for (int v = 0; v < 2; v++) out_ready[b][v] = 1;
    for (int c = 0; c < 40; c++) begin
      for (int p = 0; p < P; p++) begin
        in_req[p].addr = 48'h80; in_req[p].age = 8'h00; in_req[p].data = data_t'(p);
      end
      #1;
      for (int p = 0; p < P; p++) if (in_ready[p]) begin
        if (last[p] >= 0 && c - last[p] > gap[p]) gap[p] = c - last[p];
        last[p] = c;
      end
      @(negedge clk);
    end
    for (int p = 0; p < P; p++) check(gap[p] == P, $sformatf("port %0d served every %0d cycles", p, gap[p]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
