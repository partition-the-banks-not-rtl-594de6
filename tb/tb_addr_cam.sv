// tb_addr_cam: self-checking test of the address CAM. Random addresses
// from a small pool (so that matches are frequent, including same
// doubleword with different byte offsets) are written; every search
// vector and read is compared with a reference array.
module tb_addr_cam;
  import lsq_pkg::*;
  localparam int unsigned N = 48;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en;
  logic [$clog2(N)-1:0] wr_slot, rd_slot;
  addr_t wr_addr, search_addr, rd_addr;
  logic [N-1:0] match;

  addr_cam #(.LSQ_ENTRIES(N)) dut (.*);

  addr_t model [N];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic addr_t rand_addr();
    return {$urandom % 4, 8'h0, $urandom, 5'($urandom % 4), 3'($urandom)} ;
  endfunction

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // fill every slot first so that the reference is defined
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      wr_en = 1; wr_slot = i; wr_addr = addr_t'({$urandom % 2, 37'h0, 5'($urandom % 4), 3'($urandom)});
      model[i] = wr_addr;
    end
    @(negedge clk);
    for (int it = 0; it < 3000; it++) begin
      wr_en = $urandom % 2; wr_slot = $urandom % N;
      wr_addr = addr_t'({$urandom % 2, 37'h0, 5'($urandom % 4), 3'($urandom)});
      search_addr = addr_t'({$urandom % 2, 37'h0, 5'($urandom % 4), 3'($urandom)});
      rd_slot = $urandom % N;
      #1;
      for (int i = 0; i < N; i++)
        check(match[i] == (model[i][ADDR_W-1:3] == search_addr[ADDR_W-1:3]), $sformatf("match %0d", i));
      check(rd_addr == model[rd_slot], "read port");
      @(negedge clk);
      if (wr_en) model[wr_slot] = wr_addr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
