// tb_age_cam: self-checking test of the age-table CAM. Ages are written
// to every slot, then random keys and head blocks are searched; the
// older/equal/younger/same-block vectors are compared with a model that
// orders ages by distance from the head block.
module tb_age_cam;
  import lsq_pkg::*;
  localparam int unsigned N = 48;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en;
  logic [$clog2(N)-1:0] wr_slot, rd_slot;
  age_t wr_age, search_age, rd_age;
  blk_t head_blk;
  logic [N-1:0] older, equal, younger, same_blk;
  age_t ages [N];

  age_cam #(.LSQ_ENTRIES(N)) dut (.*);

  int model [N];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // position in program order relative to the head block
  function automatic int pos(int a, int h);
    return (a - h * LSID_PER_BLOCK + WINDOW) % WINDOW;
  endfunction

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    head_blk = '0; search_age = '0; rd_slot = '0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); wr_en = 1; wr_slot = i; wr_age = age_t'($urandom); model[i] = wr_age;
    end
    @(negedge clk);
    for (int it = 0; it < 3000; it++) begin
      wr_en = $urandom % 2; wr_slot = $urandom % N; wr_age = age_t'($urandom);
      head_blk = blk_t'($urandom);
      search_age = ($urandom % 4 == 0) ? age_t'(model[$urandom % N]) : age_t'($urandom);
      rd_slot = $urandom % N;
      #1;
      for (int i = 0; i < N; i++) begin
        int pe, pk;
        pe = pos(model[i], head_blk); pk = pos(search_age, head_blk);
        check(older[i] == (pe < pk) && equal[i] == (pe == pk) && younger[i] == (pe > pk),
              $sformatf("compare slot %0d age %0d key %0d head %0d", i, model[i], search_age, head_blk));
        check(same_blk[i] == (model[i] / LSID_PER_BLOCK == search_age / LSID_PER_BLOCK), "same block");
        check(ages[i] == model[i], "ages");
      end
      check(rd_age == model[rd_slot], "read port");
      @(negedge clk);
      if (wr_en) model[wr_slot] = wr_age;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
