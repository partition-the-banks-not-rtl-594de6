// tb_indirection_table: self-checking test of the age-indexed slot table.
// Random writes, reads on both ports, block invalidations and per-block
// store vectors are compared with an array reference model.
module tb_indirection_table;
  import lsq_pkg::*;
  localparam int unsigned N = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en, wr_store;
  age_t wr_age;
  logic [$clog2(N)-1:0] wr_slot;
  age_t rd_age [2];
  logic [$clog2(N)-1:0] rd_slot [2];
  logic rd_valid [2], rd_store [2];
  logic [NUM_BLOCKS-1:0] clr_blk_mask;
  blk_t scan_blk;
  logic [LSID_PER_BLOCK-1:0] scan_store_vec;

  indirection_table #(.LSQ_ENTRIES(N)) dut (.*);

  int   m_slot [WINDOW];
  logic m_valid [WINDOW], m_store [WINDOW];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = 0; clr_blk_mask = '0; scan_blk = '0; rd_age[0] = '0; rd_age[1] = '0;
    wr_age = '0; wr_slot = '0; wr_store = 0;
    for (int a = 0; a < WINDOW; a++) begin m_valid[a] = 0; m_store[a] = 0; m_slot[a] = 0; end
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int it = 0; it < 4000; it++) begin
      wr_en    = $urandom % 2;
      wr_age   = age_t'($urandom);
      wr_slot  = $urandom % N;
      wr_store = $urandom % 2;
      clr_blk_mask = ($urandom % 16 == 0) ? NUM_BLOCKS'($urandom) : '0;
      if (wr_en) clr_blk_mask[age_blk(wr_age)] = 1'b0;
      rd_age[0] = age_t'($urandom);
      rd_age[1] = ($urandom % 2) ? wr_age : age_t'($urandom);
      scan_blk  = blk_t'($urandom);
      #1;
      for (int p = 0; p < 2; p++) begin
        check(rd_valid[p] == m_valid[rd_age[p]], "valid");
        if (m_valid[rd_age[p]]) begin
          check(rd_slot[p] == m_slot[rd_age[p]], $sformatf("slot of age %0d", rd_age[p]));
          check(rd_store[p] == m_store[rd_age[p]], "store bit");
        end
      end
      for (int l = 0; l < LSID_PER_BLOCK; l++)
        check(scan_store_vec[l] == (m_valid[scan_blk*LSID_PER_BLOCK+l] && m_store[scan_blk*LSID_PER_BLOCK+l]),
              "scan vector");
      @(negedge clk);
      for (int b = 0; b < NUM_BLOCKS; b++)
        if (clr_blk_mask[b]) for (int l = 0; l < LSID_PER_BLOCK; l++) m_valid[b*LSID_PER_BLOCK+l] = 0;
      if (wr_en) begin
        m_valid[wr_age] = 1; m_store[wr_age] = wr_store; m_slot[wr_age] = wr_slot;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
