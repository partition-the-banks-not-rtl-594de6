// tb_lsq_ram: self-checking test of the LSQ data RAM (one write, two
// read ports) against a reference array.
module tb_lsq_ram;
  import lsq_pkg::*;
  localparam int unsigned N = 48;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en;
  logic [$clog2(N)-1:0] wr_slot;
  ram_word_t wr_data;
  logic [$clog2(N)-1:0] rd_slot [2];
  ram_word_t rd_data [2];

  lsq_ram #(.LSQ_ENTRIES(N)) dut (.*);

  ram_word_t model [N];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic ram_word_t rnd();
    return '{data: {$urandom, $urandom}, size: 2'($urandom), off: 3'($urandom)};
  endfunction

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rd_slot[0] = '0; rd_slot[1] = '0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); wr_en = 1; wr_slot = i; wr_data = rnd(); model[i] = wr_data;
    end
    @(negedge clk);
    for (int it = 0; it < 3000; it++) begin
      wr_en = $urandom % 2; wr_slot = $urandom % N; wr_data = rnd();
      rd_slot[0] = $urandom % N; rd_slot[1] = $urandom % N;
      #1;
      check(rd_data[0] == model[rd_slot[0]], "read port 0");
      check(rd_data[1] == model[rd_slot[1]], "read port 1");
      @(negedge clk);
      if (wr_en) model[wr_slot] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
