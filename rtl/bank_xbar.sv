// bank_xbar: address-interleaved routing of memory instructions to the
// LSQ/cache partitions.
//
// NUM_PORTS execution-side injection ports each carry at most one memory
// instruction per cycle. Cache lines are interleaved across NUM_BANKS
// partitions, so the partition is the line address modulo NUM_BANKS
// (address bits just above the line offset). The virtual channel is chosen
// from the instruction's block: VC0 for the non-speculative (head) block,
// VC1 otherwise. Every (partition, VC) output grants one requesting port
// per cycle by round robin, among ports whose flit the channel can take;
// a port sees in_ready when its flit was granted; an ungranted port may
// keep its flit or offer another one next cycle (the issue logic, outside
// this module, is expected to offer non-speculative work when refused).
// Up to NUM_BANKS x 2 instructions move per cycle. The interleaving on
// cache lines and round-robin arbitration follow the document; the 64-byte
// line, the single-stage crossbar in place of a routed mesh and the
// grant rule are this design's choices.
module bank_xbar
  import lsq_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 4,
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned LINE_BYTES = 64,
  localparam int unsigned BANK_W = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned PORT_W = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1,
  localparam int unsigned LINE_W = $clog2(LINE_BYTES)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  blk_t     head_blk,
  input  logic     in_valid [NUM_PORTS],
  input  mem_req_t in_req   [NUM_PORTS],
  output logic     in_ready [NUM_PORTS],
  output logic     out_valid [NUM_BANKS][2],
  output mem_req_t out_req   [NUM_BANKS][2],
  input  logic     out_ready [NUM_BANKS][2]
);

  function automatic logic [BANK_W-1:0] bank_of(addr_t a);
    return BANK_W'((a >> LINE_W) % NUM_BANKS);
  endfunction

  logic [PORT_W-1:0] rr_q [NUM_BANKS][2];   // next port to favour
  logic [PORT_W-1:0] gnt_port [NUM_BANKS][2];
  logic              gnt [NUM_BANKS][2];

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) in_ready[p] = 1'b0;
    for (int b = 0; b < NUM_BANKS; b++) begin
      for (int v = 0; v < 2; v++) begin
        gnt[b][v]      = 1'b0;
        gnt_port[b][v] = '0;
        for (int k = 0; k < NUM_PORTS; k++) begin
          int unsigned p;
          p = (int'(rr_q[b][v]) + k) % NUM_PORTS;
          if (!gnt[b][v] && in_valid[p] && out_ready[b][v] &&
              int'(bank_of(in_req[p].addr)) == b &&
              ((age_blk(in_req[p].age) == head_blk) ? 0 : 1) == v) begin
            gnt[b][v]      = 1'b1;
            gnt_port[b][v] = PORT_W'(p);
          end
        end
        out_valid[b][v] = gnt[b][v];
        out_req[b][v]   = in_req[gnt_port[b][v]];
        if (gnt[b][v]) in_ready[gnt_port[b][v]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_BANKS; b++)
        for (int v = 0; v < 2; v++) rr_q[b][v] <= '0;
    end else begin
      for (int b = 0; b < NUM_BANKS; b++)
        for (int v = 0; v < 2; v++)
          if (gnt[b][v])
            rr_q[b][v] <= PORT_W'((int'(gnt_port[b][v]) + 1) % NUM_PORTS);
    end
  end

endmodule
