// lsq_pkg: constants and types shared by the address-interleaved LSQ.
//
// The memory-instruction window is 256 entries: 8 in-flight blocks of at
// most 32 loads/stores each. An instruction's age (memory sequence number)
// is {block slot, load/store id}; block slots are used circularly, so
// ages are compared relative to the oldest (non-speculative) block.
// Addresses are 48 bits (the width of the address CAM); data is one 64-bit
// doubleword. Sizes are encoded as log2(bytes): 0=1, 1=2, 2=4, 3=8 bytes.
// The window geometry follows the block-structured processor the design
// targets; address/data widths, the size encoding and packet layout are
// this design's choices.
package lsq_pkg;

  localparam int unsigned NUM_BLOCKS = 8;                    // in-flight blocks
  localparam int unsigned LSID_PER_BLOCK = 32;               // ld/st per block
  localparam int unsigned WINDOW = NUM_BLOCKS * LSID_PER_BLOCK;  // M = 256
  localparam int unsigned BLK_W = $clog2(NUM_BLOCKS);        // 3
  localparam int unsigned LSID_W = $clog2(LSID_PER_BLOCK);   // 5
  localparam int unsigned AGE_W = BLK_W + LSID_W;            // 8 = log2(M)
  localparam int unsigned ADDR_W = 48;
  localparam int unsigned DATA_W = 64;
  localparam int unsigned BYTES = DATA_W / 8;                // 8
  localparam int unsigned OFF_W = $clog2(BYTES);             // 3
  // RAM word: data (or load target) + size + byte offset = 69 bits
  localparam int unsigned RAM_W = DATA_W + 2 + OFF_W;

  typedef logic [AGE_W-1:0]  age_t;
  typedef logic [BLK_W-1:0]  blk_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [BYTES-1:0]  bmask_t;

  // Memory instruction packet as carried by the operand network.
  typedef struct packed {
    age_t        age;       // {block slot, lsid}
    logic        is_store;
    logic [1:0]  size;      // log2(bytes)
    addr_t       addr;      // byte address
    data_t       data;      // store value (low bytes) or load target tag
  } mem_req_t;

  // Word kept per slot in the LSQ RAM.
  typedef struct packed {
    data_t          data;
    logic [1:0]     size;
    logic [OFF_W-1:0] off;
  } ram_word_t;

  function automatic blk_t age_blk(age_t a);
    return a[AGE_W-1 -: BLK_W];
  endfunction

  // Age relative to the oldest in-flight block: smaller is older.
  function automatic age_t rel_age(age_t a, blk_t head);
    return a - age_t'({head, {LSID_W{1'b0}}});
  endfunction

  // Byte lanes of a doubleword touched by an access.
  function automatic bmask_t byte_mask(logic [OFF_W-1:0] off, logic [1:0] size);
    bmask_t m;
    m = bmask_t'((9'd1 << (9'd1 << size)) - 9'd1);
    return bmask_t'(m << off);
  endfunction

  // Doubleword-aligned address (the unit the address CAM compares).
  function automatic logic [ADDR_W-OFF_W-1:0] dw_addr(addr_t a);
    return a[ADDR_W-1:OFF_W];
  endfunction

endpackage
