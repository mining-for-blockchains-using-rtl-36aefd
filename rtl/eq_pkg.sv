// eq_pkg: types and constants shared by the Equihash miner.
//
// Every item in external memory is one 256-bit word of the memory-controller
// user interface. Its top 32 bits are a reference: in the first stage a
// 10-bit all-ones prefix followed by the 22-bit item index (a leaf of the
// solution tree), in later stages the word address of the tree node in
// MEM_BUF2 that records which two items were XORed. The hash bits that are
// still to be processed sit right-aligned in the low bits of the word. Tree
// nodes in MEM_BUF2 hold two references in bits [63:0].
// The word size, the 10-bit prefix, the 22-bit index and the 32-bit
// references follow the document; the bit placement inside the word is this
// design's choice.
package eq_pkg;

  localparam int WORD_W   = 256;  // memory-controller data width
  localparam int REF_W    = 32;   // width of a reference (leaf tag or node address)
  localparam int PREFIX_W = 10;   // all-ones prefix that marks a leaf
  localparam int LEAFIDX_W = REF_W - PREFIX_W;  // 22-bit index field
  localparam int WADDR_W  = 32;   // word address width used inside the design
  localparam int APP_ADDR_W = 28; // memory-controller address (64-bit units)

  localparam logic [PREFIX_W-1:0] LEAF_PREFIX = '1;

  // Memory-controller user-interface commands
  localparam logic [2:0] MEMC_CMD_WRITE = 3'b000;
  localparam logic [2:0] MEMC_CMD_READ  = 3'b001;

  // Main state of the algorithm; also selects the owner of the memory port.
  typedef enum logic [2:0] {
    ST_IDLE      = 3'd0,
    ST_BLAKE2B   = 3'd1,
    ST_RADIX     = 3'd2,
    ST_COLLISION = 3'd3,
    ST_DONE      = 3'd4
  } eq_state_e;

  function automatic logic is_leaf(input logic [REF_W-1:0] r);
    return r[REF_W-1 -: PREFIX_W] == LEAF_PREFIX;
  endfunction

  function automatic logic [REF_W-1:0] item_ref(input logic [WORD_W-1:0] w);
    return w[WORD_W-1 -: REF_W];
  endfunction

endpackage
