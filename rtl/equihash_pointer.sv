// equihash_pointer: memory map of the miner. External memory is split in
// MEM_BUF0 (word 0), MEM_BUF1 (word BUF_WORDS) and MEM_BUF2 (word
// 2*BUF_WORDS, unbounded), each buffer holding BUF_WORDS 256-bit items.
//
// It tracks which of BUF0/BUF1 holds the current items (`cur`), how many
// there are, and the next free word of the solution tree in MEM_BUF2, and
// derives the pointers of every step:
//   blake2b writes MEM_BUF0;
//   radix reads from `cur` (radix_base_addr) and uses the other buffer as
//   scratch; after RADIX_PASS passes the sorted items are in `cur` if the
//   number of passes is even, in the other buffer if it is odd;
//   on radix_done `cur` moves to the buffer holding the sorted items;
//   collision reads `cur`, writes items to the other buffer and tree nodes
//   from tree_addr on, and on collision_done `cur` moves to the new items.
// `job_start` resets the map for a new job; `radix_done` and
// `collision_done` (with the collision count and the tree end pointer)
// advance it. The three zones are the document's (its memory organisation
// figure); their size and the bookkeeping above are this design's choice.
// Several output bits are constant (the buffer bases are fixed), which is
// why synthesis reports constant outputs here.
module equihash_pointer
  import eq_pkg::*;
#(
  parameter int BUF_WORDS  = 1 << 22,
  parameter int NUM_ITEMS  = 1 << 22,
  parameter int RADIX_PASS = 3
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               job_start,
  input  logic               radix_done,
  input  logic               collision_done,
  input  logic [WADDR_W-1:0] collision_count,
  input  logic [WADDR_W-1:0] collision_tree_end,
  output logic [WADDR_W-1:0] blake2b_base_addr,
  output logic [WADDR_W-1:0] radix_base_addr,
  output logic [WADDR_W-1:0] radix_scratch_addr,
  output logic [WADDR_W-1:0] radix_end,
  output logic [WADDR_W-1:0] collision_rbase,
  output logic [WADDR_W-1:0] collision_wbase,
  output logic [WADDR_W-1:0] collision_end,
  output logic [WADDR_W-1:0] tree_addr
);
  localparam logic [WADDR_W-1:0] BUF0 = '0;
  localparam logic [WADDR_W-1:0] BUF1 = WADDR_W'(BUF_WORDS);
  localparam logic [WADDR_W-1:0] BUF2 = WADDR_W'(2 * BUF_WORDS);
  localparam logic ODD_PASSES = RADIX_PASS[0];

  logic               cur;      // 0: items in BUF0, 1: items in BUF1
  logic [WADDR_W-1:0] count;
  logic [WADDR_W-1:0] tree;
  logic               sorted;

  assign sorted = cur ^ ODD_PASSES;

  assign blake2b_base_addr  = BUF0;
  assign radix_base_addr    = cur ? BUF1 : BUF0;
  assign radix_scratch_addr = cur ? BUF0 : BUF1;
  assign radix_end          = count;
  assign collision_rbase    = cur ? BUF1 : BUF0;   // cur already points at the sorted items
  assign collision_wbase    = cur ? BUF0 : BUF1;
  assign collision_end      = count;
  assign tree_addr          = tree;

  always_ff @(posedge clk) begin
    if (rst || job_start) begin
      cur   <= 1'b0;
      count <= WADDR_W'(NUM_ITEMS);
      tree  <= BUF2;
    end else if (radix_done) begin
      cur <= sorted;
    end else if (collision_done) begin
      cur   <= ~cur;
      count <= collision_count;
      tree  <= collision_tree_end;
    end
  end
endmodule
