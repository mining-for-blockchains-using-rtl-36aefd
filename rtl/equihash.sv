// equihash: the Equihash engine. It holds almost no logic of its own and
// connects equihash_state (main controller, with the memory map), blake2b (list
// generation), radix with snoop (sorting), collision (collisions, tree and
// solution output) and mem_gasket (sharing of the memory-controller user
// interface).
//
// Parameters: N and K are the Equihash parameters (210 and 9 by default, so
// L = N/(K+1) = 21, 2^22 items of 210 bits). RADIX_BITS is the radix of
// the sort (7 in the fastest configuration reported; 21/7 = 3 passes),
// MAX_COLL the number of contiguous collisions held (7), BUF_WORDS the
// size of MEM_BUF0 and MEM_BUF1 in 256-bit words (2^22), WORK_BYTES the job
// length in bytes.
//
// A job arrives on work_valid/work_data (taken with work_ack); solution
// indices leave on sol_valid/sol_index/sol_ready; `done` pulses when a job
// is finished. `init_done` is the memory controller's calibration flag.
// The structure is the document's. Its own logic is only the number of
// sort passes, ceil(L/RADIX_BITS), and the snoop clear (snoop counts from
// an idle engine, so it sees exactly the items blake2b writes); these are
// this design's choices. app_addr[1:0], app_cmd[2:1] and sol_index[31:22]
// are constant zero (word addressing, two commands, 22-bit indices).
module equihash
  import eq_pkg::*;
#(
  parameter int N          = 210,
  parameter int K          = 9,
  parameter int RADIX_BITS = 7,
  parameter int MAX_COLL   = 7,
  parameter int BUF_WORDS  = 1 << 22,
  parameter int WORK_BYTES = 124
) (
  input  logic                    clk,
  input  logic                    rst,
  // job from the host link
  input  logic                    work_valid,
  input  logic [WORK_BYTES*8-1:0] work_data,
  output logic                    work_ack,
  // solution to the host link
  output logic                    sol_valid,
  output logic [31:0]             sol_index,
  input  logic                    sol_ready,
  // memory controller user interface
  input  logic                    init_done,
  output logic [APP_ADDR_W-1:0]   app_addr,
  output logic [2:0]              app_cmd,
  output logic                    app_en,
  input  logic                    app_rdy,
  output logic [WORD_W-1:0]       app_wdf_data,
  output logic                    app_wdf_wren,
  output logic                    app_wdf_end,
  input  logic                    app_wdf_rdy,
  input  logic [WORD_W-1:0]       app_rd_data,
  input  logic                    app_rd_data_valid,
  // status
  output eq_state_e               state,
  output logic [3:0]              stage,
  output logic                    done,
  output logic [31:0]             dropped,
  output logic [31:0]             overflow,
  output logic [31:0]             solutions
);
  localparam int L          = N / (K + 1);
  localparam int NUM_ITEMS  = 1 << (L + 1);
  localparam int RADIX_PASS = (L + RADIX_BITS - 1) / RADIX_BITS;
  localparam int NB         = 1 << RADIX_BITS;

  logic last_stage;
  logic blake2b_start, blake2b_done, radix_start, radix_done;
  logic collision_start, collision_done;
  logic [WADDR_W-1:0] collision_count, collision_tree_end;
  logic [WADDR_W-1:0] blake2b_base_addr, radix_base_addr, radix_scratch_addr, radix_end;
  logic [WADDR_W-1:0] collision_rbase, collision_wbase, collision_end, tree_addr;

  logic [WADDR_W-1:0] wbaddr, wraddr, wcaddr, rraddr, rcaddr;
  logic [WORD_W-1:0]  wbdata, wrdata, wcdata, rrdata, rcdata;
  logic wbvalid, wbready, wrvalid, wrready, wcvalid, wctree, wcready;
  logic rrsend, rrready, rrvalid, rcsend, rcready, rcvalid;

  logic               snoop_wvalid, snoop_rst, snoop_clear;
  logic [WORD_W-1:0]  snoop_wdata;
  logic [3:0]         snoop_pass;
  logic [WADDR_W-1:0] bucket_base [NB];

  equihash_state #(
    .K(K), .BUF_WORDS(BUF_WORDS), .NUM_ITEMS(NUM_ITEMS), .RADIX_PASS(RADIX_PASS)
  ) u_state (
    .clk, .rst, .init_done, .uart_done(work_valid), .work_ack,
    .state, .stage, .last_stage,
    .blake2b_start, .blake2b_done, .radix_start, .radix_done,
    .collision_start, .collision_done, .collision_count, .collision_tree_end,
    .equihash_state_done(done),
    .blake2b_base_addr, .radix_base_addr, .radix_scratch_addr, .radix_end,
    .collision_rbase, .collision_wbase, .collision_end, .tree_addr);

  blake2b #(.N(N), .K(K), .WORK_BYTES(WORK_BYTES)) u_blake2b (
    .clk, .rst, .blake2b_start, .blake2b_done, .blake2b_base_addr,
    .uart_rdata(work_data), .wbaddr, .wbdata, .wbvalid, .wbready);

  radix #(.RADIX_BITS(RADIX_BITS), .RADIX_PASS(RADIX_PASS), .KEY_W(L)) u_radix (
    .clk, .rst, .radix_start, .radix_done,
    .radix_base_addr, .radix_scratch_addr, .radix_end, .bucket_base,
    .rrsend, .rraddr, .rrready, .rrdata, .rrvalid,
    .wraddr, .wrdata, .wrvalid, .wrready,
    .snoop_pass, .snoop_rst);

  // snoop also starts clean for every job
  assign snoop_clear = snoop_rst || (state == ST_IDLE);

  snoop #(.RADIX_BITS(RADIX_BITS), .RADIX_PASS(RADIX_PASS), .KEY_W(L)) u_snoop (
    .clk, .rst, .snoop_rst(snoop_clear), .pass_cnt(snoop_pass),
    .wvalid(snoop_wvalid), .wdata(snoop_wdata), .bucket_base);

  collision #(.N(N), .K(K), .MAX_COLL(MAX_COLL), .BUF_WORDS(BUF_WORDS)) u_collision (
    .clk, .rst, .collision_start, .collision_done, .last_stage,
    .collision_rbase, .collision_wbase, .collision_end, .tree_addr,
    .rcsend, .rcaddr, .rcready, .rcdata, .rcvalid,
    .wcaddr, .wcdata, .wcvalid, .wctree, .wcready,
    .collision_count, .collision_tree_end, .dropped, .overflow, .solutions,
    .sol_valid, .sol_index, .sol_ready);

  mem_gasket u_gasket (
    .clk, .rst, .state,
    .app_addr, .app_cmd, .app_en, .app_rdy, .app_wdf_data, .app_wdf_wren,
    .app_wdf_end, .app_wdf_rdy, .app_rd_data, .app_rd_data_valid,
    .wbaddr, .wbdata, .wbvalid, .wbready,
    .wraddr, .wrdata, .wrvalid, .wrready,
    .rrsend, .rraddr, .rrready, .rrdata, .rrvalid,
    .wcaddr, .wcdata, .wcvalid, .wctree, .wcready,
    .rcsend, .rcaddr, .rcready, .rcdata, .rcvalid,
    .snoop_wvalid, .snoop_wdata);
endmodule
