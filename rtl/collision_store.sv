// collision_store: finds and records the collisions among sorted items.
//
// Items arrive in key order (key = the low L = N/(K+1) bits of the hash
// field). The store keeps the current run of items with equal key, up to
// MAX_COLL of them; an item beyond that is dropped (counted in `dropped`),
// which is how the number of supported collisions limits the algorithm.
// Each new item of the run is paired with every item already held:
//  * in stages 1..K-1 a pair writes the tree node {ref_a, ref_b} (the two
//    items' 32-bit references) to MEM_BUF2 at tree pointer X, flagged as a
//    tree write, then the new item {X, zeros, (hash_a ^ hash_b) >> L} to
//    wbase + count, and advances X and count. When count reaches `wcap`
//    (the buffer size) further pairs are discarded and counted in
//    `overflow`;
//  * in the last stage a pair whose hashes also agree on the next L bits
//    (2L bits in all, i.e. everything that is left) is a solution: it is
//    offered on sol_req with its two references and the store waits for
//    sol_ack, which collision gives once the solution tree is sent.
// `done` pulses once item_end items have been taken; `count` and
// `tree_ptr` then give the new number of items and the next free tree word.
// The pairing, the 10-bit-prefix leaves, the tree in MEM_BUF2 and the
// shifted XOR follow the document (Figures 3.16, 3.17); the serial pairing
// order and the overflow rule are this design's choices.
module collision_store
  import eq_pkg::*;
#(
  parameter int N        = 210,
  parameter int K        = 9,
  parameter int MAX_COLL = 7
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic               last_stage,
  input  logic [WADDR_W-1:0] item_end,
  input  logic [WADDR_W-1:0] wbase,
  input  logic [WADDR_W-1:0] tree_base,
  input  logic [WADDR_W-1:0] wcap,
  // sorted items
  input  logic               in_valid,
  input  logic [WORD_W-1:0]  in_data,
  output logic               in_pop,
  // write port
  output logic [WADDR_W-1:0] waddr,
  output logic [WORD_W-1:0]  wdata,
  output logic               wvalid,
  output logic               wtree,
  input  logic               wready,
  // solutions
  output logic               sol_req,
  output logic [REF_W-1:0]   sol_ref_a,
  output logic [REF_W-1:0]   sol_ref_b,
  input  logic               sol_ack,
  // results
  output logic               done,
  output logic [WADDR_W-1:0] count,
  output logic [WADDR_W-1:0] tree_ptr,
  output logic [31:0]        dropped,
  output logic [31:0]        overflow,
  output logic [31:0]        solutions
);
  localparam int L  = N / (K + 1);
  localparam int HW = WORD_W - REF_W;   // hash field width
  localparam int GW = $clog2(MAX_COLL + 1);

  typedef enum logic [2:0] {S_IDLE, S_TAKE, S_PAIR, S_WTREE, S_WITEM, S_SOL} sstate_e;

  sstate_e            st;
  logic [WORD_W-1:0]  grp [MAX_COLL];
  logic [GW-1:0]      grp_n, j;
  logic [L-1:0]       grp_key;
  logic [WORD_W-1:0]  cur;
  logic [WADDR_W-1:0] consumed;

  logic [WORD_W-1:0]  a;
  logic [HW-1:0]      x;

  assign a = grp[j];
  assign x = a[HW-1:0] ^ cur[HW-1:0];

  assign in_pop    = (st == S_TAKE) && (consumed != item_end) && in_valid;
  assign sol_req   = (st == S_SOL);
  assign sol_ref_a = item_ref(a);
  assign sol_ref_b = item_ref(cur);
  assign wvalid    = (st == S_WTREE) || (st == S_WITEM);
  assign wtree     = (st == S_WTREE);

  always_comb begin
    wdata = '0;
    if (st == S_WTREE) begin
      waddr = tree_ptr;
      wdata[2*REF_W-1:0] = {item_ref(a), item_ref(cur)};
    end else begin
      waddr = wbase + count;
      wdata[WORD_W-1 -: REF_W] = tree_ptr;
      wdata[HW-1:0] = x >> L;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_IDLE;
      grp_n     <= '0;
      j         <= '0;
      grp_key   <= '0;
      cur       <= '0;
      consumed  <= '0;
      count     <= '0;
      tree_ptr  <= '0;
      dropped   <= '0;
      overflow  <= '0;
      solutions <= '0;
      done      <= 1'b0;
      for (int i = 0; i < MAX_COLL; i++) grp[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          grp_n    <= '0;
          consumed <= '0;
          count    <= '0;
          tree_ptr <= tree_base;
          dropped  <= '0;
          overflow <= '0;
          st       <= S_TAKE;
        end
        S_TAKE: begin
          if (consumed == item_end) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end else if (in_valid) begin
            consumed <= consumed + 1'b1;
            cur      <= in_data;
            if (grp_n != 0 && in_data[L-1:0] == grp_key) begin
              j  <= '0;
              st <= S_PAIR;
            end else begin
              grp[0]  <= in_data;
              grp_n   <= GW'(1);
              grp_key <= in_data[L-1:0];
            end
          end
        end
        S_PAIR: begin
          if (j == grp_n) begin
            if (grp_n < GW'(MAX_COLL)) begin
              grp[grp_n] <= cur;
              grp_n      <= grp_n + 1'b1;
            end else begin
              dropped <= dropped + 1'b1;
            end
            st <= S_TAKE;
          end else if (last_stage) begin
            if (x[2*L-1:0] == '0) st <= S_SOL;
            else j <= j + 1'b1;
          end else if (count >= wcap) begin
            overflow <= overflow + 1'b1;
            j        <= j + 1'b1;
          end else begin
            st <= S_WTREE;
          end
        end
        S_WTREE: if (wready) st <= S_WITEM;
        S_WITEM: if (wready) begin
          tree_ptr <= tree_ptr + 1'b1;
          count    <= count + 1'b1;
          j        <= j + 1'b1;
          st       <= S_PAIR;
        end
        default: if (sol_ack) begin  // S_SOL
          solutions <= solutions + 1'b1;
          j         <= j + 1'b1;
          st        <= S_PAIR;
        end
      endcase
    end
  end
endmodule
