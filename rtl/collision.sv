// collision: collision step of one Equihash stage.
//
// A reader sends the read addresses rbase + i, i = 0 .. item_end-1, and
// pushes the returned sorted items into a 256-bit x FIFO_DEPTH FIFO built
// from 72-bit FIFO units (wide_fifo); a read is only sent when the FIFO has
// room for every word in flight. collision_store takes the items from the
// other side of the FIFO, writes tree nodes and new items through the write
// interface (tree writes flagged on `wctree`), and reports solutions in the
// last stage.
//
// For each solution the tree walker sends the 2^K leaf indices of the
// solution to the host link, left to right: it holds a stack of references,
// starting with the solution's two; a leaf (10-bit all-ones prefix) is
// sent out as its 22-bit index on sol_valid/sol_index (waiting for
// sol_ready), any other reference is read from MEM_BUF2 and replaced by the
// node's two references. While it walks, the reader sends no reads and the
// walker waits until the reader's reads have all returned, so read data
// always returns to the side that asked for it.
// `collision_done` pulses when every item has been taken and processed.
// The FIFO, the tree search and the use of UART to return the indices are
// the document's; the stack walk and the read sharing are this design's.
// sol_index[31:22] are always zero: indices have 22 bits, the output keeps
// the 32-bit width of the eight-character solution lines.
module collision
  import eq_pkg::*;
#(
  parameter int N          = 210,
  parameter int K          = 9,
  parameter int MAX_COLL   = 7,
  parameter int BUF_WORDS  = 1 << 22,
  parameter int FIFO_DEPTH = 512
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               collision_start,
  output logic               collision_done,
  input  logic               last_stage,
  input  logic [WADDR_W-1:0] collision_rbase,
  input  logic [WADDR_W-1:0] collision_wbase,
  input  logic [WADDR_W-1:0] collision_end,
  input  logic [WADDR_W-1:0] tree_addr,
  // read interface
  output logic               rcsend,
  output logic [WADDR_W-1:0] rcaddr,
  input  logic               rcready,
  input  logic [WORD_W-1:0]  rcdata,
  input  logic               rcvalid,
  // write interface
  output logic [WADDR_W-1:0] wcaddr,
  output logic [WORD_W-1:0]  wcdata,
  output logic               wcvalid,
  output logic               wctree,
  input  logic               wcready,
  // results
  output logic [WADDR_W-1:0] collision_count,
  output logic [WADDR_W-1:0] collision_tree_end,
  output logic [31:0]        dropped,
  output logic [31:0]        overflow,
  output logic [31:0]        solutions,
  // solution indices to the host link
  output logic               sol_valid,
  output logic [31:0]        sol_index,
  input  logic               sol_ready
);
  localparam int FCW   = $clog2(FIFO_DEPTH + 1);
  localparam int STACK = 2 * K + 2;
  localparam int SPW   = $clog2(STACK + 1);

  // ---------------- reader ----------------
  logic               reading;
  logic [WADDR_W-1:0] read_cnt;
  logic [FCW-1:0]     outstanding;
  logic               walk_active;
  logic               rd_send;

  logic               f_empty, f_full, f_pop, f_push;
  logic [WORD_W-1:0]  f_dout;
  logic [FCW-1:0]     f_count;

  assign rd_send = reading && !walk_active && (read_cnt != collision_end) &&
                   ((f_count + outstanding) < FCW'(FIFO_DEPTH));
  assign f_push  = rcvalid && (outstanding != 0);

  wide_fifo #(.WIDTH(WORD_W), .UNIT_W(72), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .wr_en(f_push), .din(rcdata), .rd_en(f_pop),
    .dout(f_dout), .empty(f_empty), .full(f_full), .count(f_count));

  always_ff @(posedge clk) begin
    if (rst) begin
      reading     <= 1'b0;
      read_cnt    <= '0;
      outstanding <= '0;
    end else begin
      outstanding <= outstanding + FCW'(rd_send && rcready) - FCW'(f_push);
      if (collision_start) begin
        reading  <= 1'b1;
        read_cnt <= '0;
      end else if (rd_send && rcready) begin
        read_cnt <= read_cnt + 1'b1;
      end else if (read_cnt == collision_end) begin
        reading <= 1'b0;
      end
    end
  end

  // ---------------- store ----------------
  logic             sol_req, sol_ack;
  logic [REF_W-1:0] sol_ref_a, sol_ref_b;

  collision_store #(.N(N), .K(K), .MAX_COLL(MAX_COLL)) u_store (
    .clk, .rst,
    .start      (collision_start),
    .last_stage,
    .item_end   (collision_end),
    .wbase      (collision_wbase),
    .tree_base  (tree_addr),
    .wcap       (WADDR_W'(BUF_WORDS)),
    .in_valid   (!f_empty),
    .in_data    (f_dout),
    .in_pop     (f_pop),
    .waddr      (wcaddr),
    .wdata      (wcdata),
    .wvalid     (wcvalid),
    .wtree      (wctree),
    .wready     (wcready),
    .sol_req, .sol_ref_a, .sol_ref_b, .sol_ack,
    .done       (collision_done),
    .count      (collision_count),
    .tree_ptr   (collision_tree_end),
    .dropped, .overflow, .solutions);

  // ---------------- tree walker ----------------
  typedef enum logic [2:0] {K_IDLE, K_DRAIN, K_POP, K_READ, K_RESP, K_EMIT, K_ACK} kstate_e;

  kstate_e          kst;
  logic [REF_W-1:0] stack [STACK];
  logic [SPW-1:0]   sp;
  logic [REF_W-1:0] node;

  assign walk_active = (kst != K_IDLE);
  assign sol_ack     = (kst == K_ACK);
  assign sol_valid   = (kst == K_EMIT);
  assign sol_index   = {{(32-LEAFIDX_W){1'b0}}, node[LEAFIDX_W-1:0]};

  assign rcsend = rd_send || (kst == K_READ);
  assign rcaddr = (kst == K_READ) ? WADDR_W'(node) : collision_rbase + read_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      kst  <= K_IDLE;
      sp   <= '0;
      node <= '0;
      for (int i = 0; i < STACK; i++) stack[i] <= '0;
    end else begin
      unique case (kst)
        K_IDLE: if (sol_req) begin
          stack[0] <= sol_ref_b;
          stack[1] <= sol_ref_a;
          sp       <= SPW'(2);
          kst      <= K_DRAIN;
        end
        K_DRAIN: if (outstanding == 0) kst <= K_POP;
        K_POP: begin
          if (sp == 0) kst <= K_ACK;
          else begin
            node <= stack[sp - 1'b1];
            sp   <= sp - 1'b1;
            kst  <= is_leaf(stack[sp - 1'b1]) ? K_EMIT : K_READ;
          end
        end
        K_READ: if (rcready) kst <= K_RESP;
        K_RESP: if (rcvalid) begin
          stack[sp]        <= rcdata[REF_W-1:0];        // right child
          stack[sp + 1'b1] <= rcdata[2*REF_W-1:REF_W];  // left child, walked first
          sp               <= sp + SPW'(2);
          kst              <= K_POP;
        end
        K_EMIT: if (sol_ready) kst <= K_POP;
        default: kst <= K_IDLE;  // K_ACK
      endcase
    end
  end

  a_stack: assert property (@(posedge clk) disable iff (rst)
    (kst == K_RESP && rcvalid) |-> (sp <= SPW'(STACK - 2)));
endmodule
