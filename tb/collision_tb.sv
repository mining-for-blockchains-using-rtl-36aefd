// collision_tb: runs collision stages against a memory model with random
// latency and random ready, N=40, K=4 (L=8), MAX_COLL=3, FIFO of 16 words
// so that the read credit limit is reached.
// Intermediate stage: sorted items are preloaded at the read base; after
// `collision_done` the new items at the write base and the tree nodes are
// compared with a model, as are the count, tree end, dropped and overflow
// outputs (one run forces a small buffer capacity on the store to make
// overflow happen).
// Last stage: each preloaded item points at its own tree of K-1 levels of
// nodes ending in 8 leaf indices; items with equal key agree on the next L
// bits half of the time. Every solution must come out on sol_index as the
// 16 leaf indices of the first item's tree followed by the second's, in
// order; the output ready is random.
module collision_tb;
  import eq_pkg::*;
  localparam int N = 40, K = 4, L = N / (K + 1), MC = 3, HW = WORD_W - REF_W;
  localparam int RBASE = 1000, WBASE = 3000, TBASE = 6000;
  logic clk = 0, rst = 1, collision_start = 0, collision_done, last_stage = 0;
  logic [WADDR_W-1:0] collision_rbase = RBASE, collision_wbase = WBASE;
  logic [WADDR_W-1:0] collision_end = '0, tree_addr = TBASE;
  logic rcsend, rcready, rcvalid = 0;
  logic [WADDR_W-1:0] rcaddr, wcaddr, collision_count, collision_tree_end;
  logic [WORD_W-1:0] rcdata = '0, wcdata;
  logic wcvalid, wctree, wcready;
  logic [31:0] dropped, overflow, solutions, sol_index;
  logic sol_valid, sol_ready;
  int checks = 0, failures = 0;

  collision #(.N(N), .K(K), .MAX_COLL(MC), .BUF_WORDS(1 << 20), .FIFO_DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  // memory model, in-order reads with 3..20 cycles latency
  logic [WORD_W-1:0] mem [int];
  typedef struct { int due; logic [WORD_W-1:0] d; } rd_t;
  rd_t rq[$];
  int cyc = 0, n_done = 0, n_tree_reads = 0;
  logic rdy = 0, srdy = 0;
  int got[$];
  always @(negedge clk) begin
    rdy  = ($urandom_range(0, 99) < 75);
    srdy = ($urandom_range(0, 99) < 60);
  end
  assign wcready   = rdy && wcvalid;
  assign rcready   = rdy && !wcvalid && rcsend;
  assign sol_ready = srdy;
  always @(posedge clk) begin
    cyc++;
    rcvalid <= 1'b0;
    // requests are ignored during reset, when the DUT's state is not yet defined
    if (!rst && wcvalid && wcready) mem[wcaddr] = wcdata;
    if (!rst && rcsend && rcready) begin
      rd_t r;
      r.due = cyc + $urandom_range(3, 20);
      if (rq.size() > 0 && r.due < rq[$].due) r.due = rq[$].due;
      r.d = mem.exists(rcaddr) ? mem[rcaddr] : '0;
      rq.push_back(r);
      if (int'(rcaddr) >= TBASE) n_tree_reads++;
    end
    if (rq.size() > 0 && rq[0].due <= cyc) begin
      rcdata <= rq[0].d; rcvalid <= 1'b1; void'(rq.pop_front());
    end
    if (sol_valid && sol_ready) got.push_back(int'(sol_index));
    if (collision_done) n_done++;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // leaves of a reference, left to right, from the memory contents
  function automatic void leaves(logic [REF_W-1:0] r, ref int q[$]);
    if (is_leaf(r)) q.push_back(int'(r[LEAFIDX_W-1:0]));
    else begin
      leaves(mem[int'(r)][63:32], q);
      leaves(mem[int'(r)][31:0], q);
    end
  endfunction

  int next_node = TBASE, next_leaf = 0;
  // builds a tree of `lev` node levels in memory and returns its root
  function automatic logic [REF_W-1:0] build(int lev);
    logic [REF_W-1:0] a, b;
    int me;
    if (lev == 0) begin
      next_leaf++;
      return {LEAF_PREFIX, LEAFIDX_W'(next_leaf)};
    end
    a = build(lev - 1);
    b = build(lev - 1);
    me = next_node++;
    mem[me] = '0;
    mem[me][63:0] = {a, b};
    return REF_W'(me);
  endfunction

  task automatic start_and_wait(int n, bit last);
    int t0 = n_done;
    @(negedge clk);
    collision_end = WADDR_W'(n); last_stage = last; collision_start = 1;
    @(negedge clk); collision_start = 0;
    while (n_done == t0) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  task automatic intermediate(int n, int nkeys, int capacity);
    logic [WORD_W-1:0] items[$], grp[$];
    int keys[$];
    int e_count = 0, e_drop = 0, e_ovf = 0, bad = 0;
    mem.delete();
    for (int i = 0; i < n; i++) keys.push_back($urandom_range(0, nkeys - 1));
    keys.sort();
    for (int i = 0; i < n; i++) begin
      logic [WORD_W-1:0] w;
      w = {8{$urandom}};
      w[WORD_W-1 -: REF_W] = {LEAF_PREFIX, LEAFIDX_W'(i)};
      w[L-1:0] = L'(keys[i]);
      items.push_back(w);
      mem[RBASE + i] = w;
    end
    force dut.u_store.wcap = WADDR_W'(capacity);
    start_and_wait(n, 1'b0);
    release dut.u_store.wcap;
    // model
    foreach (items[i]) begin
      if (grp.size() > 0 && grp[0][L-1:0] == items[i][L-1:0]) begin
        foreach (grp[g]) begin
          if (e_count >= capacity) e_ovf++;
          else begin
            logic [WORD_W-1:0] node, item;
            logic [HW-1:0] x;
            x = grp[g][HW-1:0] ^ items[i][HW-1:0];
            node = '0; node[63:0] = {item_ref(grp[g]), item_ref(items[i])};
            item = '0; item[WORD_W-1 -: REF_W] = REF_W'(TBASE + e_count); item[HW-1:0] = x >> L;
            checks++;
            if (!mem.exists(TBASE + e_count) || mem[TBASE + e_count] !== node ||
                !mem.exists(WBASE + e_count) || mem[WBASE + e_count] !== item) begin
              failures++;
              if (bad++ < 5) $display("FAIL new item %0d: node %h item %h", e_count,
                                      mem[TBASE + e_count][63:0], mem[WBASE + e_count][63:0]);
            end
            e_count++;
          end
        end
        if (grp.size() < MC) grp.push_back(items[i]);
        else e_drop++;
      end else begin
        grp.delete(); grp.push_back(items[i]);
      end
    end
    checks++;
    if (int'(collision_count) != e_count || int'(collision_tree_end) != TBASE + e_count ||
        int'(dropped) != e_drop || int'(overflow) != e_ovf || mem.exists(WBASE + e_count)) begin
      failures++;
      $display("FAIL intermediate: count %0d/%0d tree end %0d dropped %0d/%0d overflow %0d/%0d",
               collision_count, e_count, collision_tree_end, dropped, e_drop, overflow, e_ovf);
    end
    $display("intermediate stage: %0d items in, %0d out, %0d dropped, %0d overflow",
             n, e_count, e_drop, e_ovf);
  endtask

  task automatic last(int n, int nkeys);
    logic [WORD_W-1:0] items[$], grp[$];
    int keys[$], exp[$];
    int n_exp = 0, sol0 = int'(solutions);
    mem.delete();
    next_node = TBASE; next_leaf = 0;
    got.delete();
    for (int i = 0; i < n; i++) keys.push_back($urandom_range(0, nkeys - 1));
    keys.sort();
    for (int i = 0; i < n; i++) begin
      logic [WORD_W-1:0] w;
      w = {8{$urandom}};
      w[WORD_W-1 -: REF_W] = build(K - 1);
      w[L-1:0] = L'(keys[i]);
      w[2*L-1:L] = L'($urandom_range(0, 1));
      items.push_back(w);
      mem[RBASE + i] = w;
    end
    foreach (items[i]) begin
      if (grp.size() > 0 && grp[0][L-1:0] == items[i][L-1:0]) begin
        foreach (grp[g])
          if (grp[g][2*L-1:0] == items[i][2*L-1:0]) begin
            leaves(item_ref(grp[g]), exp);
            leaves(item_ref(items[i]), exp);
            n_exp++;
          end
        if (grp.size() < MC) grp.push_back(items[i]);
      end else begin
        grp.delete(); grp.push_back(items[i]);
      end
    end
    n_tree_reads = 0;
    start_and_wait(n, 1'b1);
    checks++;
    if (int'(solutions) - sol0 != n_exp || got.size() != exp.size()) begin
      failures++;
      $display("FAIL last stage: %0d solutions (expected %0d), %0d indices (expected %0d)",
               int'(solutions) - sol0, n_exp, got.size(), exp.size());
    end
    for (int i = 0; i < exp.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != exp[i]) begin
        failures++;
        if (failures < 10) $display("FAIL index %0d: %0d expected %0d", i, got[i], exp[i]);
      end
    end
    checks++;
    if (n_tree_reads != n_exp * 2 * ((1 << (K - 1)) - 1)) begin
      failures++; $display("FAIL tree reads %0d", n_tree_reads);
    end
    $display("last stage: %0d items, %0d solutions, %0d indices, %0d tree reads",
             n, n_exp, got.size(), n_tree_reads);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    intermediate(400, 80, 1 << 20);
    intermediate(300, 40, 50);
    intermediate(0, 4, 1 << 20);
    last(200, 60);
    last(1, 4);
    intermediate(100, 20, 1 << 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
