// collision_store_tb: feeds sorted item streams to collision_store and
// compares every write and every solution request with a model worked out
// in the testbench.
// Settings: N=40, K=4 (L=8), MAX_COLL=3 so that runs of equal key longer
// than three items are common and the dropping rule is exercised.
// Cases: an intermediate stage with room for everything, an intermediate
// stage with a small capacity (pairs beyond it are discarded and counted),
// a last stage whose items agree on the next L bits half of the time
// (solutions), and an empty stage. Input valid, write ready and solution
// acknowledge are random. The final count, tree pointer, dropped, overflow
// and the cumulative solution count are checked after each `done`.
module collision_store_tb;
  import eq_pkg::*;
  localparam int N = 40, K = 4, L = N / (K + 1), MC = 3, HW = WORD_W - REF_W;
  logic clk = 0, rst = 1, start = 0, last_stage = 0;
  logic [WADDR_W-1:0] item_end = '0, wbase = '0, tree_base = '0, wcap = '0;
  logic in_valid = 0, in_pop;
  logic [WORD_W-1:0] in_data = '0;
  logic [WADDR_W-1:0] waddr, count, tree_ptr;
  logic [WORD_W-1:0] wdata;
  logic wvalid, wtree, wready, sol_req, sol_ack, done;
  logic [REF_W-1:0] sol_ref_a, sol_ref_b;
  logic [31:0] dropped, overflow, solutions;
  int checks = 0, failures = 0;

  collision_store #(.N(N), .K(K), .MAX_COLL(MC)) dut (.*);
  always #5 clk = ~clk;

  // expected events: kind 0 = item write, 1 = tree write, 2 = solution
  typedef struct { int kind; logic [WADDR_W-1:0] addr; logic [WORD_W-1:0] d; } ev_t;
  ev_t evq[$];
  logic [WORD_W-1:0] inq[$];
  int n_sol = 0, n_dones = 0;

  logic rdy_w = 0, rdy_s = 0;
  always @(negedge clk) begin
    rdy_w = ($urandom_range(0, 99) < 70);
    rdy_s = ($urandom_range(0, 99) < 50);
    in_valid = (inq.size() > 0) && ($urandom_range(0, 99) < 80);
    in_data = (inq.size() > 0) ? inq[0] : '0;
  end
  assign wready  = rdy_w && wvalid;
  assign sol_ack = rdy_s && sol_req;

  always @(posedge clk) begin
    if (in_pop) void'(inq.pop_front());
    if (done) n_dones++;
    if ((wvalid && wready) || sol_ack) begin
      ev_t e;
      checks++;
      if (evq.size() == 0) begin
        failures++; $display("FAIL unexpected event wvalid %0b sol %0b", wvalid, sol_ack);
      end else begin
        e = evq.pop_front();
        if (sol_ack) begin
          if (e.kind != 2 || {sol_ref_a, sol_ref_b} !== e.d[63:0]) begin
            failures++; $display("FAIL solution %h %h expected kind %0d %h", sol_ref_a, sol_ref_b, e.kind, e.d[63:0]);
          end
        end else if (e.kind != int'(wtree) || waddr !== e.addr || wdata !== e.d) begin
          failures++;
          $display("FAIL write tree %0b addr %0d data %h expected kind %0d addr %0d data %h",
                   wtree, waddr, wdata, e.kind, e.addr, e.d);
        end
      end
    end
  end

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Builds a sorted list of n items with keys below nkeys; `hi` sets how many
  // values the next L bits may take.
  function automatic void make_items(int n, int nkeys, int hi, int stage1,
                                     ref logic [WORD_W-1:0] items[$]);
    int keys[$];
    for (int i = 0; i < n; i++) keys.push_back($urandom_range(0, nkeys - 1));
    keys.sort();
    items.delete();
    for (int i = 0; i < n; i++) begin
      logic [WORD_W-1:0] w;
      w = {8{$urandom}};
      w[WORD_W-1 -: REF_W] = stage1 ? {LEAF_PREFIX, 22'(i)} : 32'(5000 + i);
      w[L-1:0] = L'(keys[i]);
      w[2*L-1:L] = L'($urandom_range(0, hi - 1));
      items.push_back(w);
    end
  endfunction

  // Expected behaviour; returns the final count, tree pointer, dropped and
  // overflow through the refs.
  task automatic model(logic [WORD_W-1:0] items[$], bit last, int base, int tbase, int cap,
                       ref int e_count, ref int e_tree, ref int e_drop, ref int e_ovf);
    logic [WORD_W-1:0] grp[$];
    e_count = 0; e_tree = tbase; e_drop = 0; e_ovf = 0;
    foreach (items[i]) begin
      logic [WORD_W-1:0] c;
      c = items[i];
      if (grp.size() > 0 && grp[0][L-1:0] == c[L-1:0]) begin
        foreach (grp[g]) begin
          logic [HW-1:0] x;
          ev_t e;
          x = grp[g][HW-1:0] ^ c[HW-1:0];
          if (last) begin
            if (x[2*L-1:0] == '0) begin
              e.kind = 2; e.addr = '0; e.d = '0;
              e.d[63:0] = {item_ref(grp[g]), item_ref(c)};
              evq.push_back(e); n_sol++;
            end
          end else if (e_count >= cap) begin
            e_ovf++;
          end else begin
            e.kind = 1; e.addr = WADDR_W'(e_tree); e.d = '0;
            e.d[63:0] = {item_ref(grp[g]), item_ref(c)};
            evq.push_back(e);
            e.kind = 0; e.addr = WADDR_W'(base + e_count); e.d = '0;
            e.d[WORD_W-1 -: REF_W] = REF_W'(e_tree);
            e.d[HW-1:0] = x >> L;
            evq.push_back(e);
            e_count++; e_tree++;
          end
        end
        if (grp.size() < MC) grp.push_back(c);
        else e_drop++;
      end else begin
        grp.delete();
        grp.push_back(c);
      end
    end
  endtask

  task automatic run_case(string name, int n, int nkeys, int hi, bit last, int cap);
    logic [WORD_W-1:0] items[$];
    int e_count, e_tree, e_drop, e_ovf, t0;
    int base = 100 + $urandom_range(0, 50), tbase = 4000 + $urandom_range(0, 50);
    make_items(n, nkeys, hi, !last, items);
    model(items, last, base, tbase, cap, e_count, e_tree, e_drop, e_ovf);
    foreach (items[i]) inq.push_back(items[i]);
    @(negedge clk);
    item_end = WADDR_W'(n); wbase = WADDR_W'(base); tree_base = WADDR_W'(tbase);
    wcap = WADDR_W'(cap); last_stage = last; start = 1;
    @(negedge clk); start = 0;
    t0 = n_dones;
    while (n_dones == t0) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (evq.size() != 0 || inq.size() != 0 || int'(count) != e_count || int'(tree_ptr) != e_tree ||
        int'(dropped) != e_drop || int'(overflow) != e_ovf || int'(solutions) != n_sol) begin
      failures++;
      $display("FAIL %s: left %0d/%0d count %0d/%0d tree %0d/%0d drop %0d/%0d ovf %0d/%0d sol %0d/%0d",
               name, evq.size(), inq.size(), count, e_count, tree_ptr, e_tree, dropped, e_drop,
               overflow, e_ovf, solutions, n_sol);
    end
    $display("%s: %0d items, %0d written, %0d dropped, %0d overflow, %0d solutions so far",
             name, n, e_count, e_drop, e_ovf, n_sol);
    evq.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    run_case("intermediate", 300, 64, 256, 1'b0, 100000);
    run_case("capacity", 300, 40, 256, 1'b0, 60);
    run_case("last stage", 300, 50, 2, 1'b1, 100000);
    run_case("empty", 0, 4, 2, 1'b0, 100000);
    run_case("last stage again", 200, 30, 2, 1'b1, 100000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
