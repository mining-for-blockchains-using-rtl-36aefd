// radix_sort_run: testbench helper. Runs radix with its snoop for one
// radix width RB on KW-bit keys: NITEMS items with random keys are
// preloaded (snoop counting them), sorted in ceil(KW/RB) passes on a memory
// model that stalls at random and answers after a random latency, and the
// result (in the scratch area after an odd number of passes, back at the
// base after an even one) must be the stable sort worked out here. Then again with one item.
// Reports its checks, failures and the number of passes it saw (snoop
// resets) to the testbench that instantiates it.
module radix_sort_run #(
  parameter int RB = 7,
  parameter int KW = 21,
  parameter int NITEMS = 600
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   passes
);
  import eq_pkg::*;
  localparam int RP = (KW + RB - 1) / RB, NB = 1 << RB;
  localparam int BASE = 0, SCR = 4096;
  // an odd number of passes leaves the result in the scratch area
  localparam int OUT = (RP % 2) ? SCR : BASE;
  logic rst = 1, radix_start = 0, radix_done;
  logic [31:0] radix_end = '0;
  logic [31:0] bucket_base [NB];
  logic rrsend, rrready, rrvalid, wrvalid, wrready;
  logic [31:0] rraddr, wraddr;
  logic [WORD_W-1:0] rrdata, wrdata;
  logic [3:0] snoop_pass;
  logic snoop_rst;
  // snoop inputs: the testbench while preloading, radix while sorting
  logic pre_valid = 0, sorting = 0;
  logic [WORD_W-1:0] pre_data = '0;

  radix #(.RADIX_BITS(RB), .RADIX_PASS(RP), .KEY_W(KW), .FIFO_DEPTH(8)) dut (
    .clk, .rst, .radix_start, .radix_done,
    .radix_base_addr(32'(BASE)), .radix_scratch_addr(32'(SCR)), .radix_end, .bucket_base,
    .rrsend, .rraddr, .rrready, .rrdata, .rrvalid,
    .wraddr, .wrdata, .wrvalid, .wrready, .snoop_pass, .snoop_rst);

  snoop #(.RADIX_BITS(RB), .RADIX_PASS(RP), .KEY_W(KW)) u_snoop (
    .clk, .rst, .snoop_rst,
    .pass_cnt(sorting ? snoop_pass : 4'd0),
    .wvalid(sorting ? (wrvalid && wrready) : pre_valid),
    .wdata(sorting ? wrdata : pre_data),
    .bucket_base);


  // memory model: one command per cycle, write first
  logic [WORD_W-1:0] mem [int];
  typedef struct { int due; logic [WORD_W-1:0] d; } rd_t;
  rd_t rq[$];
  int cyc = 0, n_reads = 0, n_writes = 0, n_done = 0;
  logic rdy;
  always @(negedge clk) rdy = ($urandom_range(0, 99) < 75);
  assign wrready = rdy && wrvalid;
  assign rrready = rdy && !wrvalid && rrsend;
  always @(posedge clk) begin
    cyc++;
    rrvalid <= 1'b0;
    // requests are ignored during reset, when the sorter's state is not yet defined
    if (!rst && wrvalid && wrready) begin mem[wraddr] = wrdata; n_writes++; end
    if (!rst && rrsend && rrready) begin
      rd_t r;
      r.due = cyc + $urandom_range(3, 15);
      if (rq.size() > 0 && r.due < rq[$].due) r.due = rq[$].due;
      r.d = mem.exists(rraddr) ? mem[rraddr] : '0;
      rq.push_back(r);
      n_reads++;
    end
    if (rq.size() > 0 && rq[0].due <= cyc) begin
      rrdata <= rq[0].d; rrvalid <= 1'b1; void'(rq.pop_front());
    end
    if (radix_done) n_done++;
  end


  initial begin
    int sizes[2] = '{NITEMS, 1};
    checks = 0; failures = 0; passes = 0; finished = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 2; t++) begin
      automatic logic [WORD_W-1:0] items[$], exp[$];
      automatic int n = sizes[t];
      mem.delete();
      // preload
      for (int i = 0; i < n; i++) begin
        logic [WORD_W-1:0] d;
        d = {32'(i), {7{$urandom}}};
        items.push_back(d);
        mem[BASE + i] = d;
        @(negedge clk); pre_valid = 1; pre_data = d;
      end
      @(negedge clk); pre_valid = 0;
      // stable sort by key, worked out here
      foreach (items[i]) begin  // stable insertion sort
        automatic int pos = exp.size();
        while (pos > 0 && exp[pos - 1][KW-1:0] > items[i][KW-1:0]) pos--;
        exp.insert(pos, items[i]);
      end
      radix_end = 32'(n);
      n_reads = 0; n_writes = 0; n_done = 0;
      sorting = 1;
      @(negedge clk); radix_start = 1; @(negedge clk); radix_start = 0;
      while (n_done == 0) @(posedge clk);
      repeat (20) @(posedge clk);
      sorting = 0;
      checks++;
      if (n_done != 1 || n_reads != RP * n || n_writes != RP * n) begin
        failures++; $display("FAIL %0d items: done %0d reads %0d writes %0d", n, n_done, n_reads, n_writes);
      end
      for (int i = 0; i < n; i++) begin
        checks++;
        if (!mem.exists(OUT + i) || mem[OUT + i] !== exp[i]) begin
          failures++;
          if (failures < 10) $display("FAIL position %0d key %h idx %0d expected key %h idx %0d", i, mem[OUT + i][KW-1:0], mem[OUT + i][255:224], exp[i][KW-1:0], exp[i][255:224]);
        end
      end
    end
    finished = 1;
  end
  always @(posedge clk) if (snoop_rst && !rst) passes++;
endmodule
