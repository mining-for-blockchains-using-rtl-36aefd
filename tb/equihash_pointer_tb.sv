// equihash_pointer_tb: plays the events of a job (start, radix done,
// collision done with new counts) for an odd and an even number of sort
// passes and checks every pointer against the memory map worked out by
// hand: MEM_BUF0 at 0, MEM_BUF1 at BUF_WORDS, MEM_BUF2 at 2*BUF_WORDS.
module equihash_pointer_tb;
  localparam int BW = 1000, NI = 512;
  logic clk = 0, rst = 1;
  logic job_start = 0, radix_done = 0, collision_done = 0;
  logic [31:0] collision_count = '0, collision_tree_end = '0;
  logic [31:0] b2[2], rb[2], rs[2], re[2], cr[2], cw[2], ce[2], ta[2];
  int checks = 0, failures = 0;

  equihash_pointer #(.BUF_WORDS(BW), .NUM_ITEMS(NI), .RADIX_PASS(3)) odd_p (
    .clk, .rst, .job_start, .radix_done, .collision_done, .collision_count, .collision_tree_end,
    .blake2b_base_addr(b2[0]), .radix_base_addr(rb[0]), .radix_scratch_addr(rs[0]), .radix_end(re[0]),
    .collision_rbase(cr[0]), .collision_wbase(cw[0]), .collision_end(ce[0]), .tree_addr(ta[0]));
  equihash_pointer #(.BUF_WORDS(BW), .NUM_ITEMS(NI), .RADIX_PASS(2)) even_p (
    .clk, .rst, .job_start, .radix_done, .collision_done, .collision_count, .collision_tree_end,
    .blake2b_base_addr(b2[1]), .radix_base_addr(rb[1]), .radix_scratch_addr(rs[1]), .radix_end(re[1]),
    .collision_rbase(cr[1]), .collision_wbase(cw[1]), .collision_end(ce[1]), .tree_addr(ta[1]));

  always #5 clk = ~clk;
  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int i, input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s (%s passes): %0d vs %0d", what, i ? "even" : "odd", got, exp); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    int items [2];
    int cur [2];   // buffer holding the items, modelled here
    int tree;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int job = 0; job < 2; job++) begin
      pulse(job_start);
      cur = '{0, 0}; items = '{NI, NI}; tree = 2 * BW;
      for (int st = 0; st < 4; st++) begin
        for (int i = 0; i < 2; i++) begin
          chk(i, b2[i], 0, "blake2b base");
          chk(i, rb[i], cur[i] * BW, "radix base");
          chk(i, rs[i], (1 - cur[i]) * BW, "radix scratch");
          chk(i, re[i], items[i], "radix end");
        end
        pulse(radix_done);
        // three passes end in the scratch buffer, two passes back in the base one
        cur[0] = 1 - cur[0];
        for (int i = 0; i < 2; i++) begin
          chk(i, cr[i], cur[i] * BW, "collision read base");
          chk(i, cw[i], (1 - cur[i]) * BW, "collision write base");
          chk(i, ce[i], items[i], "collision end");
          chk(i, ta[i], tree, "tree pointer");
        end
        collision_count = 400 + 10 * st + job;
        collision_tree_end = tree + 300 + st;
        pulse(collision_done);
        tree = tree + 300 + st;
        for (int i = 0; i < 2; i++) begin
          cur[i] = 1 - cur[i];
          items[i] = 400 + 10 * st + job;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
