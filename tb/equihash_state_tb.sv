// equihash_state_tb: runs the main controller (K = 9) through two jobs with
// random step durations and checks the state sequence IDLE, BLAKE2B,
// (RADIX, COLLISION) x 9, DONE, IDLE; that each step gets exactly one start
// pulse; that it waits for both init_done and uart_done; last_stage and
// stage; one done pulse per job; and that the pointer submodule is advanced
// (radix base follows the buffer swaps).
module equihash_state_tb;
  import eq_pkg::*;
  localparam int K = 9;
  logic clk = 0, rst = 1;
  logic init_done = 0, uart_done = 0, work_ack;
  eq_state_e state;
  logic [3:0] stage;
  logic last_stage, blake2b_start, blake2b_done = 0, radix_start, radix_done = 0;
  logic collision_start, collision_done = 0, equihash_state_done;
  logic [31:0] collision_count = 32'd500, collision_tree_end = '0;
  logic [31:0] blake2b_base_addr, radix_base_addr, radix_scratch_addr, radix_end;
  logic [31:0] collision_rbase, collision_wbase, collision_end, tree_addr;
  int checks = 0, failures = 0;
  int n_b = 0, n_r = 0, n_c = 0, n_done = 0;

  equihash_state #(.K(K), .BUF_WORDS(1024), .NUM_ITEMS(512), .RADIX_PASS(3)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    n_b += blake2b_start; n_r += radix_start; n_c += collision_start; n_done += equihash_state_done;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %s stage %0d)", what, state.name(), stage); end
  endtask

  task automatic finish_step(ref logic d);
    repeat ($urandom_range(2, 20)) @(negedge clk);
    d = 1; @(negedge clk); d = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int job = 0; job < 2; job++) begin
      int b0, r0, c0;
      b0 = n_b;
      @(negedge clk);
      uart_done = 1;
      if (job == 0) begin
        repeat (5) @(negedge clk);
        chk(state == ST_IDLE, "waits for init_done");
        b0 = n_b;
        init_done = 1;
      end
      @(negedge clk);
      chk(state == ST_BLAKE2B, "enters BLAKE2B");
      uart_done = 0;
      r0 = n_r; c0 = n_c;
      finish_step(blake2b_done);
      chk(n_b == b0 + 1, "one blake2b_start");
      for (int s = 0; s < K; s++) begin
        logic [31:0] rb;
        chk(state == ST_RADIX, "enters RADIX");
        chk(last_stage == (s == K - 1), "last_stage");
        chk(stage == 4'(s), "stage counter");
        rb = radix_base_addr;
        finish_step(radix_done);
        chk(state == ST_COLLISION, "enters COLLISION");
        chk(n_r == r0 + s + 1, "one radix_start per stage");
        // three passes: sorted items are in the other buffer
        chk(collision_rbase == (rb == 0 ? 32'd1024 : 32'd0), "collision reads the sorted buffer");
        finish_step(collision_done);
        chk(n_c == c0 + s + 1, "one collision_start per stage");
      end
      chk(state == ST_DONE, "enters DONE");
      @(negedge clk);
      chk(state == ST_IDLE, "back to IDLE");
      chk(n_done == job + 1, "one done pulse per job");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
