// equihash_tb: the mining core without the UART link, at reduced size
// (N=40, K=4: L=8, 512 items; 3-bit radix, three sort passes; buffers of
// 512 words). Jobs are given on work_valid/work_data, a DDR3 user-interface
// model with random stalls serves the memory and the index output is taken
// with a random ready. Every solution is checked independently: the
// testbench recomputes the BLAKE2b items of its 2^K indices and checks that
// they XOR to zero and that every aligned group of 2^s indices XORs to zero
// on its low s*L bits. Jobs are given until solutions were found and a
// stage has hit the buffer capacity; the run must also show memory stalls,
// every sort pass, tree reads, dropped items and a waiting index output.
module equihash_tb;
  import tb_blake2b_pkg::*;
  import eq_pkg::*;

  localparam int N = 40, K = 4, L = N / (K + 1);
  localparam int RADIX_BITS = 3, MAX_COLL = 7, BUF_WORDS = 512;
  localparam int WORK_BYTES = 8;
  localparam int MAX_JOBS = 16;

  logic clk = 0, rst = 1;
  logic work_valid = 0, work_ack, sol_valid, sol_ready;
  logic [WORK_BYTES*8-1:0] work_data = '0;
  logic [31:0] sol_index;
  logic init_calib_complete, app_en, app_rdy, app_wdf_wren, app_wdf_end, app_wdf_rdy, app_rd_data_valid;
  logic [27:0] app_addr;
  logic [2:0] app_cmd;
  logic [255:0] app_wdf_data, app_rd_data;
  eq_state_e state;
  logic [3:0] stage;
  logic done;
  logic [31:0] dropped, overflow, solutions;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  equihash #(
    .N(N), .K(K), .RADIX_BITS(RADIX_BITS), .MAX_COLL(MAX_COLL), .BUF_WORDS(BUF_WORDS),
    .WORK_BYTES(WORK_BYTES)
  ) dut (.*, .init_done(init_calib_complete));

  ddr3_ui_model #(.LATENCY(12), .STALL_PCT(15)) mem (
    .clk, .rst, .init_calib_complete, .app_addr, .app_cmd, .app_en, .app_rdy,
    .app_wdf_data, .app_wdf_wren, .app_wdf_end, .app_wdf_rdy,
    .app_rd_data, .app_rd_data_valid);

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- job source and index sink ----------------
  task automatic send_job(input logic [WORK_BYTES*8-1:0] w);
    @(negedge clk);
    work_data = w; work_valid = 1;
    do @(posedge clk); while (!work_ack);  // sampled before the edge's updates
    @(negedge clk); work_valid = 0;
  endtask

  int unsigned lines[$];
  logic srdy = 0;
  always @(negedge clk) srdy = ($urandom_range(0, 99) < 30);
  assign sol_ready = srdy;
  int n_wait = 0;
  always @(posedge clk) begin
    if (sol_valid && sol_ready) lines.push_back(sol_index);
    if (sol_valid && !sol_ready) n_wait++;
  end

  // ---------------- reference items ----------------
  function automatic logic [N-1:0] item(input logic [WORK_BYTES*8-1:0] w, input int unsigned idx);
    byte unsigned q[$];
    logic [511:0] d;
    for (int j = WORK_BYTES - 1; j >= 0; j--) q.push_back(w[8*j +: 8]);
    for (int j = 0; j < 4; j++) q.push_back(8'((idx / 2) >> (8*j)));
    d = b2b(q, (2 * N + 7) / 8);
    return (idx % 2) ? d[2*N-1:N] : d[N-1:0];
  endfunction

  // ---------------- mechanism counters ----------------
  int n_trivial = 0, n_pass = 0, n_tree_reads = 0, n_full = 0, n_jobs = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_radix.snoop_rst) n_pass++;
    if (dut.u_collision.kst == 3'(4) && app_rdy) n_tree_reads++;  // K_READ accepted
  end

  int unsigned max_dropped = 0, max_overflow = 0;
  always @(posedge clk) if (!rst && dut.u_collision.collision_done) begin
    if (dropped > max_dropped) max_dropped = dropped;
    if (overflow > max_overflow) max_overflow = overflow;
  end

  initial begin
    logic [WORK_BYTES*8-1:0] work;
    int found = 0, sol_before, stages_seen;
    repeat (5) @(posedge clk);
    rst = 0;
    for (int job = 0; job < MAX_JOBS && (found < 3 || job < 2 || max_overflow == 0); job++) begin
      int nsol;
      work = {$urandom, $urandom};
      sol_before = solutions;
      lines.delete();
      send_job(work);
      while (!done) @(posedge clk);
      n_jobs++;
      // all K stages ran
      checks++;
      if (stage != 4'(K)) begin failures++; $display("FAIL stage counter %0d", stage); end
      nsol = solutions - sol_before;
      // wait until every line is out
      repeat (20) @(posedge clk);
      checks++;
      if (lines.size() != nsol * (1 << K)) begin
        failures++;
        $display("FAIL job %0d: %0d lines for %0d solutions", job, lines.size(), nsol);
      end
      $display("job %0d work %h: %0d solutions, dropped %0d overflow %0d", job, work, nsol, dropped, overflow);
      for (int s = 0; s < nsol && (s + 1) * (1 << K) <= lines.size(); s++) begin
        logic [N-1:0] h [1 << K];
        for (int i = 0; i < (1 << K); i++) h[i] = item(work, lines[s * (1 << K) + i]);
        for (int lvl = 1; lvl <= K; lvl++) begin
          automatic int gsz = 1 << lvl;
          automatic int bits = (lvl == K) ? N : lvl * L;
          for (int g = 0; g < (1 << K); g += gsz) begin
            automatic logic [N-1:0] x = '0;
            for (int i = 0; i < gsz; i++) x ^= h[g + i];
            checks++;
            if ((x & ((N'(1) << bits) - 1'b1)) != '0 && bits < N || (bits == N && x != '0)) begin
              failures++;
              $display("FAIL job %0d solution %0d level %0d group %0d: xor %h", job, s, lvl, g, x);
            end
          end
        end
        found++;
        begin
          automatic bit rep = 0;
          for (int i = 0; i < (1 << K); i++)
            for (int j2 = i + 1; j2 < (1 << K); j2++)
              if (lines[s * (1 << K) + i] == lines[s * (1 << K) + j2]) rep = 1;
          if (rep) n_trivial++;
        end
      end
    end
    checks++;
    if (mem.errors != 0) begin failures++; $display("FAIL %0d protocol errors at the memory", mem.errors); end
    $display("jobs %0d, solutions %0d, sort passes %0d, memory stall cycles %0d, tree reads %0d, max dropped %0d, max overflow %0d, cycles with an index waiting %0d, solutions with repeated indices %0d",
             n_jobs, found, n_pass, mem.stall_cycles, n_tree_reads, max_dropped, max_overflow, n_wait, n_trivial);
    checks++; if (found == 0) begin failures++; $display("FAIL no solution found"); end
    checks++; if (n_pass != n_jobs * K * ((L + RADIX_BITS - 1) / RADIX_BITS)) begin failures++; $display("FAIL pass count"); end
    checks++; if (mem.stall_cycles == 0) begin failures++; $display("FAIL no memory stall"); end
    checks++; if (n_tree_reads == 0) begin failures++; $display("FAIL no tree read"); end
    checks++; if (n_wait == 0) begin failures++; $display("FAIL index output never waited"); end
    checks++; if (max_overflow == 0) begin failures++; $display("FAIL buffer capacity never reached"); end
    checks++; if (max_dropped == 0) begin failures++; $display("FAIL collision limit never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
