// equihash_top_tb: end-to-end test of the miner at reduced size (N=40, K=4:
// L=8, 512 items; 3-bit radix, so three sort passes; buffers of 512 words).
// A host model sends jobs over UART, a DDR3 user-interface model with random
// stalls serves the memory, and every solution line coming back is checked
// independently: the testbench recomputes the BLAKE2b items of the 2^K
// indices and checks that they XOR to zero and that every aligned group of
// 2^s indices XORs to zero on its low s*L bits (the Wagner pattern).
// Jobs are sent until solutions have been found and the buffer capacity
// was hit; the run must also see every mechanism: memory stalls, all sort
// passes, tree reads, dropped items beyond the collision limit, pairs discarded at the buffer capacity and
// several indices queued for the UART.
module equihash_top_tb;
  import tb_blake2b_pkg::*;
  import eq_pkg::*;

  localparam int N = 40, K = 4, L = N / (K + 1);
  localparam int RADIX_BITS = 3, MAX_COLL = 7, BUF_WORDS = 512;
  localparam int WORK_BYTES = 8;
  localparam int CPB = 16;
  localparam int MAX_JOBS = 8;

  logic clk = 0, rst = 1;
  logic rx = 1, tx;
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

  equihash_top #(
    .N(N), .K(K), .RADIX_BITS(RADIX_BITS), .MAX_COLL(MAX_COLL), .BUF_WORDS(BUF_WORDS),
    .WORK_BYTES(WORK_BYTES), .CLK_FREQ(CPB * 1000), .BAUD(1000)
  ) dut (.*);

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

  // ---------------- host model: send ----------------
  task automatic send_byte(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (CPB) @(posedge clk);
    end
  endtask

  function automatic logic [7:0] hexc(input logic [3:0] n);
    return (n < 10) ? 8'h30 + 8'(n) : 8'h61 + 8'(n) - 8'd10;  // lower case on purpose
  endfunction

  task automatic send_job(input logic [WORK_BYTES*8-1:0] w);
    for (int i = WORK_BYTES * 2 - 1; i >= 0; i--) send_byte(hexc(w[4*i +: 4]));
    send_byte(8'h0A);
  endtask

  // ---------------- host model: receive ----------------
  int unsigned lines[$];
  int bad_chars = 0;
  initial begin
    logic [7:0] b;
    int unsigned val;
    int nch;
    val = 0; nch = 0;
    forever begin
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = tx;
      end
      repeat (CPB) @(posedge clk);
      if (b == 8'h0A) begin
        if (nch != 8) bad_chars++;
        lines.push_back(val);
        val = 0; nch = 0;
      end else begin
        nch++;
        if (b >= "0" && b <= "9") val = (val << 4) | 32'(b - "0");
        else if (b >= "A" && b <= "F") val = (val << 4) | 32'(b - "A" + 10);
        else bad_chars++;
      end
    end
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
    if (dut.u_equihash.u_radix.snoop_rst) n_pass++;
    if (dut.u_equihash.u_collision.kst == 3'(4) && app_rdy) n_tree_reads++;  // K_READ accepted
    if (dut.u_comm_uart.f_count > 1) n_full++;  // several indices waiting for the line
  end

  int unsigned max_dropped = 0, max_overflow = 0;
  always @(posedge clk) if (!rst && dut.u_equihash.u_collision.collision_done) begin
    if (dropped > max_dropped) max_dropped = dropped;
    if (overflow > max_overflow) max_overflow = overflow;
  end

  initial begin
    logic [WORK_BYTES*8-1:0] work;
    int found = 0, sol_before, stages_seen;
    repeat (5) @(posedge clk);
    rst = 0;
    for (int job = 0; job < MAX_JOBS && (found < 3 || job < 2 || max_overflow == 0); job++) begin
      int nsol, t0;
      work = {$urandom, $urandom};
      sol_before = solutions;
      lines.delete();
      send_job(work);
      t0 = 0;
      while (!done) @(posedge clk);
      n_jobs++;
      // all K stages ran
      checks++;
      if (stage != 4'(K)) begin failures++; $display("FAIL stage counter %0d", stage); end
      nsol = solutions - sol_before;
      // wait until every line is out
      while (lines.size() < nsol * (1 << K) && t0 < 200000 + nsol * (1 << K) * 200 * CPB) begin @(posedge clk); t0++; end
      repeat (20 * CPB) @(posedge clk);
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
    checks++;
    if (bad_chars != 0) begin failures++; $display("FAIL %0d malformed output characters", bad_chars); end
    $display("jobs %0d, solutions %0d, sort passes %0d, memory stall cycles %0d, tree reads %0d, max dropped %0d, max overflow %0d, cycles with indices queued %0d, solutions with repeated indices %0d",
             n_jobs, found, n_pass, mem.stall_cycles, n_tree_reads, max_dropped, max_overflow, n_full, n_trivial);
    checks++; if (found == 0) begin failures++; $display("FAIL no solution found"); end
    checks++; if (n_pass != n_jobs * K * ((L + RADIX_BITS - 1) / RADIX_BITS)) begin failures++; $display("FAIL pass count"); end
    checks++; if (mem.stall_cycles == 0) begin failures++; $display("FAIL no memory stall"); end
    checks++; if (n_tree_reads == 0) begin failures++; $display("FAIL no tree read"); end
    checks++; if (n_full == 0) begin failures++; $display("FAIL solution FIFO never held several indices"); end
    checks++; if (max_dropped == 0) begin failures++; $display("FAIL collision limit never reached"); end
    checks++; if (max_overflow == 0) begin failures++; $display("FAIL buffer capacity never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
