// blake2b_tb: list generation at N=40, K=4 (256 hashes, 512 items) with
// the memory accepting writes at random. Every write is compared with the
// item recomputed by the reference BLAKE2b: address base + index, prefix of
// ten ones, 22-bit index, the right half of the digest. Checks that each
// index is written exactly once and that blake2b_done pulses once, after
// the last write; the generator is run twice to check it restarts.
module blake2b_tb;
  import tb_blake2b_pkg::*;
  import eq_pkg::*;
  localparam int N = 40, K = 4, L = N / (K + 1), WB = 8, NI = 1 << (L + 1);
  logic clk = 0, rst = 1, blake2b_start = 0, blake2b_done;
  logic [31:0] blake2b_base_addr = 32'd1000;
  logic [WB*8-1:0] uart_rdata;
  logic [31:0] wbaddr;
  logic [WORD_W-1:0] wbdata;
  logic wbvalid, wbready;
  int checks = 0, failures = 0;

  blake2b #(.N(N), .K(K), .WORK_BYTES(WB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] item(input logic [WB*8-1:0] w, input int unsigned idx);
    byte unsigned q[$];
    logic [511:0] d;
    for (int j = WB - 1; j >= 0; j--) q.push_back(w[8*j +: 8]);
    for (int j = 0; j < 4; j++) q.push_back(8'((idx / 2) >> (8*j)));
    d = b2b(q, (2 * N + 7) / 8);
    return (idx % 2) ? d[2*N-1:N] : d[N-1:0];
  endfunction

  logic [WORD_W-1:0] written [int];
  int n_done = 0, writes_after_done = 0;
  always @(posedge clk) begin
    wbready <= ($urandom_range(0, 99) < 70);
    if (wbvalid && wbready) begin
      if (n_done > 0) writes_after_done++;
      if (written.exists(wbaddr)) begin failures++; $display("FAIL address %0d written twice", wbaddr); end
      written[wbaddr] = wbdata;
    end
    if (blake2b_done) n_done++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int run = 0; run < 2; run++) begin
      uart_rdata = {$urandom, $urandom};
      written.delete();
      n_done = 0; writes_after_done = 0;
      @(negedge clk); blake2b_start = 1; @(negedge clk); blake2b_start = 0;
      while (n_done == 0) @(posedge clk);
      repeat (50) @(posedge clk);
      checks++; if (n_done != 1 || writes_after_done != 0) begin failures++; $display("FAIL done pulses %0d, writes after done %0d", n_done, writes_after_done); end
      checks++; if (written.num() != NI) begin failures++; $display("FAIL %0d items written", written.num()); end
      for (int i = 0; i < NI; i++) begin
        logic [WORD_W-1:0] exp;
        exp = '0;
        exp[255:224] = {10'h3FF, 22'(i)};
        exp[N-1:0] = item(uart_rdata, i);
        checks++;
        if (!written.exists(1000 + i) || written[1000 + i] !== exp) begin
          failures++; $display("FAIL item %0d: %h expected %h", i, written[1000 + i], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
