// blake2b_core_tb: checks the BLAKE2b core against published digests
// ("abc", 64-byte digest) and against digests of fixed one- and two-block
// messages with 53- and 64-byte outputs computed with an independent
// BLAKE2b implementation, then against the reference function on random
// one-block messages. Also checks the 26-cycle block latency.
module blake2b_core_tb;
  import tb_blake2b_pkg::*;

  logic clk = 0, rst = 1;
  logic init = 0, next_block = 0;
  logic [1023:0] block = '0;
  logic [6:0] digest_len = 7'd64;
  logic [63:0] total_len = '0;
  logic ready, digest_valid;
  logic [511:0] digest;
  int checks = 0, failures = 0;

  blake2b_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [511:0] got, input logic [511:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s\n got %h\n exp %h", what, got, exp);
    end
  endtask

  // Hash a byte queue, returns the masked digest and the cycles of the last block
  task automatic run(input byte unsigned msg[$], input int outlen,
                     output logic [511:0] dg, output int cyc);
    int nblk = (msg.size() + 127) / 128;
    if (nblk == 0) nblk = 1;
    digest_len = 7'(outlen);
    total_len  = 64'(msg.size());
    for (int b = 0; b < nblk; b++) begin
      block = '0;
      for (int j = 0; j < 128; j++)
        if (b*128 + j < msg.size()) block[8*j +: 8] = msg[b*128 + j];
      @(negedge clk);
      while (!ready) @(negedge clk);
      if (b == 0) init = 1; else next_block = 1;
      @(negedge clk);
      init = 0; next_block = 0;
      cyc = 1;
      while (!ready) begin @(negedge clk); cyc++; end
    end
    dg = '0;
    for (int i = 0; i < outlen; i++) dg[8*i +: 8] = digest[8*i +: 8];
  endtask

  initial begin
    byte unsigned q[$];
    logic [511:0] dg;
    logic seen_valid;
    int cyc;
    repeat (3) @(negedge clk);
    rst = 0;

    q = '{8'h61, 8'h62, 8'h63};
    run(q, 64, dg, cyc);
    check(dg, 512'h239900d4ed8623b95a92f1dba88ad31895cc3345ded552c22d79ab2a39c5877dd1a2ffdb6fbb124bb7c45a68142f214ce9f6129fb697276a0d4d1c983fa580ba, "abc");
    checks++;
    if (cyc != 26) begin failures++; $display("FAIL latency %0d, expected 26", cyc); end

    q = {};
    for (int i = 0; i < 200; i++) q.push_back(8'((i*7+3) & 255));
    run(q, 53, dg, cyc);
    check(dg, 512'h99f6303267e1a4ad0533aa82d3e1fa6d129001f23eb5db8f1e24df18c42682336351fc7ec916355d66bcee1ca045915465a974f1a3, "two blocks, 53 bytes");
    check(b2b(q, 53), dg, "reference function, two blocks");

    q = {};
    for (int i = 0; i < 128; i++) q.push_back(8'((i*13+1) & 255));
    run(q, 64, dg, cyc);
    check(dg, 512'h644abd63e6377c442cc7ce80c4296ee9c0671707881a3c771e9115e3ab905d5ab430a25446ee9be142de54c8ee08bf11991e48979da1914847e2ec1d193b59b7, "one full block");

    for (int t = 0; t < 40; t++) begin
      automatic int len = 1 + int'($urandom_range(0, 127));
      automatic int ol = 1 + int'($urandom_range(0, 63));
      q = {};
      for (int i = 0; i < len; i++) q.push_back(8'($urandom));
      run(q, ol, dg, cyc);
      check(dg, b2b(q, ol), "random message");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
