// snoop_tb: random item writes with a 3-bit radix, 3 passes, 8-bit key;
// checks after each snoop_rst that bucket_base[x] equals the number of
// items written since the previous reset whose digit for the selected pass
// is below x, and that writes with pass >= RADIX_PASS are not counted.
module snoop_tb;
  import eq_pkg::*;
  localparam int RB = 3, RP = 3, KW = 8, NB = 1 << RB;
  logic clk = 0, rst = 1, snoop_rst = 0, wvalid = 0;
  logic [3:0] pass_cnt = '0;
  logic [WORD_W-1:0] wdata = '0;
  logic [WADDR_W-1:0] bucket_base [NB];
  int checks = 0, failures = 0;

  snoop #(.RADIX_BITS(RB), .RADIX_PASS(RP), .KEY_W(KW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt [NB];
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk); snoop_rst = 1; @(negedge clk); snoop_rst = 0;
    for (int round = 0; round < 12; round++) begin
      automatic int p = round % 4;   // 3 is beyond RADIX_PASS
      cnt = '{default: 0};
      pass_cnt = 4'(p);
      repeat ($urandom_range(1, 300)) begin
        logic [WORD_W-1:0] d;
        int dig;
        d = {8{$urandom}};
        wvalid = $urandom_range(0, 3) != 0;
        wdata = d;
        // the key is the low 8 bits; digit 2 has only bits 6..7
        dig = (int'(d[KW-1:0]) >> (RB * p)) & (NB - 1);
        if (wvalid && p < RP) cnt[dig]++;
        @(negedge clk);
      end
      wvalid = 0;
      snoop_rst = 1; @(negedge clk); snoop_rst = 0;
      begin
        automatic int acc = 0;
        for (int x = 0; x < NB; x++) begin
          checks++;
          if (bucket_base[x] != 32'(acc)) begin
            failures++; $display("FAIL round %0d bucket %0d base %0d expected %0d", round, x, bucket_base[x], acc);
          end
          acc += cnt[x];
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
