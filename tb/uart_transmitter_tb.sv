// uart_transmitter_tb: sends random bytes at 115,200 baud from a 200 MHz
// clock and decodes the line in the middle of every bit: start bit 0, data
// LSB first, stop bit 1, idle 1; checks that a frame lasts exactly ten
// periods of 1,736 cycles and that a start while busy is ignored.
module uart_transmitter_tb;
  localparam int CPB = 200_000_000 / 115_200;
  logic clk = 0, rst = 1, start = 0;
  logic [7:0] data = '0;
  logic busy, tx;
  int checks = 0, failures = 0;
  int busy_cycles = 0;
  always @(posedge clk) if (busy) busy_cycles++;

  uart_transmitter dut (.*);
  always #2.5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    @(negedge clk);
    checks++; if (tx !== 1'b1) begin failures++; $display("FAIL idle line not high"); end
    for (int n = 0; n < 10; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      logic [9:0] seen;
      int len;
      @(negedge clk);
      busy_cycles = 0;
      data = b; start = 1;
      @(negedge clk);
      start = 0;
      data = ~b;
      // a start while busy must not disturb the frame
      start = 1; @(negedge clk); start = 0;
      repeat (CPB / 2 - 2) @(negedge clk);
      for (int i = 0; i < 10; i++) begin
        seen[i] = tx;
        if (i < 9) repeat (CPB) @(negedge clk);
      end
      checks++;
      if (seen !== {1'b1, b, 1'b0}) begin failures++; $display("FAIL frame %b for %h", seen, b); end
      while (busy) @(negedge clk);
      checks++;
      if (busy_cycles != 10 * CPB) begin
        failures++; $display("FAIL frame length %0d", busy_cycles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
