// uart_receiver_tb: sends random bytes at 115,200 baud to a receiver clocked
// at 200 MHz (1,736 cycles per bit) and checks each byte, the time from the
// start edge to `valid` (about 9.5 bit periods: the middle of the stop
// bit), and that a frame with a broken stop bit is dropped.
module uart_receiver_tb;
  localparam int CPB = 200_000_000 / 115_200;
  logic clk = 0, rst = 1, rx = 1;
  logic [7:0] data;
  logic valid;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  int unsigned got_cnt = 0, got_time;
  logic [7:0] got;

  uart_receiver dut (.*);
  always #2.5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (valid) begin got = data; got_cnt++; got_time = cyc; end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input logic [7:0] b, input logic stop, output int unsigned t0);
    @(posedge clk);
    t0 = cyc;
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = stop; repeat (CPB) @(posedge clk);
    rx = 1; repeat (CPB) @(posedge clk);
  endtask

  initial begin
    int unsigned t0, n_before;
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (10) @(posedge clk);
    for (int n = 0; n < 12; n++) begin
      automatic logic [7:0] b = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : 8'($urandom);
      n_before = got_cnt;
      frame(b, 1'b1, t0);
      checks++;
      if (got_cnt != n_before + 1 || got !== b) begin
        failures++; $display("FAIL byte %h got %h (%0d frames)", b, got, got_cnt - n_before);
      end
      checks++;
      if (got_time - t0 < 9 * CPB + CPB / 2 || got_time - t0 > 9 * CPB + CPB / 2 + 6) begin
        failures++; $display("FAIL valid %0d cycles after start edge", got_time - t0);
      end
    end
    n_before = got_cnt;
    frame(8'hA5, 1'b0, t0);
    checks++;
    if (got_cnt != n_before) begin failures++; $display("FAIL frame with bad stop bit accepted"); end
    frame(8'h5A, 1'b1, t0);
    checks++;
    if (got !== 8'h5A) begin failures++; $display("FAIL no recovery after bad frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
