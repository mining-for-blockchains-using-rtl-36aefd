// comm_uart_tb: host-link test at 16 clock cycles per bit. Sends jobs as hex
// strings (upper and lower case, with a stray non-hex character) ended by a
// line feed and checks work_data and the work_valid/work_ack handshake;
// then queues solution indices faster than the line can send them and
// checks that every one comes back as eight upper-case hex characters and
// a line feed, in order.
module comm_uart_tb;
  localparam int CPB = 16;
  localparam int WB = 4;
  logic clk = 0, rst = 1, rx = 1, tx;
  logic work_valid, work_ack = 0;
  logic [WB*8-1:0] work_data;
  logic sol_valid = 0, sol_ready;
  logic [31:0] sol_index = '0;
  int checks = 0, failures = 0;

  comm_uart #(.CLK_FREQ(CPB * 1000), .BAUD(1000), .WORK_BYTES(WB), .SOL_DEPTH(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_byte(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rx = f[i]; repeat (CPB) @(posedge clk); end
  endtask
  task automatic send_str(input string s);
    for (int i = 0; i < s.len(); i++) send_byte(s[i]);
  endtask

  string lines[$];
  initial begin
    string cur = "";
    logic [7:0] b;
    forever begin
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = tx; end
      repeat (CPB) @(posedge clk);
      if (b == 8'h0A) begin lines.push_back(cur); cur = ""; end
      else cur = {cur, string'(b)};
    end
  end

  initial begin
    int unsigned idx[$];
    string exp_s;
    repeat (4) @(posedge clk);
    rst = 0;
    send_str("DEADBEEF\n");
    repeat (5) @(posedge clk);
    checks++; if (!work_valid || work_data !== 32'hDEADBEEF) begin failures++; $display("FAIL job 1 %h", work_data); end
    repeat (50) @(posedge clk);
    checks++; if (!work_valid) begin failures++; $display("FAIL work_valid dropped without ack"); end
    @(negedge clk); work_ack = 1; @(negedge clk); work_ack = 0;
    checks++; if (work_valid) begin failures++; $display("FAIL work_valid stays after ack"); end
    send_str("01a2-b3C4\n");
    repeat (5) @(posedge clk);
    checks++; if (!work_valid || work_data !== 32'h01A2B3C4) begin failures++; $display("FAIL job 2 %h", work_data); end

    // 12 indices offered back to back into an 8-deep FIFO
    for (int n = 0; n < 12; n++) begin
      automatic logic [31:0] v = (n == 0) ? 32'h0 : (n == 1) ? 32'h003FFFFF : $urandom;
      idx.push_back(v);
      @(negedge clk);
      sol_valid = 1; sol_index = v;
      @(posedge clk);
      while (!sol_ready) @(posedge clk);
      @(negedge clk);
      sol_valid = 0;
    end
    while (lines.size() < 12) @(posedge clk);
    for (int n = 0; n < 12; n++) begin
      checks++;
      exp_s = $sformatf("%08x", idx[n]);
      if (lines[n] != exp_s.toupper()) begin
        failures++; $display("FAIL line %0d '%s' expected %08X", n, lines[n], idx[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
