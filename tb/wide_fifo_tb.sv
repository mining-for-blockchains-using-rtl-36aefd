// wide_fifo_tb: random pushes and pops on a 256-bit FIFO made of four
// 72-bit units, 8 deep, compared with a queue: data order, empty, full,
// count, and that pushes to a full FIFO and pops from an empty one are
// ignored.
module wide_fifo_tb;
  localparam int W = 256, D = 8;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int n_full = 0, n_empty = 0;

  wide_fifo #(.WIDTH(W), .UNIT_W(72), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int c = 0; c < 3000; c++) begin
      int bias;
      bias = (c / 300) % 2 ? 70 : 30;
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == D) || count != q.size() ||
          (q.size() > 0 && dout !== q[0])) begin
        failures++; $display("FAIL at %0d: size %0d count %0d empty %b full %b", c, q.size(), count, empty, full);
      end
      if (full) n_full++;
      if (empty) n_empty++;
      wr_en = ($urandom_range(0, 99) < bias);
      rd_en = ($urandom_range(0, 99) < 100 - bias);
      din = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      #1;
      begin
        bit pop, push;
        pop = rd_en && q.size() > 0;
        push = wr_en && q.size() < D;
        if (pop) void'(q.pop_front());
        if (push) q.push_back(din);
      end
    end
    checks++; if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL full/empty not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
