// radix_configs_tb: the radix sorter and its snoop counter at every radix
// width the document compares for 21-bit keys in its sort table: 4 to 11
// bits per pass, that is 6, 5, 4, 3, 3, 3, 3 and 2 passes. Each width runs
// in its own radix_sort_run instance, all in parallel on one clock: 500
// random items and then a single item are sorted against a memory model
// with random stalls and latency, and the output must equal a stable sort
// by key. Each instance must also have seen exactly ceil(21/width) snoop
// resets per sort. The widths come from the document; 7 bits is the
// design's default, the others are only parameter changes.
module radix_configs_tb;
  localparam int KW = 21, NCFG = 8;
  localparam int RBS [NCFG] = '{4, 5, 6, 7, 8, 9, 10, 11};
  logic clk = 0;
  always #5 clk = ~clk;
  logic fin [NCFG];
  int ch [NCFG], fl [NCFG], ps [NCFG];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    radix_sort_run #(.RB(RBS[g]), .KW(KW), .NITEMS(500)) u_run (
      .clk, .finished(fin[g]), .checks(ch[g]), .failures(fl[g]), .passes(ps[g]));
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    for (int g = 0; g < NCFG; g++)
      $display("watchdog expired: %0d-bit radix finished %0b, %0d passes", RBS[g], fin[g], ps[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bit all;
    repeat (2) @(posedge clk);
    do begin
      @(posedge clk);
      all = 1;
      for (int g = 0; g < NCFG; g++) all &= fin[g];
    end while (!all);
    for (int g = 0; g < NCFG; g++) begin
      automatic int rp = (KW + RBS[g] - 1) / RBS[g];
      checks += ch[g] + 1;
      failures += fl[g];
      if (ps[g] != 2 * rp) begin
        failures++;
        $display("FAIL %0d-bit radix: %0d passes, expected %0d", RBS[g], ps[g], 2 * rp);
      end
      $display("%0d-bit radix: %0d passes per sort, %0d checks, %0d failures",
               RBS[g], ps[g] / 2, ch[g], fl[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
