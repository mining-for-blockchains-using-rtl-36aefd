// collision_configs_tb: collision_store with the three collision limits the
// document compares (4, 6 and 7 items held per run of equal key; 7 is the
// design's default). Each limit runs in its own collision_store_run
// instance, all in parallel on one clock, through intermediate stages with
// and without enough capacity, last stages with solutions and an empty
// stage, against a model of the pairing, dropping and overflow rules. The
// test also requires that each limit actually dropped items in the
// intermediate stages, so the limit was reached.
module collision_configs_tb;
  localparam int NCFG = 3;
  localparam int MCS [NCFG] = '{4, 6, 7};
  logic clk = 0;
  always #5 clk = ~clk;
  logic fin [NCFG];
  int ch [NCFG], fl [NCFG], dr [NCFG];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    collision_store_run #(.MC(MCS[g])) u_run (
      .clk, .finished(fin[g]), .checks(ch[g]), .failures(fl[g]));
    // largest dropped count seen over the run (the counter restarts per stage)
    always @(posedge clk)
      if (!u_run.rst && int'(u_run.dropped) > dr[g]) dr[g] = int'(u_run.dropped);
  end

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    for (int g = 0; g < NCFG; g++)
      $display("watchdog expired: MAX_COLL %0d finished %0b", MCS[g], fin[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bit all;
    for (int g = 0; g < NCFG; g++) dr[g] = 0;
    repeat (2) @(posedge clk);
    do begin
      @(posedge clk);
      all = 1;
      for (int g = 0; g < NCFG; g++) all &= fin[g];
    end while (!all);
    for (int g = 0; g < NCFG; g++) begin
      checks += ch[g] + 1;
      failures += fl[g];
      if (dr[g] == 0) begin
        failures++;
        $display("FAIL MAX_COLL %0d never dropped an item", MCS[g]);
      end
      $display("MAX_COLL %0d: %0d checks, %0d failures, up to %0d dropped in a stage",
               MCS[g], ch[g], fl[g], dr[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
