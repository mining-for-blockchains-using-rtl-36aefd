// mem_gasket_tb: drives random traffic on all five interfaces in every state
// and checks the controller side against the routing rules worked out here:
// owner chosen by the state, write before read, write only with data room,
// address = word address * 4, data and valid routed back only to the owner,
// ready only to the owner, and the snoop tap (item writes only).
module mem_gasket_tb;
  import eq_pkg::*;
  logic clk = 0, rst = 1;
  eq_state_e state;
  logic [APP_ADDR_W-1:0] app_addr;
  logic [2:0] app_cmd;
  logic app_en, app_rdy, app_wdf_wren, app_wdf_end, app_wdf_rdy, app_rd_data_valid;
  logic [WORD_W-1:0] app_wdf_data, app_rd_data;
  logic [WADDR_W-1:0] wbaddr, wraddr, rraddr, wcaddr, rcaddr;
  logic [WORD_W-1:0] wbdata, wrdata, rrdata, wcdata, rcdata;
  logic wbvalid, wbready, wrvalid, wrready, rrsend, rrready, rrvalid;
  logic wcvalid, wctree, wcready, rcsend, rcready, rcvalid;
  logic snoop_wvalid;
  logic [WORD_W-1:0] snoop_wdata;
  int checks = 0, failures = 0;

  mem_gasket dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [WORD_W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s state %s: %h vs %h", what, state.name(), got, exp); end
  endtask

  initial begin
    eq_state_e states[5] = '{ST_IDLE, ST_BLAKE2B, ST_RADIX, ST_COLLISION, ST_DONE};
    repeat (2) @(posedge clk);
    rst = 0;
    for (int c = 0; c < 4000; c++) begin
      logic ew, er, ww, wi;
      logic [WADDR_W-1:0] wa, ra;
      logic [WORD_W-1:0] wd;
      @(negedge clk);
      state = states[$urandom_range(0, 4)];
      {wbvalid, wrvalid, wcvalid, rrsend, rcsend, wctree} = 6'($urandom);
      {app_rdy, app_wdf_rdy, app_rd_data_valid} = 3'($urandom);
      wbaddr = $urandom & 32'h3FFFFFF; wraddr = $urandom & 32'h3FFFFFF; wcaddr = $urandom & 32'h3FFFFFF;
      rraddr = $urandom & 32'h3FFFFFF; rcaddr = $urandom & 32'h3FFFFFF;
      wbdata = {8{$urandom}}; wrdata = {8{$urandom}}; wcdata = {8{$urandom}};
      app_rd_data = {8{$urandom}};
      #1;
      // independent model of the routing
      ww = 0; er = 0; wa = '0; ra = '0; wd = '0; wi = 0;
      case (state)
        ST_BLAKE2B:   begin ww = wbvalid; wa = wbaddr; wd = wbdata; wi = 1; end
        ST_RADIX:     begin ww = wrvalid; wa = wraddr; wd = wrdata; wi = 1; er = rrsend; ra = rraddr; end
        ST_COLLISION: begin ww = wcvalid; wa = wcaddr; wd = wcdata; wi = !wctree; er = rcsend; ra = rcaddr; end
        default: ;
      endcase
      ew = ww && app_wdf_rdy;
      expect_eq(app_en, ew || (er && !ww), "app_en");
      if (ew) begin
        expect_eq(app_cmd, 3'b000, "write cmd");
        expect_eq(app_addr, APP_ADDR_W'(wa) << 2, "write addr");
        expect_eq(app_wdf_data, wd, "write data");
        expect_eq(app_wdf_wren, app_rdy, "wren");
      end else if (er && !ww) begin
        expect_eq(app_cmd, 3'b001, "read cmd");
        expect_eq(app_addr, APP_ADDR_W'(ra) << 2, "read addr");
        expect_eq(app_wdf_wren, 0, "no wren on read");
      end
      expect_eq(wbready, state == ST_BLAKE2B && ew && app_rdy, "wbready");
      expect_eq(wrready, state == ST_RADIX && ew && app_rdy, "wrready");
      expect_eq(wcready, state == ST_COLLISION && ew && app_rdy, "wcready");
      expect_eq(rrready, state == ST_RADIX && er && !ww && app_rdy, "rrready");
      expect_eq(rcready, state == ST_COLLISION && er && !ww && app_rdy, "rcready");
      expect_eq(rrvalid, state == ST_RADIX && app_rd_data_valid, "rrvalid");
      expect_eq(rcvalid, state == ST_COLLISION && app_rd_data_valid, "rcvalid");
      if (state == ST_RADIX) expect_eq(rrdata, app_rd_data, "rrdata");
      if (state == ST_COLLISION) expect_eq(rcdata, app_rd_data, "rcdata");
      expect_eq(snoop_wvalid, ew && app_rdy && wi, "snoop_wvalid");
      if (snoop_wvalid) expect_eq(snoop_wdata, wd, "snoop_wdata");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
