// mem_gasket: connects the simplified read and write interfaces of the
// blake2b, radix and collision steps to the single memory-controller user
// interface, choosing the owner by the main `state` (BLAKE2B: blake2b
// writes; RADIX: radix reads and writes; COLLISION: collision reads and
// writes; otherwise nothing).
//
// Write interface: w?addr (word address), w?data, w?valid, and w?ready,
// high in the cycle the controller accepts the command. Read interface:
// r?send, r?addr, r?ready (command accepted), and r?data/r?valid when the
// word returns (in order). Word addresses are multiplied by four for the
// controller, whose addresses count 64-bit units.
//
// A write goes out with its data in the same cycle as its command, and only
// when the controller's write-data FIFO has room; when the owner presents a
// write and a read in the same cycle the write goes first. The snoop tap
// repeats every accepted item write (not the collision step's tree-node
// writes, flagged by `wctree`).
// The state multiplexing and the interface names are the document's; the
// ready signals (which stand for its `memc_cmd_full`) and the write-first
// rule are this design's choices. Read data goes to both the radix and
// the collision ports unchanged (only the valid flags are routed), and
// app_addr[1:0] and app_cmd[2:1] are constant zero, so synthesis lists
// these outputs as tied to inputs or constants.
module mem_gasket
  import eq_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  eq_state_e             state,
  // memory controller user interface
  output logic [APP_ADDR_W-1:0] app_addr,
  output logic [2:0]            app_cmd,
  output logic                  app_en,
  input  logic                  app_rdy,
  output logic [WORD_W-1:0]     app_wdf_data,
  output logic                  app_wdf_wren,
  output logic                  app_wdf_end,
  input  logic                  app_wdf_rdy,
  input  logic [WORD_W-1:0]     app_rd_data,
  input  logic                  app_rd_data_valid,
  // blake2b write interface
  input  logic [WADDR_W-1:0]    wbaddr,
  input  logic [WORD_W-1:0]     wbdata,
  input  logic                  wbvalid,
  output logic                  wbready,
  // radix write and read interfaces
  input  logic [WADDR_W-1:0]    wraddr,
  input  logic [WORD_W-1:0]     wrdata,
  input  logic                  wrvalid,
  output logic                  wrready,
  input  logic                  rrsend,
  input  logic [WADDR_W-1:0]    rraddr,
  output logic                  rrready,
  output logic [WORD_W-1:0]     rrdata,
  output logic                  rrvalid,
  // collision write and read interfaces
  input  logic [WADDR_W-1:0]    wcaddr,
  input  logic [WORD_W-1:0]     wcdata,
  input  logic                  wcvalid,
  input  logic                  wctree,
  output logic                  wcready,
  input  logic                  rcsend,
  input  logic [WADDR_W-1:0]    rcaddr,
  output logic                  rcready,
  output logic [WORD_W-1:0]     rcdata,
  output logic                  rcvalid,
  // item writes seen by snoop
  output logic                  snoop_wvalid,
  output logic [WORD_W-1:0]     snoop_wdata
);
  logic [WADDR_W-1:0] waddr, raddr;
  logic [WORD_W-1:0]  wdata;
  logic               wvalid, witem, rsend;
  logic               do_write, do_read;

  // Figure-3.8 style multiplexers, selected by the state
  always_comb begin
    waddr = '0; wdata = '0; wvalid = 1'b0; witem = 1'b0;
    raddr = '0; rsend = 1'b0;
    unique case (state)
      ST_BLAKE2B: begin
        waddr = wbaddr; wdata = wbdata; wvalid = wbvalid; witem = 1'b1;
      end
      ST_RADIX: begin
        waddr = wraddr; wdata = wrdata; wvalid = wrvalid; witem = 1'b1;
        raddr = rraddr; rsend = rrsend;
      end
      ST_COLLISION: begin
        waddr = wcaddr; wdata = wcdata; wvalid = wcvalid; witem = !wctree;
        raddr = rcaddr; rsend = rcsend;
      end
      default: ;
    endcase
  end

  assign do_write = wvalid && app_wdf_rdy;
  assign do_read  = rsend && !wvalid;

  assign app_en       = do_write || do_read;
  assign app_cmd      = do_write ? MEMC_CMD_WRITE : MEMC_CMD_READ;
  assign app_addr     = APP_ADDR_W'({do_write ? waddr : raddr, 2'b00});
  assign app_wdf_data = wdata;
  assign app_wdf_wren = do_write && app_rdy;
  assign app_wdf_end  = do_write && app_rdy;

  wire w_acc = do_write && app_rdy;
  wire r_acc = do_read && app_rdy;

  assign wbready = (state == ST_BLAKE2B)   && w_acc;
  assign wrready = (state == ST_RADIX)     && w_acc;
  assign wcready = (state == ST_COLLISION) && w_acc;
  assign rrready = (state == ST_RADIX)     && r_acc;
  assign rcready = (state == ST_COLLISION) && r_acc;

  assign rrdata  = app_rd_data;
  assign rcdata  = app_rd_data;
  assign rrvalid = (state == ST_RADIX)     && app_rd_data_valid;
  assign rcvalid = (state == ST_COLLISION) && app_rd_data_valid;

  assign snoop_wvalid = w_acc && witem;
  assign snoop_wdata  = wdata;

  // A write's data is offered only together with its command
  a_wdf_with_cmd: assert property (@(posedge clk) disable iff (rst)
    app_wdf_wren |-> (app_en && app_rdy && app_cmd == MEMC_CMD_WRITE));
endmodule
