// equihash_top: Equihash miner for one FPGA board. A host sends a job over
// UART as hex characters ended by a line feed; the engine generates the
// BLAKE2b list in external DDR3 memory, sorts it and collides it K times,
// and every solution found goes back to the host as 2^K indices, one line
// of eight hex characters each.
//
// It joins comm_uart (host link), equihash (the engine) and the user
// interface of the DDR3 memory controller, whose signals are ports here:
// the controller and the clocking are vendor blocks outside this RTL. All
// logic runs on `clk` (200 MHz on the board) with synchronous active-high
// reset. The status outputs report the main state, the stage, the end of a
// job and the collision statistics of the last collision step.
// Timing: a job is taken once its line feed has arrived and the engine is
// idle; solution lines leave while the last stage is still running.
// Follows the document: the three blocks, the UART at 115200 baud with
// hex lines, the 200 MHz clock. This design's choices: one clock domain
// (the document runs the hash core at 50 MHz behind asynchronous FIFOs)
// and the status ports. app_addr[1:0] and app_cmd[2:1] are constant zero,
// since whole 256-bit words are addressed and only the write (000) and read
// (001) commands are used; synthesis reports them as constant outputs.
module equihash_top
  import eq_pkg::*;
#(
  parameter int N          = 210,
  parameter int K          = 9,
  parameter int RADIX_BITS = 7,
  parameter int MAX_COLL   = 7,
  parameter int BUF_WORDS  = 1 << 22,
  parameter int WORK_BYTES = 124,
  parameter int CLK_FREQ   = 200_000_000,
  parameter int BAUD       = 115_200
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  rx,
  output logic                  tx,
  // memory controller user interface
  input  logic                  init_calib_complete,
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
  // status
  output eq_state_e             state,
  output logic [3:0]            stage,
  output logic                  done,
  output logic [31:0]           dropped,
  output logic [31:0]           overflow,
  output logic [31:0]           solutions
);
  logic                    work_valid, work_ack;
  logic [WORK_BYTES*8-1:0] work_data;
  logic                    sol_valid, sol_ready;
  logic [31:0]             sol_index;

  comm_uart #(
    .CLK_FREQ(CLK_FREQ), .BAUD(BAUD), .WORK_BYTES(WORK_BYTES), .SOL_DEPTH(512)
  ) u_comm_uart (
    .clk, .rst, .rx, .tx,
    .work_valid, .work_data, .work_ack,
    .sol_valid, .sol_index, .sol_ready);

  equihash #(
    .N(N), .K(K), .RADIX_BITS(RADIX_BITS), .MAX_COLL(MAX_COLL),
    .BUF_WORDS(BUF_WORDS), .WORK_BYTES(WORK_BYTES)
  ) u_equihash (
    .clk, .rst,
    .work_valid, .work_data, .work_ack,
    .sol_valid, .sol_index, .sol_ready,
    .init_done(init_calib_complete),
    .app_addr, .app_cmd, .app_en, .app_rdy, .app_wdf_data, .app_wdf_wren,
    .app_wdf_end, .app_wdf_rdy, .app_rd_data, .app_rd_data_valid,
    .state, .stage, .done, .dropped, .overflow, .solutions);
endmodule
