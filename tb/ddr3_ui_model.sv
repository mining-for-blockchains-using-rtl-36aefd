// ddr3_ui_model: behavioural model of the user interface of a DDR3 memory
// controller (256-bit words, addresses in 64-bit units so consecutive words
// are 4 apart), for simulation only; not synthesizable.
//
// Commands are taken when app_en and app_rdy are both high: a WRITE (000)
// stores app_wdf_data, which must come with app_wdf_wren/app_wdf_end in the
// same cycle; a READ (001) returns the word LATENCY cycles later on
// app_rd_data/app_rd_data_valid, in command order. Unwritten words read as
// zero. app_rdy and app_wdf_rdy drop at random in STALL_PCT percent of the
// cycles. init_calib_complete rises INIT_CYCLES after reset.
module ddr3_ui_model #(
  parameter int LATENCY     = 12,
  parameter int STALL_PCT   = 10,
  parameter int INIT_CYCLES = 20
) (
  input  logic         clk,
  input  logic         rst,
  output logic         init_calib_complete,
  input  logic [27:0]  app_addr,
  input  logic [2:0]   app_cmd,
  input  logic         app_en,
  output logic         app_rdy,
  input  logic [255:0] app_wdf_data,
  input  logic         app_wdf_wren,
  input  logic         app_wdf_end,
  output logic         app_wdf_rdy,
  output logic [255:0] app_rd_data,
  output logic         app_rd_data_valid
);
  logic [255:0] mem [int unsigned];
  typedef struct { longint due; logic [255:0] data; } rd_t;
  rd_t rq[$];
  longint cyc = 0;
  int init_cnt = 0;
  int unsigned stall_cycles = 0, reads = 0, writes = 0, errors = 0;

  always @(posedge clk) begin
    cyc++;
    app_rd_data_valid <= 1'b0;
    if (rst) begin
      init_cnt = 0;
      init_calib_complete <= 1'b0;
      app_rdy     <= 1'b0;
      app_wdf_rdy <= 1'b0;
      rq.delete();
    end else begin
      if (init_cnt < INIT_CYCLES) init_cnt++;
      init_calib_complete <= (init_cnt >= INIT_CYCLES);
      if (app_en && app_rdy) begin
        if (app_addr[1:0] != 2'b00) errors++;
        if (app_cmd == 3'b000) begin
          if (!(app_wdf_wren && app_wdf_end && app_wdf_rdy)) errors++;
          mem[32'(app_addr >> 2)] = app_wdf_data;
          writes++;
        end else if (app_cmd == 3'b001) begin
          rd_t r;
          r.due  = cyc + LATENCY;
          r.data = mem.exists(32'(app_addr >> 2)) ? mem[32'(app_addr >> 2)] : '0;
          rq.push_back(r);
          reads++;
        end else errors++;
      end else if (app_wdf_wren) errors++;
      if (app_en && !app_rdy) stall_cycles++;
      if (rq.size() > 0 && rq[0].due <= cyc) begin
        app_rd_data       <= rq[0].data;
        app_rd_data_valid <= 1'b1;
        void'(rq.pop_front());
      end
      app_rdy     <= init_calib_complete && ($urandom_range(0, 99) >= STALL_PCT);
      app_wdf_rdy <= init_calib_complete && ($urandom_range(0, 99) >= STALL_PCT);
    end
  end

  // Direct access for testbenches
  function automatic logic [255:0] peek(input int unsigned word);
    return mem.exists(word) ? mem[word] : '0;
  endfunction
  function automatic void poke(input int unsigned word, input logic [255:0] d);
    mem[word] = d;
  endfunction
endmodule
