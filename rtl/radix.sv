// radix: least-significant-digit radix sort of the items on their KEY_W-bit
// key (the low bits of each item's hash field), RADIX_BITS bits per pass,
// RADIX_PASS passes. Even passes read from radix_base_addr and write to
// radix_scratch_addr, odd passes the other way round. Each pass reads every
// item once and writes it once, to
//   write buffer + bucket_base[d] + bucket_cnt[d],
// where d is the pass's digit of the key, bucket_base comes from snoop and
// bucket_cnt counts the items already put in bucket d during this pass.
// Items of equal digit keep their order, so the passes compose to a sort.
//
// Two state machines run concurrently (document's Figures 3.13 and 3.14).
// The read machine (IDLE, PASS, PASS_END, DONE) sends the read addresses
// base + read_cnt for read_cnt = 0 .. radix_end-1; returned words queue in a
// small FIFO (the document keeps one registered word, rdataq). It only sends
// a read when the FIFO has room for every word in flight, and starts the
// next pass once the write machine has finished the current one. The write
// machine (IDLE, PASS, PASS_END, DONE) takes words from the FIFO and writes
// them to their buckets, one per cycle when the memory accepts it. It
// pulses `snoop_rst` at the start of every pass, and drives `snoop_pass`
// with the next pass's number so snoop counts the next digit while the
// items are written. `radix_done` pulses once after the last write.
module radix
  import eq_pkg::*;
#(
  parameter int RADIX_BITS = 7,
  parameter int RADIX_PASS = 3,
  parameter int KEY_W      = 21,
  parameter int FIFO_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               radix_start,
  output logic               radix_done,
  input  logic [WADDR_W-1:0] radix_base_addr,
  input  logic [WADDR_W-1:0] radix_scratch_addr,
  input  logic [WADDR_W-1:0] radix_end,
  input  logic [WADDR_W-1:0] bucket_base [1 << RADIX_BITS],
  // read interface
  output logic               rrsend,
  output logic [WADDR_W-1:0] rraddr,
  input  logic               rrready,
  input  logic [WORD_W-1:0]  rrdata,
  input  logic               rrvalid,
  // write interface
  output logic [WADDR_W-1:0] wraddr,
  output logic [WORD_W-1:0]  wrdata,
  output logic               wrvalid,
  input  logic               wrready,
  // to snoop
  output logic [3:0]         snoop_pass,
  output logic               snoop_rst
);
  localparam int NB = 1 << RADIX_BITS;
  localparam int DW = RADIX_BITS * RADIX_PASS;
  localparam int FCW = $clog2(FIFO_DEPTH + 1);

  typedef enum logic [1:0] {S_IDLE, S_PASS, S_PASS_END, S_DONE} rstate_e;

  rstate_e radix_rstate, radix_wstate;
  logic [WADDR_W-1:0] read_cnt, write_cnt;
  logic [3:0]         pass_rcnt, pass_wcnt;
  logic [WADDR_W-1:0] bucket_cnt [NB];
  logic [FCW-1:0]     outstanding;

  // ---------------- read side ----------------
  logic           f_empty, f_full, f_pop;
  logic [WORD_W-1:0] f_dout;
  logic [FCW-1:0] f_count;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_rfifo (
    .clk, .rst, .wr_en(rrvalid), .din(rrdata), .rd_en(f_pop),
    .dout(f_dout), .empty(f_empty), .full(f_full), .count(f_count));

  assign rrsend = (radix_rstate == S_PASS) && (read_cnt != radix_end) &&
                  ((f_count + outstanding) < FCW'(FIFO_DEPTH));
  assign rraddr = (pass_rcnt[0] ? radix_scratch_addr : radix_base_addr) + read_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      radix_rstate <= S_IDLE;
      read_cnt     <= '0;
      pass_rcnt    <= '0;
      outstanding  <= '0;
    end else begin
      outstanding <= outstanding + FCW'(rrsend && rrready) - FCW'(rrvalid);
      unique case (radix_rstate)
        S_IDLE: begin
          read_cnt  <= '0;
          pass_rcnt <= '0;
          if (radix_start) radix_rstate <= S_PASS;
        end
        S_PASS: begin
          if (rrsend && rrready) read_cnt <= read_cnt + 1'b1;
          else if (read_cnt == radix_end) begin
            pass_rcnt    <= pass_rcnt + 1'b1;
            radix_rstate <= S_PASS_END;
          end
        end
        S_PASS_END: begin
          if (pass_rcnt == 4'(RADIX_PASS)) radix_rstate <= S_DONE;
          else if (pass_wcnt == pass_rcnt && radix_wstate == S_PASS) begin
            read_cnt     <= '0;
            radix_rstate <= S_PASS;
          end
        end
        default: begin  // S_DONE
          read_cnt <= '0;
          if (radix_wstate == S_IDLE) radix_rstate <= S_IDLE;
        end
      endcase
    end
  end

  // ---------------- write side ----------------
  logic [RADIX_BITS-1:0] digit;

  always_comb begin
    logic [DW-1:0] key;
    key = '0;
    for (int b = 0; b < KEY_W && b < DW; b++) key[b] = f_dout[b];
    digit = '0;
    for (int p = 0; p < RADIX_PASS; p++)
      if (pass_wcnt == 4'(p)) digit = key[p*RADIX_BITS +: RADIX_BITS];
  end

  assign wrvalid = (radix_wstate == S_PASS) && (write_cnt != radix_end) && !f_empty;
  assign wraddr  = (pass_wcnt[0] ? radix_base_addr : radix_scratch_addr) +
                   bucket_base[digit] + bucket_cnt[digit];
  assign wrdata  = f_dout;
  assign f_pop   = wrvalid && wrready;
  assign snoop_pass = (radix_wstate == S_PASS || radix_wstate == S_PASS_END) ?
                      pass_wcnt + 1'b1 : 4'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      radix_wstate <= S_IDLE;
      write_cnt    <= '0;
      pass_wcnt    <= '0;
      radix_done   <= 1'b0;
      snoop_rst    <= 1'b0;
      for (int x = 0; x < NB; x++) bucket_cnt[x] <= '0;
    end else begin
      radix_done <= 1'b0;
      snoop_rst  <= 1'b0;
      unique case (radix_wstate)
        S_IDLE: begin
          write_cnt <= '0;
          pass_wcnt <= '0;
          for (int x = 0; x < NB; x++) bucket_cnt[x] <= '0;
          if (radix_start) begin
            snoop_rst    <= 1'b1;
            radix_wstate <= S_PASS;
          end
        end
        S_PASS: begin
          if (f_pop) begin
            write_cnt          <= write_cnt + 1'b1;
            bucket_cnt[digit]  <= bucket_cnt[digit] + 1'b1;
          end else if (write_cnt == radix_end) begin
            radix_wstate <= S_PASS_END;
          end
        end
        S_PASS_END: begin
          write_cnt <= '0;
          for (int x = 0; x < NB; x++) bucket_cnt[x] <= '0;
          pass_wcnt <= pass_wcnt + 1'b1;
          if (pass_wcnt == 4'(RADIX_PASS - 1)) begin
            radix_wstate <= S_DONE;
          end else begin
            snoop_rst    <= 1'b1;
            radix_wstate <= S_PASS;
          end
        end
        default: begin  // S_DONE
          radix_done   <= 1'b1;
          radix_wstate <= S_IDLE;
        end
      endcase
    end
  end

  // The read FIFO can never overflow: reads are only sent with room for them
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) rrvalid |-> !f_full);
endmodule
