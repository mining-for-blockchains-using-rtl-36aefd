// comm_uart: host link of the miner.
//
// Receive side: bytes from uart_receiver are ASCII hex characters; each one
// is decoded to a nibble and shifted in at the low end of a WORK_BYTES-byte
// accumulator, so the first character sent ends up most significant. A line
// feed (0x0A) copies the accumulator to `work_data`, clears it and raises
// `work_valid`, which stays high until the consumer pulses `work_ack`.
// Other characters are ignored.
//
// Send side: each solution index offered on `sol_valid`/`sol_index` (taken
// when `sol_ready` is high) is queued in a FIFO of SOL_DEPTH entries, since
// solutions can be produced faster than the line can carry them. The
// sender pops one index at a time and writes it as eight upper-case hex
// characters, most significant first, followed by a line feed.
//
// Hex encoding, line feed framing, the FIFO, the 200 MHz clock and the
// 115,200 baud rate follow the document; the job length, the handshake on
// `work_valid` and the FIFO depth are this design's choices.
module comm_uart #(
  parameter int CLK_FREQ   = 200_000_000,
  parameter int BAUD       = 115_200,
  parameter int WORK_BYTES = 124,
  parameter int SOL_DEPTH  = 512
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    rx,
  output logic                    tx,
  output logic                    work_valid,
  output logic [WORK_BYTES*8-1:0] work_data,
  input  logic                    work_ack,
  input  logic                    sol_valid,
  input  logic [31:0]             sol_index,
  output logic                    sol_ready
);
  // ---------------- receive ----------------
  logic [7:0] rx_byte;
  logic       rx_valid;
  logic [WORK_BYTES*8-1:0] acc;

  uart_receiver #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD)) u_rx (
    .clk, .rst, .rx, .data(rx_byte), .valid(rx_valid));

  function automatic logic [4:0] hex_nibble(input logic [7:0] c);
    // bit 4 set: character is a hex digit
    if (c >= "0" && c <= "9") return {1'b1, 4'(c - "0")};
    if (c >= "A" && c <= "F") return {1'b1, 4'(c - "A" + 8'd10)};
    if (c >= "a" && c <= "f") return {1'b1, 4'(c - "a" + 8'd10)};
    return 5'd0;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      acc        <= '0;
      work_data  <= '0;
      work_valid <= 1'b0;
    end else begin
      if (work_ack) work_valid <= 1'b0;
      if (rx_valid) begin
        logic [4:0] nb;
        nb = hex_nibble(rx_byte);
        if (rx_byte == 8'h0A) begin
          work_data  <= acc;
          work_valid <= 1'b1;
          acc        <= '0;
        end else if (nb[4]) begin
          acc <= {acc[WORK_BYTES*8-5:0], nb[3:0]};
        end
      end
    end
  end

  // ---------------- send ----------------
  logic        f_empty, f_full;
  logic [31:0] f_dout;
  logic        f_pop;
  logic [$clog2(SOL_DEPTH+1)-1:0] f_count;

  assign sol_ready = !f_full;

  sync_fifo #(.WIDTH(32), .DEPTH(SOL_DEPTH)) u_fifo (
    .clk, .rst,
    .wr_en(sol_valid), .din(sol_index),
    .rd_en(f_pop), .dout(f_dout),
    .empty(f_empty), .full(f_full), .count(f_count));

  logic       tx_start, tx_busy;
  logic [7:0] tx_byte;
  logic [31:0] cur;
  logic [3:0]  chr;     // 0..7 hex digits, 8 line feed
  logic        sending;

  uart_transmitter #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD)) u_tx (
    .clk, .rst, .start(tx_start), .data(tx_byte), .busy(tx_busy), .tx);

  function automatic logic [7:0] hex_char(input logic [3:0] n);
    return (n < 4'd10) ? 8'("0") + 8'(n) : 8'("A") + 8'(n) - 8'd10;
  endfunction

  assign f_pop    = !sending && !f_empty;
  assign tx_start = sending && !tx_busy;
  assign tx_byte  = (chr == 4'd8) ? 8'h0A : hex_char(cur[31:28]);

  always_ff @(posedge clk) begin
    if (rst) begin
      sending <= 1'b0;
      cur     <= '0;
      chr     <= '0;
    end else if (f_pop) begin
      sending <= 1'b1;
      cur     <= f_dout;
      chr     <= '0;
    end else if (tx_start) begin
      cur <= {cur[27:0], 4'd0};
      chr <= chr + 1'b1;
      if (chr == 4'd8) sending <= 1'b0;
    end
  end
endmodule
