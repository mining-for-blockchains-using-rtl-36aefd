// uart_transmitter: sends 8-bit UART frames: start bit 0, eight data bits
// LSB first, one stop bit 1, line idle at 1, each bit CLK_FREQ/BAUD clock
// cycles long (frame format from the document).
//
// Interface: `start` with `data` loads a byte when `busy` is low; `busy`
// stays high for the ten bit periods of the frame.
module uart_transmitter #(
  parameter int CLK_FREQ = 200_000_000,
  parameter int BAUD     = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       tx
);
  localparam int CPB = CLK_FREQ / BAUD;
  localparam int CW  = $clog2(CPB + 1);

  logic [9:0]    frame;   // shifted out LSB first
  logic [3:0]    nbits;   // bits left to send
  logic [CW-1:0] cnt;

  assign busy = (nbits != 0);
  assign tx   = busy ? frame[0] : 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      frame <= '1;
      nbits <= '0;
      cnt   <= '0;
    end else if (!busy) begin
      if (start) begin
        frame <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        cnt   <= CW'(CPB - 1);
      end
    end else if (cnt == 0) begin
      frame <= {1'b1, frame[9:1]};
      nbits <= nbits - 1'b1;
      cnt   <= CW'(CPB - 1);
    end else begin
      cnt <= cnt - 1'b1;
    end
  end
endmodule
