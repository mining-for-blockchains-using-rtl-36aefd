// uart_receiver: receives 8-bit UART frames (start bit 0, eight data bits
// LSB first, one stop bit 1, line idle at 1, no parity), as described by
// the document for the link to the host.
//
// The Rx line is synchronised with two flip-flops. After a falling edge the
// receiver waits half a bit period and checks that the line is still low,
// then samples each data bit and the stop bit in the middle of its period
// (CLK_FREQ/BAUD clock cycles per bit; 1,736 at 200 MHz and 115,200 baud).
// `valid` pulses for one cycle with `data` when a frame ends with a good
// stop bit; a frame with a bad stop bit is dropped.
module uart_receiver #(
  parameter int CLK_FREQ = 200_000_000,
  parameter int BAUD     = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid
);
  localparam int CPB = CLK_FREQ / BAUD;
  localparam int CW  = $clog2(CPB + 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;

  rstate_e      st;
  logic [1:0]   sync;
  logic [CW-1:0] cnt;
  logic [2:0]   bitn;
  logic [7:0]   sh;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync  <= 2'b11;
      st    <= R_IDLE;
      cnt   <= '0;
      bitn  <= '0;
      sh    <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rx};
      valid <= 1'b0;
      case (st)
        R_IDLE: if (!sync[1]) begin
          st  <= R_START;
          cnt <= CW'(CPB / 2);
        end
        R_START: if (cnt == 0) begin
          if (!sync[1]) begin
            st   <= R_DATA;
            cnt  <= CW'(CPB - 1);
            bitn <= '0;
          end else st <= R_IDLE;
        end else cnt <= cnt - 1'b1;
        R_DATA: if (cnt == 0) begin
          sh  <= {sync[1], sh[7:1]};
          cnt <= CW'(CPB - 1);
          if (bitn == 3'd7) st <= R_STOP;
          bitn <= bitn + 1'b1;
        end else cnt <= cnt - 1'b1;
        default: if (cnt == 0) begin  // R_STOP
          if (sync[1]) begin
            data  <= sh;
            valid <= 1'b1;
          end
          st <= R_IDLE;
        end else cnt <= cnt - 1'b1;
      endcase
    end
  end
endmodule
