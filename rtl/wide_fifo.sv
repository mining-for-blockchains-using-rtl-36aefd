// wide_fifo: FIFO wider than one block-RAM FIFO unit, built by placing
// UNITS = ceil(WIDTH/UNIT_W) unit FIFOs side by side, as the document does
// with 72-bit x 512 units to hold 256-bit memory words.
//
// As in the document's construction, every unit sees the same write and
// read enables, gated so that nothing is written while any unit is full and
// nothing is read while any unit is empty; `empty` and `full` are the OR of
// the units' flags. The units therefore always hold the same number of
// entries. `dout` is first-word fall-through. The unit FIFO is a generic
// array FIFO rather than the vendor primitive.
module wide_fifo #(
  parameter int WIDTH  = 256,
  parameter int UNIT_W = 72,
  parameter int DEPTH  = 512
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           din,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int UNITS = (WIDTH + UNIT_W - 1) / UNIT_W;
  localparam int CW = $clog2(DEPTH+1);

  logic [UNITS*UNIT_W-1:0] din_pad, dout_pad;
  logic [UNITS-1:0]        u_empty, u_full;
  logic [CW-1:0]           u_count [UNITS];
  logic                    wr_g, rd_g;

  assign din_pad = (UNITS*UNIT_W)'(din);
  assign empty   = |u_empty;
  assign full    = |u_full;
  assign wr_g    = wr_en && !full;
  assign rd_g    = rd_en && !empty;
  assign dout    = dout_pad[WIDTH-1:0];
  assign count   = u_count[0];

  for (genvar u = 0; u < UNITS; u++) begin : g_unit
    sync_fifo #(.WIDTH(UNIT_W), .DEPTH(DEPTH)) unit (
      .clk, .rst,
      .wr_en (wr_g),
      .din   (din_pad[u*UNIT_W +: UNIT_W]),
      .rd_en (rd_g),
      .dout  (dout_pad[u*UNIT_W +: UNIT_W]),
      .empty (u_empty[u]),
      .full  (u_full[u]),
      .count (u_count[u])
    );
  end
endmodule
