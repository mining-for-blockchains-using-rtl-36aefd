// snoop: bucket-start calculator of the radix sort.
//
// It watches every item written to memory (`wvalid`/`wdata`) and looks at
// the radix digit the next sort pass will use: digit `pass_cnt` of the
// item's KEY_W-bit key (the low bits of the hash field), digit p being key
// bits [(p+1)*RADIX_BITS-1 : p*RADIX_BITS]. For an item with digit d it
// increments the start pointer of every bucket above d, so that when the
// pass begins each bucket starts right after the space the buckets below it
// need (document's Figure 3.15). Digits at or beyond RADIX_PASS are not
// counted.
//
// The pointers being counted are kept apart from the ones radix is using:
// `snoop_rst` copies the counted pointers to `bucket_base` and clears the
// count, so radix pulses it at the start of every pass, while it writes the
// items whose next digit must be counted. Bucket 0 always starts at 0.
// The counting scheme is the document's; the two banks and the digit
// masking are this design's choices.
module snoop
  import eq_pkg::*;
#(
  parameter int RADIX_BITS = 7,
  parameter int RADIX_PASS = 3,
  parameter int KEY_W      = 21
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               snoop_rst,
  input  logic [3:0]         pass_cnt,
  input  logic               wvalid,
  input  logic [WORD_W-1:0]  wdata,
  output logic [WADDR_W-1:0] bucket_base [1 << RADIX_BITS]
);
  localparam int NB = 1 << RADIX_BITS;
  localparam int DW = RADIX_BITS * RADIX_PASS;

  logic [WADDR_W-1:0]    acc [NB];
  logic [RADIX_BITS-1:0] digit;
  logic                  counting;

  always_comb begin
    logic [DW-1:0] key;
    key = '0;
    for (int b = 0; b < KEY_W && b < DW; b++) key[b] = wdata[b];
    digit = '0;
    for (int p = 0; p < RADIX_PASS; p++)
      if (pass_cnt == 4'(p)) digit = key[p*RADIX_BITS +: RADIX_BITS];
  end

  assign counting = wvalid && (pass_cnt < 4'(RADIX_PASS));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int x = 0; x < NB; x++) begin
        acc[x]         <= '0;
        bucket_base[x] <= '0;
      end
    end else if (snoop_rst) begin
      for (int x = 0; x < NB; x++) begin
        bucket_base[x] <= acc[x];
        acc[x]         <= '0;
      end
    end else if (counting) begin
      for (int x = 1; x < NB; x++)
        if (RADIX_BITS'(x) > digit) acc[x] <= acc[x] + 1'b1;
    end
  end
endmodule
