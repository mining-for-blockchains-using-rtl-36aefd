// blake2b: list generation step of Equihash.
//
// For every index i in 0 .. 2^(N/(K+1))-1 the core hashes one 128-byte
// block made of the job (WORK_BYTES bytes, in the order they came from the
// host) followed by i as a 4-byte little-endian number, asking for a digest
// of ceil(2N/8) bytes. The 2N-bit digest, read as a little-endian number,
// is split in two N-bit items: bits [N-1:0] become item 2i, bits [2N-1:N]
// item 2i+1. Each item is written to blake2b_base_addr + its index as
//   {10'b11_1111_1111, 22-bit index, zeros, N hash bits}.
//
// Two state machines do the work (document's Figures 3.11 and 3.12): the
// generation machine IDLE -> PASS0 -> WAIT0 -> (PASS0 | PASS_END) -> DONE
// starts one hash per PASS0, and the write machine WRITE_IDLE -> WRITE_0 ->
// WRITE_1 writes the two halves of each digest, each write waiting for the
// memory to accept it. PASS0 is entered again only when the write machine
// has taken the previous digest, so no digest is lost when the memory
// stalls. `blake2b_done` pulses once, after the last item is written.
// State names, counters, the split and the 10-bit prefix follow the
// document; the byte layout of the hashed block is this design's choice.
// Bits of wbdata are constant by construction: the ten prefix ones and
// the zero bits between the index and the hash.
module blake2b
  import eq_pkg::*;
#(
  parameter int N          = 210,
  parameter int K          = 9,
  parameter int WORK_BYTES = 124
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    blake2b_start,
  output logic                    blake2b_done,
  input  logic [WADDR_W-1:0]      blake2b_base_addr,
  input  logic [WORK_BYTES*8-1:0] uart_rdata,
  output logic [WADDR_W-1:0]      wbaddr,
  output logic [WORD_W-1:0]       wbdata,
  output logic                    wbvalid,
  input  logic                    wbready
);
  localparam int L            = N / (K + 1);
  localparam int NUM_HASH     = 1 << L;
  localparam int DIGEST_BYTES = (2 * N + 7) / 8;
  localparam int IDX_W        = L + 1;

  initial begin
    assert (WORK_BYTES <= 124) else $error("job must leave 4 bytes of the block for the index");
    assert (IDX_W <= LEAFIDX_W) else $error("index does not fit the 22-bit field");
    assert (N + REF_W <= WORD_W) else $error("item does not fit a memory word");
  end

  typedef enum logic [2:0] {G_IDLE, G_PASS0, G_WAIT0, G_PASS_END, G_DONE} gstate_e;
  typedef enum logic [1:0] {W_IDLE, W_WRITE_0, W_WRITE_1} wstate_e;

  gstate_e gstate;
  wstate_e bwstate;

  logic [L:0]     index_cnt;
  logic [IDX_W-1:0] write0_cnt, write1_cnt;

  // core
  logic          core_init, core_ready, digest_valid;
  logic [1023:0] core_block;
  logic [511:0]  digest;
  logic [2*N-1:0] dq;

  always_comb begin
    core_block = '0;
    for (int j = 0; j < WORK_BYTES; j++)
      core_block[8*j +: 8] = uart_rdata[8*(WORK_BYTES-1-j) +: 8];
    core_block[8*WORK_BYTES +: 32] = 32'(index_cnt);
  end

  assign core_init = (gstate == G_PASS0);

  blake2b_core u_core (
    .clk, .rst,
    .init       (core_init),
    .next_block (1'b0),
    .block      (core_block),
    .digest_len (7'(DIGEST_BYTES)),
    .total_len  (64'(WORK_BYTES + 4)),
    .ready      (core_ready),
    .digest,
    .digest_valid);

  // generation machine
  always_ff @(posedge clk) begin
    if (rst) begin
      gstate       <= G_IDLE;
      index_cnt    <= '0;
      blake2b_done <= 1'b0;
    end else begin
      blake2b_done <= 1'b0;
      unique case (gstate)
        G_IDLE: begin
          index_cnt <= '0;
          if (blake2b_start) gstate <= G_PASS0;
        end
        G_PASS0: begin
          index_cnt <= index_cnt + 1'b1;
          gstate    <= G_WAIT0;
        end
        G_WAIT0: if (core_ready) begin
          if (index_cnt == (L+1)'(NUM_HASH)) gstate <= G_PASS_END;
          else if (bwstate == W_IDLE && !digest_valid) gstate <= G_PASS0;
        end
        G_PASS_END: if (!wbvalid && bwstate == W_IDLE && !digest_valid) gstate <= G_DONE;
        default: begin  // G_DONE
          index_cnt    <= '0;
          blake2b_done <= 1'b1;
          gstate       <= G_IDLE;
        end
      endcase
    end
  end

  // write machine
  always_ff @(posedge clk) begin
    if (rst) begin
      bwstate    <= W_IDLE;
      write0_cnt <= '0;
      write1_cnt <= IDX_W'(1);
      dq         <= '0;
    end else begin
      unique case (bwstate)
        W_IDLE: begin
          if (blake2b_start) begin
            write0_cnt <= '0;
            write1_cnt <= IDX_W'(1);
          end
          if (digest_valid) begin
            dq      <= digest[2*N-1:0];
            bwstate <= W_WRITE_0;
          end
        end
        W_WRITE_0: if (wbready) begin
          write0_cnt <= write0_cnt + IDX_W'(2);
          bwstate    <= W_WRITE_1;
        end
        default: if (wbready) begin  // W_WRITE_1
          write1_cnt <= write1_cnt + IDX_W'(2);
          bwstate    <= W_IDLE;
        end
      endcase
    end
  end

  always_comb begin
    logic [IDX_W-1:0] idx;
    logic [N-1:0]     h;
    wbvalid = (bwstate == W_WRITE_0) || (bwstate == W_WRITE_1);
    idx = (bwstate == W_WRITE_1) ? write1_cnt : write0_cnt;
    h   = (bwstate == W_WRITE_1) ? dq[2*N-1:N] : dq[N-1:0];
    wbaddr = blake2b_base_addr + WADDR_W'(idx);
    wbdata = '0;
    wbdata[WORD_W-1 -: REF_W] = {LEAF_PREFIX, LEAFIDX_W'(idx)};
    wbdata[N-1:0] = h;
  end
endmodule
