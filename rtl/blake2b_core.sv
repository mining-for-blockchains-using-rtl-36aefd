// blake2b_core: BLAKE2b hash core (RFC 7693), one 128-byte block at a time.
//
// Interface (the signal set of the core used by the miner): `init` starts a
// new message with `block` as its first block, `next_block` digests a further
// block of the same message. `total_len` is the message length in bytes and
// `digest_len` the wanted digest length (1..64 bytes, unkeyed). A block is
// the last one when the byte counter reaches `total_len`; the counter then
// holds `total_len`, and the block must be zero-padded by the user.
// Byte j of the block is block[8j+7:8j]; byte j of the digest is
// digest[8j+7:8j]; only the first digest_len bytes are meaningful.
//
// Timing: `ready` is high while idle. A block takes 24 cycles (one half
// round, four G functions in parallel, per cycle) plus one cycle to load and
// one to fold the state. `digest_valid` pulses for one cycle together with
// the return of `ready` after the last block, and `digest` stays stable until
// the next `init`. The document names this core and its interface only; the
// half-round-per-cycle structure is this design's choice.
module blake2b_core (
  input  logic          clk,
  input  logic          rst,
  input  logic          init,
  input  logic          next_block,
  input  logic [1023:0] block,
  input  logic [6:0]    digest_len,
  input  logic [63:0]   total_len,
  output logic          ready,
  output logic [511:0]  digest,
  output logic          digest_valid
);

  localparam logic [63:0] IV [8] = '{
    64'h6a09e667f3bcc908, 64'hbb67ae8584caa73b, 64'h3c6ef372fe94f82b, 64'ha54ff53a5f1d36f1,
    64'h510e527fade682d1, 64'h9b05688c2b3e6c1f, 64'h1f83d9abfb41bd6b, 64'h5be0cd19137e2179};

  // Message schedule: SIGMA[r][i], r = round mod 10
  localparam logic [3:0] SIGMA [10][16] = '{
    '{ 0, 1, 2, 3, 4, 5, 6, 7, 8, 9,10,11,12,13,14,15},
    '{14,10, 4, 8, 9,15,13, 6, 1,12, 0, 2,11, 7, 5, 3},
    '{11, 8,12, 0, 5, 2,15,13,10,14, 3, 6, 7, 1, 9, 4},
    '{ 7, 9, 3, 1,13,12,11,14, 2, 6, 5,10, 4, 0,15, 8},
    '{ 9, 0, 5, 7, 2, 4,10,15,14, 1,11,12, 6, 8, 3,13},
    '{ 2,12, 6,10, 0,11, 8, 3, 4,13, 7, 5,15,14, 1, 9},
    '{12, 5, 1,15,14,13, 4,10, 0, 7, 6, 3, 9, 2, 8,11},
    '{13,11, 7,14,12, 1, 3, 9, 5, 0,15, 4, 8, 6, 2,10},
    '{ 6,15,14, 9,11, 3, 0, 8,12, 2,13, 7, 1, 4,10, 5},
    '{10, 2, 8, 4, 7, 6, 1, 5,15,11, 9,14, 3,12,13, 0}};

  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_FOLD} state_e;

  state_e       state;
  logic [63:0]  h [8];
  logic [63:0]  v [16];
  logic [63:0]  m [16];
  logic [63:0]  t;
  logic         last;
  logic [4:0]   half;       // 0..23: even = column step, odd = diagonal step
  logic [63:0]  vn [16];

  // One G function; returns {a,b,c,d}
  function automatic logic [255:0] g(input logic [63:0] a, b, c, d, x, y);
    a = a + b + x;  d = d ^ a;  d = {d[31:0], d[63:32]};
    c = c + d;      b = b ^ c;  b = {b[23:0], b[63:24]};
    a = a + b + y;  d = d ^ a;  d = {d[15:0], d[63:16]};
    c = c + d;      b = b ^ c;  b = {b[62:0], b[63]};
    return {a, b, c, d};
  endfunction

  // Index of the four G inputs for the column (col=1) or diagonal step
  always_comb begin
    logic [3:0] r;
    logic [3:0] ia, ib, ic, id;
    logic [255:0] res;
    r = 4'(({27'd0, half} >> 1) % 10);
    for (int i = 0; i < 16; i++) vn[i] = v[i];
    for (int gi = 0; gi < 4; gi++) begin
      ia = 4'(gi);
      if (!half[0]) begin
        ib = 4'(gi + 4); ic = 4'(gi + 8); id = 4'(gi + 12);
      end else begin
        ib = 4'(4 + ((gi + 1) % 4));
        ic = 4'(8 + ((gi + 2) % 4));
        id = 4'(12 + ((gi + 3) % 4));
      end
      res = g(v[ia], v[ib], v[ic], v[id],
              m[SIGMA[r][{half[0], 3'(2*gi)}]], m[SIGMA[r][{half[0], 3'(2*gi+1)}]]);
      vn[ia] = res[255:192];
      vn[ib] = res[191:128];
      vn[ic] = res[127:64];
      vn[id] = res[63:0];
    end
  end

  assign ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      digest_valid <= 1'b0;
      t            <= '0;
      last         <= 1'b0;
      half         <= '0;
      for (int i = 0; i < 8; i++) h[i] <= '0;
      for (int i = 0; i < 16; i++) begin v[i] <= '0; m[i] <= '0; end
    end else begin
      digest_valid <= 1'b0;
      case (state)
        S_IDLE: if (init || next_block) begin
          logic [63:0] hs [8];
          logic [63:0] tn;
          logic        ln;
          for (int i = 0; i < 8; i++) hs[i] = init ? IV[i] : h[i];
          if (init) hs[0] = hs[0] ^ 64'h0101_0000 ^ {57'd0, digest_len};
          tn = (init ? 64'd0 : t) + 64'd128;
          ln = (tn >= total_len);
          if (ln) tn = total_len;
          for (int i = 0; i < 8; i++) begin
            h[i]     <= hs[i];
            v[i]     <= hs[i];
            v[i + 8] <= IV[i];
          end
          v[12] <= IV[4] ^ tn;
          v[14] <= ln ? ~IV[6] : IV[6];
          for (int i = 0; i < 16; i++) m[i] <= block[64*i +: 64];
          t     <= tn;
          last  <= ln;
          half  <= '0;
          state <= S_ROUND;
        end
        S_ROUND: begin
          for (int i = 0; i < 16; i++) v[i] <= vn[i];
          half <= half + 5'd1;
          if (half == 5'd23) state <= S_FOLD;
        end
        default: begin  // S_FOLD
          for (int i = 0; i < 8; i++) h[i] <= h[i] ^ v[i] ^ v[i + 8];
          digest_valid <= last;
          state <= S_IDLE;
        end
      endcase
    end
  end

  always_comb for (int i = 0; i < 8; i++) digest[64*i +: 64] = h[i];

endmodule
