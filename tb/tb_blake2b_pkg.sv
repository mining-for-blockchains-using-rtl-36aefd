// tb_blake2b_pkg: reference BLAKE2b (RFC 7693) for testbenches, written as a
// plain sequential function over a byte queue, independent of the RTL core.
// b2b(msg, outlen) returns the digest as a little-endian number: byte j of
// the digest is bits [8j+7:8j].
package tb_blake2b_pkg;

  function automatic logic [63:0] rotr(input logic [63:0] x, input int n);
    return (x >> n) | (x << (64 - n));
  endfunction

  function automatic logic [511:0] b2b(input byte unsigned msg[$], input int outlen);
    logic [63:0] iv [8];
    int sg [10][16];
    logic [63:0] hh [8];
    logic [63:0] vv [16];
    logic [63:0] mm [16];
    int nblk, len;
    logic [127:0] ctr;
    logic [511:0] res;
    iv[0] = 64'h6a09e667f3bcc908; iv[1] = 64'hbb67ae8584caa73b;
    iv[2] = 64'h3c6ef372fe94f82b; iv[3] = 64'ha54ff53a5f1d36f1;
    iv[4] = 64'h510e527fade682d1; iv[5] = 64'h9b05688c2b3e6c1f;
    iv[6] = 64'h1f83d9abfb41bd6b; iv[7] = 64'h5be0cd19137e2179;
    sg = '{'{0,1,2,3,4,5,6,7,8,9,10,11,12,13,14,15},
           '{14,10,4,8,9,15,13,6,1,12,0,2,11,7,5,3},
           '{11,8,12,0,5,2,15,13,10,14,3,6,7,1,9,4},
           '{7,9,3,1,13,12,11,14,2,6,5,10,4,0,15,8},
           '{9,0,5,7,2,4,10,15,14,1,11,12,6,8,3,13},
           '{2,12,6,10,0,11,8,3,4,13,7,5,15,14,1,9},
           '{12,5,1,15,14,13,4,10,0,7,6,3,9,2,8,11},
           '{13,11,7,14,12,1,3,9,5,0,15,4,8,6,2,10},
           '{6,15,14,9,11,3,0,8,12,2,13,7,1,4,10,5},
           '{10,2,8,4,7,6,1,5,15,11,9,14,3,12,13,0}};
    len = msg.size();
    for (int i = 0; i < 8; i++) hh[i] = iv[i];
    hh[0] ^= 64'h01010000 ^ 64'(outlen);
    nblk = (len == 0) ? 1 : (len + 127) / 128;
    for (int b = 0; b < nblk; b++) begin
      for (int w = 0; w < 16; w++) begin
        mm[w] = 0;
        for (int j = 0; j < 8; j++) begin
          int p = b * 128 + w * 8 + j;
          if (p < len) mm[w][8*j +: 8] = msg[p];
        end
      end
      ctr = (b == nblk - 1) ? 128'(len) : 128'((b + 1) * 128);
      for (int i = 0; i < 8; i++) begin vv[i] = hh[i]; vv[i+8] = iv[i]; end
      vv[12] ^= ctr[63:0];
      vv[13] ^= ctr[127:64];
      if (b == nblk - 1) vv[14] = ~vv[14];
      for (int r = 0; r < 12; r++) begin
        int ab [8][4];
        ab = '{'{0,4,8,12},'{1,5,9,13},'{2,6,10,14},'{3,7,11,15},
               '{0,5,10,15},'{1,6,11,12},'{2,7,8,13},'{3,4,9,14}};
        for (int q = 0; q < 8; q++) begin
          int a = ab[q][0], bb = ab[q][1], c = ab[q][2], d = ab[q][3];
          logic [63:0] x = mm[sg[r%10][2*q]], y = mm[sg[r%10][2*q+1]];
          vv[a] = vv[a] + vv[bb] + x; vv[d] = rotr(vv[d] ^ vv[a], 32);
          vv[c] = vv[c] + vv[d];      vv[bb] = rotr(vv[bb] ^ vv[c], 24);
          vv[a] = vv[a] + vv[bb] + y; vv[d] = rotr(vv[d] ^ vv[a], 16);
          vv[c] = vv[c] + vv[d];      vv[bb] = rotr(vv[bb] ^ vv[c], 63);
        end
      end
      for (int i = 0; i < 8; i++) hh[i] ^= vv[i] ^ vv[i+8];
    end
    res = '0;
    for (int i = 0; i < outlen; i++) res[8*i +: 8] = hh[i/8][8*(i%8) +: 8];
    return res;
  endfunction

endpackage
