// tb_circ_pkg: test-bench CIRC encoder matching the decoder's frame
// conventions, written from the code definition with its own GF(256)
// tables:
//   audio frame D[n]: 24 bytes, words w = 0..11 (L/R alternating), low byte
//   first. C2 frame f holds the words with w[1] = 0 of D[f] and those with
//   w[1] = 1 of D[f-2], word w at positions 16*w[1] + 2*{w[3:2],w[0]} (+1
//   for the high byte); positions 12..15 are the C2 parity Q, solved so that
//   the 28-symbol word has roots alpha^0..alpha^3.
//   C1 frame s holds symbol j of C2 frame s + 108 - 4j (j = 0..27) and C1
//   parity P at 28..31.
//   EFM frame e carries the odd symbols of C1 frame e and the even symbols
//   of C1 frame e+1, with symbols 12..15 and 28..31 inverted.
//
// Interface: arrays D, C2, C1, EFM filled by encode_all(). Timing: none,
// used at time 0. The delays and parity inversion follow the CD standard
// CIRC; the odd/even one-frame delay placement is this design's convention
// and matches ecc_ctrl.
package tb_circ_pkg;
  localparam int NF = 520;           // frames prepared

  byte unsigned exp_t [0:511];
  byte unsigned log_t [0:255];
  byte unsigned D   [0:NF-1][0:23];
  byte unsigned C2  [0:NF-1][0:27];
  byte unsigned C1  [0:NF-1][0:31];
  byte unsigned EFM [0:NF-1][0:31];

  function automatic void gf_init();
    byte unsigned x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = x; exp_t[i+255] = x; log_t[x] = byte'(i);
      x = (x & 8'h80) ? ((x << 1) ^ 8'h1D) : (x << 1);
    end
    exp_t[510] = exp_t[0]; exp_t[511] = exp_t[1];
  endfunction

  function automatic byte unsigned m(byte unsigned a, byte unsigned b);
    if (a == 0 || b == 0) return 0;
    return exp_t[int'(log_t[a]) + int'(log_t[b])];
  endfunction

  function automatic byte unsigned inv(byte unsigned a);
    return exp_t[255 - int'(log_t[a])];
  endfunction

  function automatic byte unsigned apow(int e);
    return exp_t[e % 255];
  endfunction

  // Fill the 4 parity positions pp..pp+3 of an n-symbol word (position p
  // has degree n-1-p) so that it has roots alpha^0..alpha^3.
  function automatic void rs_fill(ref byte unsigned cw [0:31], input int n, input int pp);
    byte unsigned a [0:3][0:4];
    for (int t = 0; t < 4; t++) cw[pp + t] = 0;
    for (int i = 0; i < 4; i++) begin
      byte unsigned s;
      s = 0;
      for (int p = 0; p < n; p++) s ^= m(cw[p], apow(i * (n - 1 - p)));
      for (int t = 0; t < 4; t++) a[i][t] = apow(i * (n - 1 - (pp + t)));
      a[i][4] = s;
    end
    for (int c = 0; c < 4; c++) begin
      int piv;
      byte unsigned f;
      piv = c;
      while (a[piv][c] == 0) piv++;
      for (int k = 0; k < 5; k++) begin
        byte unsigned tmp;
        tmp = a[c][k]; a[c][k] = a[piv][k]; a[piv][k] = tmp;
      end
      f = inv(a[c][c]);
      for (int k = 0; k < 5; k++) a[c][k] = m(a[c][k], f);
      for (int r = 0; r < 4; r++) begin
        if (r != c && a[r][c] != 0) begin
          byte unsigned g;
          g = a[r][c];
          for (int k = 0; k < 5; k++) a[r][k] ^= m(g, a[c][k]);
        end
      end
    end
    for (int t = 0; t < 4; t++) cw[pp + t] = a[t][4];
  endfunction

  function automatic int wpos(int w);
    return 16 * ((w >> 1) & 1) + 2 * (((w >> 2) << 1) | (w & 1));
  endfunction

  // Build everything from D[].
  function automatic void encode_all();
    byte unsigned cw [0:31];
    for (int f = 0; f < NF; f++) begin
      for (int p = 0; p < 32; p++) cw[p] = 0;
      for (int w = 0; w < 12; w++) begin
        int src;
        src = ((w >> 1) & 1) ? f - 2 : f;
        for (int b = 0; b < 2; b++) cw[wpos(w) + b] = (src >= 0) ? D[src][2*w + b] : 8'h00;
      end
      rs_fill(cw, 28, 12);
      for (int p = 0; p < 28; p++) C2[f][p] = cw[p];
    end
    for (int s = 0; s < NF; s++) begin
      for (int j = 0; j < 28; j++) begin
        int f;
        f = s + 108 - 4 * j;
        cw[j] = (f < NF) ? C2[f][j] : 8'h00;
      end
      rs_fill(cw, 32, 28);
      for (int p = 0; p < 32; p++) C1[s][p] = cw[p];
    end
    for (int e = 0; e < NF; e++) begin
      for (int j = 0; j < 32; j++) begin
        byte unsigned v;
        v = (j % 2 == 1) ? C1[e][j] : ((e + 1 < NF) ? C1[e+1][j] : 8'h00);
        if ((j >= 12 && j <= 15) || j >= 28) v = ~v;
        EFM[e][j] = v;
      end
    end
  endfunction
endpackage
