// tb_efm_pkg: test-bench side EFM modulator. It rebuilds the codeword set
// (14-bit words with 2..10 zeros between ones, at most 10 leading or
// trailing zeros, subcode syncs S0/S1 excluded, byte b = b-th word in
// ascending order) with its own code, chooses merging bits that keep the
// run-length limits across symbol boundaries, and assembles 588-bit frames:
// 24-bit sync, 3 merging bits, then 33 symbols of 14 bits + 3 merging bits.
//
// Interface: efm_word(b), build_frame(syms) -> 588 channel bits (before
// NRZI), S0/S1 constants. Timing: none. Frame layout follows the CD
// standard; the byte assignment is the same stand-in as the RTL table.
package tb_efm_pkg;
  typedef logic [587:0] frame_bits_t;  // bit 587 is sent first

  localparam logic [13:0] S0 = 14'b00100000000001;
  localparam logic [13:0] S1 = 14'b00000000010010;

  function automatic logic [13:0] efm_word(int b);
    int n;
    n = 0;
    for (int w = 1; w < 16384; w++) begin
      int run, lead, good, seen;
      run = 0; lead = 0; good = 1; seen = 0;
      for (int i = 13; i >= 0; i--) begin
        if ((w >> i) & 1) begin
          if (seen && (run < 2 || run > 10)) good = 0;
          if (!seen) lead = run;
          seen = 1; run = 0;
        end else run++;
      end
      if (lead > 10 || run > 10) good = 0;
      if (good && w != int'(S0) && w != int'(S1)) begin
        if (n == b) return 14'(w);
        n++;
      end
    end
    return 14'd0;
  endfunction

  function automatic int lead0(logic [13:0] w);
    for (int i = 13; i >= 0; i--) if (w[i]) return 13 - i;
    return 14;
  endfunction
  function automatic int trail0(logic [13:0] w);
    for (int i = 0; i < 14; i++) if (w[i]) return i;
    return 14;
  endfunction

  // merging bits between a word with tz trailing zeros and one with lz
  // leading zeros
  function automatic logic [2:0] merge(int tz, int lz);
    if (tz + 3 + lz >= 2 && tz + 3 + lz <= 10) return 3'b000;
    if (tz >= 2 && lz >= 2 - 0 && tz <= 10 && lz + 2 <= 10) return 3'b100;
    if (tz + 1 >= 2 && lz + 1 >= 2 && tz + 1 <= 10 && lz + 1 <= 10) return 3'b010;
    return 3'b001;
  endfunction

  // syms[0] is the subcode symbol (already a 14-bit word), syms[1..32] main
  function automatic frame_bits_t build_frame(logic [13:0] syms [33]);
    frame_bits_t f;
    int pos;
    int tz;
    f = '0;
    pos = 587;
    for (int i = 23; i >= 0; i--) begin
      f[pos] = 1'(24'b100000000001000000000010 >> i); pos--;
    end
    tz = 1;
    for (int s = 0; s < 33; s++) begin
      logic [2:0] mb;
      mb = merge(tz, lead0(syms[s]));
      for (int i = 2; i >= 0; i--) begin f[pos] = mb[i]; pos--; end
      for (int i = 13; i >= 0; i--) begin f[pos] = syms[s][i]; pos--; end
      tz = trail0(syms[s]);
    end
    return f;
  endfunction
endpackage
