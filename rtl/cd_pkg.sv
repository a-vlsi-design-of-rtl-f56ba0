// cd_pkg: types, constants and GF(2^8) arithmetic shared by the CD data
// processor. The field is GF(256) with primitive polynomial
// x^8+x^4+x^3+x^2+1 (the polynomial of the CD CIRC code). The codes are the
// C1 (32,28) and C2 (28,24) Reed-Solomon codes with 4 parity symbols and
// generator roots alpha^0..alpha^3. All functions are combinational and
// synthesizable.
//
// Interface: package items only (gf_t, rs_result_t, code and frame
// constants, the SRAM address map helpers col_base/col_addr/slot_sub).
// Timing: none, all functions are combinational. The field polynomial and
// roots are the CD standard values, which the document cites without
// printing them; the address map (input ring at 0x000, deinterleave area of
// 1792 bytes at 0x100, column windows of 4*(27-j)+6 bytes) is this design's.
package cd_pkg;

  typedef logic [7:0] gf_t;

  localparam int unsigned NPAR        = 4;    // parity symbols per RS codeword (d = 5)
  localparam int unsigned C1_LEN      = 32;   // first decoding stage codeword length
  localparam int unsigned C2_LEN      = 28;   // second decoding stage codeword length
  localparam int unsigned FRAME_SYMS  = 33;   // EFM symbols per frame (1 subcode + 32 main)
  localparam int unsigned FRAME_BITS  = 588;  // channel bits per EFM frame
  localparam int unsigned SUBCODE_PERIOD = 98; // EFM frames per subcode block
  localparam int unsigned DEINT_D     = 4;    // CIRC deinterleave delay unit, frames
  localparam logic [23:0] FRAME_SYNC  = 24'b100000000001000000000010;
  localparam logic [13:0] SUB_S0      = 14'b00100000000001;
  localparam logic [13:0] SUB_S1      = 14'b00000000010010;

  // Multiply in GF(256).
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t p;
    gf_t aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = aa[7] ? ((aa << 1) ^ 8'h1D) : (aa << 1);
    end
    return p;
  endfunction

  // Multiply by alpha (= 2).
  function automatic gf_t gf_mul_a(gf_t a);
    return a[7] ? ((a << 1) ^ 8'h1D) : (a << 1);
  endfunction

  // Inverse: a^254 by square-and-multiply. gf_inv(0) returns 0.
  function automatic gf_t gf_inv(gf_t a);
    gf_t r;
    gf_t sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  // alpha^e
  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t r;
    r = 8'h01;
    for (int i = 0; i < 255; i++)
      if (i < int'(e % 255)) r = gf_mul_a(r);
    return r;
  endfunction

  // ---- SRAM map ----
  // 0x000..0x0FF : input ring, 8 frames x 32 main bytes, written by WFCK.
  // 0x100..0x7FF : deinterleave area, 1792 bytes, indexed by the C1 frame
  //                counter k (0..1791). Column j (C1 output symbol j, 0..27)
  //                is a sliding window of COL_LEN(j) = 4*(27-j) + 6 bytes: the
  //                CIRC delay 4*(27-j) frames plus room for one frame of C2
  //                lag, C2 correction and the 2-frame descrambling delay. All
  //                windows slide by one byte per frame, so one shared counter
  //                addresses every column: addr = 0x100 + (k + COL_BASE(j)) mod 1792.
  localparam int unsigned IN_RING_FRAMES = 8;
  localparam int unsigned DEINT_BASE     = 256;
  localparam int unsigned DEINT_SIZE     = 1792;
  localparam int unsigned COL_SLACK      = 6;

  // last address offset of column j's window (sum of window lengths - 1)
  function automatic logic [10:0] col_base(logic [4:0] j);
    int jj;
    jj = int'(j);
    return 11'((jj + 1) * (4 * 27 + COL_SLACK) - 2 * jj * (jj + 1) - 1);
  endfunction

  // (a - d) mod 1792, for a in 0..1791 and d in 0..1791
  function automatic logic [10:0] slot_sub(logic [10:0] a, logic [10:0] d);
    logic [11:0] t;
    t = {1'b0, a} + 12'(DEINT_SIZE) - {1'b0, d};
    return (t >= 12'(DEINT_SIZE)) ? 11'(t - 12'(DEINT_SIZE)) : t[10:0];
  endfunction

  // SRAM address of column j for C1 frame slot s
  function automatic logic [10:0] col_addr(logic [4:0] j, logic [10:0] s);
    logic [11:0] t;
    t = {1'b0, s} + {1'b0, col_base(j)};
    if (t >= 12'(DEINT_SIZE)) t = t - 12'(DEINT_SIZE);
    return 11'(t + 12'(DEINT_BASE));
  endfunction

  // CIRC deinterleave delay of column j, in frames
  function automatic logic [10:0] col_delay(logic [4:0] j);
    return 11'(DEINT_D * (27 - int'(j)));
  endfunction

  // Result of one RS decode, handed from the decoder to the corrector.
  typedef struct packed {
    logic        is_c2;              // codeword came from the second stage
    logic [10:0] tag;                // caller's frame tag
    logic        fail;               // beyond correction capability
    logic [2:0]  nerr;               // number of corrected symbols (0..4)
    logic [3:0][4:0] loc;            // stream index of each correction
    logic [3:0][7:0] val;            // XOR value of each correction
    logic [2:0]  nera;               // number of erasure flags seen (saturates at 7)
  } rs_result_t;

endpackage
