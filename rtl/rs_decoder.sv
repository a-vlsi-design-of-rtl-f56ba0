// rs_decoder: pipelined Reed-Solomon errata decoder for the CD C1 (32,28) and
// C2 (28,24) codes over GF(256), 4 parity symbols, roots alpha^0..alpha^3.
//
// The decoding steps are the five of the C1/C2 ECC block, each in its own
// pipeline stage so that up to four codewords are in flight at once:
//   S1  syndrome calculation and erasure-flag power calculation. One symbol
//       per cycle, highest-degree symbol first; each flagged symbol records
//       its locator alpha^position.
//   S2  Forney (modified) syndrome T(x) = S(x)L(x) mod x^4 and erasure
//       locator polynomial L(x) = prod(1 + X_j x), one cycle.
//   S3  key equation solver by the modified Euclid's algorithm, started from
//       (x^4, T(x)) with the multiplier polynomial seeded with L(x), so that it
//       yields the errata locator sigma(x) and errata evaluator omega(x) at
//       once. One partial-division step per cycle; it stops when
//       2*deg(remainder) < 4 + e (e = number of erasures).
//   S4  Chien search over the codeword positions with Forney's error value
//       Y = omega(x) / (x * sigma'(x)) at each root x = X^-1; the inverse is
//       the inversion circuit.
// Step 5, error correction, is done by the caller on the stored codeword
// using the (location, value) pairs of the result (see ecc_ctrl).
//
// Interface: symbols arrive on in_valid/in_ready with in_first/in_last
// framing; in_era marks an erasure (used only when in_is_c2 is set, C1 is
// decoded for errors only). The result leaves on res_valid/res_ready.
// A codeword of length N occupies S1 for N cycles and S4 for N cycles, so
// the pipeline takes one codeword every N+1 cycles; latency is about
// 2N + 12 cycles. A codeword is marked fail when more erasures than 4 are
// flagged, when the Euclid loop does not finish, when sigma/omega are not a
// valid errata pair (sigma(0) = 0, deg omega >= deg sigma, or
// 2*deg sigma > 4 + e), or when the number of Chien roots differs from
// deg sigma(x).
// The algorithm choice and stage split follow the document; the stream
// interface, the per-cycle schedule and the failure tests are this design's.
module rs_decoder
  import cd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_first,
  input  logic        in_last,
  input  gf_t         in_data,
  input  logic        in_era,
  input  logic        in_is_c2,
  input  logic [10:0] in_tag,
  output logic        res_valid,
  input  logic        res_ready,
  output rs_result_t  res
);

  typedef gf_t poly_t [0:4];

  function automatic int pdeg(poly_t p);
    int d;
    d = -1;
    for (int i = 0; i < 5; i++) if (p[i] != 8'h00) d = i;
    return d;
  endfunction

  function automatic gf_t peval(poly_t p, gf_t x);
    gf_t acc;
    acc = 8'h00;
    for (int i = 4; i >= 0; i--) acc = gf_mul(acc, x) ^ p[i];
    return acc;
  endfunction

  // ---------------- S1: syndromes and erasure powers ----------------
  logic        s1_full;     // S1 holds a finished codeword
  gf_t         s1_syn [0:3];
  gf_t         s1_pw  [0:3];
  logic [2:0]  s1_nera;
  logic [5:0]  s1_len;
  logic        s1_c2;
  logic [10:0] s1_tag;
  logic        s2_full, s3_full, s4_full;
  logic        s2_take;

  assign in_ready = !s1_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_full <= 1'b0;
      s1_nera <= '0;
      s1_len  <= '0;
      s1_c2   <= 1'b0;
      s1_tag  <= '0;
      for (int k = 0; k < 4; k++) begin
        s1_syn[k] <= '0;
        s1_pw[k]  <= '0;
      end
    end else begin
      if (s2_take) s1_full <= 1'b0;
      if (in_valid && in_ready) begin
        logic [2:0] ne;
        logic       era;
        era = in_era && in_is_c2;
        ne  = in_first ? 3'd0 : s1_nera;
        for (int k = 0; k < 4; k++) begin
          gf_t ak;
          ak = gf_alpha_pow(k);
          s1_syn[k] <= in_first ? in_data : (gf_mul(s1_syn[k], ak) ^ in_data);
          // earlier locators move up one position per new symbol
          s1_pw[k]  <= in_first ? 8'h00 : gf_mul_a(s1_pw[k]);
          if (era && ne == 3'(k)) s1_pw[k] <= 8'h01;
        end
        if (era && ne != 3'd7) ne = ne + 3'd1;
        s1_nera <= ne;
        s1_len  <= in_first ? 6'd1 : s1_len + 6'd1;
        if (in_first) begin
          s1_c2  <= in_is_c2;
          s1_tag <= in_tag;
        end
        if (in_last) s1_full <= 1'b1;
      end
    end
  end

  // ---------------- S2: erasure locator and Forney syndrome ----------------
  poly_t       s2_lam, s2_t;
  logic [2:0]  s2_nera;
  logic [5:0]  s2_len;
  logic        s2_c2, s2_fail;
  logic [10:0] s2_tag;
  logic        s3_take;
  poly_t       lam_c, t_c;

  always_comb begin
    poly_t nl;
    for (int i = 0; i < 5; i++) begin
      lam_c[i] = (i == 0) ? 8'h01 : 8'h00;
      nl[i]    = 8'h00;
      t_c[i]   = 8'h00;
    end
    for (int j = 0; j < 4; j++) begin
      if (3'(j) < s1_nera) begin
        nl[0] = lam_c[0];
        for (int i = 1; i < 5; i++) nl[i] = lam_c[i] ^ gf_mul(s1_pw[j], lam_c[i-1]);
        lam_c = nl;
      end
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j <= i; j++)
        t_c[i] = t_c[i] ^ gf_mul(s1_syn[j], lam_c[i-j]);
  end

  assign s2_take = s1_full && (!s2_full || s3_take);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_full <= 1'b0;
      s2_nera <= '0;
      s2_len  <= '0;
      s2_c2   <= 1'b0;
      s2_fail <= 1'b0;
      s2_tag  <= '0;
      for (int i = 0; i < 5; i++) begin
        s2_lam[i] <= '0;
        s2_t[i]   <= '0;
      end
    end else begin
      if (s3_take) s2_full <= 1'b0;
      if (s2_take) begin
        s2_full <= 1'b1;
        s2_lam  <= lam_c;
        s2_t    <= t_c;
        s2_nera <= s1_nera;
        s2_len  <= s1_len;
        s2_c2   <= s1_c2;
        s2_tag  <= s1_tag;
        s2_fail <= (s1_nera > 3'd4);
      end
    end
  end

  // ---------------- S3: modified Euclid key equation solver ----------------
  poly_t       ra, rb, ua, ub;
  logic [2:0]  s3_nera;
  logic [5:0]  s3_len;
  logic        s3_c2, s3_fail, s3_done;
  logic [10:0] s3_tag;
  logic [3:0]  s3_iter;
  logic        s4_take;
  logic        euclid_stop;
  int          dega, degb;

  assign dega = pdeg(ra);
  assign degb = pdeg(rb);
  assign euclid_stop = (2 * degb < 4 + int'(s3_nera)) || s3_fail;
  assign s3_take = s2_full && (!s3_full || s4_take);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_full <= 1'b0;
      s3_done <= 1'b0;
      s3_nera <= '0;
      s3_len  <= '0;
      s3_c2   <= 1'b0;
      s3_fail <= 1'b0;
      s3_tag  <= '0;
      s3_iter <= '0;
      for (int i = 0; i < 5; i++) begin
        ra[i] <= '0;
        rb[i] <= '0;
        ua[i] <= '0;
        ub[i] <= '0;
      end
    end else begin
      if (s4_take) begin
        s3_full <= 1'b0;
        s3_done <= 1'b0;
      end
      if (s3_take) begin
        s3_full <= 1'b1;
        s3_done <= 1'b0;
        s3_iter <= '0;
        for (int i = 0; i < 5; i++) begin
          ra[i] <= (i == 4) ? 8'h01 : 8'h00;  // x^4 (its x^4 term never meets T's top)
          ua[i] <= 8'h00;
        end
        rb      <= s2_t;
        ub      <= s2_lam;
        s3_nera <= s2_nera;
        s3_len  <= s2_len;
        s3_c2   <= s2_c2;
        s3_tag  <= s2_tag;
        s3_fail <= s2_fail;
      end else if (s3_full && !s3_done) begin
        if (euclid_stop) begin
          s3_done <= 1'b1;
        end else if (s3_iter == 4'hF) begin
          s3_fail <= 1'b1;
          s3_done <= 1'b1;
        end else begin
          s3_iter <= s3_iter + 4'd1;
          if (dega >= degb) begin
            gf_t c;
            int  sh;
            c  = gf_mul(ra[dega], gf_inv(rb[degb]));
            sh = dega - degb;
            for (int i = 0; i < 5; i++) begin
              if (i >= sh) begin
                ra[i] <= ra[i] ^ gf_mul(c, rb[i-sh]);
                ua[i] <= ua[i] ^ gf_mul(c, ub[i-sh]);
              end
            end
          end else begin
            ra <= rb;
            rb <= ra;
            ua <= ub;
            ub <= ua;
          end
        end
      end
    end
  end

  // ---------------- S4: Chien search and Forney error values ----------------
  poly_t       sig, omg;
  logic [5:0]  s4_len, s4_p;
  logic [2:0]  s4_nera;
  logic        s4_c2, s4_fail, s4_done;
  logic [10:0] s4_tag;
  gf_t         s4_x;
  logic [2:0]  s4_nerr;
  logic [3:0][4:0] s4_loc;
  logic [3:0][7:0] s4_val;
  gf_t         sig_x, omg_x, dsig_x, yval;
  logic        out_free;

  assign sig_x  = peval(sig, s4_x);
  assign omg_x  = peval(omg, s4_x);
  assign dsig_x = sig[1] ^ gf_mul(sig[3], gf_mul(s4_x, s4_x));
  assign yval   = gf_mul(omg_x, gf_inv(gf_mul(s4_x, dsig_x)));
  assign s4_take = s3_full && s3_done && (!s4_full || (s4_done && out_free));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s4_full <= 1'b0;
      s4_done <= 1'b0;
      s4_len  <= '0;
      s4_p    <= '0;
      s4_nera <= '0;
      s4_c2   <= 1'b0;
      s4_fail <= 1'b0;
      s4_tag  <= '0;
      s4_x    <= 8'h01;
      s4_nerr <= '0;
      s4_loc  <= '0;
      s4_val  <= '0;
      for (int i = 0; i < 5; i++) begin
        sig[i] <= '0;
        omg[i] <= '0;
      end
    end else begin
      if (s4_full && s4_done && out_free) begin
        s4_full <= 1'b0;
        s4_done <= 1'b0;
      end
      if (s4_take) begin
        s4_full <= 1'b1;
        s4_done <= 1'b0;
        sig     <= ub;
        omg     <= rb;
        s4_len  <= s3_len;
        s4_p    <= '0;
        s4_x    <= 8'h01;
        s4_nera <= s3_nera;
        s4_c2   <= s3_c2;
        // a valid errata solution: sigma(0) != 0, deg omega < deg sigma and
        // 2*deg sigma <= 4 + e (errors count twice, erasures once)
        s4_fail <= s3_fail || (pdeg(ub) < 0) || (ub[0] == 8'h00) || (pdeg(rb) >= pdeg(ub))
                   || (2 * pdeg(ub) > 4 + int'(s3_nera));
        s4_tag  <= s3_tag;
        s4_nerr <= '0;
        s4_loc  <= '0;
        s4_val  <= '0;
      end else if (s4_full && !s4_done) begin
        if (sig_x == 8'h00 && !s4_fail) begin
          if (s4_nerr == 3'd4) begin
            s4_fail <= 1'b1;
          end else begin
            s4_loc[s4_nerr[1:0]] <= 5'(s4_len - 6'd1 - s4_p);
            s4_val[s4_nerr[1:0]] <= yval;
            s4_nerr <= s4_nerr + 3'd1;
          end
        end
        s4_x <= gf_mul(s4_x, 8'h8E);  // times alpha^-1
        s4_p <= s4_p + 6'd1;
        if (s4_p == s4_len - 6'd1) begin
          s4_done <= 1'b1;
          if (int'(s4_nerr) + ((sig_x == 8'h00) ? 1 : 0) != pdeg(sig)) s4_fail <= 1'b1;
        end
      end
    end
  end

  // ---------------- result register ----------------
  assign out_free = !res_valid || res_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res       <= '0;
    end else begin
      if (res_valid && res_ready) res_valid <= 1'b0;
      if (s4_full && s4_done && out_free) begin
        res_valid <= 1'b1;
        res.is_c2 <= s4_c2;
        res.tag   <= s4_tag;
        res.fail  <= s4_fail;
        res.nerr  <= s4_fail ? 3'd0 : s4_nerr;
        res.loc   <= s4_loc;
        res.val   <= s4_val;
        res.nera  <= s4_nera;
      end
    end
  end

endmodule
