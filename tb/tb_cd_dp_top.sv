// tb_cd_dp_top: end-to-end test of the data processor at its default
// parameters. The bench CIRC-encodes random audio frames (tb_circ_pkg),
// EFM-modulates them with subcode (tb_efm_pkg) and feeds NRZI channel bits,
// one per clock, so WFCK and RFCK both run at 588 clocks per frame. Along
// the way it makes each mechanism happen and counts it:
//   random single-byte errors (C1 correction), a 12-frame burst of about
//   2.1 mm (C1 failures, C2 erasure correction, no flag may reach the
//   output), an 80-frame burst (C2 failures, interpolation and hold in
//   CD-DA mode), an invalid EFM word (code error), a destroyed frame sync (sync
//   insertion), a missing S0 (subcode sync insertion), a 250-bit pause in
//   the channel bits (WFCK phase jump, absorbed by the input ring and the
//   subcode buffer), a CD-ROM to CD-DA mode switch over the MICOM bus,
//   the 1-bit DAC, and at the end the SRAM self test started over the bus.
// Checks: every unflagged output sample equals the encoded audio; in CD-DA
// mode every flagged sample equals the interpolation rule; output frames
// carry 24 bytes; the ECC never overruns its frame; the subcode words come
// out as a continuous sequence; the DAC pulse density matches its input;
// the MICOM counters agree with the event counts.
//
// Interface: drives bit_en/bit_in and the MICOM bus, watches every output
// port. Timing: 588 clocks per frame on both WFCK and RFCK, about 500
// frames in all, with a watchdog. Frame format, CIRC structure and the EFM
// code set follow the CD standard; the EFM byte assignment is the same
// stand-in as in the RTL.
module tb_cd_dp_top;
  import tb_circ_pkg::*;
  import tb_efm_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic        bit_en, bit_in;
  logic [2:0]  mc_addr;
  logic        mc_wr;
  logic [7:0]  mc_wdata, mc_rdata;
  logic        main_valid, main_flag, main_frame;
  logic [7:0]  main_byte;
  logic        sub_valid, sub_ok;
  logic [9:0]  sub_word;
  logic        dac_pcm_valid, dac_os_en, dac_out;
  logic [15:0] dac_pcm;
  logic        wfck, rfck, sync_locked, sync_inserted, efm_code_err, sub_locked, sub_inserted;
  logic        ecc_primed, ecc_overrun;
  logic        ev_c1_corr, ev_c1_fail, ev_c2_corr, ev_c2_fail, ev_c2_era, ev_interp, ev_hold;
  logic        sub_underflow, sub_overflow;

  cd_dp_top dut (.*);

  int checks = 0, failures = 0;
  localparam int RUN = 500;     // EFM frames sent

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- event counters ----------------
  int n_c1c = 0, n_c1f = 0, n_c2c = 0, n_c2f = 0, n_c2e = 0, n_int = 0, n_hold = 0;
  int n_ins = 0, n_subins = 0, n_ovr = 0, n_under = 0, n_over = 0, n_codeerr = 0;
  always @(posedge clk) begin
    if (ev_c1_corr) n_c1c++;
    if (ev_c1_fail) n_c1f++;
    if (ev_c2_corr) n_c2c++;
    if (ev_c2_fail) n_c2f++;
    if (ev_c2_era)  n_c2e++;
    if (ev_interp)  n_int++;
    if (ev_hold)    n_hold++;
    if (sync_inserted) n_ins++;
    if (sub_inserted)  n_subins++;
    if (ecc_overrun)   n_ovr++;
    if (sub_underflow) n_under++;
    if (sub_overflow)  n_over++;
    if (efm_code_err)  n_codeerr++;
  end

  // ---------------- main data capture ----------------
  int          nbytes = 0, k0 = -1, frame_bytes = 0, nframes = 0, bad_frames = 0;
  logic [7:0]  ob [0:20000];
  logic        of [0:20000];
  logic        om [0:20000];
  always @(posedge clk) begin
    if (main_valid) begin
      if (main_frame) begin
        if (k0 < 0) k0 = int'(dut.k_cur);
        else begin
          // the first frame is 20 bytes: each channel holds one sample back
          if (nframes > 0 && frame_bytes != 24) begin
            bad_frames++;
            $display("frame with %0d bytes at k=%0d", frame_bytes, dut.k_cur);
          end
          nframes++;
        end
        frame_bytes = 0;
      end
      frame_bytes++;
      if (nbytes <= 20000) begin
        ob[nbytes] = main_byte; of[nbytes] = main_flag; om[nbytes] = dut.cdda_mode;
      end
      nbytes++;
    end
  end

  // ---------------- subcode capture ----------------
  int sub_idx = -1, sub_bad = 0, sub_reads = 0, sub_syncs = 0;
  function automatic logic [9:0] sub_expect(int e);
    if (e % 98 == 0) return 10'h200;
    if (e % 98 == 1) return 10'h100;
    return {2'b00, 8'((e * 5 + 3) & 255)};
  endfunction
  always @(posedge clk) begin
    if (sub_valid && sub_ok) begin
      sub_reads++;
      if (sub_idx == -1) begin
        if (sub_word[9]) begin sub_idx = -2; sub_syncs++; end
      end else if (sub_idx == -2) begin
        // first data word after the sync: recover its frame number
        if (!sub_word[8]) sub_idx = ((int'(sub_word[7:0]) - 3) * 205) & 255;
      end else begin
        sub_idx++;
        if (sub_word != sub_expect(sub_idx)) begin
          sub_bad++;
          if (sub_bad < 5) $display("subcode mismatch at %0d: %h", sub_idx, sub_word);
        end
        if (sub_word[9]) sub_syncs++;
      end
    end
  end

  // ---------------- DAC ----------------
  int dac_ones = 0, dac_n = 0;
  always @(posedge clk) if (dac_os_en) begin
    dac_n++;
    if (dac_out) dac_ones++;
  end

  task automatic mc_write(logic [2:0] a, logic [7:0] d);
    @(negedge clk);
    mc_addr = a; mc_wdata = d; mc_wr = 1;
    @(negedge clk);
    mc_wr = 0;
  endtask

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [13:0] etab [256];
  logic level = 0;

  initial begin
    frame_bits_t f;
    logic [13:0] syms [33];
    int mode_switch_done;
    int n_samples, bad_clean, bad_interp, n_flagged, n_flag_early;
    bit_en = 0; bit_in = 0; mc_addr = 0; mc_wr = 0; mc_wdata = 0;
    dac_pcm_valid = 0; dac_pcm = 0; dac_os_en = 0;
    gf_init();
    for (int b = 0; b < 256; b++) etab[b] = efm_word(b);
    for (int n = 0; n < NF; n++) for (int i = 0; i < 24; i++) D[n][i] = byte'($urandom_range(0, 255));
    encode_all();
    // error injection on the EFM payloads
    // The patterns are more than 109 frames (the span of a C2 codeword)
    // apart, so that each is judged on its own.
    // single-byte errors on every second frame: one error per C1 codeword
    for (int e = 130; e < 160; e += 2) EFM[e][$urandom_range(0, 31)] ^= byte'($urandom_range(1, 255));
    // 12 frames, about 2.1 mm of track at 1.3 m/s: must be corrected unflagged
    for (int e = 270; e < 282; e++) for (int j = 0; j < 32; j++) EFM[e][j] ^= byte'($urandom_range(1, 255));
    // 80 frames: beyond C2, flagged and interpolated or held
    for (int e = 400; e < 480; e++) for (int j = 0; j < 32; j++) EFM[e][j] ^= byte'($urandom_range(1, 255));
    repeat (3) @(posedge clk);
    rst_n = 1;
    // DAC: constant input, modulator running every clock for a while
    dac_pcm_valid = 1; dac_pcm = 16'sd16384; dac_os_en = 1;
    mode_switch_done = 0;
    for (int e = 0; e < RUN; e++) begin
      syms[0] = (e % 98 == 0 && e != 196) ? S0 : (e % 98 == 1) ? S1 :
                etab[(e % 98 == 0) ? 0 : ((e * 5 + 3) & 255)];
      for (int j = 0; j < 32; j++) syms[j + 1] = etab[EFM[e][j]];
      f = build_frame(syms);
      if (e == 210) f[587 - 5] = 1'b1;  // destroy the frame sync
      if (e == 140) begin             // channel bit error: two adjacent ones,
        f[587 - 200] = 1'b1;          // never a valid EFM word (symbol 10)
        f[587 - 201] = 1'b1;
      end
      if (e == 200) begin               // channel pause: WFCK phase jump
        bit_en = 0;
        repeat (250) @(posedge clk);
      end
      if (e == 220 && !mode_switch_done) begin
        mc_write(3'd0, 8'h01);          // CD-DA mode: interpolation on
        mode_switch_done = 1;
      end
      for (int i = 587; i >= 0; i--) begin
        if (f[i]) level = ~level;
        @(negedge clk);
        bit_en = 1; bit_in = level;
        if (dac_n == 8192) dac_os_en = 0;
      end
    end
    bit_en = 0;
    repeat (2000) @(posedge clk);

    // ---------------- analysis ----------------
    n_samples = nbytes / 2; bad_clean = 0; bad_interp = 0; n_flagged = 0; n_flag_early = 0;
    begin
      logic [15:0] prev_out [2];
      prev_out[0] = 0; prev_out[1] = 0;
      for (int i = 0; i < n_samples && 2 * i + 1 <= 20000; i++) begin
        int n, w, c;
        logic [15:0] got, exp_v, nxt_v;
        logic fl, nfl, md;
        n = k0 - 5 + i / 12; w = i % 12; c = w % 2;
        got = {ob[2*i+1], ob[2*i]};
        fl = of[2*i]; md = om[2*i];
        if (n >= NF - 1) break;
        exp_v = {D[n][2*w+1], D[n][2*w]};
        if (!fl) begin
          if (got != exp_v) begin
            bad_clean++;
            if (bad_clean < 5) $display("clean sample %0d (frame %0d word %0d): got %h exp %h", i, n, w, got, exp_v);
          end
        end else begin
          n_flagged++;
          if (n < 398) n_flag_early++;  // before the 80-frame burst reaches the output
          if (md && i + 2 < n_samples) begin
            // next sample of the same channel
            nfl = (2*(i+2) <= 20000 && i + 2 < n_samples) ? of[2*(i+2)] : 1'b1;
            nxt_v = {D[k0 - 5 + (i+2)/12][2*((i+2)%12)+1], D[k0 - 5 + (i+2)/12][2*((i+2)%12)]};
            if (!nfl) begin
              logic [16:0] s;
              s = {prev_out[c][15], prev_out[c]} + {nxt_v[15], nxt_v};
              exp_v = s[16:1];
            end else exp_v = prev_out[c];
            if (got != exp_v) begin
              bad_interp++;
              if (bad_interp < 5) $display("interp sample %0d: got %h exp %h", i, got, exp_v);
            end
          end
        end
        prev_out[c] = got;
      end
    end
    $display("samples=%0d flagged=%0d c1corr=%0d c1fail=%0d c2corr=%0d c2era=%0d c2fail=%0d interp=%0d hold=%0d ins=%0d subins=%0d",
             n_samples, n_flagged, n_c1c, n_c1f, n_c2c, n_c2e, n_c2f, n_int, n_hold, n_ins, n_subins);
    check(k0 >= 0 && n_samples > 12 * 200, "enough decoded output");
    check(bad_clean == 0, "unflagged samples equal the encoded audio");
    check(bad_interp == 0, "flagged samples follow the interpolation rule");
    check(bad_frames == 0 && nframes > 200, "24 bytes per output frame");
    check(n_ovr == 0, "ECC finishes within each frame");
    check(sub_bad == 0 && sub_reads > 300, "subcode sequence continuous");
    check(sub_syncs >= 3, "subcode syncs delivered");
    check(n_under == 0 && n_over == 0, "subcode buffer neither under- nor overflows");
    check(n_codeerr > 0, "EFM code errors seen in the bursts");
    // mechanisms
    check(n_c1c > 0, "C1 correction happened");
    check(n_c1f > 0, "C1 failure happened");
    check(n_c2e > 0, "C2 erasure correction happened");
    check(n_c2f > 0, "C2 failure happened");
    check(n_int > 0, "interpolation happened");
    check(n_hold > 0, "hold happened");
    check(n_ins > 0, "frame sync insertion happened");
    check(n_subins > 0, "subcode sync insertion happened");
    check(n_flagged > 0, "flagged samples reached the output");
    check(n_flag_early == 0, $sformatf("12-frame burst corrected without flags (%0d flagged)", n_flag_early));
    // 1-bit DAC: 16384/65536 above mid-scale -> density 0.75
    check(dac_n == 8192 && dac_ones > 6040 && dac_ones < 6250, $sformatf("DAC density %0d/8192", dac_ones));
    // MICOM counters (saturating at 255)
    @(negedge clk); mc_addr = 3'd2; #1;
    check(int'(mc_rdata) == ((n_c1f > 255) ? 255 : n_c1f), "MICOM C1 error counter");
    mc_addr = 3'd3; #1;
    check(int'(mc_rdata) == ((n_c2f > 255) ? 255 : n_c2f), "MICOM C2 error counter");
    mc_addr = 3'd0; #1;
    check(mc_rdata == 8'h01, "MICOM mode register");
    mc_addr = 3'd1; #1;
    check(mc_rdata[2] == 1'b1, "MICOM status shows ECC primed");
    // memory self test started over the MICOM bus (after the data run: it
    // takes over the SRAM)
    mc_write(3'd7, 8'h01);
    @(negedge clk); mc_addr = 3'd7; #1;
    check(mc_rdata[0] == 1'b1, "memory BIST running");
    repeat (11 * 2048 + 10) @(posedge clk);
    @(negedge clk); mc_addr = 3'd7; #1;
    check(mc_rdata[2:0] == 3'b010, $sformatf("memory BIST done without fail (%b)", mc_rdata[2:0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
