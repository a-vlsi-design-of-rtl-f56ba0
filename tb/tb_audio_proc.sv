// tb_audio_proc: the audio processor against a bench memory model. The
// bench fills the deinterleave area (its own copy of the address map) with
// known 24-byte frames, sets C1/C2 flags for chosen symbols and gives RFCK
// ticks. It checks the byte order and descrambling (word w from C2 frame
// k-5 when w[1] = 0, else k-3), the flag rule (C2 failed and C1 flag set),
// pass-through in CD-ROM mode, and in CD-DA mode the mean-of-neighbours
// interpolation and the hold when the next sample is flagged too, plus 24
// bytes per frame.
//
// Timing: one RFCK tick per 588 clocks, memory read latency one cycle.
// The interpolation rule and descrambling checked here are this design's
// reading; the document states only that interpolation uses the ECC output
// flag in CD-DA mode and is off in CD-ROM mode.
module tb_audio_proc;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic rfck, interp_on, primed;
  logic [10:0] k_cur;
  logic [127:0] c1flag;
  logic [7:0] c2fail;
  logic out_valid, out_flag, out_frame, ev_interp, ev_hold;
  logic [7:0] out_byte;
  logic m_req, m_gnt, m_rvalid;
  logic [10:0] m_addr;
  logic [7:0] m_rdata;

  audio_proc dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] mem [2048];
  int colbase [28];

  // memory model: grant at once, data one cycle later
  assign m_gnt = m_req;
  always @(posedge clk) begin
    m_rvalid <= m_req;
    m_rdata  <= mem[m_addr];
  end

  function automatic int taddr(int j, int slot);
    int s;
    s = ((slot % 1792) + 1792) % 1792;
    return 256 + ((s + colbase[j]) % 1792);
  endfunction
  function automatic int wpos(int w);
    return 16 * ((w >> 1) & 1) + 2 * (((w >> 2) << 1) | (w & 1));
  endfunction

  // sample value of word w of audio frame n
  function automatic logic [15:0] sval(int n, int w);
    return 16'((n * 977 + w * 4099) & 16'h7FFF) - 16'h2000;
  endfunction

  // audio frame n = C2 frame n (group A) and n+2 (group B)
  task automatic put_frame(int n);
    for (int w = 0; w < 12; w++) begin
      int f;
      logic [15:0] v;
      f = ((w >> 1) & 1) ? n + 2 : n;
      v = sval(n, w);
      mem[taddr(wpos(w), f - 4 * (27 - wpos(w)))]     = v[7:0];
      mem[taddr(wpos(w) + 1, f - 4 * (27 - wpos(w) - 1))] = v[15:8];
    end
  endtask

  logic [7:0] ob [0:4095];
  logic       of [0:4095];
  int nb = 0, fb = 0, bad_fb = 0, nfr = 0;
  always @(posedge clk) if (out_valid) begin
    if (out_frame) begin
      if (nfr > 1 && fb != 24) bad_fb++;
      nfr++; fb = 0;
    end
    fb++;
    ob[nb] = out_byte; of[nb] = out_flag; nb++;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(int k);
    put_frame(k - 5);
    @(negedge clk); k_cur = 11'(k); rfck = 1; @(negedge clk); rfck = 0;
    repeat (200) @(posedge clk);
  endtask

  initial begin
    int acc, i, n_int, n_hold;
    acc = 0;
    for (int j = 0; j < 28; j++) begin acc += 4 * (27 - j) + 6; colbase[j] = acc - 1; end
    for (int a = 0; a < 2048; a++) mem[a] = 0;
    rfck = 0; interp_on = 0; primed = 1; k_cur = 0; c1flag = '0; c2fail = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // CD-ROM mode, no flags: frames k = 205..209 output audio frames 200..204
    for (int k = 205; k < 210; k++) tick(k);
    // samples come out one per channel late: stream = frame 200 word 0 onward
    i = 0;
    for (int s = 0; s < (nb / 2); s++) begin
      logic [15:0] got;
      got = {ob[2*s+1], ob[2*s]};
      checks++;
      if (got != sval(200 + s / 12, s % 12) || of[2*s]) begin
        failures++; $display("FAIL pass sample %0d got %h exp %h", s, got, sval(200 + s / 12, s % 12));
      end
    end
    checks++; if (nb != 20 + 4 * 24) begin failures++; $display("FAIL byte count %0d", nb); end
    // flags: audio frame 210, word 4 (pos 4, C2 frame 210) -> C2 fail of
    // frame 210 and C1 flag of its slot. CD-ROM mode: value passes, flagged.
    c2fail[210 % 8] = 1;
    c1flag[(210 - 4 * 27 + 4 * 4) % 128] = 1;      // low byte of word 4 (pos 4)
    nb = 0;
    for (int k = 210; k < 216; k++) tick(k);
    // stream now starts with frame 204 words 10,11 then frame 205...
    begin
      int s;
      s = 2 + (210 - 205) * 12 + 4;  // frame 210 word 4
      checks++;
      if (!of[2*s] || {ob[2*s+1], ob[2*s]} != sval(210, 4)) begin
        failures++; $display("FAIL CD-ROM flagged sample");
      end
      checks++;
      if (of[2*s - 2] || of[2*s + 2]) begin failures++; $display("FAIL neighbour flagged"); end
    end
    // CD-DA mode: interpolation of frame 220 word 4 (next L sample word 6 good)
    // and hold of frame 225 words 4 and 6 (word 6 at pos 20, C2 frame 227)
    interp_on = 1;
    c2fail = '0; c1flag = '0;
    c2fail[220 % 8] = 1;
    c1flag[(220 - 4 * 23) % 128] = 1;
    nb = 0;
    for (int k = 216; k < 226; k++) tick(k);
    begin
      int s;
      logic [16:0] sum;
      s = 2 + (220 - 211) * 12 + 4;
      sum = {sval(220, 2)[15], sval(220, 2)} + {sval(220, 6)[15], sval(220, 6)};
      checks++;
      if (!of[2*s] || {ob[2*s+1], ob[2*s]} != sum[16:1]) begin
        failures++; $display("FAIL interpolation got %h exp %h", {ob[2*s+1], ob[2*s]}, sum[16:1]);
      end
    end
    c2fail = '0; c1flag = '0;
    c2fail[230 % 8] = 1; c1flag[(230 - 4 * 23) % 128] = 1;   // frame 230 word 4
    c2fail[232 % 8] = 1; c1flag[(232 - 4 * 7) % 128] = 1;    // frame 230 word 6 (pos 20)
    nb = 0;
    for (int k = 226; k < 238; k++) tick(k);
    begin
      int s;
      s = 2 + (230 - 221) * 12 + 4;
      checks++;
      if (!of[2*s] || {ob[2*s+1], ob[2*s]} != sval(230, 2)) begin
        failures++; $display("FAIL hold (word 4) got %h exp %h", {ob[2*s+1], ob[2*s]}, sval(230, 2));
      end
      checks++;
      if (!of[2*s+4]) begin failures++; $display("FAIL word 6 not flagged"); end
    end
    checks++; if (bad_fb != 0) begin failures++; $display("FAIL bytes per frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
