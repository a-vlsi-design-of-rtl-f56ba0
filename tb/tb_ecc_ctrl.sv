// tb_ecc_ctrl: the ECC controller with the RS decoder, the arbiter and the
// SRAM. The bench plays the EFM writer: once per frame period (588 clocks)
// it writes one CIRC-encoded EFM frame (tb_circ_pkg) into the input ring
// and gives an RFCK tick. It injects single-byte errors (C1 corrects), a
// 10-frame burst (C1 fails, C2 corrects by erasures) and a 60-frame burst
// (C2 fails). After each frame it checks, straight in the SRAM, that the
// C2 frame just decoded holds the encoded data wherever C2 succeeded, that
// the C1 error flags mark exactly the C1 frames hit by the bursts or
// needing two corrections, and that
// the controller never overran its frame.
//
// Timing: one RFCK tick per 588 clocks, about 300 frames, watchdog. The
// erasure use of C1 flags in C2 and the C2 limit of 4 erasures follow the
// document; the frame schedule is this design's.
module tb_ecc_ctrl;
  import cd_pkg::*;
  import tb_circ_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic rfck, primed, overrun;
  logic [10:0] k_cur;
  logic [127:0] c1flag;
  logic [7:0] c2fail;
  logic ev_c1_corr, ev_c1_fail, ev_c2_corr, ev_c2_fail, ev_c2_era;
  logic rs_in_valid, rs_in_ready, rs_in_first, rs_in_last, rs_in_era, rs_in_is_c2;
  gf_t rs_in_data;
  logic [10:0] rs_in_tag;
  logic rs_res_valid, rs_res_ready;
  rs_result_t rs_res;
  logic [1:0] req, we, gnt, rvalid;
  logic [1:0][10:0] addr;
  logic [1:0][7:0] wdata;
  logic [7:0] rdata;
  logic m_en, m_we;
  logic [10:0] m_addr;
  logic [7:0] m_wdata, m_rdata;

  ecc_ctrl dut (
    .clk, .rst_n, .rfck, .k_cur, .primed, .overrun, .c1flag, .c2fail,
    .ev_c1_corr, .ev_c1_fail, .ev_c2_corr, .ev_c2_fail, .ev_c2_era,
    .rs_in_valid, .rs_in_ready, .rs_in_first, .rs_in_last, .rs_in_data,
    .rs_in_era, .rs_in_is_c2, .rs_in_tag, .rs_res_valid, .rs_res_ready, .rs_res,
    .m_req(req[1]), .m_we(we[1]), .m_addr(addr[1]), .m_wdata(wdata[1]),
    .m_gnt(gnt[1]), .m_rvalid(rvalid[1]), .m_rdata(rdata)
  );
  rs_decoder u_rs (
    .clk, .rst_n, .in_valid(rs_in_valid), .in_ready(rs_in_ready),
    .in_first(rs_in_first), .in_last(rs_in_last), .in_data(rs_in_data),
    .in_era(rs_in_era), .in_is_c2(rs_in_is_c2), .in_tag(rs_in_tag),
    .res_valid(rs_res_valid), .res_ready(rs_res_ready), .res(rs_res)
  );
  mem_arbiter #(.N(2), .AW(11)) u_arb (
    .clk, .rst_n, .req, .we, .addr, .wdata, .gnt, .rvalid, .rdata,
    .m_en, .m_we, .m_addr, .m_wdata, .m_rdata
  );
  sram_2kb u_sram (.clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata));

  int checks = 0, failures = 0;
  int n_c1c = 0, n_c1f = 0, n_c2c = 0, n_c2f = 0, n_ovr = 0;
  always @(posedge clk) begin
    if (ev_c1_corr) n_c1c++;
    if (ev_c1_fail) n_c1f++;
    if (ev_c2_era)  n_c2c++;
    if (ev_c2_fail) n_c2f++;
    if (overrun)    n_ovr++;
  end

  // independent copy of the deinterleave address map
  int colbase [28];
  function automatic int taddr(int j, int slot);
    int s;
    s = ((slot % 1792) + 1792) % 1792;
    return 256 + ((s + colbase[j]) % 1792);
  endfunction

  bit burst [0:NF-1];
  int err_j [0:NF-1];  // symbol hit by a single error in EFM frame e, or -1

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc, bad_data, bad_flag, c2_ok_frames;
    acc = 0;
    for (int j = 0; j < 28; j++) begin acc += 4 * (27 - j) + 6; colbase[j] = acc - 1; end
    rfck = 0; req[0] = 0; we[0] = 1; addr[0] = 0; wdata[0] = 0;
    gf_init();
    for (int n = 0; n < NF; n++) for (int i = 0; i < 24; i++) D[n][i] = byte'($urandom_range(0, 255));
    encode_all();
    for (int e = 0; e < NF; e++) burst[e] = 0;
    for (int e = 0; e < NF; e++) err_j[e] = -1;
    for (int e = 120; e < 150; e++) begin
      err_j[e] = $urandom_range(0, 31);
      EFM[e][err_j[e]] ^= byte'($urandom_range(1, 255));
    end
    for (int e = 160; e < 170; e++) begin burst[e] = 1; for (int j = 0; j < 32; j++) EFM[e][j] ^= 8'h5A; end
    for (int e = 200; e < 260; e++) begin burst[e] = 1; for (int j = 0; j < 32; j++) EFM[e][j] ^= 8'hA5; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    bad_data = 0; bad_flag = 0; c2_ok_frames = 0;
    for (int e = 0; e < 300; e++) begin
      for (int j = 0; j < 32; j++) begin
        @(negedge clk);
        req[0] = 1; addr[0] = 11'(((e % 8) * 32) + j); wdata[0] = EFM[e][j];
        @(posedge clk);
        while (!gnt[0]) @(posedge clk);
        #1 req[0] = 0;
      end
      @(negedge clk); rfck = 1; @(negedge clk); rfck = 0;
      repeat (560) @(posedge clk);
      // C2 frame m = k-1 is now decoded and corrected
      if (e >= 112) begin
        int m;
        bit two;
        m = e - 1;
        if (!c2fail[m % 8]) begin
          c2_ok_frames++;
          for (int j = 0; j < 28; j++) begin
            if (j < 12 || j > 15) begin
              if (u_sram.mem[taddr(j, m - 4 * (27 - j))] != C2[m][j]) bad_data++;
            end
          end
        end
        // C1 frame e (odd symbols from EFM frame e, even ones from e-1) is
        // flagged when either EFM frame is in a burst, or when it collected
        // two single errors (two corrections); it is decoded by now
        two = (err_j[e] >= 0 && err_j[e] % 2 == 1) && (err_j[e-1] >= 0 && err_j[e-1] % 2 == 0);
        if (c1flag[e % 128] != (burst[e] || burst[e - 1] || two)) begin
          bad_flag++;
          if (bad_flag < 4) $display("c1flag mismatch frame %0d", e);
        end
      end
    end
    $display("c1corr=%0d c1fail=%0d c2era=%0d c2fail=%0d c2ok=%0d", n_c1c, n_c1f, n_c2c, n_c2f, c2_ok_frames);
    checks++; if (bad_data != 0) begin failures++; $display("FAIL %0d corrected symbols wrong", bad_data); end
    checks++; if (bad_flag != 0) begin failures++; $display("FAIL C1 flags"); end
    checks++; if (n_ovr != 0) begin failures++; $display("FAIL overrun"); end
    checks++; if (!primed) failures++;
    checks++; if (n_c1c == 0 || n_c1f == 0 || n_c2c == 0 || n_c2f == 0) begin failures++; $display("FAIL mechanism missing"); end
    checks++; if (c2_ok_frames < 50) begin failures++; $display("FAIL too few decoded C2 frames"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
