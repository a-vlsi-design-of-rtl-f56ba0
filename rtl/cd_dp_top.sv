// cd_dp_top: data processor of a CD signal processor for a high-speed
// CD-ROM drive.
//
// Channel bits from the data recovery (slicer + PLL, outside this module)
// go through
//   sync_detector -> efm_demod -> efm_writer
// which demodulates each 588-bit EFM frame and writes its 32 main bytes
// into the 2 KB SRAM (input ring) in the disc's frame timing, WFCK. The
// subcode byte goes to subcode_proc (subcode sync protection/insertion) and
// then into subcode_buffer (16 x 10 bits), which re-times it to the read
// frame clock RFCK. RFCK is generated here, one pulse every FRAME_CYCLES
// clocks, started once three frames are stored. On each RFCK tick ecc_ctrl
// deinterleaves and decodes one C1 and one C2 codeword through the pipelined
// rs_decoder and corrects them in the SRAM; audio_proc then reads one
// decoded frame (24 bytes), interpolates flagged samples in CD-DA mode and
// outputs the bytes with error flags for the CD-ROM decoder (ATAPI chip).
// The same RFCK tick reads one subcode word, so subcode and main data leave
// in the same timing. micom_if holds the mode and status registers; sdm_dac
// is the digital modulator of the 1-bit DAC that plays the 1X audio data
// coming back from the CD-ROM decoder. mem_arbiter shares the single-port
// SRAM (EFM writer first, then ECC, then audio). sram_bist tests the SRAM
// by March C- when started from the MICOM register 7; while it runs it owns
// the SRAM port.
// Timing: the system clock is the channel bit clock (about 4.32 MHz x
// speed, about 207 MHz at 48X); one frame is 588 clocks at full speed.
// The decoded output starts after the 4*27-frame deinterleave lines fill.
// The block structure follows the document; interfaces, memory map and
// RFCK start rule are this design's.
module cd_dp_top
  import cd_pkg::*;
#(
  parameter int unsigned FRAME_CYCLES = FRAME_BITS
) (
  input  logic        clk,
  input  logic        rst_n,
  // data recovery
  input  logic        bit_en,
  input  logic        bit_in,
  // MICOM
  input  logic [2:0]  mc_addr,
  input  logic        mc_wr,
  input  logic [7:0]  mc_wdata,
  output logic [7:0]  mc_rdata,
  // main data to the CD-ROM decoder
  output logic        main_valid,
  output logic [7:0]  main_byte,
  output logic        main_flag,
  output logic        main_frame,
  // subcode data and sync to the CD-ROM decoder
  output logic        sub_valid,
  output logic        sub_ok,
  output logic [9:0]  sub_word,
  // 1-bit DAC
  input  logic        dac_pcm_valid,
  input  logic [15:0] dac_pcm,
  input  logic        dac_os_en,
  output logic        dac_out,
  // timing and status
  output logic        wfck,
  output logic        rfck,
  output logic        sync_locked,
  output logic        sync_inserted,
  output logic        efm_code_err,
  output logic        sub_locked,
  output logic        sub_inserted,
  output logic        ecc_primed,
  output logic        ecc_overrun,
  output logic        ev_c1_corr, ev_c1_fail, ev_c2_corr, ev_c2_fail, ev_c2_era,
  output logic        ev_interp, ev_hold,
  output logic        sub_underflow, sub_overflow
);
  // ---------------- EFM front end ----------------
  logic        sym_valid;
  logic [5:0]  sym_idx;
  logic [13:0] sym_word;
  logic        byte_valid, code_err, is_s0, is_s1;

  assign efm_code_err = byte_valid && code_err;
  logic [5:0]  byte_idx;
  logic [7:0]  byte_data;

  sync_detector u_sync (
    .clk, .rst_n, .bit_en, .bit_in,
    .frame_start(wfck), .sync_inserted, .locked(sync_locked),
    .sym_valid, .sym_idx, .sym_word
  );

  efm_demod u_efm (
    .clk, .rst_n, .sym_valid, .sym_idx, .sym_word,
    .byte_valid, .byte_idx, .byte_data, .code_err, .is_s0, .is_s1
  );

  logic [2:0] wr_slot;
  logic       frame_done;
  logic       sp_valid, sp_s0, sp_s1;
  logic [7:0] sp_data;
  logic [2:0] req, we, gnt, rvalid;
  logic [2:0][10:0] addr;
  logic [2:0][7:0]  wdata;
  logic [7:0] rdata;

  efm_writer u_wr (
    .clk, .rst_n, .wfck, .byte_valid, .byte_idx, .byte_data, .is_s0, .is_s1,
    .wr_slot, .frame_done,
    .sub_valid(sp_valid), .sub_data(sp_data), .sub_s0(sp_s0), .sub_s1(sp_s1),
    .m_req(req[0]), .m_addr(addr[0]), .m_wdata(wdata[0]), .m_gnt(gnt[0])
  );
  assign we[0] = 1'b1;

  // ---------------- SRAM and arbiter ----------------
  logic        m_en, m_we;
  logic [10:0] m_addr;
  logic [7:0]  m_wdata, m_rdata;

  mem_arbiter #(.N(3), .AW(11)) u_arb (
    .clk, .rst_n, .req, .we, .addr, .wdata, .gnt, .rvalid, .rdata,
    .m_en, .m_we, .m_addr, .m_wdata, .m_rdata
  );

  // memory self test: while it runs it owns the SRAM port (test mode; the
  // data path is not expected to work during or right after it)
  logic        bist_start, bist_busy, bist_done, bist_fail;
  logic [10:0] bist_fail_addr;
  logic [7:0]  bist_fail_bits;
  logic        b_en, b_we;
  logic [10:0] b_addr;
  logic [7:0]  b_wdata;

  sram_bist #(.DEPTH(2048)) u_bist (
    .clk, .rst_n, .start(bist_start), .busy(bist_busy), .done(bist_done), .fail(bist_fail),
    .fail_addr(bist_fail_addr), .fail_bits(bist_fail_bits),
    .m_en(b_en), .m_we(b_we), .m_addr(b_addr), .m_wdata(b_wdata), .m_rdata(m_rdata)
  );

  sram_2kb u_sram (
    .clk,
    .en   (bist_busy ? b_en    : m_en),
    .we   (bist_busy ? b_we    : m_we),
    .addr (bist_busy ? b_addr  : m_addr),
    .wdata(bist_busy ? b_wdata : m_wdata),
    .rdata(m_rdata)
  );

  // ---------------- RFCK generation ----------------
  logic        rf_run;
  logic [15:0] rf_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf_run <= 1'b0;
      rf_cnt <= '0;
      rfck   <= 1'b0;
    end else begin
      rfck <= 1'b0;
      if (!rf_run) begin
        if (frame_done && wr_slot == 3'd2) rf_run <= 1'b1;
      end else if (rf_cnt == 16'(FRAME_CYCLES - 1)) begin
        rf_cnt <= '0;
        rfck   <= 1'b1;
      end else begin
        rf_cnt <= rf_cnt + 16'd1;
      end
    end
  end

  // ---------------- ECC ----------------
  logic        rs_in_valid, rs_in_ready, rs_in_first, rs_in_last, rs_in_era, rs_in_is_c2;
  gf_t         rs_in_data;
  logic [10:0] rs_in_tag;
  logic        rs_res_valid, rs_res_ready;
  rs_result_t  rs_res;
  logic [10:0] k_cur;
  logic [127:0] c1flag;
  logic [7:0]  c2fail;

  rs_decoder u_rs (
    .clk, .rst_n,
    .in_valid(rs_in_valid), .in_ready(rs_in_ready), .in_first(rs_in_first),
    .in_last(rs_in_last), .in_data(rs_in_data), .in_era(rs_in_era),
    .in_is_c2(rs_in_is_c2), .in_tag(rs_in_tag),
    .res_valid(rs_res_valid), .res_ready(rs_res_ready), .res(rs_res)
  );

  ecc_ctrl u_ecc (
    .clk, .rst_n, .rfck, .k_cur, .primed(ecc_primed), .overrun(ecc_overrun),
    .c1flag, .c2fail, .ev_c1_corr, .ev_c1_fail, .ev_c2_corr, .ev_c2_fail, .ev_c2_era,
    .rs_in_valid, .rs_in_ready, .rs_in_first, .rs_in_last, .rs_in_data,
    .rs_in_era, .rs_in_is_c2, .rs_in_tag, .rs_res_valid, .rs_res_ready, .rs_res,
    .m_req(req[1]), .m_we(we[1]), .m_addr(addr[1]), .m_wdata(wdata[1]),
    .m_gnt(gnt[1]), .m_rvalid(rvalid[1]), .m_rdata(rdata)
  );

  // ---------------- audio processor ----------------
  logic cdda_mode;

  audio_proc u_audio (
    .clk, .rst_n, .rfck, .interp_on(cdda_mode), .k_cur, .primed(ecc_primed),
    .c1flag, .c2fail,
    .out_valid(main_valid), .out_byte(main_byte), .out_flag(main_flag),
    .out_frame(main_frame), .ev_interp, .ev_hold,
    .m_req(req[2]), .m_addr(addr[2]), .m_gnt(gnt[2]), .m_rvalid(rvalid[2]),
    .m_rdata(rdata)
  );
  assign we[2]    = 1'b0;
  assign wdata[2] = '0;

  // ---------------- subcode ----------------
  logic       sw_valid;
  logic [9:0] sw_word;
  logic       sub_running;
  logic [4:0] sub_fill;

  subcode_proc u_subp (
    .clk, .rst_n, .sub_valid(sp_valid), .sub_data(sp_data), .sub_s0(sp_s0),
    .sub_s1(sp_s1), .out_valid(sw_valid), .out_word(sw_word),
    .locked(sub_locked), .ev_inserted(sub_inserted)
  );

  subcode_buffer u_subb (
    .clk, .rst_n, .wr_en(sw_valid), .wr_data(sw_word), .rd_en(rfck),
    .rd_valid(sub_valid), .rd_ok(sub_ok), .rd_data(sub_word),
    .running(sub_running), .ev_underflow(sub_underflow),
    .ev_overflow(sub_overflow), .fill(sub_fill)
  );

  // ---------------- MICOM interface and 1-bit DAC ----------------
  micom_if u_micom (
    .clk, .rst_n, .addr(mc_addr), .wr(mc_wr), .wdata(mc_wdata), .rdata(mc_rdata),
    .cdda_mode, .sync_locked, .sub_locked, .ecc_primed, .sub_running,
    .ev_c1_fail, .ev_c2_fail, .ev_c1_corr, .ev_c2_corr,
    .sub_rd_valid(sub_valid), .sub_rd_byte(sub_word[7:0]),
    .bist_start, .bist_busy, .bist_done, .bist_fail
  );

  sdm_dac u_dac (
    .clk, .rst_n, .pcm_valid(dac_pcm_valid), .pcm(dac_pcm), .os_en(dac_os_en),
    .dac_out
  );
endmodule
