// ecc_ctrl: C1/C2 ECC sequencing with CIRC deinterleaving in the 2 KB SRAM.
//
// Once per read frame clock (RFCK tick) it advances the C1 frame counter k
// (0..1791) and
//   1. reads the C1 codeword of frame k from the input ring: odd symbols
//      from the newest frame, even symbols from the frame before (the one
//      frame decoder delay), inverting the parity symbols 12..15 and
//      28..31, and streams it into the RS decoder; symbols 0..27 are also
//      copied into deinterleave column j at slot k;
//   2. reads the C2 codeword of frame m = k-1: column j from slot
//      m - 4*(27-j), each symbol with the C1 error flag of its C1 codeword
//      as erasure flag, and streams it into the RS decoder.
// C2 works one frame behind C1 so that C1 of a frame is corrected before C2
// reads its zero-delay column.
// A second state machine (step 5 of the decoder, error correction) takes
// each decoder result, records the C1 error flag (c1flag, per C1 frame) or
// the C2 failure (c2fail, per C2 frame) and corrects the stored symbols by
// read-modify-write: corrected = stored XOR error value. Parity symbols are
// not corrected since nothing reads them afterwards.
// Per frame this takes about 140 SRAM accesses plus 8 per correction, well
// inside the 588 clocks of a frame when the system clock equals the channel
// bit clock. `overrun` pulses if a tick comes before the previous frame was
// issued. Output flags for the audio processor: a symbol is in error when
// its C2 codeword failed and its C1 flag is set (the C1 flag is copied).
// Decoding order, erasure use and flag copying follow the document; the
// memory layout, the C2 one-frame lag and the schedule are this design's.
module ecc_ctrl
  import cd_pkg::*;
#(
  parameter bit C1_FLAG_ON_2 = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rfck,
  output logic [10:0]  k_cur,
  output logic         primed,     // deinterleave lines filled, C2 output valid
  output logic         overrun,
  output logic [127:0] c1flag,
  output logic [7:0]   c2fail,
  output logic         ev_c1_corr, ev_c1_fail, ev_c2_corr, ev_c2_fail, ev_c2_era,
  // RS decoder
  output logic         rs_in_valid,
  input  logic         rs_in_ready,
  output logic         rs_in_first,
  output logic         rs_in_last,
  output gf_t          rs_in_data,
  output logic         rs_in_era,
  output logic         rs_in_is_c2,
  output logic [10:0]  rs_in_tag,
  input  logic         rs_res_valid,
  output logic         rs_res_ready,
  input  rs_result_t   rs_res,
  // memory arbiter client
  output logic         m_req,
  output logic         m_we,
  output logic [10:0]  m_addr,
  output logic [7:0]   m_wdata,
  input  logic         m_gnt,
  input  logic         m_rvalid,
  input  logic [7:0]   m_rdata
);
  typedef enum logic [2:0] {I_IDLE, I_C1_RD, I_C1_DAT, I_FEED, I_C1_WR, I_C2_RD, I_C2_DAT} istate_t;
  typedef enum logic [1:0] {C_IDLE, C_RD, C_DAT, C_WR} cstate_t;

  istate_t     ist;
  cstate_t     cst;
  logic [4:0]  j;
  logic        phase_c2;
  gf_t         sym;
  logic        sym_era;
  logic [7:0]  warm;

  // issue side memory request
  logic        i_req, i_we;
  logic [10:0] i_addr;
  logic [7:0]  i_wdata;
  // correction side memory request
  logic        c_req, c_we;
  logic [10:0] c_addr;
  logic [7:0]  c_wdata;

  rs_result_t  cur;
  logic [2:0]  ci;
  logic [10:0] c_slot;

  logic [10:0] c2_base, c2_slot;
  logic        par_c1;

  assign c2_base = slot_sub(k_cur, 11'd1);
  assign c2_slot = slot_sub(c2_base, col_delay(j));
  assign par_c1  = (j >= 5'd12 && j <= 5'd15) || (j >= 5'd28);

  // correction side has priority on the shared client port
  always_comb begin
    if (c_req) begin
      m_req = 1'b1; m_we = c_we; m_addr = c_addr; m_wdata = c_wdata;
    end else begin
      m_req = i_req; m_we = i_we; m_addr = i_addr; m_wdata = i_wdata;
    end
  end

  assign rs_in_valid = (ist == I_FEED);
  assign rs_in_first = (j == 5'd0);
  assign rs_in_last  = phase_c2 ? (j == 5'd27) : (j == 5'd31);
  assign rs_in_data  = sym;
  assign rs_in_era   = sym_era;
  assign rs_in_is_c2 = phase_c2;
  assign rs_in_tag   = phase_c2 ? c2_base : k_cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ist      <= I_IDLE;
      j        <= '0;
      phase_c2 <= 1'b0;
      sym      <= '0;
      sym_era  <= 1'b0;
      k_cur    <= 11'(DEINT_SIZE - 1);
      warm     <= '0;
      primed   <= 1'b0;
      overrun  <= 1'b0;
      i_req    <= 1'b0;
      i_we     <= 1'b0;
      i_addr   <= '0;
      i_wdata  <= '0;
    end else begin
      overrun <= 1'b0;
      if (rfck) begin
        if (ist != I_IDLE) begin
          overrun <= 1'b1;
        end else begin
          k_cur    <= (k_cur == 11'(DEINT_SIZE - 1)) ? 11'd0 : k_cur + 11'd1;
          j        <= '0;
          phase_c2 <= 1'b0;
          ist      <= I_C1_RD;
          if (warm != 8'd255) warm <= warm + 8'd1;
          // C2 of frame k-1 needs 4*27 + 1 earlier C1 frames; the audio side
          // reads C2 frames up to k-5
          if (warm >= 8'(4 * 27 + 8)) primed <= 1'b1;
        end
      end
      unique case (ist)
        I_IDLE: ;
        I_C1_RD: begin
          i_req  <= 1'b1;
          i_we   <= 1'b0;
          // even symbols come from the previous frame
          i_addr <= {3'b000, j[0] ? k_cur[2:0] : (k_cur[2:0] - 3'd1), j};
          if (i_req && m_gnt && !c_req) begin
            i_req <= 1'b0;
            ist   <= I_C1_DAT;
          end
        end
        I_C1_DAT: if (m_rvalid) begin
          sym     <= par_c1 ? ~m_rdata : m_rdata;
          sym_era <= 1'b0;
          ist     <= I_FEED;
        end
        I_FEED: if (rs_in_ready) begin
          if (!phase_c2) begin
            if (j < 5'd28) begin
              ist     <= I_C1_WR;
              i_req   <= 1'b1;
              i_we    <= 1'b1;
              i_addr  <= col_addr(j, k_cur);
              i_wdata <= sym;
            end else if (j == 5'd31) begin
              j        <= '0;
              phase_c2 <= 1'b1;
              ist      <= I_C2_RD;
            end else begin
              j   <= j + 5'd1;
              ist <= I_C1_RD;
            end
          end else begin
            if (j == 5'd27) ist <= I_IDLE;
            else begin
              j   <= j + 5'd1;
              ist <= I_C2_RD;
            end
          end
        end
        I_C1_WR: if (i_req && m_gnt && !c_req) begin
          i_req <= 1'b0;
          i_we  <= 1'b0;
          j     <= j + 5'd1;
          ist   <= I_C1_RD;
        end
        I_C2_RD: begin
          i_req  <= 1'b1;
          i_we   <= 1'b0;
          i_addr <= col_addr(j, c2_slot);
          if (i_req && m_gnt && !c_req) begin
            i_req <= 1'b0;
            ist   <= I_C2_DAT;
          end
        end
        I_C2_DAT: if (m_rvalid) begin
          sym     <= m_rdata;
          sym_era <= c1flag[c2_slot[6:0]];
          ist     <= I_FEED;
        end
        default: ist <= I_IDLE;
      endcase
    end
  end

  // ---------------- error correction (step 5) ----------------
  assign rs_res_ready = (cst == C_IDLE);

  logic [4:0] cj;
  logic       skip;
  assign cj   = cur.loc[ci[1:0]];
  assign skip = cur.is_c2 ? (cj >= 5'd12 && cj <= 5'd15) : (cj >= 5'd28);
  assign c_slot = cur.is_c2 ? slot_sub(cur.tag, col_delay(cj)) : cur.tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst        <= C_IDLE;
      cur        <= '0;
      ci         <= '0;
      c1flag     <= '0;
      c2fail     <= '0;
      c_req      <= 1'b0;
      c_we       <= 1'b0;
      c_addr     <= '0;
      c_wdata    <= '0;
      ev_c1_corr <= 1'b0;
      ev_c1_fail <= 1'b0;
      ev_c2_corr <= 1'b0;
      ev_c2_fail <= 1'b0;
      ev_c2_era  <= 1'b0;
    end else begin
      ev_c1_corr <= 1'b0;
      ev_c1_fail <= 1'b0;
      ev_c2_corr <= 1'b0;
      ev_c2_fail <= 1'b0;
      ev_c2_era  <= 1'b0;
      unique case (cst)
        C_IDLE: if (rs_res_valid) begin
          cur <= rs_res;
          ci  <= '0;
          cst <= C_RD;
          if (rs_res.is_c2) begin
            c2fail[rs_res.tag[2:0]] <= rs_res.fail;
            ev_c2_fail <= rs_res.fail && primed;
            ev_c2_corr <= !rs_res.fail && rs_res.nerr != 3'd0 && primed;
            ev_c2_era  <= !rs_res.fail && rs_res.nera != 3'd0 && primed;
          end else begin
            c1flag[rs_res.tag[6:0]] <= rs_res.fail || (C1_FLAG_ON_2 && rs_res.nerr >= 3'd2);
            ev_c1_fail <= rs_res.fail;
            ev_c1_corr <= !rs_res.fail && rs_res.nerr != 3'd0;
          end
        end
        C_RD: begin
          if (ci >= cur.nerr) begin
            cst <= C_IDLE;
          end else if (skip) begin
            ci <= ci + 3'd1;
          end else begin
            c_req  <= 1'b1;
            c_we   <= 1'b0;
            c_addr <= col_addr(cj, c_slot);
            if (c_req && m_gnt) begin
              c_req <= 1'b0;
              cst   <= C_DAT;
            end
          end
        end
        C_DAT: if (m_rvalid) begin
          c_req   <= 1'b1;
          c_we    <= 1'b1;
          c_wdata <= m_rdata ^ cur.val[ci[1:0]];
          cst     <= C_WR;
        end
        C_WR: if (c_req && m_gnt) begin
          c_req <= 1'b0;
          c_we  <= 1'b0;
          ci    <= ci + 3'd1;
          cst   <= C_RD;
        end
        default: cst <= C_IDLE;
      endcase
    end
  end
endmodule
