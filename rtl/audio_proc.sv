// audio_proc: reads each decoded frame out of the SRAM, interpolates
// uncorrectable audio samples in CD-DA mode and hands the data with its
// error flags to the CD-ROM decoder (ATAPI chip).
//
// On every read frame clock (RFCK tick) after the deinterleave lines are
// primed it fetches the 24 data bytes of one output frame: 12 16-bit words,
// L/R alternating, low byte first. Word w sits at C2 symbol position
// 2*{w[3:2],w[0]} (+16 when w[1] is set); words with w[1] = 0 are taken from
// the C2 frame decoded two frames earlier than the others, which undoes the
// 2-frame scrambling delay of the CIRC encoder. A byte's error flag is set
// when its C2 codeword failed and its C1 codeword had failed too (the C2
// flag is copied from the C1 flag). In CD-DA mode (interp_on) a flagged
// sample is replaced by the mean of its neighbours in the same channel, or
// by the previous sample when the next one is flagged as well; for that
// each channel is delayed by one sample. In CD-ROM mode the interpolation is
// off and the bytes pass unchanged. Each sample leaves as two bytes on
// out_valid (low, then high) with out_flag; out_frame marks the first byte
// of a frame. 24 bytes per frame, so 98 frames make one 2352-byte sector.
// The on/off rule follows the document; the interpolation formula, the byte
// order and the scrambling map are this design's reading of the CD format.
module audio_proc
  import cd_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rfck,
  input  logic         interp_on,
  input  logic [10:0]  k_cur,
  input  logic         primed,
  input  logic [127:0] c1flag,
  input  logic [7:0]   c2fail,
  output logic         out_valid,
  output logic [7:0]   out_byte,
  output logic         out_flag,
  output logic         out_frame,
  output logic         ev_interp,
  output logic         ev_hold,
  // memory arbiter client (reads only)
  output logic         m_req,
  output logic [10:0]  m_addr,
  input  logic         m_gnt,
  input  logic         m_rvalid,
  input  logic [7:0]   m_rdata
);
  typedef enum logic [2:0] {A_IDLE, A_RD, A_DAT, A_CALC, A_OUT_LO, A_OUT_HI} astate_t;

  astate_t     st;
  logic [3:0]  w;
  logic        hb;          // 0: fetching low byte, 1: high byte
  logic [7:0]  lo_byte;
  logic        lo_flag;
  logic [15:0] new_s;
  logic        new_f;
  logic        first_out;
  logic [15:0] prev_s [2];
  logic [15:0] pend_s [2];
  logic        pend_f [2];
  logic        pend_ok [2];
  logic [15:0] res_s;
  logic        res_f;

  logic [4:0]  pos;
  logic [10:0] c2f, slot;
  logic        bflag;

  assign pos   = {w[1], w[3:2], w[0], hb};
  assign c2f   = slot_sub(k_cur, w[1] ? 11'd3 : 11'd5);
  assign slot  = slot_sub(c2f, col_delay(pos));
  assign bflag = c2fail[c2f[2:0]] & c1flag[slot[6:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= A_IDLE;
      w         <= '0;
      hb        <= 1'b0;
      lo_byte   <= '0;
      lo_flag   <= 1'b0;
      new_s     <= '0;
      new_f     <= 1'b0;
      first_out <= 1'b0;
      res_s     <= '0;
      res_f     <= 1'b0;
      m_req     <= 1'b0;
      m_addr    <= '0;
      out_valid <= 1'b0;
      out_byte  <= '0;
      out_flag  <= 1'b0;
      out_frame <= 1'b0;
      ev_interp <= 1'b0;
      ev_hold   <= 1'b0;
      for (int c = 0; c < 2; c++) begin
        prev_s[c]  <= '0;
        pend_s[c]  <= '0;
        pend_f[c]  <= 1'b0;
        pend_ok[c] <= 1'b0;
      end
    end else begin
      out_valid <= 1'b0;
      out_frame <= 1'b0;
      ev_interp <= 1'b0;
      ev_hold   <= 1'b0;
      unique case (st)
        A_IDLE: if (rfck && primed) begin
          w         <= '0;
          hb        <= 1'b0;
          first_out <= 1'b1;
          st        <= A_RD;
        end
        A_RD: begin
          m_req  <= 1'b1;
          m_addr <= col_addr(pos, slot);
          if (m_req && m_gnt) begin
            m_req <= 1'b0;
            st    <= A_DAT;
          end
        end
        A_DAT: if (m_rvalid) begin
          if (!hb) begin
            lo_byte <= m_rdata;
            lo_flag <= bflag;
            hb      <= 1'b1;
            st      <= A_RD;
          end else begin
            new_s <= {m_rdata, lo_byte};
            new_f <= bflag | lo_flag;
            hb    <= 1'b0;
            st    <= A_CALC;
          end
        end
        A_CALC: begin
          // finish the pending sample of this channel using the new one
          logic c;
          logic [16:0] sum;  // sum[0] is dropped by the halving
          c   = w[0];
          sum = {prev_s[c][15], prev_s[c]} + {new_s[15], new_s};
          res_f <= pend_f[c];
          if (pend_f[c] && interp_on) begin
            if (!new_f) begin
              res_s     <= sum[16:1];
              ev_interp <= pend_ok[c];
            end else begin
              res_s   <= prev_s[c];
              ev_hold <= pend_ok[c];
            end
          end else begin
            res_s <= pend_s[c];
          end
          pend_s[c]  <= new_s;
          pend_f[c]  <= new_f;
          pend_ok[c] <= 1'b1;
          st         <= A_OUT_LO;
          if (!pend_ok[c]) begin
            // nothing pending yet on this channel: no output for this slot
            st <= (w == 4'd11) ? A_IDLE : A_RD;
            w  <= w + 4'd1;
          end
        end
        A_OUT_LO: begin
          out_valid <= 1'b1;
          out_byte  <= res_s[7:0];
          out_flag  <= res_f;
          out_frame <= first_out;
          first_out <= 1'b0;
          prev_s[w[0]] <= res_s;
          st        <= A_OUT_HI;
        end
        A_OUT_HI: begin
          out_valid <= 1'b1;
          out_byte  <= res_s[15:8];
          out_flag  <= res_f;
          st        <= (w == 4'd11) ? A_IDLE : A_RD;
          w         <= w + 4'd1;
        end
        default: st <= A_IDLE;
      endcase
    end
  end
endmodule
