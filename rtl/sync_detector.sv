// sync_detector: frame sync detection and symbol framing for the EFM
// channel bit stream.
//
// The recovered channel bit (one per bit_en strobe from the data recovery
// PLL) arrives as the sliced NRZI level; a transition is a channel '1'. A
// 24-bit shift register is compared with the 11T-11T frame sync pattern.
// A bit counter runs over the 588 channel bits of a frame, with the last bit
// of the sync at count 23, then 3 merging bits, then 33 symbols of 14
// channel bits each followed by 3 merging bits.
//   * Protection: once locked, a sync pattern is accepted only within
//     +/-WIN bits of where the counter expects it; patterns elsewhere (false
//     syncs made by data or defects) are ignored.
//   * Insertion: if no sync is found in the window, a frame start is
//     inserted WIN bits after the expected position and the counter carries
//     on, so the symbols keep being cut. After MAX_MISS inserted syncs in a
//     row the detector drops lock and takes the next sync it finds.
// Outputs: frame_start (one clock pulse per frame, the write frame clock
// WFCK of the main data), sym_valid with sym_idx (0 = subcode symbol,
// 1..32 = main data) and the 14-bit sym_word. The frame layout and sync
// pattern are those of the CD standard; the NRZI input, the window and the
// lock rules are this design's choices.
module sync_detector
  import cd_pkg::*;
#(
  parameter int unsigned WIN      = 2,
  parameter int unsigned MAX_MISS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_en,
  input  logic        bit_in,
  output logic        frame_start,
  output logic        sync_inserted,
  output logic        locked,
  output logic        sym_valid,
  output logic [5:0]  sym_idx,
  output logic [13:0] sym_word
);
  logic        prev_lvl;
  logic [23:0] sh;
  logic [9:0]  cnt;
  logic        win_hit;
  logic [3:0]  miss;
  logic        ch, detect, in_win;
  logic [23:0] sh_next;
  logic [9:0]  nxt;

  assign ch      = bit_in ^ prev_lvl;
  assign sh_next = {sh[22:0], ch};
  assign detect  = (sh_next == FRAME_SYNC);
  assign nxt     = (cnt == 10'(FRAME_BITS - 1)) ? 10'd0 : cnt + 10'd1;
  assign in_win  = (nxt >= 10'(23 - WIN)) && (nxt <= 10'(23 + WIN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_lvl      <= 1'b0;
      sh            <= '0;
      cnt           <= '0;
      win_hit       <= 1'b0;
      miss          <= '0;
      locked        <= 1'b0;
      frame_start   <= 1'b0;
      sync_inserted <= 1'b0;
      sym_valid     <= 1'b0;
      sym_idx       <= '0;
      sym_word      <= '0;
    end else begin
      frame_start   <= 1'b0;
      sync_inserted <= 1'b0;
      sym_valid     <= 1'b0;
      if (bit_en) begin
        prev_lvl <= bit_in;
        sh       <= sh_next;
        cnt      <= nxt;
        if (nxt == 10'd0) win_hit <= 1'b0;
        if (!locked) begin
          if (detect) begin
            locked      <= 1'b1;
            cnt         <= 10'd23;
            win_hit     <= 1'b1;
            miss        <= '0;
            frame_start <= 1'b1;
          end
        end else begin
          if (detect && in_win && !win_hit) begin
            cnt         <= 10'd23;
            win_hit     <= 1'b1;
            miss        <= '0;
            frame_start <= 1'b1;
          end else if (nxt == 10'(23 + WIN) && !win_hit) begin
            win_hit       <= 1'b1;
            frame_start   <= 1'b1;
            sync_inserted <= 1'b1;
            if (miss == 4'(MAX_MISS - 1)) begin
              locked <= 1'b0;
              miss   <= '0;
            end else begin
              miss <= miss + 4'd1;
            end
          end
          for (int s = 0; s < FRAME_SYMS; s++) begin
            if (nxt == 10'(40 + 17 * s)) begin
              sym_valid <= 1'b1;
              sym_idx   <= 6'(s);
              sym_word  <= sh_next[13:0];
            end
          end
        end
      end
    end
  end
endmodule
