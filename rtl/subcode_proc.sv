// subcode_proc: subcode sync detection with protection and insertion.
//
// Symbol 0 of each EFM frame is the subcode symbol. A subcode block is 98
// frames long and starts with two frames whose subcode symbols are the sync
// patterns S0 and S1. The processor counts frames (on sub_valid, i.e. by
// WFCK) modulo 98:
//   * unlocked, it locks on the first S0 followed by S1;
//   * locked, an S0/S1 pair is accepted only where the frame counter
//     expects it (protection); when the pair is missing there the sync is
//     inserted (insertion) and the block count goes on. After MAX_MISS
//     inserted syncs in a row it drops lock.
// Each frame it emits one 10-bit word for the subcode buffer:
// {block sync, S1 frame, subcode byte}, bit 9 marking the S0 frame (the
// subcode sync) and bit 8 the S1 frame; the byte is 0 in both sync frames.
// The word leaves on out_valid one clock after sub_valid. The 98-frame
// period follows the document; the S0-then-S1 rule, MAX_MISS and the word
// layout are this design's choices.
module subcode_proc
  import cd_pkg::*;
#(
  parameter int unsigned MAX_MISS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sub_valid,
  input  logic [7:0] sub_data,
  input  logic       sub_s0,
  input  logic       sub_s1,
  output logic       out_valid,
  output logic [9:0] out_word,
  output logic       locked,
  output logic       ev_inserted
);
  logic [6:0] fcnt;        // frame number within the block, 0 = S0 frame
  logic       prev_s0;
  logic [7:0] prev_data;
  logic       prev_valid;
  logic [2:0] miss;

  // Decisions are taken one frame late, when the S1 frame has arrived, so
  // the previous frame is emitted as its role becomes known.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcnt        <= '0;
      prev_s0     <= 1'b0;
      prev_data   <= '0;
      prev_valid  <= 1'b0;
      miss        <= '0;
      locked      <= 1'b0;
      out_valid   <= 1'b0;
      out_word    <= '0;
      ev_inserted <= 1'b0;
    end else begin
      out_valid   <= 1'b0;
      ev_inserted <= 1'b0;
      if (sub_valid) begin
        logic pair;
        logic [6:0] nxt;
        logic is_sync;
        pair = prev_valid && prev_s0 && sub_s1;
        nxt  = (fcnt == 7'(SUBCODE_PERIOD - 1)) ? 7'd0 : fcnt + 7'd1;
        is_sync = 1'b0;
        if (!locked) begin
          if (pair) begin
            locked  <= 1'b1;
            miss    <= '0;
            is_sync = 1'b1;
          end
        end else if (nxt == 7'd0) begin
          is_sync = 1'b1;
          if (pair) miss <= '0;
          else begin
            ev_inserted <= 1'b1;
            if (miss == 3'(MAX_MISS - 1)) begin
              locked <= 1'b0;
              miss   <= '0;
            end else miss <= miss + 3'd1;
          end
        end
        // fcnt numbers the previous frame
        fcnt <= is_sync ? 7'd0 : nxt;
        if (prev_valid) begin
          out_valid <= 1'b1;
          out_word  <= {is_sync, 1'b0, (is_sync ? 8'h00 : prev_data)};
          if (locked && !is_sync && nxt == 7'd1) out_word <= {2'b01, 8'h00};
        end
        prev_valid <= 1'b1;
        prev_s0    <= sub_s0;
        prev_data  <= sub_data;
      end
    end
  end
endmodule
