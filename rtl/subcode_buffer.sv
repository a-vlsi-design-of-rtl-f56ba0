// subcode_buffer: 16-entry x 10-bit buffer of subcode sync and data.
//
// The subcode words arrive in the write frame clock timing (WFCK, recovered
// from the disc), which jumps in phase on a track jump, while the main data
// leaves the SRAM in the read frame clock timing (RFCK). This buffer moves
// the subcode into the RFCK timing too, so the subcode sync handed to the
// CD-ROM decoder stays in step with the main data: the write pointer
// advances on wr_en (one word per WFCK frame), the read pointer on rd_en
// (one word per RFCK frame). Both are frame-rate enables in the one system
// clock (WFCK and RFCK come from the same channel clock source).
// Reading starts once START_FILL words are stored, which leaves room for
// START_FILL frames of phase slip either way. A read from an empty buffer
// returns the last word with rd_ok low (underflow); a write into a full
// one is dropped (overflow). rd_data/rd_valid appear one clock after rd_en.
// Depth and width follow the document (16 x [9:0]); START_FILL and the
// under/overflow handling are this design's choices.
module subcode_buffer #(
  parameter int unsigned DEPTH      = 16,
  parameter int unsigned WIDTH      = 10,
  parameter int unsigned START_FILL = DEPTH / 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic             rd_valid,
  output logic             rd_ok,
  output logic [WIDTH-1:0] rd_data,
  output logic             running,
  output logic             ev_underflow,
  output logic             ev_overflow,
  output logic [$clog2(DEPTH):0] fill
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign do_wr = wr_en && (fill != (PW+1)'(DEPTH));
  assign do_rd = rd_en && running && (fill != '0);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr         <= '0;
      rptr         <= '0;
      fill         <= '0;
      running      <= 1'b0;
      rd_valid     <= 1'b0;
      rd_ok        <= 1'b0;
      rd_data      <= '0;
      ev_underflow <= 1'b0;
      ev_overflow  <= 1'b0;
    end else begin
      rd_valid     <= 1'b0;
      ev_underflow <= 1'b0;
      ev_overflow  <= wr_en && !do_wr;
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      fill <= fill + (PW+1)'(do_wr) - (PW+1)'(do_rd);
      if (!running && fill >= (PW+1)'(START_FILL)) running <= 1'b1;
      if (rd_en && running) begin
        rd_valid <= 1'b1;
        rd_ok    <= do_rd;
        if (do_rd) rd_data <= mem[rptr];
        else       ev_underflow <= 1'b1;
      end
    end
  end
endmodule
