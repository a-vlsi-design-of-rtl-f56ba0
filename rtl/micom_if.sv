// micom_if: register interface between the data processor and the drive's
// microcontroller (MICOM). A simple synchronous bus: a write (wr) stores
// wdata into the register at addr on the clock edge; a read returns the
// addressed register on rdata combinationally.
//   0  MODE   bit0 CD-DA mode (interpolation on), R/W, reset 0 (CD-ROM)
//   1  STATUS bit0 frame sync locked, bit1 subcode sync locked,
//             bit2 ECC primed, bit3 subcode buffer running (read only)
//   2  C1ERR  C1 uncorrectable codewords, saturating; write clears
//   3  C2ERR  C2 uncorrectable codewords, saturating; write clears
//   4  C1COR  C1 corrected codewords, saturating; write clears
//   5  C2COR  C2 corrected codewords, saturating; write clears
//   6  SUBQ   last subcode byte read out of the subcode buffer
//   7  BIST   write bit0 = 1: start the SRAM self test (bist_start pulse);
//             read bit0 busy, bit1 done, bit2 fail
// The document only names the MICOM interface; the register map is this
// design's.
module micom_if (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] addr,
  input  logic       wr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       cdda_mode,
  input  logic       sync_locked,
  input  logic       sub_locked,
  input  logic       ecc_primed,
  input  logic       sub_running,
  input  logic       ev_c1_fail,
  input  logic       ev_c2_fail,
  input  logic       ev_c1_corr,
  input  logic       ev_c2_corr,
  input  logic       sub_rd_valid,
  input  logic [7:0] sub_rd_byte,
  output logic       bist_start,
  input  logic       bist_busy,
  input  logic       bist_done,
  input  logic       bist_fail
);
  logic [7:0] c1err, c2err, c1cor, c2cor, subq;

  function automatic logic [7:0] sat_inc(logic [7:0] v, logic ev);
    return (ev && v != 8'hFF) ? v + 8'd1 : v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cdda_mode <= 1'b0;
      c1err     <= '0;
      c2err     <= '0;
      c1cor     <= '0;
      c2cor     <= '0;
      subq      <= '0;
      bist_start <= 1'b0;
    end else begin
      bist_start <= wr && addr == 3'd7 && wdata[0];
      c1err <= sat_inc(c1err, ev_c1_fail);
      c2err <= sat_inc(c2err, ev_c2_fail);
      c1cor <= sat_inc(c1cor, ev_c1_corr);
      c2cor <= sat_inc(c2cor, ev_c2_corr);
      if (sub_rd_valid) subq <= sub_rd_byte;
      if (wr) begin
        unique case (addr)
          3'd0: cdda_mode <= wdata[0];
          3'd2: c1err <= '0;
          3'd3: c2err <= '0;
          3'd4: c1cor <= '0;
          3'd5: c2cor <= '0;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (addr)
      3'd0:    rdata = {7'd0, cdda_mode};
      3'd1:    rdata = {4'd0, sub_running, ecc_primed, sub_locked, sync_locked};
      3'd2:    rdata = c1err;
      3'd3:    rdata = c2err;
      3'd4:    rdata = c1cor;
      3'd5:    rdata = c2cor;
      3'd6:    rdata = subq;
      default: rdata = {5'd0, bist_fail, bist_done, bist_busy};
    endcase
  end
endmodule
