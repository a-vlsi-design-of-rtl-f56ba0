// efm_writer: splits each demodulated EFM frame into its subcode byte and
// its 32 main data bytes. The main bytes are written into the SRAM input
// ring (8 frames x 32 bytes at addresses 0x000-0x0FF, frame slot = write
// frame counter mod 8) through the memory arbiter; a one-byte holding
// register covers the arbitration wait, which is far shorter than the 17
// channel bits between symbols. The write frame counter advances on each
// frame start from the sync detector (WFCK). The subcode byte and the S0/S1
// sync flags of symbol 0 go to the subcode processor on sub_valid.
// The ring size is this design's choice (it is the WFCK/RFCK jitter margin).
module efm_writer
  import cd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wfck,        // frame start pulse
  input  logic        byte_valid,
  input  logic [5:0]  byte_idx,
  input  logic [7:0]  byte_data,
  input  logic        is_s0,
  input  logic        is_s1,
  output logic [2:0]  wr_slot,     // input ring slot of the frame being written
  output logic        frame_done,  // all 32 main bytes of the frame are stored
  output logic        sub_valid,
  output logic [7:0]  sub_data,
  output logic        sub_s0,
  output logic        sub_s1,
  // memory arbiter client
  output logic        m_req,
  output logic [10:0] m_addr,
  output logic [7:0]  m_wdata,
  input  logic        m_gnt
);
  logic       started;
  logic [4:0] pend_col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started    <= 1'b0;
      wr_slot    <= '0;
      m_req      <= 1'b0;
      m_addr     <= '0;
      m_wdata    <= '0;
      pend_col   <= '0;
      frame_done <= 1'b0;
      sub_valid  <= 1'b0;
      sub_data   <= '0;
      sub_s0     <= 1'b0;
      sub_s1     <= 1'b0;
    end else begin
      sub_valid  <= 1'b0;
      frame_done <= 1'b0;
      if (wfck) begin
        started <= 1'b1;
        if (started) wr_slot <= wr_slot + 3'd1;
      end
      if (m_req && m_gnt) begin
        m_req <= 1'b0;
        if (pend_col == 5'd31) frame_done <= 1'b1;
      end
      if (byte_valid) begin
        if (byte_idx == 6'd0) begin
          sub_valid <= 1'b1;
          sub_data  <= (is_s0 || is_s1) ? 8'h00 : byte_data;
          sub_s0    <= is_s0;
          sub_s1    <= is_s1;
        end else begin
          m_req    <= 1'b1;
          pend_col <= 5'(byte_idx - 6'd1);
          m_addr   <= {3'b000, wr_slot, 5'(byte_idx - 6'd1)};
          m_wdata  <= byte_data;
        end
      end
    end
  end
endmodule
