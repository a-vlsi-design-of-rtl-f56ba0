// sram_bist: built-in self test of the 2 KB SRAM by the March C- algorithm.
//
// A pulse on start takes over the memory port (busy high) and runs six
// march elements over all DEPTH addresses with solid data backgrounds
// (all zeros / all ones in the 8-bit word):
//   0 up   (w0)        1 up   (r0, w1)     2 up   (r1, w0)
//   3 down (r0, w1)    4 down (r1, w0)     5 up   (r0)
// It finds stuck-at, transition and most coupling faults between cells.
// Each read is compared with the expected background one clock later (the
// SRAM's read latency). At the end done is set, with fail high if any
// compare missed; fail_addr and fail_bits hold the first failing address and
// the bits that differed. done/fail stay until the next start.
//
// Interface: start (pulse), busy, done, fail, fail_addr, fail_bits; memory
// port m_en/m_we/m_addr/m_wdata/m_rdata with the SRAM's timing (write on
// the clock edge, read data one clock after m_en). While busy the owner of
// the port must route it to this block.
// Timing: element 0 takes one clock per address, the others two (read, then
// compare and write), so a run takes 11 * DEPTH clocks (22 528 for 2 KB),
// about 0.11 ms at 207 MHz.
// That the memory is tested by BIST follows the document; the algorithm,
// backgrounds and interface are this design's choices.
module sram_bist #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          fail,
  output logic [AW-1:0] fail_addr,
  output logic [7:0]    fail_bits,
  output logic          m_en,
  output logic          m_we,
  output logic [AW-1:0] m_addr,
  output logic [7:0]    m_wdata,
  input  logic [7:0]    m_rdata
);
  logic [2:0]    elem;
  logic          phase;     // 0: read (or the write of element 0), 1: compare + write
  logic [AW-1:0] a;
  logic          exp_one;   // background expected by this element's read
  logic          wr_one;    // background written by this element
  logic          has_wr;
  logic          down;
  logic          last_addr;

  assign exp_one   = (elem == 3'd2) || (elem == 3'd4);
  assign wr_one    = (elem == 3'd1) || (elem == 3'd3);
  assign has_wr    = (elem != 3'd5);
  assign down      = (elem == 3'd3) || (elem == 3'd4);
  assign last_addr = down ? (a == '0) : (a == AW'(DEPTH - 1));

  // memory port: combinational from the state
  always_comb begin
    m_en    = 1'b0;
    m_we    = 1'b0;
    m_addr  = a;
    m_wdata = wr_one ? 8'hFF : 8'h00;
    if (busy) begin
      if (elem == 3'd0) begin
        m_en = 1'b1;
        m_we = 1'b1;
      end else if (!phase) begin
        m_en = 1'b1;                  // read
      end else if (has_wr) begin
        m_en = 1'b1;                  // write after the compare
        m_we = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      fail      <= 1'b0;
      fail_addr <= '0;
      fail_bits <= '0;
      elem      <= '0;
      phase     <= 1'b0;
      a         <= '0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        done  <= 1'b0;
        fail  <= 1'b0;
        fail_addr <= '0;
        fail_bits <= '0;
        elem  <= '0;
        phase <= 1'b0;
        a     <= '0;
      end
    end else begin
      if (elem != 3'd0 && !phase) begin
        phase <= 1'b1;
      end else begin
        if (elem != 3'd0 && m_rdata != (exp_one ? 8'hFF : 8'h00) && !fail) begin
          fail      <= 1'b1;
          fail_addr <= a;
          fail_bits <= m_rdata ^ (exp_one ? 8'hFF : 8'h00);
        end
        phase <= 1'b0;
        if (last_addr) begin
          if (elem == 3'd5) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            elem <= elem + 3'd1;
            // elements 3 and 4 run downwards
            a <= (elem == 3'd2 || elem == 3'd3) ? AW'(DEPTH - 1) : '0;
          end
        end else begin
          a <= down ? a - 1'b1 : a + 1'b1;
        end
      end
    end
  end
endmodule
