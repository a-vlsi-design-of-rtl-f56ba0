// tb_efm_writer: drives demodulated frames (symbol 0 = subcode, 1..32 =
// main) with frame-start pulses and a memory model that sometimes delays
// the grant. Checks that each main byte lands at {slot, column} with the
// slot advancing per frame (mod 8), that frame_done follows the 32nd
// byte, and that the subcode byte and S0/S1 flags come out on sub_valid.
//
// Timing: one byte per 17 clocks as from the demodulator, grant delayed
// by 0..3 cycles at random. The 8-frame input ring is this design's; the
// split into 32 main bytes and 1 subcode byte follows the document.
module tb_efm_writer;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;
  logic wfck, byte_valid, is_s0, is_s1, frame_done, sub_valid, sub_s0, sub_s1;
  logic [5:0] byte_idx;
  logic [7:0] byte_data, sub_data, m_wdata;
  logic [2:0] wr_slot;
  logic m_req, m_gnt;
  logic [10:0] m_addr;
  int checks = 0, failures = 0;

  efm_writer dut (.*);

  logic [7:0] mem [2048];
  logic [7:0] last_sub;
  logic last_s0, last_s1;
  int n_done = 0, n_sub = 0;
  always @(posedge clk) begin
    m_gnt <= m_req && !m_gnt && ($urandom_range(0, 3) != 0);
    if (m_req && m_gnt) mem[m_addr] = m_wdata;
    if (frame_done) n_done++;
    if (sub_valid) begin n_sub++; last_sub = sub_data; last_s0 = sub_s0; last_s1 = sub_s1; end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wfck = 0; byte_valid = 0; byte_idx = 0; byte_data = 0; is_s0 = 0; is_s1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 11; f++) begin
      @(negedge clk); wfck = 1; @(negedge clk); wfck = 0;
      for (int s = 0; s < 33; s++) begin
        repeat (10) @(negedge clk);
        byte_valid = 1; byte_idx = 6'(s);
        byte_data = 8'(f * 40 + s);
        is_s0 = (s == 0) && (f == 3);
        is_s1 = (s == 0) && (f == 4);
        @(negedge clk); byte_valid = 0; is_s0 = 0; is_s1 = 0;
        if (s == 0) begin
          @(negedge clk);
          checks++;
          if (last_sub != ((f == 3 || f == 4) ? 8'h00 : 8'(f * 40)) || last_s0 != (f == 3) || last_s1 != (f == 4)) begin
            failures++; $display("FAIL subcode frame %0d", f);
          end
        end
      end
      repeat (20) @(negedge clk);
      for (int c = 0; c < 32; c++) begin
        checks++;
        if (mem[(f % 8) * 32 + c] != 8'(f * 40 + c + 1)) begin
          failures++; $display("FAIL frame %0d col %0d", f, c);
        end
      end
      checks++; if (n_done != f + 1) begin failures++; $display("FAIL frame_done count"); end
    end
    checks++; if (n_sub != 11) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
