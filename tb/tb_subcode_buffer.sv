// tb_subcode_buffer: writes one word per "WFCK" frame and reads one per
// "RFCK" frame, both 588 clocks apart but at a different phase; then
// stalls the writes for a few frames (a track jump) and checks that the
// read sequence stays continuous with no word lost or repeated, that
// reading starts at half fill, and that underflow and overflow are
// detected when the two clocks really drift apart.
//
// Timing: write and read strobes 588 clocks apart. Depth 16 x 10 bits and
// the WFCK write / RFCK read pointers follow the document's buffer figure;
// the half-fill start is this design's.
module tb_subcode_buffer;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;
  logic wr_en, rd_en, rd_valid, rd_ok, running, ev_underflow, ev_overflow;
  logic [9:0] wr_data, rd_data;
  logic [4:0] fill;
  int checks = 0, failures = 0;

  subcode_buffer dut (.*);

  int wcount = 0, rexp = 0, nread = 0, bad = 0, n_under = 0, n_over = 0;
  always @(posedge clk) begin
    if (rd_valid && rd_ok) begin
      nread++;
      if (rd_data != 10'(rexp)) bad++;
      rexp++;
    end
    if (ev_underflow) n_under++;
    if (ev_overflow) n_over++;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 588 * 60; t++) begin
      @(negedge clk);
      // writes stop for frames 30..33 (jump), then catch up two per frame
      wr_en = ((t % 588) == 100 && !(t / 588 >= 30 && t / 588 < 34)) ||
              ((t % 588) == 400 && (t / 588 >= 34 && t / 588 < 38));
      wr_data = 10'(wcount);
      rd_en = ((t % 588) == 250);
      if (wr_en) wcount++;
      if (t == 588 * 5) begin checks++; if (running) begin failures++; $display("FAIL started early"); end end
    end
    wr_en = 0; rd_en = 0;
    checks++; if (bad != 0) begin failures++; $display("FAIL sequence"); end
    checks++; if (nread < 45) begin failures++; $display("FAIL reads %0d", nread); end
    checks++; if (n_under != 0 || n_over != 0) begin failures++; $display("FAIL flow"); end
    // reads without writes: underflow
    for (int t = 0; t < 40; t++) begin
      @(negedge clk); rd_en = 1; @(negedge clk); rd_en = 0;
    end
    checks++; if (n_under == 0) begin failures++; $display("FAIL no underflow"); end
    for (int t = 0; t < 20; t++) begin
      @(negedge clk); wr_en = 1; @(negedge clk); wr_en = 0;
    end
    checks++; if (n_over == 0 || fill != 5'd16) begin failures++; $display("FAIL no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
