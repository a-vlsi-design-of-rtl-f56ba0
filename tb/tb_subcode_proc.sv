// tb_subcode_proc: feeds subcode symbols for several 98-frame blocks and
// checks the emitted words: the S0 frame marked in bit 9, the S1 frame in
// bit 8, data bytes unchanged; lock on the first S0/S1 pair; a stray S0/S1
// pair in mid-block ignored (protection); a block with no S0 still marked
// at its expected frame (insertion); loss of lock after MAX_MISS missing
// syncs.
//
// Timing: one subcode symbol per 588 clocks (shortened to a few clocks
// between symbols in the bench, which the block does not care about). The
// 98-frame period and the protection/insertion functions follow the
// document; the lock and miss rules are this design's.
module tb_subcode_proc;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;
  logic sub_valid, sub_s0, sub_s1, out_valid, locked, ev_inserted;
  logic [7:0] sub_data;
  logic [9:0] out_word;
  int checks = 0, failures = 0;

  subcode_proc dut (.*);

  logic [9:0] got [0:2000];
  int ng = 0, n_ins = 0;
  always @(posedge clk) begin
    if (out_valid) begin got[ng] = out_word; ng++; end
    if (ev_inserted) n_ins++;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame e: block starts at e = 5 + 98*b; block 2 has no S0; a stray pair
  // at e = 50/51
  function automatic bit f_s0(int e);
    return ((e - 5) % 98 == 0 && e >= 5 && e != 5 + 196) || (e == 50);
  endfunction
  function automatic bit f_s1(int e);
    return ((e - 5) % 98 == 1 && e >= 5) || (e == 51);
  endfunction

  initial begin
    int bad;
    bit lost;
    sub_valid = 0; sub_s0 = 0; sub_s1 = 0; sub_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 5 + 98 * 4; e++) begin
      @(negedge clk);
      sub_valid = 1; sub_s0 = f_s0(e); sub_s1 = f_s1(e);
      sub_data = (sub_s0 || sub_s1) ? 8'h00 : 8'(e * 3 + 1);
      @(negedge clk); sub_valid = 0;
      repeat (3) @(negedge clk);
    end
    // word i describes frame i
    bad = 0;
    for (int e = 5; e < ng; e++) begin
      logic [9:0] exp_w;
      if ((e - 5) % 98 == 0) exp_w = 10'h200;
      else if ((e - 5) % 98 == 1) exp_w = 10'h100;
      else exp_w = {2'b00, (e == 50 || e == 51) ? 8'h00 : 8'(e * 3 + 1)};
      if (got[e] != exp_w) begin
        bad++;
        if (bad < 4) $display("frame %0d got %h exp %h", e, got[e], exp_w);
      end
    end
    checks++; if (bad != 0) begin failures++; $display("FAIL words"); end
    checks++; if (got[1][9:8] != 2'b00) failures++;
    checks++; if (n_ins != 1) begin failures++; $display("FAIL insertions %0d", n_ins); end
    checks++; if (!locked) failures++;
    // now stop sending syncs: lock is lost after 4 blocks
    lost = 0;
    for (int e = 0; e < 98 * 5; e++) begin
      @(negedge clk); sub_valid = 1; sub_s0 = 0; sub_s1 = 0; sub_data = 8'h11;
      @(negedge clk); sub_valid = 0;
      if (!locked) lost = 1;
    end
    checks++; if (!lost) begin failures++; $display("FAIL lock not lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
