// tb_micom_if: register read/write through the MICOM bus: mode bit set and
// cleared, status bits following their inputs, event counters counting,
// saturating at 255 and cleared by a write, last subcode byte captured,
// the BIST start pulse and status bits.
//
// Timing: one bus access per clock, read data combinational. The register
// map is this design's; the document only names the MICOM interface.
module tb_micom_if;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;
  logic [2:0] addr;
  logic wr, cdda_mode, sync_locked, sub_locked, ecc_primed, sub_running;
  logic ev_c1_fail, ev_c2_fail, ev_c1_corr, ev_c2_corr, sub_rd_valid;
  logic [7:0] wdata, rdata, sub_rd_byte;
  logic bist_start, bist_busy, bist_done, bist_fail;
  int checks = 0, failures = 0;

  micom_if dut (.*);

  task automatic chk(logic [2:0] a, logic [7:0] e, string what);
    addr = a; #1;
    checks++;
    if (rdata !== e) begin failures++; $display("FAIL %s: %h != %h", what, rdata, e); end
  endtask

  task automatic pulse(ref logic s, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); s = 1; @(negedge clk); s = 0;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0; wr = 0; wdata = 0; sync_locked = 0; sub_locked = 0; ecc_primed = 0; sub_running = 0;
    ev_c1_fail = 0; ev_c2_fail = 0; ev_c1_corr = 0; ev_c2_corr = 0; sub_rd_valid = 0; sub_rd_byte = 0;
    bist_busy = 0; bist_done = 0; bist_fail = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(0, 8'h00, "mode after reset");
    @(negedge clk); addr = 0; wdata = 8'h01; wr = 1; @(negedge clk); wr = 0;
    chk(0, 8'h01, "mode set");
    checks++; if (!cdda_mode) failures++;
    sync_locked = 1; ecc_primed = 1;
    chk(1, 8'h05, "status");
    sub_locked = 1; sub_running = 1;
    chk(1, 8'h0F, "status all");
    pulse(ev_c1_fail, 7);
    pulse(ev_c2_fail, 3);
    pulse(ev_c1_corr, 300);
    pulse(ev_c2_corr, 2);
    chk(2, 8'd7, "C1 errors");
    chk(3, 8'd3, "C2 errors");
    chk(4, 8'd255, "C1 corrected saturates");
    chk(5, 8'd2, "C2 corrected");
    @(negedge clk); addr = 2; wr = 1; @(negedge clk); wr = 0;
    chk(2, 8'd0, "C1 errors cleared");
    chk(3, 8'd3, "C2 errors kept");
    @(negedge clk); sub_rd_byte = 8'h5C; sub_rd_valid = 1; @(negedge clk); sub_rd_valid = 0;
    chk(6, 8'h5C, "subcode byte");
    @(negedge clk); addr = 0; wdata = 8'h00; wr = 1; @(negedge clk); wr = 0;
    chk(0, 8'h00, "mode cleared");
    // BIST register: a write of bit 0 gives one start pulse; status bits read back
    @(negedge clk); addr = 7; wdata = 8'h01; wr = 1; @(negedge clk); wr = 0;
    checks++; if (!bist_start) begin failures++; $display("FAIL no BIST start pulse"); end
    @(negedge clk);
    checks++; if (bist_start) begin failures++; $display("FAIL BIST start longer than one clock"); end
    bist_busy = 1; chk(7, 8'h01, "BIST busy");
    bist_busy = 0; bist_done = 1; bist_fail = 1; chk(7, 8'h06, "BIST done and fail");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
