// tb_mem_arbiter: three clients with random requests share one SRAM model.
// Checks one grant per cycle to the highest-priority requester, that every
// request is eventually granted, that read data returns in the next cycle
// with rvalid for the right client, and that written data is stored.
//
// Timing: 3000 random cycles after a fill pass, watchdog. The fixed priority being checked
// is this design's choice; the document does not describe SRAM sharing.
module tb_mem_arbiter;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;
  logic [2:0] req, we, gnt, rvalid;
  logic [2:0][10:0] addr;
  logic [2:0][7:0] wdata;
  logic [7:0] rdata, m_wdata, m_rdata;
  logic m_en, m_we;
  logic [10:0] m_addr;
  int checks = 0, failures = 0;

  mem_arbiter dut (.*);
  sram_2kb u_sram (.clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata));

  logic [7:0] model [2048];
  int last_rd_client = -1;
  logic [7:0] last_rd_exp;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int waits [3];
    req = 0; we = 0; addr = '0; wdata = '0;
    for (int a = 0; a < 2048; a++) model[a] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // zero the memory through client 0
    for (int a = 0; a < 2048; a++) begin
      req[0] = 1; we[0] = 1; addr[0] = 11'(a); wdata[0] = 0;
      @(negedge clk);
    end
    req = 0;
    waits = '{0, 0, 0};
    for (int t = 0; t < 3000; t++) begin
      // check the read issued last cycle
      if (last_rd_client >= 0) begin
        checks++;
        if (!rvalid[last_rd_client] || rdata != last_rd_exp) begin
          failures++; $display("FAIL read data client %0d", last_rd_client);
        end
      end
      for (int c = 0; c < 3; c++) if (!req[c] && $urandom_range(0, 2) == 0) begin
        req[c] = 1; we[c] = 1'($urandom_range(0, 1)); addr[c] = 11'($urandom_range(0, 63));
        wdata[c] = 8'($urandom);
      end
      #1;
      last_rd_client = -1;
      checks++;
      begin
        int exp_c;
        exp_c = -1;
        for (int c = 2; c >= 0; c--) if (req[c]) exp_c = c;
        if ((exp_c < 0 && gnt != 0) || (exp_c >= 0 && gnt != 3'(1 << exp_c))) begin
          failures++; $display("FAIL grant %b for req %b", gnt, req);
        end
        if (exp_c >= 0) begin
          if (we[exp_c]) model[addr[exp_c]] = wdata[exp_c];
          else begin last_rd_client = exp_c; last_rd_exp = model[addr[exp_c]]; end
        end
      end
      @(negedge clk);
      for (int c = 0; c < 3; c++) begin
        if (gnt[c]) begin req[c] = 0; waits[c] = 0; end
        else if (req[c]) waits[c]++;
      end
    end
    checks++;
    if (waits[2] > 200) begin failures++; $display("FAIL client 2 starved %0d", waits[2]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
