// tb_sram_2kb: writes a pseudo-random pattern to every address, reads it
// back with the one-cycle read latency, then checks that a write does not
// disturb a neighbouring word.
//
// Timing: one access per clock, read data one cycle later. The 2 KB size
// follows the document.
module tb_sram_2kb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we;
  logic [10:0] addr;
  logic [7:0] wdata, rdata;
  int checks = 0, failures = 0;

  sram_2kb dut (.*);

  function automatic logic [7:0] pat(int a);
    return 8'((a * 37) ^ (a >> 3) ^ 8'h5A);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    @(posedge clk);
    for (int a = 0; a < 2048; a++) begin
      en <= 1; we <= 1; addr <= 11'(a); wdata <= pat(a);
      @(posedge clk);
    end
    for (int a = 0; a < 2048; a++) begin
      en <= 1; we <= 0; addr <= 11'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== pat(a)) begin failures++; $display("FAIL addr %0d", a); end
    end
    en <= 1; we <= 1; addr <= 11'd100; wdata <= 8'hC3; @(posedge clk);
    en <= 1; we <= 0; addr <= 11'd101; @(posedge clk); #1;
    checks++; if (rdata !== pat(101)) failures++;
    en <= 1; we <= 0; addr <= 11'd100; @(posedge clk); #1;
    checks++; if (rdata !== 8'hC3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
