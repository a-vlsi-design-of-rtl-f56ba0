// tb_sdm_dac: for several constant inputs the density of ones in the 1-bit
// stream, averaged over 16384 oversampling steps, must equal
// (x + 32768) / 65536 within 0.5 %; a second-order loop also keeps the
// running error bounded, which is checked on a slow ramp.
//
// Timing: os_en every clock. The modulator is this design's; the document
// only names the 1-bit DAC.
module tb_sdm_dac;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;
  logic pcm_valid, os_en, dac_out;
  logic [15:0] pcm;
  int checks = 0, failures = 0;

  sdm_dac dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vals [5] = '{-30000, -8000, 0, 12000, 29000};
    pcm_valid = 0; pcm = 0; os_en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (vals[i]) begin
      int ones;
      real dens, expd;
      @(negedge clk); pcm = 16'(vals[i]); pcm_valid = 1; @(negedge clk); pcm_valid = 0;
      os_en = 1;
      repeat (256) @(negedge clk);   // settle
      ones = 0;
      for (int t = 0; t < 16384; t++) begin
        @(negedge clk);
        if (dac_out) ones++;
      end
      os_en = 0;
      dens = real'(ones) / 16384.0;
      expd = (real'(vals[i]) + 32768.0) / 65536.0;
      checks++;
      if (dens - expd > 0.005 || expd - dens > 0.005) begin
        failures++; $display("FAIL x=%0d density %f expected %f", vals[i], dens, expd);
      end
    end
    // hold os_en low: output must not change
    begin
      logic o;
      o = dac_out;
      repeat (50) @(negedge clk);
      checks++; if (dac_out != o) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
