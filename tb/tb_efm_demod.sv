// tb_efm_demod: every byte 0..255 is modulated by the bench's own table and
// must come back one clock later with no error flag; S0 and S1 must raise
// their flags, and words breaking the run-length rules must raise code_err.
//
// Timing: one symbol per two clocks, byte_valid expected the next clock.
// The bench table is built by its own code with the same stand-in byte
// assignment as the RTL (the standard table is not in the document).
module tb_efm_demod;
  import tb_efm_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;
  logic sym_valid, byte_valid, code_err, is_s0, is_s1;
  logic [5:0] sym_idx, byte_idx;
  logic [13:0] sym_word;
  logic [7:0] byte_data;
  int checks = 0, failures = 0;

  efm_demod dut (.*);

  task automatic put(logic [13:0] w, logic [5:0] idx);
    sym_valid <= 1; sym_word <= w; sym_idx <= idx;
    @(posedge clk);
    sym_valid <= 0;
    #1;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_valid = 0; sym_word = 0; sym_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 256; b++) begin
      put(efm_word(b), 6'(b % 33));
      checks++;
      if (!byte_valid || byte_data != 8'(b) || code_err || is_s0 || is_s1 || byte_idx != 6'(b % 33)) begin
        failures++; $display("FAIL byte %0d -> %0d err=%0d", b, byte_data, code_err);
      end
    end
    put(S0, 0); checks++; if (!is_s0 || is_s1 || code_err) failures++;
    put(S1, 0); checks++; if (!is_s1 || is_s0 || code_err) failures++;
    put(14'h3FFF, 1); checks++; if (!code_err) failures++;
    put(14'h0000, 1); checks++; if (!code_err) failures++;
    put(14'b10100000000000, 1); checks++; if (!code_err) failures++;
    put(14'b00000000000001, 1); checks++; if (!code_err) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
