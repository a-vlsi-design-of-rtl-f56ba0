// tb_sync_detector: feeds NRZI-coded EFM frames (built by tb_efm_pkg) one
// channel bit every second clock and checks: every symbol word and index,
// one frame_start per frame, an inserted sync for a frame whose sync is
// destroyed (symbols still cut correctly), no extra frame start for a sync
// pattern written outside the window (protection), and loss of lock after
// MAX_MISS frames without sync.
//
// Timing: one channel bit every second clock, watchdog. The protection and
// insertion functions follow the document; the window and miss limit are
// this design's parameters.
module tb_sync_detector;
  import tb_efm_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;
  logic bit_en, bit_in, frame_start, sync_inserted, locked, sym_valid;
  logic [5:0] sym_idx;
  logic [13:0] sym_word;
  int checks = 0, failures = 0;

  sync_detector dut (.*);

  logic [13:0] exp_syms [33];
  logic [13:0] cur_syms [33];
  int n_fs = 0, n_ins = 0, sym_seen = 0, sym_bad = 0;
  bit check_syms = 1;
  logic level = 0;

  always @(posedge clk) begin
    if (frame_start) n_fs++;
    if (sync_inserted) n_ins++;
    if (sym_valid && check_syms) begin
      sym_seen++;
      if (sym_word !== cur_syms[sym_idx]) sym_bad++;
    end
  end

  task automatic send_frame(frame_bits_t f);
    for (int i = 587; i >= 0; i--) begin
      if (f[i]) level = ~level;
      bit_en <= 1; bit_in <= level;
      @(posedge clk);
      bit_en <= 0;
      @(posedge clk);
    end
  endtask

  function automatic frame_bits_t make(int seed);
    logic [13:0] s [33];
    for (int k = 0; k < 33; k++) s[k] = efm_word((seed * 7 + k * 13) % 256);
    exp_syms = s;
    return build_frame(s);
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_bits_t f;
    int fs0, ins0;
    bit_en = 0; bit_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // six clean frames
    for (int n = 0; n < 6; n++) begin
      f = make(n);
      cur_syms = exp_syms;
      send_frame(f);
    end
    checks++; if (!locked) begin failures++; $display("FAIL not locked"); end
    checks++; if (n_fs != 6 || n_ins != 0) begin failures++; $display("FAIL fs=%0d ins=%0d", n_fs, n_ins); end
    checks++; if (sym_seen != 6 * 33 - 33 + 33 || sym_bad != 0) begin
      failures++; $display("FAIL symbols seen=%0d bad=%0d", sym_seen, sym_bad); end
    // destroyed sync: insertion, symbols still right
    fs0 = n_fs; sym_seen = 0;
    f = make(20); cur_syms = exp_syms;
    f[587-5] = 1'b1;  // breaks the first 10-zero run
    send_frame(f);
    f = make(21); cur_syms = exp_syms; send_frame(f);
    checks++; if (n_ins != 1 || n_fs != fs0 + 2) begin failures++; $display("FAIL insertion ins=%0d", n_ins); end
    checks++; if (sym_bad != 0 || sym_seen != 66) begin failures++; $display("FAIL symbols after insertion"); end
    // false sync pattern in the data area: ignored
    fs0 = n_fs; ins0 = n_ins; check_syms = 0;
    f = make(30);
    for (int i = 0; i < 24; i++) f[300 - i] = 1'(24'b100000000001000000000010 >> (23 - i));
    send_frame(f);
    check_syms = 1; sym_seen = 0;
    f = make(31); cur_syms = exp_syms; send_frame(f);
    checks++; if (n_fs != fs0 + 2 || n_ins != ins0) begin failures++; $display("FAIL protection fs=%0d", n_fs - fs0); end
    checks++; if (sym_bad != 0 || sym_seen != 33) begin failures++; $display("FAIL symbols after false sync"); end
    // no syncs at all: lock is lost after 8 inserted frames
    check_syms = 0;
    for (int n = 0; n < 9; n++) begin
      f = make(40 + n); f[587-5] = 1'b1; send_frame(f);
    end
    checks++; if (locked) begin failures++; $display("FAIL lock kept"); end
    // relock on the next good frame
    f = make(50); send_frame(f);
    checks++; if (!locked) begin failures++; $display("FAIL no relock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
