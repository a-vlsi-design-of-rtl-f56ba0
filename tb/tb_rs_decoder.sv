// tb_rs_decoder: self-checking test of the pipelined RS errata decoder.
// The bench builds its own log/antilog tables, encodes random messages
// systematically with g(x) = (x-1)(x-a)(x-a^2)(x-a^3), corrupts them and
// checks that applying the decoder's (location, value) pairs restores the
// codeword. It covers C1 with 0..2 errors and 3 errors (must fail), C2 with
// 1..4 erasures, erasure plus error, and 5 erasures (must fail), and checks
// that back-to-back codewords come out one every N+1 cycles.
//
// Timing: symbols fed at the decoder's in_ready pace, results taken with
// res_ready high, watchdog. The error/erasure limits (2 errors for C1, 4
// erasures for C2) follow the document; the throughput figure is this
// design's.
module tb_rs_decoder;
  import cd_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_first, in_last, in_era, in_is_c2;
  gf_t in_data;
  logic [10:0] in_tag;
  logic res_valid, res_ready;
  rs_result_t res;

  rs_decoder dut (.*);

  int checks = 0, failures = 0;
  byte unsigned exp_t [0:511];
  byte unsigned log_t [0:255];

  function automatic byte unsigned m(byte unsigned a, byte unsigned b);
    if (a == 0 || b == 0) return 0;
    return exp_t[int'(log_t[a]) + int'(log_t[b])];
  endfunction

  byte unsigned cw [0:31];
  byte unsigned rx [0:31];
  bit           er [0:31];

  task automatic encode(int n);
    byte unsigned g [0:4];
    byte unsigned r [0:3];
    byte unsigned fb;
    g = '{1, 0, 0, 0, 0};
    for (int i = 0; i < 4; i++) begin  // multiply by (x + a^i)
      for (int j = 4; j > 0; j--) g[j] = g[j-1] ^ m(g[j], exp_t[i]);
      g[0] = m(g[0], exp_t[i]);
    end
    // g[] holds coefficients low..high with g[4] = 1
    r = '{0, 0, 0, 0};
    for (int i = 0; i < n - 4; i++) begin
      cw[i] = byte'($urandom_range(0, 255));
      fb = cw[i] ^ r[3];
      r[3] = r[2] ^ m(fb, g[3]);
      r[2] = r[1] ^ m(fb, g[2]);
      r[1] = r[0] ^ m(fb, g[1]);
      r[0] = m(fb, g[0]);
    end
    for (int i = 0; i < 4; i++) cw[n-4+i] = r[3-i];
    for (int i = 0; i < n; i++) begin
      rx[i] = cw[i];
      er[i] = 0;
    end
  endtask

  task automatic corrupt(int n, int nerr, int nera);
    int p;
    int k;
    k = 0;
    while (k < nerr + nera) begin
      p = $urandom_range(0, n - 1);
      if (rx[p] == cw[p] && !er[p]) begin
        rx[p] = cw[p] ^ byte'($urandom_range(1, 255));
        if (k >= nerr) er[p] = 1;
        k++;
      end
    end
  endtask

  task automatic send(int n, bit c2);
    for (int i = 0; i < n; i++) begin
      in_valid <= 1; in_first <= (i == 0); in_last <= (i == n - 1);
      in_data <= rx[i]; in_era <= er[i]; in_is_c2 <= c2; in_tag <= 11'(n);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
  endtask

  task automatic get_and_check(int n, bit expect_fail, string what);
    byte unsigned fx [0:31];
    bit ok;
    while (!res_valid) @(posedge clk);
    for (int i = 0; i < n; i++) fx[i] = rx[i];
    for (int i = 0; i < int'(res.nerr); i++) fx[res.loc[i]] ^= res.val[i];
    ok = 1;
    for (int i = 0; i < n; i++) if (fx[i] != cw[i]) ok = 0;
    checks++;
    if (expect_fail) begin
      if (!res.fail) begin failures++; $display("FAIL %s: not flagged", what); end
    end else if (res.fail || !ok) begin
      failures++; $display("FAIL %s: fail=%0d nerr=%0d", what, res.fail, res.nerr);
    end
    @(posedge clk);
  endtask

  // a random received word: whatever the decoder does, a result not marked
  // fail must turn it into a codeword (all four syndromes zero)
  task automatic random_word(int n, bit c2);
    byte unsigned fx [0:31];
    byte unsigned sy, ap;
    bit ok;
    for (int i = 0; i < n; i++) begin rx[i] = byte'($urandom_range(0, 255)); er[i] = 0; end
    send(n, c2);
    while (!res_valid) @(posedge clk);
    if (!res.fail) begin
      n_accept++;
      for (int i = 0; i < n; i++) fx[i] = rx[i];
      for (int i = 0; i < int'(res.nerr); i++) fx[res.loc[i]] ^= res.val[i];
      ok = 1;
      for (int r = 0; r < 4; r++) begin
        sy = 0; ap = exp_t[r];
        for (int i = 0; i < n; i++) sy = m(sy, ap) ^ fx[i];
        if (sy != 0) ok = 0;
      end
      checks++;
      if (!ok) begin failures++; $display("FAIL random word accepted without a codeword, nerr=%0d", res.nerr); end
    end
    @(posedge clk);
  endtask
  int n_accept = 0;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, t2;
    byte unsigned x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = x; exp_t[i+255] = x; log_t[x] = byte'(i);
      x = (x & 8'h80) ? ((x << 1) ^ 8'h1D) : (x << 1);
    end
    exp_t[510] = exp_t[0]; exp_t[511] = exp_t[1];
    in_valid = 0; in_first = 0; in_last = 0; in_data = 0; in_era = 0; in_is_c2 = 0; in_tag = 0;
    res_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int rep = 0; rep < 20; rep++) begin
      for (int ne = 0; ne <= 2; ne++) begin
        encode(32); corrupt(32, ne, 0); send(32, 0); get_and_check(32, 0, "C1");
      end
      for (int na = 1; na <= 4; na++) begin
        encode(28); corrupt(28, 0, na); send(28, 1); get_and_check(28, 0, "C2 erasures");
      end
      encode(28); corrupt(28, 1, 2); send(28, 1); get_and_check(28, 0, "C2 1 error + 2 erasures");
      encode(28); corrupt(28, 2, 0); send(28, 1); get_and_check(28, 0, "C2 2 errors");
      encode(28); corrupt(28, 0, 5); send(28, 1); get_and_check(28, 1, "C2 5 erasures");
    end
    for (int rep = 0; rep < 6; rep++) begin
      encode(32); corrupt(32, 3, 0); send(32, 0); get_and_check(32, 1, "C1 3 errors");
    end
    // random words: 3000 C1, 1000 C2
    for (int rep = 0; rep < 3000; rep++) random_word(32, 0);
    for (int rep = 0; rep < 1000; rep++) random_word(28, 1);
    $display("random words accepted as correctable: %0d of 4000", n_accept);
    checks++;
    if (n_accept > 100) begin failures++; $display("FAIL too many random words accepted"); end
    // throughput: three back-to-back error-free C1 codewords
    encode(32);
    fork
      begin send(32, 0); send(32, 0); send(32, 0); end
      begin
        while (!res_valid) @(posedge clk);
        t0 = $time / 10; @(posedge clk);
        while (!res_valid) @(posedge clk);
        t1 = $time / 10; @(posedge clk);
        while (!res_valid) @(posedge clk);
        t2 = $time / 10;
      end
    join
    checks++;
    if ((t1 - t0) > 33 || (t2 - t1) > 33) begin
      failures++; $display("FAIL throughput %0d %0d", t1 - t0, t2 - t1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
