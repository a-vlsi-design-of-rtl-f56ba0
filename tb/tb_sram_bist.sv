// tb_sram_bist: runs the March C- BIST against the bench's own memory model
// (2048 x 8, write on the clock edge, read data one clock later), into
// which one fault at a time is built:
//   none (must pass, in exactly 11 * 2048 clocks), a stuck-at-0 bit, a
//   stuck-at-1 bit, a transition fault (a bit that cannot fall), an
//   inversion coupling fault between two cells, and an address decoder
//   fault (address bit 10 ignored on writes).
// Each faulty run must end with fail set; for the single-cell faults the
// reported address and bit mask must be the faulty cell's.
//
// Timing: a clock of 10 ns, start pulse of one clock, watchdog. Which faults
// a March C- finds is textbook behaviour; the fault list is this bench's.
module tb_sram_bist;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic        start, busy, done, fail;
  logic [10:0] fail_addr;
  logic [7:0]  fail_bits;
  logic        m_en, m_we;
  logic [10:0] m_addr;
  logic [7:0]  m_wdata, m_rdata;
  int checks = 0, failures = 0;

  sram_bist dut (.*);

  // ---------------- memory model with one injectable fault ----------------
  typedef enum logic [2:0] {F_NONE, F_SA0, F_SA1, F_TRANS, F_COUPLE, F_ADDR} fault_e;
  fault_e      fault;
  logic [7:0]  mem [2048];
  logic [10:0] fa, fb;      // faulty cell / coupled victim
  logic [2:0]  fbit;

  always @(posedge clk) begin
    if (m_en && !m_we) begin
      m_rdata <= mem[m_addr];
      if (fault == F_SA0 && m_addr == fa) m_rdata[fbit] <= 1'b0;
      if (fault == F_SA1 && m_addr == fa) m_rdata[fbit] <= 1'b1;
    end
    if (m_en && m_we) begin
      logic [10:0] wa;
      logic [7:0]  wd;
      wa = (fault == F_ADDR) ? (m_addr & 11'h3FF) : m_addr;
      wd = m_wdata;
      if (fault == F_TRANS && wa == fa && mem[wa][fbit] && !wd[fbit]) wd[fbit] = 1'b1;
      // a rising write of bit fbit in cell fa inverts the same bit of cell fb
      if (fault == F_COUPLE && wa == fa && !mem[wa][fbit] && wd[fbit]) mem[fb][fbit] <= ~mem[fb][fbit];
      mem[wa] <= wd;
    end
  end

  task automatic run(fault_e f, logic [10:0] a, logic [10:0] b, logic [2:0] bit_n, output int cycles);
    fault = f; fa = a; fb = b; fbit = bit_n;
    for (int i = 0; i < 2048; i++) mem[i] = 8'($urandom_range(0, 255));
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 0;  // busy rose at the edge before this negedge
    while (busy) begin @(negedge clk); cycles++; end
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    start = 0; fault = F_NONE; fa = 0; fb = 0; fbit = 0; m_rdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    run(F_NONE, 0, 0, 0, cyc);
    check(done && !fail, "fault-free memory passes");
    check(cyc == 11 * 2048, $sformatf("run length %0d clocks, expected %0d", cyc, 11 * 2048));

    run(F_SA0, 11'h155, 0, 3'd3, cyc);
    check(done && fail && fail_addr == 11'h155 && fail_bits == 8'h08,
          $sformatf("stuck-at-0: fail=%0d addr=%h bits=%h", fail, fail_addr, fail_bits));

    run(F_SA1, 11'h7FF, 0, 3'd7, cyc);
    check(done && fail && fail_addr == 11'h7FF && fail_bits == 8'h80,
          $sformatf("stuck-at-1: fail=%0d addr=%h bits=%h", fail, fail_addr, fail_bits));

    run(F_TRANS, 11'h020, 0, 3'd0, cyc);
    check(done && fail && fail_addr == 11'h020 && fail_bits == 8'h01,
          $sformatf("transition fault: fail=%0d addr=%h bits=%h", fail, fail_addr, fail_bits));

    run(F_COUPLE, 11'h100, 11'h300, 3'd0, cyc);
    check(done && fail, "inversion coupling fault detected");

    run(F_COUPLE, 11'h300, 11'h100, 3'd0, cyc);
    check(done && fail, "inversion coupling fault (victim below) detected");

    run(F_ADDR, 0, 0, 0, cyc);
    check(done && fail, "address decoder fault detected");

    // done and fail stay until the next start
    repeat (10) @(posedge clk);
    check(done && fail && !busy, "status held after the run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
