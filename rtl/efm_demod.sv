// efm_demod: 14-to-8 EFM demodulation by translation table.
//
// Each 14-bit channel symbol is looked up in a table of the 256 data
// codewords and replaced by its byte; a symbol that is not in the table is
// flagged (code_err) and demodulates to 0. The two subcode sync patterns S0
// and S1, which are valid run-length words outside the data table, are
// reported on is_s0/is_s1. One symbol in, one byte out, registered: the
// result appears one clock after sym_valid.
//
// The codewords are the 14-bit words with at least 2 and at most 10 zeros
// between ones and at most 10 leading or trailing zeros (267 words). The
// table used here assigns byte b to the b-th such word in ascending order,
// S0 and S1 excluded. This is a stand-in with the same structure and code
// set as the standard EFM table, not its byte assignment, which would have
// to be loaded instead (EFM_TABLE) to read real discs.
module efm_demod
  import cd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sym_valid,
  input  logic [5:0]  sym_idx,
  input  logic [13:0] sym_word,
  output logic        byte_valid,
  output logic [5:0]  byte_idx,
  output logic [7:0]  byte_data,
  output logic        code_err,
  output logic        is_s0,
  output logic        is_s1
);
  typedef logic [13:0] efm_tab_t [256];

  function automatic bit rll_ok(logic [13:0] w);
    int last;
    int first;
    bit good;
    last  = -1;
    first = -1;
    good  = (w != 14'd0);
    for (int i = 13; i >= 0; i--) begin
      if (w[i]) begin
        if (first < 0) first = i;
        if (last >= 0 && ((last - i - 1) < 2 || (last - i - 1) > 10)) good = 0;
        last = i;
      end
    end
    if (first >= 0 && (13 - first) > 10) good = 0;
    if (last >= 0 && last > 10) good = 0;
    return good;
  endfunction

  function automatic efm_tab_t make_table();
    efm_tab_t t;
    int n;
    n = 0;
    for (int w = 0; w < 16384; w++) begin
      if (n < 256 && rll_ok(14'(w)) && 14'(w) != SUB_S0 && 14'(w) != SUB_S1) begin
        t[n] = 14'(w);
        n++;
      end
    end
    return t;
  endfunction

  localparam efm_tab_t EFM_TABLE = make_table();

  logic [7:0] hit_byte;
  logic       hit;

  always_comb begin
    hit_byte = 8'h00;
    hit      = 1'b0;
    for (int b = 0; b < 256; b++) begin
      if (sym_word == EFM_TABLE[b]) begin
        hit_byte = 8'(b);
        hit      = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byte_valid <= 1'b0;
      byte_idx   <= '0;
      byte_data  <= '0;
      code_err   <= 1'b0;
      is_s0      <= 1'b0;
      is_s1      <= 1'b0;
    end else begin
      byte_valid <= sym_valid;
      if (sym_valid) begin
        byte_idx  <= sym_idx;
        byte_data <= hit_byte;
        is_s0     <= (sym_word == SUB_S0);
        is_s1     <= (sym_word == SUB_S1);
        code_err  <= !hit && (sym_word != SUB_S0) && (sym_word != SUB_S1);
      end
    end
  end
endmodule
