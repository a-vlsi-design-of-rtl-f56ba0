// mem_arbiter: fixed-priority arbiter that shares the single port of the
// 2 KB SRAM between its clients (index 0 = highest priority: EFM writer,
// then ECC controller, then audio processor). A client raises req[i] with
// we/addr/wdata and holds them until gnt[i]; a granted read's data is on
// rdata in the following cycle, flagged by rvalid[i]. One access per clock.
// The priority order is this design's choice; the document only says that
// the EFM data, the ECC and the audio processor all use the SRAM.
module mem_arbiter #(
  parameter int unsigned N  = 3,
  parameter int unsigned AW = 11
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic [N-1:0]         we,
  input  logic [N-1:0][AW-1:0] addr,
  input  logic [N-1:0][7:0]    wdata,
  output logic [N-1:0]         gnt,
  output logic [N-1:0]         rvalid,
  output logic [7:0]           rdata,
  // SRAM side
  output logic                 m_en,
  output logic                 m_we,
  output logic [AW-1:0]        m_addr,
  output logic [7:0]           m_wdata,
  input  logic [7:0]           m_rdata
);
  always_comb begin
    gnt     = '0;
    m_en    = 1'b0;
    m_we    = 1'b0;
    m_addr  = '0;
    m_wdata = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        gnt     = '0;
        gnt[i]  = 1'b1;
        m_en    = 1'b1;
        m_we    = we[i];
        m_addr  = addr[i];
        m_wdata = wdata[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= '0;
    else        rvalid <= gnt & ~we;
  end

  assign rdata = m_rdata;

  // a grant is one-hot and only goes to a requester
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt) && ((gnt & ~req) == '0));
endmodule
