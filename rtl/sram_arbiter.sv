// sram_arbiter: lets NP requesters share one single-port SRAM.
//
// Every cycle the lowest-numbered port with req[i] high wins and its
// address, write enable and data go to the SRAM; gnt[i] tells it so in the
// same cycle.  A requester that is not granted keeps its request up and
// tries again next cycle.  The SRAM read data is broadcast to all ports; a
// port that was granted a read sees its data on rdata one cycle after the
// grant (rvalid[i] marks that cycle).
//
// The description names an SRAM arbiter and states that the SRAMs accept
// both internal accesses and external initialisation; fixed priority by
// port number is this design's choice (the instantiating module puts
// write-backs ahead of reads so results never wait behind new requests).
module sram_arbiter #(
  parameter int NP    = 2,
  parameter int AW    = 8,
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NP-1:0]    req,
  input  logic [NP-1:0]    we,
  input  logic [AW-1:0]    addr  [NP],
  input  logic [WIDTH-1:0] wdata [NP],
  output logic [NP-1:0]    gnt,
  output logic [NP-1:0]    rvalid,
  output logic [WIDTH-1:0] rdata,
  // SRAM side
  output logic             m_en,
  output logic             m_we,
  output logic [AW-1:0]    m_addr,
  output logic [WIDTH-1:0] m_wdata,
  input  logic [WIDTH-1:0] m_rdata
);
  always_comb begin
    gnt     = '0;
    m_en    = 1'b0;
    m_we    = 1'b0;
    m_addr  = '0;
    m_wdata = '0;
    for (int i = NP - 1; i >= 0; i--) begin
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

  assign rdata = m_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= '0;
    else        rvalid <= gnt & ~we;
  end

  // at most one port is ever granted
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
