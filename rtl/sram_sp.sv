// sram_sp: single-port synchronous SRAM, one access per clock.
//
// Stands for the single-port SRAM macros of the design: the MFCC data SRAM
// (256 words x 32 bits, one complex sample per word), the MFCC coefficient
// (LUT) SRAM (992 x 16), the DSCNN activation SRAM (7296 x 8) and the DSCNN
// weight SRAM (22016 x 8).  It is written as a memory array so that it
// simulates and synthesises as plain logic; a silicon build would replace it
// by the foundry macro of the same size.
//
// Timing: with en high, a write (we high) stores wdata at addr on the clock
// edge; a read (we low) presents mem[addr] on rdata after that edge.  rdata
// holds its value until the next read, which the DSCNN pipeline relies on
// while it stalls.  Sizes follow the macro list of the design; the hold
// behaviour of rdata is this design's assumption.
module sram_sp #(
  parameter int DEPTH = 256,
  parameter int WIDTH = 32,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
