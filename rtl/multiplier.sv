// multiplier: the single shared signed multiplier of the accelerator.
//
// Both the MFCC front end and the DSCNN compute engine use this one
// multiplier; the multiplier_arbiter in front of it decides who uses it in a
// given cycle.  An operation is accepted when in_valid is high (in_ready is
// always high: the unit takes one operation per cycle).  The product
// appears one clock later on out_prod with out_valid high for one cycle,
// together with the tag that came in with the operands, so the arbiter can
// route the result back to the requester.
//
// From the design description: one shared multiplier, operands and result
// exchanged by handshake.  The registered one-cycle latency and the tag are
// this design's choices.  Operands are 18 x 16 bits so that the 16-bit MFCC
// datapath (sums of two 16-bit values on the a side) fits; the 9-bit
// activation and 8-bit weight of the DSCNN are sign-extended into it.
module multiplier #(
  parameter int A_W   = 18,
  parameter int B_W   = 16,
  parameter int TAG_W = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [A_W-1:0]  in_a,
  input  logic signed [B_W-1:0]  in_b,
  input  logic [TAG_W-1:0]       in_tag,
  output logic                   out_valid,
  output logic signed [A_W+B_W-1:0] out_prod,
  output logic [TAG_W-1:0]       out_tag
);
  assign in_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_prod  <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_prod <= in_a * in_b;
        out_tag  <= in_tag;
      end
    end
  end
endmodule
