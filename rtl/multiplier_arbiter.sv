// multiplier_arbiter: shares the one multiplier among NREQ requesters.
//
// Each requester raises req_valid[i] with its operands and holds them until
// it sees req_ready[i] (the grant) in the same cycle; the operation is then
// issued to the multiplier.  Grants rotate round-robin: after requester i is
// served, the search starts at i+1, so neither the MFCC front end nor the
// DSCNN engine can lock the other out.  Results come back one cycle after
// the grant; the tag carried through the multiplier steers res_valid[i].
//
// The description names a multiplier arbiter between the MFCC and DSCNN
// users but not its policy; round-robin is this design's choice.
module multiplier_arbiter #(
  parameter int NREQ = 2,
  parameter int A_W  = 16,
  parameter int B_W  = 16,
  localparam int TW  = (NREQ > 1) ? $clog2(NREQ) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // requesters
  input  logic [NREQ-1:0]            req_valid,
  output logic [NREQ-1:0]            req_ready,
  input  logic signed [A_W-1:0]      req_a [NREQ],
  input  logic signed [B_W-1:0]      req_b [NREQ],
  output logic [NREQ-1:0]            res_valid,
  output logic signed [A_W+B_W-1:0]  res_prod,
  // multiplier
  output logic                       mul_valid,
  input  logic                       mul_ready,
  output logic signed [A_W-1:0]      mul_a,
  output logic signed [B_W-1:0]      mul_b,
  output logic [TW-1:0]              mul_tag,
  input  logic                       mul_out_valid,
  input  logic signed [A_W+B_W-1:0]  mul_out_prod,
  input  logic [TW-1:0]              mul_out_tag,
  output logic                       contention   // more than one request this cycle
);
  logic [TW-1:0] prio;   // first requester to look at
  logic          found;
  logic [TW-1:0] sel;

  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int k = 0; k < NREQ; k++) begin
      if (!found && req_valid[(int'(prio) + k) % NREQ]) begin
        found = 1'b1;
        sel   = TW'((int'(prio) + k) % NREQ);
      end
    end
  end

  always_comb begin
    req_ready = '0;
    if (found && mul_ready) req_ready[sel] = 1'b1;
  end

  assign mul_valid = found;
  assign mul_a     = req_a[sel];
  assign mul_b     = req_b[sel];
  assign mul_tag   = sel;
  assign res_prod  = mul_out_prod;
  // more than one requester: some bit set besides the lowest one
  assign contention = |(req_valid & (req_valid - 1'b1));

  always_comb begin
    res_valid = '0;
    if (mul_out_valid) res_valid[mul_out_tag] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prio <= '0;
    else if (found && mul_ready) prio <= TW'((int'(sel) + 1) % NREQ);
  end
endmodule
