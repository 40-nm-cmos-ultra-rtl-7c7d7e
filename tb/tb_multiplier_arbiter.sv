// tb_multiplier_arbiter: checks the round-robin sharing of one multiplier.
//
// Two requesters hold random operand pairs and keep their requests up until
// granted, as the front end and the network engine do.  The arbiter drives
// a real multiplier.  Checks: at most one grant per cycle, a grant only to a
// requester, the product returns one cycle after the grant to that
// requester only and equals a * b, no requester waits more than one cycle
// while the other is served (round robin), and contention occurs.
module tb_multiplier_arbiter;
  localparam int NREQ = 2, A_W = 18, B_W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NREQ-1:0] req_valid = '0, req_ready, res_valid;
  logic signed [A_W-1:0] req_a [NREQ];
  logic signed [B_W-1:0] req_b [NREQ];
  logic signed [A_W+B_W-1:0] res_prod;
  logic mul_valid, mul_ready, mul_out_valid, contention;
  logic signed [A_W-1:0] mul_a;
  logic signed [B_W-1:0] mul_b;
  logic [0:0] mul_tag, mul_out_tag;
  logic signed [A_W+B_W-1:0] mul_out_prod;

  multiplier_arbiter #(.NREQ(NREQ), .A_W(A_W), .B_W(B_W)) dut (.*);
  multiplier #(.A_W(A_W), .B_W(B_W), .TAG_W(1)) mul (.clk, .rst_n, .in_valid(mul_valid),
    .in_ready(mul_ready), .in_a(mul_a), .in_b(mul_b), .in_tag(mul_tag), .out_valid(mul_out_valid),
    .out_prod(mul_out_prod), .out_tag(mul_out_tag));

  int checks = 0, failures = 0, n_cont = 0;
  int wait_c [NREQ];
  longint expp [NREQ];
  logic [NREQ-1:0] pend;

  initial begin
    for (int r = 0; r < NREQ; r++) begin req_a[r] = '0; req_b[r] = '0; wait_c[r] = 0; end
    pend = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      for (int r = 0; r < NREQ; r++)
        if (!req_valid[r] && ($urandom % 2) == 0) begin
          req_valid[r] = 1'b1;
          req_a[r] = A_W'($urandom);
          req_b[r] = B_W'($urandom);
        end
      #1;
      if (contention) n_cont++;
      checks++;
      if ($countones(req_ready) > 1 || (req_ready & ~req_valid) != '0 ||
          (req_valid != '0 && req_ready == '0)) begin
        failures++;
        $display("FAIL: valid %b ready %b", req_valid, req_ready);
      end
      for (int r = 0; r < NREQ; r++) begin
        if (req_valid[r] && !req_ready[r]) wait_c[r]++;
        else wait_c[r] = 0;
        checks++;
        if (wait_c[r] > 1) begin failures++; $display("FAIL: requester %0d starved", r); end
      end
      pend = req_ready;
      for (int r = 0; r < NREQ; r++) if (req_ready[r]) expp[r] = longint'(req_a[r]) * longint'(req_b[r]);
      @(posedge clk); #1;
      checks++;
      if (res_valid != pend) begin failures++; $display("FAIL: res_valid %b expected %b", res_valid, pend); end
      for (int r = 0; r < NREQ; r++)
        if (pend[r]) begin
          checks++;
          if (longint'(res_prod) != expp[r]) begin failures++; $display("FAIL: product %0d expected %0d", res_prod, expp[r]); end
          req_valid[r] = 1'b0;
        end
    end
    checks++;
    if (n_cont == 0) begin failures++; $display("FAIL: no contention"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
