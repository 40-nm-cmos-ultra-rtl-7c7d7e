// tb_multiplier: checks the shared 18 x 16 signed multiplier.
//
// Random operand pairs (including the extreme values) are offered with a
// random valid pattern; one cycle later the product, the valid flag and
// the tag must come out unchanged.  The expected product is computed in
// 64-bit integer arithmetic.
module tb_multiplier;
  localparam int A_W = 18, B_W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid;
  logic signed [A_W-1:0] in_a = '0;
  logic signed [B_W-1:0] in_b = '0;
  logic in_tag = 0, out_tag;
  logic signed [A_W+B_W-1:0] out_prod;

  multiplier #(.A_W(A_W), .B_W(B_W), .TAG_W(1)) dut (.*);

  int checks = 0, failures = 0;
  longint exp_p;
  logic exp_v, exp_t;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      case (i % 50)
        0: begin in_a = {1'b1, {(A_W-1){1'b0}}}; in_b = {1'b1, {(B_W-1){1'b0}}}; end
        1: begin in_a = {1'b0, {(A_W-1){1'b1}}}; in_b = {1'b1, {(B_W-1){1'b0}}}; end
        default: begin in_a = A_W'($urandom); in_b = B_W'($urandom); end
      endcase
      in_tag = 1'($urandom);
      exp_p = longint'(in_a) * longint'(in_b);
      exp_v = in_valid;
      exp_t = in_tag;
      checks++;
      if (!in_ready) begin failures++; $display("FAIL: not ready"); end
      @(posedge clk); #1;
      checks++;
      if (out_valid != exp_v || (exp_v && (longint'(out_prod) != exp_p || out_tag != exp_t))) begin
        failures++;
        if (failures < 10) $display("FAIL: %0d x %0d gave %0d (valid %0d)", in_a, in_b, out_prod, out_valid);
      end
    end
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
