// tb_sram_sp: checks the single-port SRAM model.
//
// Random writes and reads against a shadow array: a read returns the stored
// word on rdata one cycle after the access, and rdata keeps that value
// through idle cycles and writes until the next read.
module tb_sram_sp;
  localparam int DEPTH = 256, WIDTH = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, we = 0;
  logic [$clog2(DEPTH)-1:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;

  sram_sp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] shadow [DEPTH];
  logic [WIDTH-1:0] last;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 8'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); en = 1; we = 0; addr = 8'd0;
    @(negedge clk); last = shadow[0];
    for (int i = 0; i < 5000; i++) begin
      en = ($urandom % 4) != 0;
      we = en && ($urandom % 3) == 0;
      addr = 8'($urandom);
      wdata = $urandom;
      @(posedge clk); #1;
      if (en && we) shadow[addr] = wdata;
      else if (en) last = shadow[addr];
      checks++;
      if (rdata != last) begin
        failures++;
        if (failures < 10) $display("FAIL: rdata %h expected %h", rdata, last);
      end
      @(negedge clk);
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
