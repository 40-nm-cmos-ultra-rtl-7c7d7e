// tb_sram_arbiter: checks the fixed-priority SRAM arbiter with a real SRAM.
//
// Four ports issue random reads and writes into one sram_sp.  Each cycle the
// lowest-numbered requesting port must be the only one granted, its access
// must reach the SRAM, and a granted read must deliver the shadow value on
// rdata one cycle later with rvalid set for that port only.  Contention
// (more than one request in a cycle) must occur.
module tb_sram_arbiter;
  localparam int NP = 4, AW = 6, WIDTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NP-1:0] req = '0, we = '0, gnt, rvalid;
  logic [AW-1:0] addr [NP];
  logic [WIDTH-1:0] wdata [NP];
  logic [WIDTH-1:0] rdata;
  logic m_en, m_we;
  logic [AW-1:0] m_addr;
  logic [WIDTH-1:0] m_wdata, m_rdata;

  sram_arbiter #(.NP(NP), .AW(AW), .WIDTH(WIDTH)) dut (.*);
  sram_sp #(.DEPTH(1 << AW), .WIDTH(WIDTH)) mem (.clk, .en(m_en), .we(m_we), .addr(m_addr),
                                                 .wdata(m_wdata), .rdata(m_rdata));

  int checks = 0, failures = 0, contention = 0;
  logic [WIDTH-1:0] shadow [1 << AW];
  int winner, pend;
  logic [WIDTH-1:0] expd;

  initial begin
    for (int p = 0; p < NP; p++) begin addr[p] = '0; wdata[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk); req = 4'b0001; we = 4'b0001; addr[0] = AW'(i); wdata[0] = WIDTH'(i * 7);
      shadow[i] = WIDTH'(i * 7);
    end
    @(negedge clk); req = '0; we = '0;
    pend = -1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        req[p] = ($urandom % 3) == 0;
        we[p] = ($urandom % 2) == 0;
        addr[p] = AW'($urandom);
        wdata[p] = WIDTH'($urandom);
      end
      #1;
      winner = -1;
      for (int p = NP - 1; p >= 0; p--) if (req[p]) winner = p;
      if ($countones(req) > 1) contention++;
      checks++;
      if (winner < 0 ? gnt != '0 : gnt != (NP'(1) << winner)) begin
        failures++;
        if (failures < 10) $display("FAIL: req %b gnt %b", req, gnt);
      end
      @(posedge clk); #1;
      if (pend >= 0) begin end
      checks++;
      if (winner >= 0 && !we[winner]) begin
        expd = shadow[addr[winner]];
        if (rvalid != (NP'(1) << winner) || rdata != expd) begin
          failures++;
          if (failures < 10) $display("FAIL: read port %0d got %h expected %h", winner, rdata, expd);
        end
      end else if (rvalid != '0) begin
        failures++;
        $display("FAIL: rvalid %b without a read", rvalid);
      end
      if (winner >= 0 && we[winner]) shadow[addr[winner]] = wdata[winner];
    end
    checks++;
    if (contention == 0) begin failures++; $display("FAIL: no contention"); end
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
