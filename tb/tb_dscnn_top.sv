// tb_dscnn_top: self-checking test of the DSCNN back end at a reduced size.
//
// The network keeps its shape (10x4 stride-2 first convolution with top
// padding 4, depthwise 3x3 / pointwise blocks, global average pooling,
// fully connected layer) but runs on a 12x10 input window with 8 channels,
// 2 blocks and 4 classes.  Weights (with many zeros and ones) are loaded
// through the host port, the input window through the feature port.  A
// reference model in this file computes every layer with plain integer
// arithmetic from the same numbers; after finish the whole activation
// memory in use (feature maps, pooled vector, class scores) is read back and
// compared.  The shared multiplier is modelled here with a one-cycle answer
// and random refusals, so the engine sees multiplier stalls.  The test also
// counts bypassed products, read stalls and register-file reuse, and fails
// if one of them never happens.  Two inferences with different data run
// back to back.
module tb_dscnn_top;
  import kws_pkg::*;
  localparam int IN_T = 12, IN_F = 10, NCH = 8, NDS = 2, NCLS = 4;
  localparam int ACT_DEPTH = 512, WGT_DEPTH = 1024;
  localparam int KT = 10, KF = 4, ST = 2, SF = 2, PT = 4;
  localparam int OH = (IN_T + 2*PT - KT) / ST + 1, OW = (IN_F - KF) / SF + 1, P = OH*OW;
  localparam int IN_BASE = NCH*P, AP_BASE = IN_BASE + IN_T*IN_F, FC_BASE = AP_BASE + NCH;
  localparam int W_BLK = 9*NCH + NCH*NCH, W_FC = NCH*KT*KF + NDS*W_BLK;
  localparam int ACT_AW = $clog2(ACT_DEPTH), WGT_AW = $clog2(WGT_DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, finish, busy, in_cl;
  logic [3:0] layer;
  logic [15:0] layer_scale [N_MAC_LAYERS];
  logic [5:0]  layer_shift [N_MAC_LAYERS];
  logic h_act_req = 0, h_act_we = 0, h_act_gnt;
  logic [ACT_AW-1:0] h_act_addr = '0;
  logic [7:0] h_act_wdata = '0, h_act_rdata;
  logic h_w_req = 0, h_w_we = 0;
  logic [WGT_AW-1:0] h_w_addr = '0;
  logic [7:0] h_w_wdata = '0, h_w_rdata;
  logic f_req = 0, f_gnt;
  logic [ACT_AW-1:0] f_addr = '0;
  logic [7:0] f_data = '0;
  logic mul_req, mul_gnt, mul_res_valid;
  logic signed [17:0] mul_a;
  logic signed [15:0] mul_b;
  logic signed [33:0] mul_res;
  logic ev_bypass, ev_mul_stall, ev_rd_stall, ev_reuse;

  dscnn_top #(.IN_T(IN_T), .IN_F(IN_F), .NCH(NCH), .NDS(NDS), .NCLS(NCLS),
              .ACT_DEPTH(ACT_DEPTH), .WGT_DEPTH(WGT_DEPTH)) dut (.*);

  // shared multiplier stand-in: refuses about one request in three
  logic deny;
  always_ff @(posedge clk) deny <= ($urandom % 3) == 0;
  assign mul_gnt = mul_req && !deny;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mul_res_valid <= 1'b0;
      mul_res <= '0;
    end else begin
      mul_res_valid <= mul_gnt;
      mul_res <= mul_a * mul_b;
    end
  end

  int checks = 0, failures = 0;
  int n_byp = 0, n_mstall = 0, n_rstall = 0, n_reuse = 0;
  always_ff @(posedge clk) if (rst_n) begin
    if (ev_bypass)    n_byp++;
    if (ev_mul_stall) n_mstall++;
    if (ev_rd_stall)  n_rstall++;
    if (ev_reuse)     n_reuse++;
  end

  // reference state
  int wmem [WGT_DEPTH];
  int amem [ACT_DEPTH];

  function automatic int clipu(longint v);
    return (v < 0) ? 0 : (v > 255) ? 255 : int'(v);
  endfunction
  function automatic int clips(longint v);
    return (v < -128) ? -128 : (v > 127) ? 127 : int'(v);
  endfunction
  function automatic int s8(int v);
    return (v > 127) ? v - 256 : v;
  endfunction

  task automatic ref_model();
    int tmp [NCH*P];
    longint acc;
    int iy, ix, blk, wb, sc, sh;
    // first convolution, signed input
    for (int ch = 0; ch < NCH; ch++)
      for (int oy = 0; oy < OH; oy++)
        for (int ox = 0; ox < OW; ox++) begin
          acc = 0;
          for (int ky = 0; ky < KT; ky++)
            for (int kx = 0; kx < KF; kx++) begin
              iy = oy*ST + ky - PT;
              ix = ox*SF + kx;
              if (iy >= 0 && iy < IN_T && ix >= 0 && ix < IN_F)
                acc += s8(amem[IN_BASE + iy*IN_F + ix]) * s8(wmem[(ch*KT + ky)*KF + kx]);
            end
          amem[ch*P + oy*OW + ox] = clipu((acc * longint'(layer_scale[0])) >>> layer_shift[0]);
        end
    for (blk = 0; blk < NDS; blk++) begin
      // depthwise 3x3
      wb = NCH*KT*KF + blk*W_BLK;
      sc = layer_scale[1 + 2*blk]; sh = layer_shift[1 + 2*blk];
      for (int ch = 0; ch < NCH; ch++)
        for (int oy = 0; oy < OH; oy++)
          for (int ox = 0; ox < OW; ox++) begin
            acc = 0;
            for (int ky = 0; ky < 3; ky++)
              for (int kx = 0; kx < 3; kx++) begin
                iy = oy + ky - 1; ix = ox + kx - 1;
                if (iy >= 0 && iy < OH && ix >= 0 && ix < OW)
                  acc += amem[ch*P + iy*OW + ix] * s8(wmem[wb + ch*9 + ky*3 + kx]);
              end
            tmp[ch*P + oy*OW + ox] = clipu((acc * sc) >>> sh);
          end
      for (int i = 0; i < NCH*P; i++) amem[i] = tmp[i];
      // pointwise
      wb += 9*NCH;
      sc = layer_scale[2 + 2*blk]; sh = layer_shift[2 + 2*blk];
      for (int p = 0; p < P; p++)
        for (int oc = 0; oc < NCH; oc++) begin
          acc = 0;
          for (int ic = 0; ic < NCH; ic++) acc += amem[ic*P + p] * s8(wmem[wb + oc*NCH + ic]);
          tmp[oc*P + p] = clipu((acc * sc) >>> sh);
        end
      for (int i = 0; i < NCH*P; i++) amem[i] = tmp[i];
    end
    // average pooling: rounded reciprocal of P in Q16
    for (int ch = 0; ch < NCH; ch++) begin
      acc = 0;
      for (int p = 0; p < P; p++) acc += amem[ch*P + p];
      amem[AP_BASE + ch] = clipu((acc * (((1 << 16) + P/2) / P)) >> 16);
    end
    // fully connected, signed result
    for (int k = 0; k < NCLS; k++) begin
      acc = 0;
      for (int ic = 0; ic < NCH; ic++) acc += amem[AP_BASE + ic] * s8(wmem[W_FC + k*NCH + ic]);
      amem[FC_BASE + k] = clips((acc * longint'(layer_scale[9])) >>> layer_shift[9]) & 255;
    end
  endtask

  task automatic host_write_w(int a, int d);
    @(negedge clk);
    h_w_req = 1; h_w_we = 1; h_w_addr = WGT_AW'(a); h_w_wdata = 8'(d);
    @(negedge clk);
    h_w_req = 0; h_w_we = 0;
  endtask

  task automatic feat_write(int a, int d);
    @(negedge clk);
    f_req = 1; f_addr = ACT_AW'(a); f_data = 8'(d);
    @(posedge clk);
    while (!f_gnt) @(posedge clk);
    @(negedge clk);
    f_req = 0;
  endtask

  task automatic host_read_a(int a, output int d);
    @(negedge clk);
    h_act_req = 1; h_act_we = 0; h_act_addr = ACT_AW'(a);
    @(negedge clk);
    h_act_req = 0;
    d = int'(h_act_rdata);
  endtask

  function automatic int rnd_w();
    int r;
    r = $urandom % 8;
    if (r < 2) return 0;
    if (r == 2) return 1;
    return int'($urandom % 13) - 6;
  endfunction

  int d, t0, cycles;
  always_ff @(posedge clk) cycles <= cycles + 1;

  initial begin
    cycles = 0;
    for (int i = 0; i < N_MAC_LAYERS; i++) begin
      layer_scale[i] = 16'(24 + $urandom % 40);
      layer_shift[i] = 6'd8;
    end
    for (int i = 0; i < ACT_DEPTH; i++) amem[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < WGT_DEPTH; i++) begin
      wmem[i] = (i < W_FC + NCH*NCLS) ? (rnd_w() & 255) : 0;
      host_write_w(i, wmem[i]);
    end
    for (int run = 0; run < 2; run++) begin
      for (int i = 0; i < IN_T*IN_F; i++) begin
        amem[IN_BASE + i] = (run == 1 && i % 5 == 0) ? 1 : (int'($urandom % 128) - 64) & 255;
        feat_write(IN_BASE + i, amem[IN_BASE + i]);
      end
      ref_model();
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      t0 = cycles;
      checks++;
      if (!busy) begin failures++; $display("busy not raised"); end
      while (!finish) @(posedge clk);
      $display("inference %0d: %0d cycles", run, cycles - t0);
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("busy after finish"); end
      for (int a = 0; a < FC_BASE + NCLS; a++) begin
        host_read_a(a, d);
        checks++;
        if (d != amem[a]) begin
          failures++;
          if (failures < 10) $display("act[%0d] = %0d, expected %0d", a, d, amem[a]);
        end
      end
    end
    checks++; if (n_byp == 0)    begin failures++; $display("no bypass"); end
    checks++; if (n_mstall == 0) begin failures++; $display("no multiplier stall"); end
    checks++; if (n_rstall == 0) begin failures++; $display("no read stall"); end
    checks++; if (n_reuse == 0)  begin failures++; $display("no register-file reuse"); end
    $display("events: bypass %0d, multiplier stall %0d, read stall %0d, reuse %0d",
             n_byp, n_mstall, n_rstall, n_reuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
