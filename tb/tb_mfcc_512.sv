// tb_mfcc_512: the MFCC front end in its 16 kHz mode (512-point frames).
//
// Same test as tb_mfcc_top (bit-true reference model, random multiplier
// refusals, 8 / 6 / 4 log segments), with the front end built for 512-point
// frames: data SRAM of 512 words and a 1488-word coefficient table (256
// window, 768 twiddle, 40 band edges, 24 log, 400 DCT words).  Mel band edges
// are placed for a 16 kHz sampling rate.
`timescale 1ns/1ps
module tb_mfcc_512;
  import kws_pkg::*;
  localparam int NFFT = 512, NMEL = 40, NDCT = 10, LUT_DEPTH = 1488;
  localparam real FS = 16000.0;
  localparam int LAT_LO = 16000, LAT_HI = 60000;
  localparam int LOGN = $clog2(NFFT);
  localparam int TWB = lut_tw_base(NFFT), MELB = lut_mel_base(NFFT);
  localparam int LNB = lut_ln_base(NFFT, NMEL), DCTB = lut_dct_base(NFFT, NMEL);
  localparam int MEL_SHIFT = 10;
  int nseg = 8;
  logic [3:0] cfg_ln_seg;
  assign cfg_ln_seg = 4'(nseg);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hd_en = 0, hd_we = 0, hl_we = 0, start = 0;
  logic [$clog2(NFFT)-1:0] hd_addr = 0;
  logic [31:0] hd_wdata = 0, hd_rdata;
  logic [$clog2(LUT_DEPTH)-1:0] hl_addr = 0;
  logic [15:0] hl_wdata = 0;
  logic busy, frame_done;
  mfcc_state_e state;
  logic mul_req, mul_gnt, mul_res_valid;
  logic signed [17:0] mul_a;
  logic signed [15:0] mul_b;
  logic signed [33:0] mul_res;
  logic feat_valid, feat_ready;
  logic [4:0] feat_idx;
  logic signed [15:0] feat_data;
  logic [0:0] tag_unused;

  mfcc_top #(.NFFT(NFFT), .LUT_DEPTH(LUT_DEPTH)) dut (.clk, .rst_n, .cfg_ln_seg, .cfg_mel_shift(5'(MEL_SHIFT)),
    .hd_en, .hd_we, .hd_addr, .hd_wdata, .hd_rdata, .hl_we, .hl_addr, .hl_wdata,
    .start, .busy, .frame_done, .state,
    .mul_req, .mul_gnt, .mul_a, .mul_b, .mul_res_valid, .mul_res,
    .feat_valid, .feat_ready, .feat_idx, .feat_data);

  logic allow;
  always_ff @(posedge clk) allow <= ($urandom_range(0, 3) != 0);
  assign mul_gnt = mul_req && allow;
  logic mr_unused;
  multiplier #(.A_W(18), .B_W(16), .TAG_W(1)) u_mul (.clk, .rst_n,
    .in_valid(mul_gnt), .in_ready(mr_unused), .in_a(mul_a), .in_b(mul_b), .in_tag(1'b0),
    .out_valid(mul_res_valid), .out_prod(mul_res), .out_tag(tag_unused));

  int checks = 0, failures = 0;
  int lut [LUT_DEPTH];
  int samp [NFFT];
  int expf [NDCT];
  int gotf [NDCT];
  int nfeat;
  int stalls_feat = 0, denied = 0;

  always_ff @(posedge clk) begin
    feat_ready <= ($urandom_range(0, 1) == 1);
    if (mul_req && !mul_gnt) denied++;
    if (feat_valid && !feat_ready) stalls_feat++;
    if (feat_valid && feat_ready) begin
      gotf[feat_idx] = int'(feat_data);
      nfeat++;
    end
  end

  function automatic longint sat16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction
  function automatic int s16(int v); return int'(shortint'(v)); endfunction

  // ------------------------------------------------------------ LUT
  task automatic build_lut();
    real pi = 3.14159265358979;
    real fs = FS, mel_hi, m, f;
    int e, prev;
    foreach (lut[i]) lut[i] = 0;
    for (int n = 0; n < NFFT/2; n++)
      lut[n] = int'($floor(32767.0 * (0.54 - 0.46 * $cos(2.0*pi*n/(NFFT-1))) + 0.5));
    for (int k = 0; k < NFFT/2; k++) begin
      real c = $cos(2.0*pi*k/NFFT), s = $sin(2.0*pi*k/NFFT);
      lut[TWB+3*k]   = int'($floor(16384.0*c + 0.5));
      lut[TWB+3*k+1] = int'($floor(16384.0*(s-c) + 0.5));
      lut[TWB+3*k+2] = int'($floor(16384.0*(s+c) + 0.5));
    end
    mel_hi = 2595.0 * $log10(1.0 + (fs/2.0)/700.0);
    prev = 0;
    for (int i = 0; i < NMEL; i++) begin
      m = mel_hi * (i+1) / NMEL;
      f = 700.0 * ($pow(10.0, m/2595.0) - 1.0);
      e = int'($floor(f / fs * NFFT + 0.5));
      if (e <= prev) e = prev + 1;
      if (e > NFFT/2) e = NFFT/2;
      lut[MELB+i] = e;
      prev = e;
    end
    // log segments: y ~ 64*ln(x), chords between bounds spread evenly in log x
    for (int q = 0; q < nseg; q++) begin
      int lo = (q == 0) ? 1 : int'($floor($pow(2.0, 15.0*q/nseg)));
      int hi = (q == nseg-1) ? 32767 : int'($floor($pow(2.0, 15.0*(q+1)/nseg))) - 1;
      real sl = 64.0 * ($ln(hi) - $ln(lo)) / (hi - lo);
      int sq = int'($floor(sl * 4096.0 + 0.5));
      if (sq > 32767) sq = 32767;
      lut[LNB+3*q]   = hi;
      lut[LNB+3*q+1] = sq;
      lut[LNB+3*q+2] = int'($floor(64.0*$ln(lo) - (sq*lo)/4096.0 + 0.5));
    end
    for (int r = 0; r < NDCT; r++)
      for (int i = 0; i < NMEL; i++)
        lut[DCTB + r*NMEL + i] = int'($floor(32767.0*$cos(pi*r*(i+0.5)/NMEL) + 0.5));
  endtask

  // ------------------------------------------------------------ reference model
  task automatic ref_model();
    longint re [NFFT], im [NFFT], pw [NFFT/2+1], e [NMEL], l [NMEL];
    longint ar, ai, br, bi, a, bb, m1, m2, m3, acc;
    int kcur, span, j, t, k, w, rk, q;
    for (int n = 0; n < NFFT; n++) begin
      w = lut[(n < NFFT/2) ? n : NFFT-1-n];
      re[n] = sat16((longint'(samp[n]) * w) >>> 15);
      im[n] = 0;
    end
    for (int st = 0; st < LOGN; st++) begin
      span = NFFT >> (st+1);
      for (int b = 0; b < NFFT/2; b++) begin
        j = b % span; t = (b / span) * 2 * span + j; k = j << st;
        ar = re[t]; ai = im[t]; br = re[t+span]; bi = im[t+span];
        a = (ar - br) >>> 1; bb = (ai - bi) >>> 1;
        m1 = (a + bb) * s16(lut[TWB+3*k]);
        m2 = bb * s16(lut[TWB+3*k+1]);
        m3 = a * s16(lut[TWB+3*k+2]);
        re[t] = (ar + br) >>> 1;  im[t] = (ai + bi) >>> 1;
        re[t+span] = sat16((m1 + m2) >>> 14);
        im[t+span] = sat16((m1 - m3) >>> 14);
      end
    end
    for (int kk = 0; kk <= NFFT/2; kk++) begin
      rk = 0;
      for (int b = 0; b < LOGN; b++) if (kk & (1 << b)) rk |= 1 << (LOGN-1-b);
      pw[kk] = re[rk]*re[rk] + im[rk]*im[rk];
    end
    kcur = 1;
    for (int i = 0; i < NMEL; i++) begin
      acc = 0;
      while (kcur <= NFFT/2 && kcur <= lut[MELB+i]) begin acc += pw[kcur]; kcur++; end
      acc = acc >>> MEL_SHIFT;
      e[i] = (acc > 32767) ? 32767 : acc;
    end
    for (int i = 0; i < NMEL; i++) begin
      q = 0;
      while (q < nseg-1 && e[i] > lut[LNB+3*q]) q++;
      l[i] = sat16(((e[i] * s16(lut[LNB+3*q+1])) >>> 12) + s16(lut[LNB+3*q+2]));
    end
    for (int r = 0; r < NDCT; r++) begin
      acc = 0;
      for (int i = 0; i < NMEL; i++) acc += l[i] * s16(lut[DCTB + r*NMEL + i]);
      expf[r] = int'(sat16(acc >>> 15));
    end
  endtask

  task automatic load_lut();
    build_lut();
    for (int i = 0; i < LUT_DEPTH; i++) begin
      @(negedge clk); hl_we = 1; hl_addr = $bits(hl_addr)'(i); hl_wdata = 16'(lut[i]);
    end
    @(negedge clk); hl_we = 0;
  endtask

  task automatic run_frame(int seed, int amp1, int amp2);
    real pi = 3.14159265358979;
    int t0, cyc;
    for (int n = 0; n < NFFT; n++)
      samp[n] = int'(amp1 * $sin(2.0*pi*n*(seed+7)/NFFT) + amp2 * $cos(2.0*pi*n*(3*seed+31)/NFFT))
                + $signed($urandom_range(0, 511)) - 256;
    for (int n = 0; n < NFFT; n++) begin
      @(negedge clk); hd_en = 1; hd_we = 1; hd_addr = $bits(hd_addr)'(n); hd_wdata = {16'(samp[n]), 16'h0};
    end
    @(negedge clk); hd_en = 0; hd_we = 0;
    ref_model();
    nfeat = 0;
    @(negedge clk); start = 1; t0 = $time;
    @(negedge clk); start = 0;
    wait (frame_done);
    cyc = ($time - t0) / 10;
    @(negedge clk);
    checks++;
    if (nfeat != NDCT) begin failures++; $display("FAIL: %0d features", nfeat); end
    for (int r = 0; r < NDCT; r++) begin
      checks++;
      if (gotf[r] !== expf[r]) begin
        failures++;
        $display("FAIL feature %0d: got %0d expected %0d", r, gotf[r], expf[r]);
      end
    end
    $display("frame seed %0d: %0d cycles, features %0d %0d %0d ...", seed, cyc, gotf[0], gotf[1], gotf[2]);
    // frame latency with ~25%% multiplier denial must stay near 1.3e4 cycles
    checks++;
    if (cyc < LAT_LO || cyc > LAT_HI) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    nseg = 8;
    load_lut();
    run_frame(1, 6000, 3000);
    nseg = 6;
    load_lut();
    run_frame(5, 12000, 9000);
    nseg = 4;
    load_lut();
    run_frame(9, 200, 100);
    checks++;
    if (denied == 0 || stalls_feat == 0) begin failures++; $display("FAIL: handshakes never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
