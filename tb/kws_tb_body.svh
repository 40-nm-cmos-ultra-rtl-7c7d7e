// kws_tb_body.svh: body shared by the end-to-end testbenches of kws_top.
//
// Included inside a testbench module after the localparams IN_T, NCH, NDS,
// NCLS, ACT_DEPTH, WGT_DEPTH, FULL and WATCHDOG and after the kws_top
// instance (named dut, ports connected by name to the signals declared
// here).  It builds the front-end table (Hamming window, twiddles, Mel band
// edges for 8 kHz, eight log segments, DCT), loads it and a random weight
// set, then feeds IN_T + 1 frames of synthetic audio.  A reference model of
// the front end gives the expected features of every frame; the quantised
// features of the first IN_T frames form the expected input window, and a
// reference model of the network gives the expected feature maps, pooled
// vector and class scores.  The frame after the window starts at once, so
// the front end runs while the first layer reads the window: its feature
// writes are held back and the two halves compete for the multiplier.
// Every mechanism (multiplier bypass and stalls, read stalls, register-file
// reuse, multiplier contention, held feature writes, automatic start, each
// front-end state) is counted and must happen at least once.  With FULL set
// the inference and layer cycle counts are held against the reference
// figures of the design (about 2.26 million cycles for the network layers).
  localparam int NFFT = 256, NMEL = 40, NDCT = 10, LUT_DEPTH = 992;
  localparam int LOGN = $clog2(NFFT);
  localparam int TWB = lut_tw_base(NFFT), MELB = lut_mel_base(NFFT);
  localparam int LNB = lut_ln_base(NFFT, NMEL), DCTB = lut_dct_base(NFFT, NMEL);
  localparam int MEL_SHIFT = 10, NSEG = 8, FEAT_SHIFT = 6;
  localparam int KT = 10, KF = 4, ST = 2, SF = 2, PT = 4;
  localparam int OH = (IN_T + 2*PT - KT) / ST + 1, OW = (NDCT - KF) / SF + 1, P = OH*OW;
  localparam int IN_BASE = NCH*P, AP_BASE = IN_BASE + IN_T*NDCT, FC_BASE = AP_BASE + NCH;
  localparam int W_BLK = 9*NCH + NCH*NCH, W_FC = NCH*KT*KF + NDS*W_BLK, W_END = W_FC + NCH*NCLS;

  int checks = 0, failures = 0;
  int lut [LUT_DEPTH];
  int samp [NFFT];
  int expf [NDCT];
  int gotf [NDCT];
  int nfeat;
  int wmem [WGT_DEPTH];
  int amem [ACT_DEPTH];
  int rowq [NDCT];
  longint cyc;
  int n_byp = 0, n_mstall = 0, n_rstall = 0, n_reuse = 0, n_cont = 0, n_fstall = 0, n_auto = 0;
  int n_state [9];
  int n_finish = 0;
  longint t_layer [12];
  longint t_start, t_fin;
  logic [3:0] prev_layer;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
    if (ev_bypass)     n_byp++;
    if (ev_mul_stall)  n_mstall++;
    if (ev_rd_stall)   n_rstall++;
    if (ev_reuse)      n_reuse++;
    if (ev_contention) n_cont++;
    if (ev_feat_stall) n_fstall++;
    if (ev_auto_start) begin n_auto++; t_start <= cyc; end
    if (dscnn_finish)  begin n_finish++; t_fin <= cyc; end
    n_state[int'(mfcc_state)]++;
    prev_layer <= dscnn_layer;
    if (dscnn_busy && prev_layer != dscnn_layer) t_layer[dscnn_layer] <= cyc;
    if (dut.u_mfcc.feat_valid && dut.u_mfcc.feat_ready) begin
      gotf[dut.u_mfcc.feat_idx] = int'(dut.u_mfcc.feat_data);
      nfeat++;
    end
    end
  end

  function automatic longint sat16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction
  function automatic int s16(int v); return int'(shortint'(v)); endfunction

  // ------------------------------------------------------------ LUT
  task automatic build_lut();
    real pi = 3.14159265358979;
    real fs = 8000.0, mel_hi, m, f;
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
    // log segments: y ~ 64*ln(x), chords between segment bounds
    for (int q = 0; q < 8; q++) begin
      int lo = (q == 0) ? 1 : (1 << (2*q+1));
      int hi = (q == 7) ? 32767 : (1 << (2*q+3)) - 1;
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
  task automatic mfcc_ref();
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
      while (q < NSEG-1 && e[i] > lut[LNB+3*q]) q++;
      l[i] = sat16(((e[i] * s16(lut[LNB+3*q+1])) >>> 12) + s16(lut[LNB+3*q+2]));
    end
    for (int r = 0; r < NDCT; r++) begin
      acc = 0;
      for (int i = 0; i < NMEL; i++) acc += l[i] * s16(lut[DCTB + r*NMEL + i]);
      expf[r] = int'(sat16(acc >>> 15));
    end
  endtask

  function automatic int clipu(longint v);
    return (v < 0) ? 0 : (v > 255) ? 255 : int'(v);
  endfunction
  function automatic int clips(longint v);
    return (v < -128) ? -128 : (v > 127) ? 127 : int'(v);
  endfunction
  function automatic int s8(int v);
    return (v > 127) ? v - 256 : v;
  endfunction

  // network reference: same layer order, layouts and arithmetic as the design
  task automatic dscnn_ref();
    int tmp [NCH*P];
    longint acc;
    int iy, ix, wb, sc, sh;
    for (int ch = 0; ch < NCH; ch++)
      for (int oy = 0; oy < OH; oy++)
        for (int ox = 0; ox < OW; ox++) begin
          acc = 0;
          for (int ky = 0; ky < KT; ky++)
            for (int kx = 0; kx < KF; kx++) begin
              iy = oy*ST + ky - PT;
              ix = ox*SF + kx;
              if (iy >= 0 && iy < IN_T && ix >= 0 && ix < NDCT)
                acc += s8(amem[IN_BASE + iy*NDCT + ix]) * s8(wmem[(ch*KT + ky)*KF + kx]);
            end
          amem[ch*P + oy*OW + ox] = clipu((acc * longint'(layer_scale[0])) >>> layer_shift[0]);
        end
    for (int blk = 0; blk < NDS; blk++) begin
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
    for (int ch = 0; ch < NCH; ch++) begin
      acc = 0;
      for (int p = 0; p < P; p++) acc += amem[ch*P + p];
      amem[AP_BASE + ch] = clipu((acc * (((1 << 16) + P/2) / P)) >> 16);
    end
    for (int k = 0; k < NCLS; k++) begin
      acc = 0;
      for (int ic = 0; ic < NCH; ic++) acc += amem[AP_BASE + ic] * s8(wmem[W_FC + k*NCH + ic]);
      amem[FC_BASE + k] = clips((acc * longint'(layer_scale[9])) >>> layer_shift[9]) & 255;
    end
  endtask

  function automatic int quant(int f);
    int v;
    v = f >>> FEAT_SHIFT;
    return ((v > 127) ? 127 : (v < -128) ? -128 : v) & 255;
  endfunction

  function automatic int rnd_w();
    int r;
    r = $urandom % 8;
    if (r < 2) return 0;
    if (r == 2) return 1;
    return int'($urandom % 13) - 6;
  endfunction

  task automatic host_read_a(int a, output int d);
    @(negedge clk);
    h_act_req = 1; h_act_we = 0; h_act_addr = $bits(h_act_addr)'(a);
    @(negedge clk);
    h_act_req = 0;
    d = int'(h_act_rdata);
  endtask

  // write one frame, start it, and return once all its features are out
  task automatic run_frame(int seed, bit wait_done);
    real pi = 3.14159265358979;
    int amp1, amp2;
    amp1 = 1000 + int'($urandom % 12000);
    amp2 = int'($urandom % 8000);
    for (int n = 0; n < NFFT; n++)
      samp[n] = int'(amp1 * $sin(2.0*pi*n*(seed % 50 + 3)/NFFT) + amp2 * $cos(2.0*pi*n*((7*seed) % 90 + 11)/NFFT))
                + $signed($urandom_range(0, 511)) - 256;
    for (int n = 0; n < NFFT; n++) begin
      @(negedge clk); hd_en = 1; hd_we = 1; hd_addr = 8'(n); hd_wdata = {16'(samp[n]), 16'h0};
    end
    @(negedge clk); hd_en = 0; hd_we = 0;
    mfcc_ref();
    nfeat = 0;
    @(negedge clk); frame_start = 1;
    @(negedge clk); frame_start = 0;
    if (wait_done) check_frame();
  endtask

  task automatic check_frame();
    while (!frame_done) @(posedge clk);
    @(negedge clk);
    checks++;
    if (nfeat != NDCT) begin failures++; $display("FAIL: %0d features in a frame", nfeat); end
    for (int r = 0; r < NDCT; r++) begin
      checks++;
      if (gotf[r] != expf[r]) begin
        failures++;
        $display("FAIL feature %0d: got %0d expected %0d", r, gotf[r], expf[r]);
      end
    end
  endtask

  task automatic check_count(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  task automatic check_range(string what, longint got, longint ref_cyc, int pct);
    checks++;
    if (got * 100 < ref_cyc * (100 - pct) || got * 100 > ref_cyc * (100 + pct)) begin
      failures++;
      $display("FAIL: %s took %0d cycles, reference %0d", what, got, ref_cyc);
    end else $display("%s: %0d cycles (reference %0d)", what, got, ref_cyc);
  endtask

  initial begin
    int d;
    longint lc [12];
    cyc = 0;
    foreach (n_state[i]) n_state[i] = 0;
    build_lut();
    for (int i = 0; i < N_MAC_LAYERS; i++) begin
      layer_scale[i] = 16'(24 + $urandom % 40);
      layer_shift[i] = (i == 0) ? 6'd10 : 6'd8;
    end
    for (int i = 0; i < ACT_DEPTH; i++) amem[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < LUT_DEPTH; i++) begin
      @(negedge clk); hl_we = 1; hl_addr = 10'(i); hl_wdata = 16'(lut[i]);
    end
    @(negedge clk); hl_we = 0;
    for (int i = 0; i < WGT_DEPTH; i++) begin
      wmem[i] = (i < W_END) ? (rnd_w() & 255) : 0;
      @(negedge clk); h_w_req = 1; h_w_we = 1; h_w_addr = $bits(h_w_addr)'(i); h_w_wdata = 8'(wmem[i]);
    end
    @(negedge clk); h_w_req = 0; h_w_we = 0;

    // one full input window
    for (int f = 0; f < IN_T; f++) begin
      run_frame(f, 1'b1);
      for (int r = 0; r < NDCT; r++) amem[IN_BASE + f*NDCT + r] = quant(expf[r]);
      checks++;
      if (int'(frame_cnt) != (f + 1) % IN_T) begin failures++; $display("FAIL: frame counter %0d", frame_cnt); end
    end
    dscnn_ref();
    // the next frame starts while the first layer reads the window
    run_frame(IN_T, 1'b0);
    for (int r = 0; r < NDCT; r++) rowq[r] = quant(expf[r]);
    check_frame();
    while (n_finish == 0) @(posedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (n_auto != 1) begin failures++; $display("FAIL: %0d automatic starts", n_auto); end
    // results: feature maps, pooled vector, class scores, and the new first row
    for (int a = 0; a < IN_BASE; a++) begin
      host_read_a(a, d);
      checks++;
      if (d != amem[a]) begin
        failures++;
        if (failures < 10) $display("FAIL act[%0d] = %0d, expected %0d", a, d, amem[a]);
      end
    end
    for (int a = AP_BASE; a < FC_BASE + NCLS; a++) begin
      host_read_a(a, d);
      checks++;
      if (d != amem[a]) begin failures++; $display("FAIL act[%0d] = %0d, expected %0d", a, d, amem[a]); end
    end
    for (int r = 0; r < NDCT; r++) begin
      host_read_a(IN_BASE + r, d);
      checks++;
      if (d != rowq[r]) begin failures++; $display("FAIL window row 0 [%0d] = %0d, expected %0d", r, d, rowq[r]); end
    end
    $display("class scores: %0d %0d %0d %0d", s8(amem[FC_BASE]), s8(amem[FC_BASE+1]),
             s8(amem[FC_BASE+2]), s8(amem[FC_BASE+3]));
    check_count("multiplier bypass", n_byp);
    check_count("engine multiplier stall", n_mstall);
    check_count("engine read stall", n_rstall);
    check_count("register-file reuse", n_reuse);
    check_count("multiplier contention", n_cont);
    check_count("held feature write", n_fstall);
    check_count("automatic inference start", n_auto);
    begin
      mfcc_state_e se;
      se = se.first();
      for (int s = 0; s < se.num(); s++) begin
        check_count(se.name(), n_state[int'(se)]);
        se = se.next();
      end
    end
    $display("events: bypass %0d, mul stall %0d, read stall %0d, reuse %0d, contention %0d, feature stall %0d",
             n_byp, n_mstall, n_rstall, n_reuse, n_cont, n_fstall);
    $display("inference: %0d cycles", t_fin - t_start);
    if (FULL) begin
      begin
        mfcc_state_e se;
        se = se.first();
        se = se.next();
        for (int k = 1; k < se.num() - 1; k++) begin
          $display("front-end state %s: %0d cycles per frame", se.name(), n_state[int'(se)] / (IN_T + 1));
          se = se.next();
        end
      end
      for (int l = 0; l < 11; l++) lc[l] = ((l == 10) ? t_fin : t_layer[l+1]) - t_layer[l];
      lc[0] = t_layer[1] - t_start;
      check_range("first convolution", lc[0], 272135, 15);
      check_range("depthwise layer (mean of 4)", (lc[1] + lc[3] + lc[5] + lc[7]) / 4, 70728, 15);
      check_range("pointwise layer (mean of 4)", (lc[2] + lc[4] + lc[6] + lc[8]) / 4, 424428, 15);
      check_range("average pooling", lc[9], 6596, 15);
      check_range("fully connected", lc[10], 786, 25);
      // network layers only: the 2.68 million figure also counts the front end
      // and the wait for the input window
      check_range("whole network", t_fin - t_start, 272135 + 4*70728 + 4*424428 + 6596 + 786, 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
