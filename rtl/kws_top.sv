// kws_top: keyword-spotting accelerator, MFCC front end plus DSCNN back end.
//
// The front end (mfcc_top) turns one frame of audio samples, written by the
// host into its data SRAM, into NDCT cepstral coefficients.  A small bridge
// quantises each coefficient to 8 bits (arithmetic right shift by
// cfg_feat_shift, then saturation to -128..127) and writes it into the
// DSCNN input window in the activation SRAM, at row frame_cnt, column
// feat_idx.  After IN_T frames the window is full and the bridge starts an
// inference of the back end (dscnn_top); the next frame starts a new window.
// A host may also start an inference itself with dscnn_start, for example
// after writing the input window directly.
//
// Both halves use one 18 x 16 signed multiplier.  multiplier_arbiter hands
// it out round-robin, so a frame can be computed while an inference runs.
// While the first (convolution) layer reads the input window, feature
// writes are held back: the front end then stalls on its feature port.
//
// Timing: frame start to features written is about 13,000 cycles when the
// multiplier is not shared; one inference takes about 2.7 million cycles.
// Front end, back end, shared multiplier and arbitration follow the design
// description; the quantisation bridge and the windowing by frame count are
// this design's choice.
module kws_top
  import kws_pkg::*;
#(
  parameter int NFFT      = 256,
  parameter int NMEL      = 40,
  parameter int NDCT      = 10,
  parameter int LUT_DEPTH = 992,
  parameter int IN_T      = 52,
  parameter int NCH       = 64,
  parameter int NDS       = 4,
  parameter int NCLS      = 12,
  parameter int ACT_DEPTH = 7296,
  parameter int WGT_DEPTH = 22016,
  localparam int MA_W     = 18,
  localparam int MB_W     = 16,
  localparam int ACT_AW   = $clog2(ACT_DEPTH),
  localparam int WGT_AW   = $clog2(WGT_DEPTH),
  localparam int TW       = $clog2(IN_T)
) (
  input  logic              clk,
  input  logic              rst_n,
  // front-end configuration and host access
  input  logic [3:0]        cfg_ln_seg,
  input  logic [4:0]        cfg_mel_shift,
  input  logic [3:0]        cfg_feat_shift,
  input  logic              hd_en,
  input  logic              hd_we,
  input  logic [$clog2(NFFT)-1:0] hd_addr,
  input  logic [31:0]       hd_wdata,
  output logic [31:0]       hd_rdata,
  input  logic              hl_we,
  input  logic [$clog2(LUT_DEPTH)-1:0] hl_addr,
  input  logic [15:0]       hl_wdata,
  input  logic              frame_start,
  output logic              mfcc_busy,
  output logic              frame_done,
  output mfcc_state_e       mfcc_state,
  output logic [TW-1:0]     frame_cnt,
  // back-end configuration and host access
  input  logic [15:0]       layer_scale [N_MAC_LAYERS],
  input  logic [5:0]        layer_shift [N_MAC_LAYERS],
  input  logic              h_act_req,
  input  logic              h_act_we,
  input  logic [ACT_AW-1:0] h_act_addr,
  input  logic [7:0]        h_act_wdata,
  output logic [7:0]        h_act_rdata,
  output logic              h_act_gnt,
  input  logic              h_w_req,
  input  logic              h_w_we,
  input  logic [WGT_AW-1:0] h_w_addr,
  input  logic [7:0]        h_w_wdata,
  output logic [7:0]        h_w_rdata,
  input  logic              dscnn_start,
  output logic              dscnn_busy,
  output logic              dscnn_finish,
  output logic [3:0]        dscnn_layer,
  // event strobes, one per cycle in which the mechanism acts
  output logic              ev_bypass,      // multiply skipped (zero or one operand)
  output logic              ev_mul_stall,   // engine waits for the shared multiplier
  output logic              ev_rd_stall,    // engine read refused by the SRAM arbiter
  output logic              ev_reuse,       // operand taken from a local buffer
  output logic              ev_contention,  // both halves request the multiplier
  output logic              ev_feat_stall,  // a feature waits for the input window
  output logic              ev_auto_start   // a full window started an inference
);
  // shared multiplier
  logic [1:0]                    m_req, m_gnt, m_rvalid;
  logic signed [MA_W-1:0]        m_a [2];
  logic signed [MB_W-1:0]        m_b [2];
  logic signed [MA_W+MB_W-1:0]   m_prod;
  logic                          mu_valid, mu_ready, mu_out_valid;
  logic signed [MA_W-1:0]        mu_a;
  logic signed [MB_W-1:0]        mu_b;
  logic                          mu_tag, mu_out_tag;
  logic signed [MA_W+MB_W-1:0]   mu_out_prod;

  multiplier_arbiter #(.NREQ(2), .A_W(MA_W), .B_W(MB_W)) u_marb (
    .clk, .rst_n, .req_valid(m_req), .req_ready(m_gnt), .req_a(m_a), .req_b(m_b),
    .res_valid(m_rvalid), .res_prod(m_prod),
    .mul_valid(mu_valid), .mul_ready(mu_ready), .mul_a(mu_a), .mul_b(mu_b), .mul_tag(mu_tag),
    .mul_out_valid(mu_out_valid), .mul_out_prod(mu_out_prod), .mul_out_tag(mu_out_tag),
    .contention(ev_contention)
  );

  multiplier #(.A_W(MA_W), .B_W(MB_W), .TAG_W(1)) u_mul (
    .clk, .rst_n, .in_valid(mu_valid), .in_ready(mu_ready), .in_a(mu_a), .in_b(mu_b),
    .in_tag(mu_tag), .out_valid(mu_out_valid), .out_prod(mu_out_prod), .out_tag(mu_out_tag)
  );

  // front end
  logic              feat_valid, feat_ready;
  logic [4:0]        feat_idx;
  logic signed [15:0] feat_data;

  mfcc_top #(.NFFT(NFFT), .NMEL(NMEL), .NDCT(NDCT), .LUT_DEPTH(LUT_DEPTH),
             .MA_W(MA_W), .MB_W(MB_W)) u_mfcc (
    .clk, .rst_n, .cfg_ln_seg, .cfg_mel_shift,
    .hd_en, .hd_we, .hd_addr, .hd_wdata, .hd_rdata, .hl_we, .hl_addr, .hl_wdata,
    .start(frame_start), .busy(mfcc_busy), .frame_done, .state(mfcc_state),
    .mul_req(m_req[0]), .mul_gnt(m_gnt[0]), .mul_a(m_a[0]), .mul_b(m_b[0]),
    .mul_res_valid(m_rvalid[0]), .mul_res(m_prod),
    .feat_valid, .feat_ready, .feat_idx, .feat_data
  );

  // feature bridge
  localparam int P_CL    = ((IN_T + 2*4 - 10) / 2 + 1) * ((NDCT - 4) / 2 + 1);
  localparam int IN_BASE = NCH * P_CL;

  logic              in_cl, f_req, f_gnt, d_start, pending;
  logic [ACT_AW-1:0] f_addr;
  logic [7:0]        f_data;
  logic signed [15:0] f_sh;

  always_comb begin
    f_sh = feat_data >>> cfg_feat_shift;
    if (f_sh > 16'sd127)       f_data = 8'h7f;
    else if (f_sh < -16'sd128) f_data = 8'h80;
    else                       f_data = f_sh[7:0];
  end
  assign f_addr        = ACT_AW'(IN_BASE + int'(frame_cnt) * NDCT + int'(feat_idx));
  assign f_req         = feat_valid && !in_cl;
  assign feat_ready    = f_gnt;
  assign ev_feat_stall = feat_valid && !f_gnt;

  logic frame_last;
  assign frame_last = feat_valid && feat_ready && (int'(feat_idx) == NDCT-1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_cnt <= '0;
      pending   <= 1'b0;
    end else begin
      if (frame_last) frame_cnt <= (int'(frame_cnt) == IN_T-1) ? '0 : frame_cnt + 1'b1;
      if (frame_last && int'(frame_cnt) == IN_T-1) pending <= 1'b1;
      else if (ev_auto_start)                      pending <= 1'b0;
    end
  end
  assign ev_auto_start = pending && !dscnn_busy;
  assign d_start       = ev_auto_start || (dscnn_start && !dscnn_busy);

  // back end
  dscnn_top #(.IN_T(IN_T), .IN_F(NDCT), .NCH(NCH), .NDS(NDS), .NCLS(NCLS),
              .ACT_DEPTH(ACT_DEPTH), .WGT_DEPTH(WGT_DEPTH), .MA_W(MA_W), .MB_W(MB_W)) u_dscnn (
    .clk, .rst_n, .start(d_start), .finish(dscnn_finish), .busy(dscnn_busy), .in_cl,
    .layer(dscnn_layer), .layer_scale, .layer_shift,
    .h_act_req, .h_act_we, .h_act_addr, .h_act_wdata, .h_act_rdata, .h_act_gnt,
    .h_w_req, .h_w_we, .h_w_addr, .h_w_wdata, .h_w_rdata,
    .f_req, .f_addr, .f_data, .f_gnt,
    .mul_req(m_req[1]), .mul_gnt(m_gnt[1]), .mul_a(m_a[1]), .mul_b(m_b[1]),
    .mul_res_valid(m_rvalid[1]), .mul_res(m_prod),
    .ev_bypass, .ev_mul_stall, .ev_rd_stall, .ev_reuse
  );
endmodule
