// mfcc_top: MFCC feature extractor (front end of the keyword spotter).
//
// One frame of NFFT speech samples is turned into NDCT cepstral features:
// Hamming window, radix-2 decimation-in-frequency FFT done in place,
// bit-reversal reordering, power spectrum, NMEL rectangular Mel bands,
// piecewise-linear logarithm and a DCT.  Everything runs serially on one
// multiplier that is shared with the neural-network back end, so this
// module has a multiplier request port rather than a multiplier.
//
// Inside: cal_fsm (state control and address generation), cal_mode
// (computation), the data SRAM (NFFT words of 32 bits, one complex value
// per word) and the coefficient (LUT) SRAM (LUT_DEPTH words of 16 bits;
// layout in kws_pkg).  While the module is idle the host owns both SRAMs:
// it writes a frame of samples as {sample, 16'h0} to data addresses
// 0..NFFT-1, loads the coefficient SRAM once, and can read the data SRAM
// back.  A start pulse in idle runs one frame; frame_done pulses when the
// last feature has been taken on the feature port (feat_valid/feat_ready,
// one feature per handshake, index 0..NDCT-1).
//
// The partitioning (top control, cal_fsm, cal_mode, data + LUT SRAM, shared
// multiplier), the 2N-bit data SRAM word and the host initialisation path
// follow the design description; the port protocol is this design's.
// With NFFT = 256, NMEL = 40, NDCT = 10 the coefficient layout uses 977 of
// the 992 LUT words.
module mfcc_top
  import kws_pkg::*;
#(
  parameter int NFFT      = 256,
  parameter int NMEL      = 40,
  parameter int NDCT      = 10,
  parameter int LUT_DEPTH = 992,
  parameter int LN_SHIFT  = 12,
  parameter int MA_W      = 18,
  parameter int MB_W      = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic [3:0]        cfg_ln_seg,
  input  logic [4:0]        cfg_mel_shift,
  // host access to the SRAMs (honoured while idle)
  input  logic              hd_en,
  input  logic              hd_we,
  input  logic [$clog2(NFFT)-1:0] hd_addr,
  input  logic [31:0]       hd_wdata,
  output logic [31:0]       hd_rdata,
  input  logic              hl_we,
  input  logic [$clog2(LUT_DEPTH)-1:0] hl_addr,
  input  logic [15:0]       hl_wdata,
  // control
  input  logic              start,
  output logic              busy,
  output logic              frame_done,
  output mfcc_state_e       state,
  // shared multiplier
  output logic              mul_req,
  input  logic              mul_gnt,
  output logic signed [MA_W-1:0] mul_a,
  output logic signed [MB_W-1:0] mul_b,
  input  logic              mul_res_valid,
  input  logic signed [MA_W+MB_W-1:0] mul_res,
  // features
  output logic              feat_valid,
  input  logic              feat_ready,
  output logic [4:0]        feat_idx,
  output logic signed [15:0] feat_data
);
  localparam int DAW = $clog2(NFFT);
  localparam int LAW = $clog2(LUT_DEPTH);

  logic        step_valid, upd;
  mfcc_step_t  step;
  upd_e        upd_code;

  logic              c_d_en, c_d_we, c_l_en;
  logic [MFCC_AW-1:0] c_d_addr, c_l_addr;
  logic [31:0]       c_d_wdata, d_rdata;
  logic [15:0]       l_rdata;

  cal_fsm #(.NFFT(NFFT), .NMEL(NMEL), .NDCT(NDCT)) u_fsm (
    .clk, .rst_n, .start, .cfg_ln_seg,
    .step_valid, .step_o(step), .upd, .upd_code,
    .state, .busy, .done(frame_done)
  );

  cal_mode #(.LN_SHIFT(LN_SHIFT), .MA_W(MA_W), .MB_W(MB_W)) u_mode (
    .clk, .rst_n, .cfg_mel_shift,
    .step_valid, .step_i(step), .upd, .upd_code,
    .d_en(c_d_en), .d_we(c_d_we), .d_addr(c_d_addr), .d_wdata(c_d_wdata), .d_rdata,
    .l_en(c_l_en), .l_addr(c_l_addr), .l_rdata,
    .mul_req, .mul_gnt, .mul_a, .mul_b, .mul_res_valid, .mul_res,
    .feat_valid, .feat_ready, .feat_idx, .feat_data
  );

  // SRAM port muxes: the computation module while busy, the host otherwise
  logic           d_en, d_we, l_en, l_we;
  logic [DAW-1:0] d_addr;
  logic [LAW-1:0] l_addr;
  logic [31:0]    d_wdata;

  always_comb begin
    if (busy) begin
      d_en = c_d_en; d_we = c_d_we; d_addr = DAW'(c_d_addr); d_wdata = c_d_wdata;
      l_en = c_l_en; l_we = 1'b0;   l_addr = LAW'(c_l_addr);
    end else begin
      d_en = hd_en;  d_we = hd_we;  d_addr = hd_addr;        d_wdata = hd_wdata;
      l_en = hl_we;  l_we = hl_we;  l_addr = hl_addr;
    end
  end

  assign hd_rdata = d_rdata;

  sram_sp #(.DEPTH(NFFT), .WIDTH(32)) u_data_sram (
    .clk, .en(d_en), .we(d_we), .addr(d_addr), .wdata(d_wdata), .rdata(d_rdata)
  );

  sram_sp #(.DEPTH(LUT_DEPTH), .WIDTH(16)) u_lut_sram (
    .clk, .en(l_en), .we(l_we), .addr(l_addr), .wdata(hl_wdata), .rdata(l_rdata)
  );
endmodule
