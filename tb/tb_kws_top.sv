// tb_kws_top: end-to-end test of the keyword spotter at a reduced size.
//
// The front end runs at its full size (256-point frames, 40 Mel bands, 10
// coefficients); the back end keeps its layer structure but uses a 12-frame
// window, 16 channels, 2 depthwise-separable blocks and 4 classes.  Thirteen
// frames are processed: twelve fill the window and start an inference, the
// thirteenth runs alongside it.  Features, feature maps, pooled vector and
// class scores are compared with reference models, and every mechanism of
// the design must be seen at least once (see kws_tb_body.svh).
module tb_kws_top;
  import kws_pkg::*;
  localparam int IN_T = 12, NCH = 16, NDS = 2, NCLS = 4, ACT_DEPTH = 1024, WGT_DEPTH = 2048;
  localparam bit FULL = 1'b0;
  localparam int WATCHDOG = 2000000;
  localparam int ACT_AW = $clog2(ACT_DEPTH), WGT_AW = $clog2(WGT_DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] cfg_ln_seg = 4'd8;
  logic [4:0] cfg_mel_shift = 5'd10;
  logic [3:0] cfg_feat_shift = 4'd6;
  logic hd_en = 0, hd_we = 0, hl_we = 0, frame_start = 0;
  logic [7:0] hd_addr = 0;
  logic [31:0] hd_wdata = 0, hd_rdata;
  logic [9:0] hl_addr = 0;
  logic [15:0] hl_wdata = 0;
  logic mfcc_busy, frame_done;
  mfcc_state_e mfcc_state;
  logic [$clog2(IN_T)-1:0] frame_cnt;
  logic [15:0] layer_scale [N_MAC_LAYERS];
  logic [5:0]  layer_shift [N_MAC_LAYERS];
  logic h_act_req = 0, h_act_we = 0, h_act_gnt;
  logic [ACT_AW-1:0] h_act_addr = '0;
  logic [7:0] h_act_wdata = '0, h_act_rdata;
  logic h_w_req = 0, h_w_we = 0;
  logic [WGT_AW-1:0] h_w_addr = '0;
  logic [7:0] h_w_wdata = '0, h_w_rdata;
  logic dscnn_start = 0, dscnn_busy, dscnn_finish;
  logic [3:0] dscnn_layer;
  logic ev_bypass, ev_mul_stall, ev_rd_stall, ev_reuse, ev_contention, ev_feat_stall, ev_auto_start;

  kws_top #(.IN_T(IN_T), .NCH(NCH), .NDS(NDS), .NCLS(NCLS), .ACT_DEPTH(ACT_DEPTH), .WGT_DEPTH(WGT_DEPTH)) dut (.*);

`include "kws_tb_body.svh"
endmodule
