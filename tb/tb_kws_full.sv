// tb_kws_full: the keyword spotter at its full default size.
//
// kws_top with every parameter at its default: 52 frames of 256 samples fill
// the 52 x 10 input window, the 64-channel network with four depthwise-
// separable blocks and 12 classes runs once, and a 53rd frame runs during
// its first layer.  Everything is checked against reference models as in
// tb_kws_top, and the layer and inference cycle counts are compared with
// the reference figures (network layers about 2.26 million cycles).
module tb_kws_full;
  import kws_pkg::*;
  localparam int IN_T = 52, NCH = 64, NDS = 4, NCLS = 12, ACT_DEPTH = 7296, WGT_DEPTH = 22016;
  localparam bit FULL = 1'b1;
  localparam int WATCHDOG = 6000000;
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

  kws_top dut (.*);

`include "kws_tb_body.svh"
endmodule
