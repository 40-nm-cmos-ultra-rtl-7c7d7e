// dscnn_control: top-level layer sequencer of the DSCNN back end.
//
// After a start pulse it runs the network one layer at a time:
//   0 CL    convolution KT x KF, stride ST x SF, NCH output channels, on the
//           IN_T x IN_F feature map (one MFCC vector per row)
//   1..8    DWCL_i (depthwise 3x3) and PWCL_i (pointwise NCH -> NCH), i = 0..NDS-1
//   9 AP    global average pooling to NCH values
//  10 FCL   fully connected NCH -> NCLS (run on the engine as a 1x1 layer)
// For every layer it builds the layer_cfg_t record (sizes, SRAM bases,
// scale and shift), pulses eng_start or ap_start, and waits for the
// matching done pulse.  finish pulses after the last layer.
//
// Activation SRAM map (8-bit words): feature maps NCH x P at 0 (layers work
// in place), the input window at IN_BASE = NCH*P, pooled vector at
// AP_BASE = IN_BASE + IN_T*IN_F, class scores at FC_BASE = AP_BASE + NCH.
// Weight SRAM map (8-bit): CL weights, then per block DW (9*NCH) and PW
// (NCH*NCH), then FC (NCLS*NCH): 22016 words for the default sizes.
//
// From the design description: one layer at a time in this order, the
// control FSM handing configuration to the engine and pooling unit, 64
// channels, 3x3 depthwise kernels.  The CL kernel (10 x 4, stride 2 x 2),
// the 52-frame window, the 12 classes and the SRAM maps are this design's
// reading of the reported weight-SRAM depth and per-layer cycle counts.
module dscnn_control
  import kws_pkg::*;
#(
  parameter int IN_T = 52,
  parameter int IN_F = 10,
  parameter int NCH  = 64,
  parameter int KT   = 10,
  parameter int KF   = 4,
  parameter int ST   = 2,
  parameter int SF   = 2,
  parameter int PT   = 4,
  parameter int PF   = 0,
  parameter int NDS  = 4,
  parameter int NCLS = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] layer_scale [N_MAC_LAYERS],
  input  logic [5:0]  layer_shift [N_MAC_LAYERS],
  output layer_cfg_t  cfg,
  output logic        eng_start,
  input  logic        eng_done,
  output logic        ap_start,
  input  logic        ap_done,
  output logic        busy,
  output logic [3:0]  layer,      // index of the running layer
  output logic        in_cl,      // the input window is being read
  output logic        finish
);
  localparam int OH      = (IN_T + 2*PT - KT) / ST + 1;
  localparam int OW      = (IN_F + 2*PF - KF) / SF + 1;
  localparam int P       = OH * OW;
  localparam int IN_BASE = NCH * P;
  localparam int AP_BASE = IN_BASE + IN_T * IN_F;
  localparam int FC_BASE = AP_BASE + NCH;
  localparam int W_BLK   = 9*NCH + NCH*NCH;
  localparam int W_FC    = NCH*KT*KF + NDS*W_BLK;
  localparam int NLAYERS = 2*NDS + 3;
  localparam int AP_SH   = 16;
  localparam int AP_RCP  = ((1 << AP_SH) + P/2) / P;

  function automatic layer_cfg_t make_cfg(int l, logic [15:0] sc [N_MAC_LAYERS], logic [5:0] sh [N_MAC_LAYERS]);
    layer_cfg_t r;
    int blk, mi;
    r = '0;
    r.in_signed = 1'b0;
    r.relu      = 1'b1;
    r.sh = 2'd1; r.sw = 2'd1;
    if (l == 0) begin
      r.kind = L_CONV;
      r.in_base = 15'(IN_BASE); r.out_base = 15'(0); r.w_base = 15'(0);
      r.in_h = 8'(IN_T); r.in_w = 8'(IN_F); r.in_c = 8'd1;
      r.out_h = 8'(OH); r.out_w = 8'(OW); r.out_c = 8'(NCH);
      r.kh = 4'(KT); r.kw = 4'(KF); r.sh = 2'(ST); r.sw = 2'(SF);
      r.pad_t = 4'(PT); r.pad_l = 4'(PF);
      r.in_signed = 1'b1;
      mi = 0;
    end else if (l <= 2*NDS) begin
      blk = (l - 1) / 2;
      r.in_base = 15'(0); r.out_base = 15'(0);
      r.in_h = 8'(OH); r.in_w = 8'(OW); r.in_c = 8'(NCH);
      r.out_h = 8'(OH); r.out_w = 8'(OW); r.out_c = 8'(NCH);
      if ((l % 2) == 1) begin
        r.kind = L_DW;
        r.w_base = 15'(NCH*KT*KF + blk*W_BLK);
        r.kh = 4'd3; r.kw = 4'd3; r.pad_t = 4'd1; r.pad_l = 4'd1;
      end else begin
        r.kind = L_PW;
        r.w_base = 15'(NCH*KT*KF + blk*W_BLK + 9*NCH);
        r.kh = 4'd1; r.kw = 4'd1;
      end
      mi = l;
    end else if (l == 2*NDS + 1) begin
      r.kind = L_AP;
      r.in_base = 15'(0); r.out_base = 15'(AP_BASE);
      r.in_c = 8'(NCH); r.out_h = 8'(OH); r.out_w = 8'(OW); r.out_c = 8'(NCH);
      mi = -1;
    end else begin
      r.kind = L_PW;
      r.in_base = 15'(AP_BASE); r.out_base = 15'(FC_BASE); r.w_base = 15'(W_FC);
      r.in_h = 8'd1; r.in_w = 8'd1; r.in_c = 8'(NCH);
      r.out_h = 8'd1; r.out_w = 8'd1; r.out_c = 8'(NCLS);
      r.kh = 4'd1; r.kw = 4'd1;
      r.relu = 1'b0;
      mi = N_MAC_LAYERS - 1;
    end
    if (mi >= 0) begin
      r.scale = sc[mi];
      r.shift = sh[mi];
    end else begin
      r.scale = 16'(AP_RCP);
      r.shift = 6'(AP_SH);
    end
    return r;
  endfunction

  typedef enum logic [1:0] {C_IDLE, C_LAUNCH, C_WAIT} cst_e;
  cst_e st;

  assign cfg   = make_cfg(int'(layer), layer_scale, layer_shift);
  assign busy  = (st != C_IDLE);
  assign in_cl = busy && (layer == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; layer <= '0;
      eng_start <= 1'b0; ap_start <= 1'b0; finish <= 1'b0;
    end else begin
      eng_start <= 1'b0; ap_start <= 1'b0; finish <= 1'b0;
      case (st)
        C_IDLE: if (start) begin
          layer <= '0;
          st    <= C_LAUNCH;
        end
        C_LAUNCH: begin
          if (cfg.kind == L_AP) ap_start  <= 1'b1;
          else                  eng_start <= 1'b1;
          st <= C_WAIT;
        end
        C_WAIT: if (eng_done || ap_done) begin
          if (int'(layer) == NLAYERS - 1) begin
            st     <= C_IDLE;
            finish <= 1'b1;
            layer  <= '0;
          end else begin
            layer <= layer + 1'b1;
            st    <= C_LAUNCH;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
