// dscnn_top: DSCNN keyword classifier (back end of the keyword spotter).
//
// Holds the layer sequencer (dscnn_control), the layer-reusable compute
// engine, the average-pooling unit, the activation SRAM (ACT_DEPTH x 8) and
// the weight SRAM (WGT_DEPTH x 8).  The multiplier is outside: the engine's
// multiplier port is brought out so that the front end can share it.
//
// The activation SRAM is single-ported and shared through an sram_arbiter,
// priority high to low: host port, engine write-back, pooling unit, engine
// read, feature writer.  The feature writer is how the MFCC front end
// deposits its features into the input window; the host port loads and
// reads back data.  The weight SRAM has its own arbiter: host port first,
// then the engine.  The host is expected to use its ports while no layer
// runs.  start launches one inference; finish pulses when the class scores
// are in the activation SRAM at FC_BASE (see dscnn_control).
//
// The block split (control FSM, compute engine, pooling, activation and
// weight SRAM, SRAM arbiter) follows the design description; the port
// list and the arbitration order are this design's.
module dscnn_top
  import kws_pkg::*;
#(
  parameter int IN_T      = 52,
  parameter int IN_F      = 10,
  parameter int NCH       = 64,
  parameter int KT        = 10,
  parameter int KF        = 4,
  parameter int ST        = 2,
  parameter int SF        = 2,
  parameter int PT        = 4,
  parameter int PF        = 0,
  parameter int NDS       = 4,
  parameter int NCLS      = 12,
  parameter int ACT_DEPTH = 7296,
  parameter int WGT_DEPTH = 22016,
  parameter int MA_W      = 18,
  parameter int MB_W      = 16,
  localparam int ACT_AW   = $clog2(ACT_DEPTH),
  localparam int WGT_AW   = $clog2(WGT_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              finish,
  output logic              busy,
  output logic              in_cl,
  output logic [3:0]        layer,
  input  logic [15:0]       layer_scale [N_MAC_LAYERS],
  input  logic [5:0]        layer_shift [N_MAC_LAYERS],
  // host access, activation SRAM
  input  logic              h_act_req,
  input  logic              h_act_we,
  input  logic [ACT_AW-1:0] h_act_addr,
  input  logic [7:0]        h_act_wdata,
  output logic [7:0]        h_act_rdata,
  output logic              h_act_gnt,
  // host access, weight SRAM
  input  logic              h_w_req,
  input  logic              h_w_we,
  input  logic [WGT_AW-1:0] h_w_addr,
  input  logic [7:0]        h_w_wdata,
  output logic [7:0]        h_w_rdata,
  // feature writer (front end)
  input  logic              f_req,
  input  logic [ACT_AW-1:0] f_addr,
  input  logic [7:0]        f_data,
  output logic              f_gnt,
  // shared multiplier
  output logic              mul_req,
  input  logic              mul_gnt,
  output logic signed [MA_W-1:0] mul_a,
  output logic signed [MB_W-1:0] mul_b,
  input  logic              mul_res_valid,
  input  logic signed [MA_W+MB_W-1:0] mul_res,
  // event strobes
  output logic              ev_bypass,
  output logic              ev_mul_stall,
  output logic              ev_rd_stall,
  output logic              ev_reuse
);
  layer_cfg_t cfg;
  logic eng_start, eng_done, eng_busy, ap_start, ap_done, ap_busy;

  dscnn_control #(.IN_T(IN_T), .IN_F(IN_F), .NCH(NCH), .KT(KT), .KF(KF), .ST(ST), .SF(SF),
                  .PT(PT), .PF(PF), .NDS(NDS), .NCLS(NCLS)) u_ctrl (
    .clk, .rst_n, .start, .layer_scale, .layer_shift, .cfg,
    .eng_start, .eng_done, .ap_start, .ap_done, .busy, .layer, .in_cl, .finish
  );

  // activation SRAM and its arbiter
  localparam int NP = 5;
  logic [NP-1:0]     a_req, a_we, a_gnt, a_rvalid;
  logic [ACT_AW-1:0] a_addr  [NP];
  logic [7:0]        a_wdata [NP];
  logic [7:0]        a_rdata;
  logic              am_en, am_we;
  logic [ACT_AW-1:0] am_addr;
  logic [7:0]        am_wdata;

  logic              e_rd_req, e_wr_req;
  logic [ACT_AW-1:0] e_rd_addr, e_wr_addr;
  logic [7:0]        e_wr_data;
  logic              p_req, p_we;
  logic [ACT_AW-1:0] p_addr;
  logic [7:0]        p_wdata;

  always_comb begin
    a_req[0] = h_act_req; a_we[0] = h_act_we; a_addr[0] = h_act_addr; a_wdata[0] = h_act_wdata;
    a_req[1] = e_wr_req;  a_we[1] = 1'b1;     a_addr[1] = e_wr_addr;  a_wdata[1] = e_wr_data;
    a_req[2] = p_req;     a_we[2] = p_we;     a_addr[2] = p_addr;     a_wdata[2] = p_wdata;
    a_req[3] = e_rd_req;  a_we[3] = 1'b0;     a_addr[3] = e_rd_addr;  a_wdata[3] = '0;
    a_req[4] = f_req;     a_we[4] = 1'b1;     a_addr[4] = f_addr;     a_wdata[4] = f_data;
  end

  sram_arbiter #(.NP(NP), .AW(ACT_AW), .WIDTH(8)) u_act_arb (
    .clk, .rst_n, .req(a_req), .we(a_we), .addr(a_addr), .wdata(a_wdata),
    .gnt(a_gnt), .rvalid(a_rvalid), .rdata(a_rdata),
    .m_en(am_en), .m_we(am_we), .m_addr(am_addr), .m_wdata(am_wdata), .m_rdata(h_act_rdata)
  );

  sram_sp #(.DEPTH(ACT_DEPTH), .WIDTH(8)) u_act_sram (
    .clk, .en(am_en), .we(am_we), .addr(am_addr), .wdata(am_wdata), .rdata(h_act_rdata)
  );

  assign h_act_gnt = a_gnt[0];
  assign f_gnt     = a_gnt[4];

  // weight SRAM and its arbiter
  logic [1:0]        w_req, w_we, w_gnt, w_rvalid;
  logic [WGT_AW-1:0] w_addr_a [2];
  logic [7:0]        w_wdata_a [2];
  logic              wm_en, wm_we;
  logic [WGT_AW-1:0] wm_addr;
  logic [7:0]        wm_wdata, w_rdata_arb;
  logic              e_w_en;
  logic [WGT_AW-1:0] e_w_addr;

  always_comb begin
    w_req[0] = h_w_req; w_we[0] = h_w_we; w_addr_a[0] = h_w_addr; w_wdata_a[0] = h_w_wdata;
    w_req[1] = e_w_en;  w_we[1] = 1'b0;   w_addr_a[1] = e_w_addr; w_wdata_a[1] = '0;
  end

  sram_arbiter #(.NP(2), .AW(WGT_AW), .WIDTH(8)) u_wgt_arb (
    .clk, .rst_n, .req(w_req), .we(w_we), .addr(w_addr_a), .wdata(w_wdata_a),
    .gnt(w_gnt), .rvalid(w_rvalid), .rdata(w_rdata_arb),
    .m_en(wm_en), .m_we(wm_we), .m_addr(wm_addr), .m_wdata(wm_wdata), .m_rdata(h_w_rdata)
  );

  sram_sp #(.DEPTH(WGT_DEPTH), .WIDTH(8)) u_wgt_sram (
    .clk, .en(wm_en), .we(wm_we), .addr(wm_addr), .wdata(wm_wdata), .rdata(h_w_rdata)
  );

  dscnn_layer_engine #(.ACT_AW(ACT_AW), .WGT_AW(WGT_AW), .MAXC(NCH), .MA_W(MA_W), .MB_W(MB_W)) u_eng (
    .clk, .rst_n, .start(eng_start), .cfg, .busy(eng_busy), .done(eng_done),
    .rd_req(e_rd_req), .rd_addr(e_rd_addr), .rd_gnt(a_gnt[3]), .rdata(a_rdata),
    .wr_req(e_wr_req), .wr_addr(e_wr_addr), .wr_data(e_wr_data), .wr_gnt(a_gnt[1]),
    .w_en(e_w_en), .w_addr(e_w_addr), .w_rdata(w_rdata_arb),
    .mul_req, .mul_gnt, .mul_a, .mul_b, .mul_res_valid, .mul_res,
    .ev_bypass, .ev_mul_stall, .ev_rd_stall, .ev_reuse
  );

  ap #(.ACT_AW(ACT_AW)) u_ap (
    .clk, .rst_n, .start(ap_start), .cfg, .busy(ap_busy), .done(ap_done),
    .req(p_req), .we(p_we), .addr(p_addr), .wdata(p_wdata),
    .gnt(a_gnt[2]), .rvalid(a_rvalid[2]), .rdata(a_rdata)
  );

  // the engine and the pooling unit never run at the same time
  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(eng_busy && ap_busy));
  // the engine owns the weight SRAM while it runs: its reads are never refused
  a_wgt_gnt: assert property (@(posedge clk) disable iff (!rst_n) e_w_en |-> w_gnt[1]);
endmodule
