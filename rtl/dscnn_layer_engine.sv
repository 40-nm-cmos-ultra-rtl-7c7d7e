// dscnn_layer_engine: the layer-reusable compute engine of the DSCNN back end.
//
// One engine computes every multiply-accumulate layer of the network, one
// layer per start pulse, configured by a layer_cfg_t record:
//   L_CONV  standard convolution with one input channel (the first layer),
//           zero padding and stride, output to a separate region;
//   L_DW    depthwise 3x3, stride 1, zero padding 1, written back in place
//           through an output line buffer of W+1 entries: output (r,c) is
//           written only after output (r+1,c+1) is computed, when no later
//           output still needs input (r,c);
//   L_PW    pointwise 1x1: for each position the C input activations are read
//           once into a register file, then all output channels are
//           computed from it and written over the same position.  The fully
//           connected layer is run as L_PW on a 1x1 map.
// Activation SRAM layout is channel-major: base + channel*H*W + row*W + col.
//
// Pipeline (registers between stages, each with valid/ready):
//   s0  loop counters -> activation and weight addresses; marks taps that
//       fall in the zero padding, taps served from the register file, loads
//       into the register file and the last tap of an output point.
//   s1  request buffer: holds the request until the activation SRAM read
//       port is granted (writes have priority) and the next stage is free;
//       issues the activation and weight reads.
//   s2  SRAM response: loads the register file or forms the operand pair.
//       Products with a zero operand, or with an operand equal to one, are
//       resolved here without the shared multiplier (bypass); otherwise s2
//       requests the multiplier and waits for the grant.
//   s3  accumulation; on the last tap Y = clip((A * scale) >>> shift) to
//       [0,255] (relu = 1) or [-128,127], pushed into the write-back queue.
// The write-back queue drains to the activation SRAM write port; in L_DW it
// holds W+1 outputs back and empties at each channel end.
//
// SRAM reads have one cycle latency; the read data must stay unchanged
// until s2 consumes it, which the arbiter guarantees because nothing else
// reads the activation SRAM while a layer runs.  The multiplier answers one
// cycle after its grant.
//
// Following the design description: the four stages and their roles, the
// zero / constant / reuse operand marking, the 0/1 multiplier bypass, the
// scale-shift-clip post-processing to 8 bits, the W+1 depthwise line buffer,
// the 1x1xC pointwise register file and in-place overwrite.  This design's
// own choices: the loop orders, the channel-major layout, the fully
// connected layer as a 1x1 pointwise layer, and a local multiplier for the
// post-processing scale (the description does not say which multiplier
// performs it).  The constant-one operand is produced only by the data
// (activation or weight equal to one); the layer set has no bias terms.
module dscnn_layer_engine
  import kws_pkg::*;
#(
  parameter int ACT_AW  = 13,   // activation SRAM address bits
  parameter int WGT_AW  = 15,   // weight SRAM address bits
  parameter int MAXC    = 64,   // register file entries (max input channels)
  parameter int LB_DEPTH = 16,  // write-back queue entries (>= max W + 2)
  parameter int MA_W    = 18,
  parameter int MB_W    = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  layer_cfg_t          cfg,
  output logic                busy,
  output logic                done,
  // activation SRAM, read port
  output logic                rd_req,
  output logic [ACT_AW-1:0]   rd_addr,
  input  logic                rd_gnt,
  input  logic [7:0]          rdata,
  // activation SRAM, write port
  output logic                wr_req,
  output logic [ACT_AW-1:0]   wr_addr,
  output logic [7:0]          wr_data,
  input  logic                wr_gnt,
  // weight SRAM (read only, owned while busy)
  output logic                w_en,
  output logic [WGT_AW-1:0]   w_addr,
  input  logic [7:0]          w_rdata,
  // shared multiplier
  output logic                mul_req,
  input  logic                mul_gnt,
  output logic signed [MA_W-1:0] mul_a,
  output logic signed [MB_W-1:0] mul_b,
  input  logic                mul_res_valid,
  input  logic signed [MA_W+MB_W-1:0] mul_res,
  // event strobes (for monitoring)
  output logic                ev_bypass,     // product resolved without multiplier
  output logic                ev_mul_stall,  // s2 waiting for the multiplier
  output logic                ev_rd_stall,   // s1 waiting for the SRAM read port
  output logic                ev_reuse       // operand taken from the register file
);
  localparam int RFW = $clog2(MAXC);

  typedef struct packed {
    logic               rd;       // needs an activation SRAM read
    logic               wrd;      // needs a weight read
    logic               zero;     // operand is zero padding
    logic               regf;     // operand from register file
    logic               load;     // load register file, no MAC
    logic [RFW-1:0]     ridx;
    logic               last;     // last tap of an output point
    logic               chan_end; // last output of a depthwise channel
    logic [ACT_AW-1:0]  act_addr;
    logic [WGT_AW-1:0]  wgt_addr;
    logic [ACT_AW-1:0]  out_addr;
  } req_t;

  // ------------------------------------------------------------ s0 counters
  layer_cfg_t c;
  logic        run;                 // s0 still producing
  logic [7:0]  ch, oy, ox, ic;
  logic [3:0]  ky, kx;
  logic        ldph;                // PW: register-file load phase
  logic [15:0] npos;                // positions per channel
  req_t        r0;

  always_comb begin
    int iy, ix, pos;
    r0  = '0;
    pos = int'(oy) * int'(c.out_w) + int'(ox);
    iy  = int'(oy) * int'(c.sh) + int'(ky) - int'(c.pad_t);
    ix  = int'(ox) * int'(c.sw) + int'(kx) - int'(c.pad_l);
    case (c.kind)
      L_CONV, L_DW: begin
        r0.zero = (iy < 0) || (iy >= int'(c.in_h)) || (ix < 0) || (ix >= int'(c.in_w));
        r0.rd   = !r0.zero;
        r0.wrd  = !r0.zero;
        r0.last = (ky == c.kh - 1'b1) && (kx == c.kw - 1'b1);
        r0.act_addr = ACT_AW'(int'(c.in_base) +
                      ((c.kind == L_DW) ? int'(ch) * int'(npos) : 0) +
                      iy * int'(c.in_w) + ix);
        r0.wgt_addr = WGT_AW'(int'(c.w_base) + (int'(ch) * int'(c.kh) + int'(ky)) * int'(c.kw) + int'(kx));
        r0.out_addr = ACT_AW'(int'(c.out_base) + int'(ch) * int'(npos) + pos);
        r0.chan_end = (c.kind == L_DW) && r0.last && (oy == c.out_h - 1'b1) && (ox == c.out_w - 1'b1);
      end
      default: begin  // L_PW
        r0.ridx = RFW'(ic);
        if (ldph) begin
          r0.load = 1'b1;
          r0.rd   = 1'b1;
          r0.act_addr = ACT_AW'(int'(c.in_base) + int'(ic) * int'(npos) + pos);
        end else begin
          r0.regf = 1'b1;
          r0.wrd  = 1'b1;
          r0.last = (ic == c.in_c - 1'b1);
          r0.wgt_addr = WGT_AW'(int'(c.w_base) + int'(ch) * int'(c.in_c) + int'(ic));
          r0.out_addr = ACT_AW'(int'(c.out_base) + int'(ch) * int'(npos) + pos);
        end
      end
    endcase
  end

  // ------------------------------------------------------------ stage registers
  logic s1_v, s2_v, s3_v;
  req_t s1, s2;
  logic s1_adv, s2_adv, s0_adv;
  logic s1_ready, s2_ready;

  // s2 operand formation
  logic [7:0]         regfile [MAXC];
  logic [7:0]         act8;
  logic signed [8:0]  act9;
  logic signed [7:0]  wgt8;
  logic               a_zero, w_zero, a_one, w_one, byp;
  logic signed [16:0] byp_val;

  always_comb begin
    act8   = s2.zero ? 8'd0 : s2.regf ? regfile[s2.ridx] : rdata;
    act9   = c.in_signed ? {act8[7], act8} : {1'b0, act8};
    wgt8   = signed'(w_rdata);
    a_zero = (act8 == 8'd0);
    w_zero = (wgt8 == 8'sd0);
    a_one  = (act9 == 9'sd1);
    w_one  = (wgt8 == 8'sd1);
    byp    = a_zero || w_zero || a_one || w_one;
    byp_val = (a_zero || w_zero) ? 17'sd0 : a_one ? 17'(wgt8) : 17'(act9);
  end

  assign mul_req  = s2_v && !s2.load && !byp;
  assign mul_a    = MA_W'(act9);
  assign mul_b    = MB_W'(wgt8);
  assign s2_adv   = s2_v && (s2.load || byp || mul_gnt);
  assign s2_ready = !s2_v || s2_adv;

  assign rd_req   = s1_v && s1.rd && s2_ready;
  assign rd_addr  = s1.act_addr;
  assign s1_adv   = s1_v && s2_ready && (!s1.rd || rd_gnt);
  assign s1_ready = !s1_v || s1_adv;
  assign w_en     = s1_adv && s1.wrd;
  assign w_addr   = s1.wgt_addr;
  assign s0_adv   = run && s1_ready;

  assign ev_bypass    = s2_adv && !s2.load && byp;
  assign ev_mul_stall = s2_v && !s2.load && !byp && !mul_gnt;
  assign ev_rd_stall  = s1_v && s1.rd && s2_ready && !rd_gnt;
  assign ev_reuse     = s2_adv && s2.regf;

  // s3 registers
  logic               s3_mul, s3_last, s3_chan_end;
  logic signed [16:0] s3_byp;
  logic [ACT_AW-1:0]  s3_out;
  logic signed [31:0] acc;

  // ------------------------------------------------------------ post-processing
  logic signed [31:0] acc_new;
  logic signed [48:0] scaled;
  logic [7:0]         y;
  always_comb begin
    acc_new = acc + (s3_mul ? 32'(mul_res) : 32'(s3_byp));
    scaled  = (49'(acc_new) * 49'(signed'({1'b0, c.scale}))) >>> c.shift;
    if (c.relu) y = (scaled < 0) ? 8'd0 : (scaled > 49'sd255) ? 8'd255 : scaled[7:0];
    else        y = (scaled < -49'sd128) ? 8'h80 : (scaled > 49'sd127) ? 8'h7f : scaled[7:0];
  end

  // ------------------------------------------------------------ write-back queue / line buffer
  logic [ACT_AW+7:0]  q_mem [LB_DEPTH];
  localparam int QW = $clog2(LB_DEPTH) + 1;
  logic [QW-1:0] q_cnt, drain;
  logic [$clog2(LB_DEPTH)-1:0] q_rd, q_wr;
  logic [QW-1:0] hold;
  logic push, pop;

  assign hold    = (c.kind == L_DW) ? QW'(int'(c.out_w) + 1) : '0;
  assign push    = s3_v && s3_last;
  assign wr_req  = (q_cnt > hold) || (drain != 0);
  assign {wr_addr, wr_data} = q_mem[q_rd];
  assign pop     = wr_req && wr_gnt;

  // ------------------------------------------------------------ sequential
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0; run <= 1'b0; busy <= 1'b0; done <= 1'b0;
      ch <= '0; oy <= '0; ox <= '0; ic <= '0; ky <= '0; kx <= '0; ldph <= 1'b0;
      npos <= '0;
      s1_v <= 1'b0; s2_v <= 1'b0; s3_v <= 1'b0; s1 <= '0; s2 <= '0;
      s3_mul <= 1'b0; s3_last <= 1'b0; s3_chan_end <= 1'b0; s3_byp <= '0; s3_out <= '0;
      acc <= '0;
      q_cnt <= '0; q_rd <= '0; q_wr <= '0; drain <= '0;
    end else begin
      done <= 1'b0;

      // start of a layer
      if (start && !busy) begin
        c    <= cfg;
        run  <= 1'b1;
        busy <= 1'b1;
        ch <= '0; oy <= '0; ox <= '0; ic <= '0; ky <= '0; kx <= '0;
        ldph <= (cfg.kind == L_PW);
        npos <= 16'(cfg.out_h) * 16'(cfg.out_w);
        acc  <= '0;
      end

      // s0: advance the loop nest
      if (s0_adv) begin
        if (c.kind == L_PW) begin
          if (ldph) begin
            if (ic == c.in_c - 1'b1) begin ic <= '0; ldph <= 1'b0; ch <= '0; end
            else ic <= ic + 1'b1;
          end else if (ic != c.in_c - 1'b1) begin
            ic <= ic + 1'b1;
          end else begin
            ic <= '0;
            if (ch != c.out_c - 1'b1) ch <= ch + 1'b1;
            else begin
              ch <= '0; ldph <= 1'b1;
              if (ox != c.out_w - 1'b1) ox <= ox + 1'b1;
              else begin
                ox <= '0;
                if (oy != c.out_h - 1'b1) oy <= oy + 1'b1;
                else run <= 1'b0;
              end
            end
          end
        end else begin
          if (kx != c.kw - 1'b1) kx <= kx + 1'b1;
          else begin
            kx <= '0;
            if (ky != c.kh - 1'b1) ky <= ky + 1'b1;
            else begin
              ky <= '0;
              if (ox != c.out_w - 1'b1) ox <= ox + 1'b1;
              else begin
                ox <= '0;
                if (oy != c.out_h - 1'b1) oy <= oy + 1'b1;
                else begin
                  oy <= '0;
                  if (ch != c.out_c - 1'b1) ch <= ch + 1'b1;
                  else run <= 1'b0;
                end
              end
            end
          end
        end
      end

      // s1
      if (s1_ready) begin
        s1_v <= s0_adv;
        if (s0_adv) s1 <= r0;
      end

      // s2
      if (s2_ready) begin
        s2_v <= s1_adv;
        if (s1_adv) s2 <= s1;
      end
      if (s2_adv && s2.load) regfile[s2.ridx] <= rdata;

      // s3
      s3_v <= s2_adv && !s2.load;
      if (s2_adv && !s2.load) begin
        s3_mul      <= !byp;
        s3_byp      <= byp_val;
        s3_last     <= s2.last;
        s3_chan_end <= s2.chan_end;
        s3_out      <= s2.out_addr;
      end
      if (s3_v) acc <= s3_last ? 32'sd0 : acc_new;

      // write-back queue
      if (push) begin
        q_mem[q_wr] <= {s3_out, y};
        q_wr <= q_wr + 1'b1;
      end
      if (pop) q_rd <= q_rd + 1'b1;
      q_cnt <= q_cnt + QW'(push) - QW'(pop);
      if (push && s3_chan_end)  drain <= q_cnt + 1'b1 - QW'(pop);
      else if (pop && drain != 0) drain <= drain - 1'b1;

      // end of layer
      if (busy && !run && !s1_v && !s2_v && !s3_v && q_cnt == 0 && !(start && !busy)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
  // the product consumed in s3 is the one granted in the previous cycle
  a_mul_lat: assert property (@(posedge clk) disable iff (!rst_n) (s3_v && s3_mul) |-> mul_res_valid);
  a_q_ovf:   assert property (@(posedge clk) disable iff (!rst_n) !(push && !pop && q_cnt == QW'(LB_DEPTH)));
endmodule
