// cal_mode: computation module of the MFCC front end.
//
// Takes one step (state + addresses) from cal_fsm, runs the local sequence
// of that state against the data SRAM, the coefficient (LUT) SRAM and the
// shared multiplier, writes the result back and answers with a one-cycle
// upd pulse.  The data SRAM holds one complex value per 32-bit word,
// {re[31:16], im[15:0]}; Mel energies and log values use the re half.
//
// Local sequences (one SRAM access per memory per cycle, one multiply per
// multiplier grant; the product arrives the cycle after the grant):
//   WINDOW   x*w >>> 15 -> re, im = 0                         (1 multiply)
//   STFT     DIF butterfly, halved against overflow:
//            D[a0] = (A+B)/2 written while the multiplier works on
//            (a + jb) = (A-B)/2 times W = cos - j sin with three products
//            m1 = (a+b)cos, m2 = b(sin-cos), m3 = a(sin+cos);
//            D[a1] = {(m1+m2) >>> 14, (m1-m3) >>> 14}        (3 multiplies)
//   REVERSE  swap D[a0] and D[a1]
//   POWER    D[a0] = re*re + im*im, 32-bit                    (2 multiplies)
//   MEL      bin index a0 against band edge LUT[a2]: a0 <= edge adds D[a0]
//            to the band sum (UPD_NEXT); otherwise the saturated sum
//            >> cfg_mel_shift is stored at a1 and the sum cleared (UPD_ALT).
//            No multiplier: rectangular bands.
//   LN       x = D[a0].re against segment upper bound LUT[a2]; if above and
//            not the last segment, UPD_ALT; else y = (slope*x >>> LN_SHIFT) +
//            offset with slope = LUT[a2+1], offset = LUT[a2+2]  (1 multiply)
//   DCT      sum of x*c over the bands, c = LUT[a2]; on 'last' the sum
//            >>> 15, saturated to 16 bits, leaves on the feature port
//            (feat_valid / feat_ready).                       (1 multiply)
//
// The operations, the 3-multiplication twiddle product, the overlap of the
// sum write-back with the twiddle multiplications, rectangular Mel bands,
// squared magnitude without square root and piecewise-linear log follow the
// design description.  Fixed-point formats, the halving in each FFT stage,
// the band/segment search by repeated steps and all shift amounts are this
// design's choices.
module cal_mode
  import kws_pkg::*;
#(
  parameter int LN_SHIFT = 12,
  parameter int MA_W     = 18,   // multiplier operand A width
  parameter int MB_W     = 16    // multiplier operand B width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [4:0]        cfg_mel_shift,
  // step from cal_fsm
  input  logic              step_valid,
  input  mfcc_step_t        step_i,
  output logic              upd,
  output upd_e              upd_code,
  // data SRAM (32 bits, one cycle read latency)
  output logic              d_en,
  output logic              d_we,
  output logic [MFCC_AW-1:0] d_addr,
  output logic [31:0]       d_wdata,
  input  logic [31:0]       d_rdata,
  // LUT SRAM (16 bits, read only)
  output logic              l_en,
  output logic [MFCC_AW-1:0] l_addr,
  input  logic [15:0]       l_rdata,
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
  localparam int PW = MA_W + MB_W;

  typedef enum logic [2:0] {P0, P1, P2, P3, P4, P5, P6, P7} ph_e;

  ph_e          ph;
  logic         active;
  mfcc_step_t   s;            // latched step
  mfcc_state_e  prev_st;
  logic signed [15:0] ra, ia;              // operands
  logic signed [15:0] c0, c1, c2;          // LUT words
  logic signed [16:0] da, db;              // butterfly difference (a, b)
  logic signed [PW-1:0] m1, m2;
  logic signed [47:0] acc;

  function automatic logic signed [15:0] sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

  // sums and differences of the butterfly, from A (registered) and B (SRAM output)
  logic signed [16:0] sum_re, sum_im, dif_re, dif_im;
  always_comb begin
    sum_re = (17'(ra) + 17'(signed'(d_rdata[31:16]))) >>> 1;
    sum_im = (17'(ia) + 17'(signed'(d_rdata[15:0])))  >>> 1;
    dif_re = (17'(ra) - 17'(signed'(d_rdata[31:16]))) >>> 1;
    dif_im = (17'(ia) - 17'(signed'(d_rdata[15:0])))  >>> 1;
  end

  logic signed [47:0] mel_sum;
  logic signed [47:0] ln_y, dct_acc, fft_re, fft_im, win_y;
  always_comb begin
    mel_sum = acc >>> cfg_mel_shift;
    ln_y    = (48'(mul_res) >>> LN_SHIFT) + 48'(c2);
    dct_acc = acc + 48'(mul_res);
    fft_re  = (48'(m1) + 48'(m2)) >>> 14;
    fft_im  = (48'(m1) - 48'(mul_res)) >>> 14;
    win_y   = 48'(mul_res) >>> 15;
  end

  always_comb begin
    d_en = 1'b0; d_we = 1'b0; d_addr = '0; d_wdata = '0;
    l_en = 1'b0; l_addr = '0;
    mul_req = 1'b0; mul_a = '0; mul_b = '0;
    upd = 1'b0; upd_code = UPD_NEXT;
    if (!active) begin
      // P0 of every state: first reads issued straight from the incoming step
      if (step_valid) begin
        d_en   = 1'b1;
        d_addr = step_i.a0;
        l_en   = (step_i.st != ST_REVERSE) && (step_i.st != ST_POWER);
        l_addr = step_i.a2;
      end
    end else begin
      case (s.st)
        ST_WINDOW: case (ph)
          P2: begin mul_req = 1'b1; mul_a = MA_W'(ra); mul_b = c0; end
          P3: if (mul_res_valid) begin
                d_en = 1'b1; d_we = 1'b1; d_addr = s.a0;
                d_wdata = {sat16(win_y), 16'h0};
                upd = 1'b1;
              end
          default: ;
        endcase
        ST_STFT: case (ph)
          P1: begin d_en = 1'b1; d_addr = s.a1; l_en = 1'b1; l_addr = s.a2 + 1'b1; end
          P2: begin
                d_en = 1'b1; d_we = 1'b1; d_addr = s.a0;
                d_wdata = {sum_re[15:0], sum_im[15:0]};
                l_en = 1'b1; l_addr = s.a2 + MFCC_AW'(2);
              end
          P3: begin mul_req = 1'b1; mul_a = MA_W'(da + db); mul_b = c0; end
          P4: begin mul_req = 1'b1; mul_a = MA_W'(db);      mul_b = c1; end
          P5: begin mul_req = 1'b1; mul_a = MA_W'(da);      mul_b = c2; end
          P6: if (mul_res_valid) begin
                d_en = 1'b1; d_we = 1'b1; d_addr = s.a1;
                d_wdata = {sat16(fft_re), sat16(fft_im)};
                upd = 1'b1;
              end
          default: ;
        endcase
        ST_REVERSE: case (ph)
          P1: begin d_en = 1'b1; d_addr = s.a1; end
          P2: begin d_en = 1'b1; d_we = 1'b1; d_addr = s.a0; d_wdata = d_rdata; end
          P3: begin d_en = 1'b1; d_we = 1'b1; d_addr = s.a1; d_wdata = {ra, ia}; upd = 1'b1; end
          default: ;
        endcase
        ST_POWER: case (ph)
          P2: begin mul_req = 1'b1; mul_a = MA_W'(ra); mul_b = ra; end
          P3: begin mul_req = 1'b1; mul_a = MA_W'(ia); mul_b = ia; end
          P4: if (mul_res_valid) begin
                d_en = 1'b1; d_we = 1'b1; d_addr = s.a0;
                d_wdata = 32'(m1) + 32'(mul_res);
                upd = 1'b1;
              end
          default: ;
        endcase
        ST_MEL: case (ph)
          P1: if (32'(s.a0) <= 32'(l_rdata)) begin
                upd = 1'b1; upd_code = UPD_NEXT;
              end else begin
                d_en = 1'b1; d_we = 1'b1; d_addr = s.a1;
                d_wdata = {(mel_sum > 48'sd32767) ? 16'h7fff : mel_sum[15:0], 16'h0};
                upd = 1'b1; upd_code = UPD_ALT;
              end
          default: ;
        endcase
        ST_LN: case (ph)
          P1: if (!(signed'(d_rdata[31:16]) <= signed'(l_rdata)) && !s.last) begin
                upd = 1'b1; upd_code = UPD_ALT;
              end else begin
                l_en = 1'b1; l_addr = s.a2 + 1'b1;
              end
          P2: begin l_en = 1'b1; l_addr = s.a2 + MFCC_AW'(2); end
          P3: begin mul_req = 1'b1; mul_a = MA_W'(ra); mul_b = c1; end
          P4: if (mul_res_valid) begin
                d_en = 1'b1; d_we = 1'b1; d_addr = s.a0;
                d_wdata = {sat16(ln_y), 16'h0};
                upd = 1'b1;
              end
          default: ;
        endcase
        ST_DCT: case (ph)
          P2: begin mul_req = 1'b1; mul_a = MA_W'(ra); mul_b = c0; end
          P3: if (mul_res_valid && !s.last) upd = 1'b1;
          P4: if (feat_ready) upd = 1'b1;
          default: ;
        endcase
        default: ;
      endcase
    end
  end

  assign feat_valid = active && (s.st == ST_DCT) && (ph == P4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      ph      <= P0;
      s       <= '0;
      prev_st <= ST_IDLE;
      ra <= '0; ia <= '0;
      c0 <= '0; c1 <= '0; c2 <= '0;
      da <= '0; db <= '0;
      m1 <= '0; m2 <= '0;
      acc <= '0;
      feat_idx  <= '0;
      feat_data <= '0;
    end else begin
      if (!active) begin
        if (step_valid) begin
          active  <= 1'b1;
          ph      <= P1;
          s       <= step_i;
          prev_st <= step_i.st;
          if (step_i.st != prev_st) begin
            acc      <= '0;
            feat_idx <= '0;
          end
        end
      end else begin
        case (s.st)
          ST_WINDOW: case (ph)
            P1: begin ra <= signed'(d_rdata[31:16]); c0 <= signed'(l_rdata); ph <= P2; end
            P2: if (mul_gnt) ph <= P3;
            P3: if (mul_res_valid) begin active <= 1'b0; ph <= P0; end
            default: ;
          endcase
          ST_STFT: case (ph)
            P1: begin ra <= signed'(d_rdata[31:16]); ia <= signed'(d_rdata[15:0]);
                      c0 <= signed'(l_rdata); ph <= P2; end
            P2: begin da <= dif_re; db <= dif_im;
                      c1 <= signed'(l_rdata); ph <= P3; end
            P3: begin
                  c2 <= signed'(l_rdata);
                  if (mul_gnt) ph <= P4;
                end
            P4: begin
                  if (mul_res_valid) m1 <= mul_res;
                  if (mul_gnt) ph <= P5;
                end
            P5: begin
                  if (mul_res_valid) m2 <= mul_res;
                  if (mul_gnt) ph <= P6;
                end
            P6: if (mul_res_valid) begin active <= 1'b0; ph <= P0; end
            default: ;
          endcase
          ST_REVERSE: case (ph)
            P1: begin ra <= signed'(d_rdata[31:16]); ia <= signed'(d_rdata[15:0]); ph <= P2; end
            P2: ph <= P3;
            P3: begin active <= 1'b0; ph <= P0; end
            default: ;
          endcase
          ST_POWER: case (ph)
            P1: begin ra <= signed'(d_rdata[31:16]); ia <= signed'(d_rdata[15:0]); ph <= P2; end
            P2: if (mul_gnt) ph <= P3;
            P3: begin
                  if (mul_res_valid) m1 <= mul_res;
                  if (mul_gnt) ph <= P4;
                end
            P4: if (mul_res_valid) begin active <= 1'b0; ph <= P0; end
            default: ;
          endcase
          ST_MEL: begin
            if (32'(s.a0) <= 32'(l_rdata)) acc <= acc + 48'(d_rdata);
            else                            acc <= '0;
            active <= 1'b0; ph <= P0;
          end
          ST_LN: case (ph)
            P1: begin
                  ra <= signed'(d_rdata[31:16]);
                  if (!(signed'(d_rdata[31:16]) <= signed'(l_rdata)) && !s.last) begin
                    active <= 1'b0; ph <= P0;
                  end else ph <= P2;
                end
            P2: begin c1 <= signed'(l_rdata); ph <= P3; end
            P3: begin
                  c2 <= signed'(l_rdata);
                  if (mul_gnt) ph <= P4;
                end
            P4: if (mul_res_valid) begin active <= 1'b0; ph <= P0; end
            default: ;
          endcase
          ST_DCT: case (ph)
            P1: begin ra <= signed'(d_rdata[31:16]); c0 <= signed'(l_rdata); ph <= P2; end
            P2: if (mul_gnt) ph <= P3;
            P3: if (mul_res_valid) begin
                  if (s.last) begin
                    feat_data <= sat16(dct_acc >>> 15);
                    acc <= '0;
                    ph  <= P4;
                  end else begin
                    acc <= dct_acc;
                    active <= 1'b0; ph <= P0;
                  end
                end
            P4: if (feat_ready) begin
                  feat_idx <= feat_idx + 1'b1;
                  active <= 1'b0; ph <= P0;
                end
            default: ;
          endcase
          default: begin active <= 1'b0; ph <= P0; end
        endcase
      end
    end
  end
endmodule
