// cal_fsm: state control and address generation of the MFCC front end.
//
// A global FSM walks IDLE -> WINDOW -> STFT -> REVERSE -> POWER -> MEL ->
// LN -> DCT -> DONE -> IDLE.  In every active state it presents one step to
// the computation module (cal_mode): the state and three addresses, two for
// the data SRAM and one for the coefficient (LUT) SRAM.  Unused addresses
// are held at zero.  The step stays on step_o while step_valid is high; the
// computation module answers each finished step with a one-cycle upd pulse
// and a code, and the next step appears in the following cycle.
//
// Address patterns (NFFT points, NMEL bands, NDCT coefficients):
//   WINDOW   n = 0..NFFT-1        a0 = n, a2 = window[min(n, NFFT-1-n)]
//   STFT     radix-2 DIF, stage s, butterfly b: span = NFFT>>(s+1),
//            a0 = top, a1 = top+span, a2 = twiddle(k = (b mod span) << s)
//   REVERSE  i = 0..NFFT-1, steps only where bitrev(i) > i: a0 = i, a1 = bitrev(i)
//   POWER    k = 0..NFFT/2        a0 = k
//   MEL      bin k from 1, band i: a0 = k, a1 = EOFF+i, a2 = edge[i];
//            UPD_NEXT -> k+1, UPD_ALT -> band i+1 (k kept)
//   LN       band i, segment q: a0 = EOFF+i, a2 = segment q, last = (q = nseg-1);
//            UPD_ALT -> q+1, UPD_NEXT -> i+1, q = 0
//   DCT      coefficient r, band i: a0 = EOFF+i, a2 = dct[r][i], last = (i = NMEL-1)
// EOFF = NFFT/2+1 is where Mel energies and log values live in the data SRAM.
//
// The state list, the three-address interface, zeroing of unused addresses
// and the progress-pulse handshake follow the design description; the exact
// index formulas and the EOFF placement are this design's.
module cal_fsm
  import kws_pkg::*;
#(
  parameter int NFFT = 256,
  parameter int NMEL = 40,
  parameter int NDCT = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,         // start of a frame (accepted in IDLE)
  input  logic [3:0]  cfg_ln_seg,    // number of log segments in the LUT (1..8)
  output logic        step_valid,
  output mfcc_step_t  step_o,
  input  logic        upd,
  input  upd_e        upd_code,
  output mfcc_state_e state,
  output logic        busy,
  output logic        done           // one-cycle pulse at the end of a frame
);
  localparam int LOGN = $clog2(NFFT);
  localparam int EOFF = NFFT/2 + 1;
  localparam int AW   = MFCC_AW;

  logic [LOGN-1:0] idx;      // n / butterfly / i / k
  logic [LOGN-1:0] stage;    // FFT stage
  logic [5:0]      band;     // Mel band / log band / DCT band
  logic [3:0]      seg;      // log segment
  logic [4:0]      coef;     // DCT coefficient
  logic            flag;     // POWER: on bin NFFT/2; MEL: past the last bin

  function automatic logic [LOGN-1:0] bitrev(input logic [LOGN-1:0] v);
    for (int b = 0; b < LOGN; b++) bitrev[b] = v[LOGN-1-b];
  endfunction

  // ---- step generation (combinational from the counters)
  logic [LOGN-1:0] span, jj, top, kk;
  always_comb begin
    span = LOGN'(NFFT >> (int'(stage) + 1));
    jj   = idx & (span - 1'b1);
    top  = ((idx - jj) << 1) | jj;           // group*2*span + j
    kk   = jj << stage;
  end

  always_comb begin
    step_o      = '0;
    step_o.st   = state;
    step_valid  = 1'b0;
    case (state)
      ST_WINDOW: begin
        step_valid = 1'b1;
        step_o.a0  = AW'(idx);
        step_o.a2  = AW'(lut_win_base()) +
                     AW'((int'(idx) < NFFT/2) ? int'(idx) : NFFT - 1 - int'(idx));
      end
      ST_STFT: begin
        step_valid = 1'b1;
        step_o.a0  = AW'(top);
        step_o.a1  = AW'(top + span);
        step_o.a2  = AW'(lut_tw_base(NFFT)) + AW'(3 * int'(kk));
      end
      ST_REVERSE: begin
        step_valid = bitrev(idx) > idx;
        step_o.a0  = AW'(idx);
        step_o.a1  = AW'(bitrev(idx));
      end
      ST_POWER: begin
        step_valid = 1'b1;
        step_o.a0  = AW'(idx);     // idx runs 0..NFFT/2-1, then flag marks bin NFFT/2
        if (flag) step_o.a0 = AW'(NFFT/2);
      end
      ST_MEL: begin
        step_valid = 1'b1;
        step_o.a0  = AW'(idx);
        if (flag) step_o.a0 = AW'(NFFT/2 + 1);   // past the last bin
        step_o.a1  = AW'(EOFF) + AW'(band);
        step_o.a2  = AW'(lut_mel_base(NFFT)) + AW'(band);
      end
      ST_LN: begin
        step_valid = 1'b1;
        step_o.a0  = AW'(EOFF) + AW'(band);
        step_o.a2  = AW'(lut_ln_base(NFFT, NMEL)) + AW'(3 * int'(seg));
        step_o.last = (seg == cfg_ln_seg - 4'd1) || (seg == 4'd7);
      end
      ST_DCT: begin
        step_valid = 1'b1;
        step_o.a0  = AW'(EOFF) + AW'(band);
        step_o.a2  = AW'(lut_dct_base(NFFT, NMEL)) + AW'(int'(coef) * NMEL + int'(band));
        step_o.last = (int'(band) == NMEL - 1);
      end
      default: ;
    endcase
  end

  assign busy = (state != ST_IDLE);

  // ---- counter and state updates
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      idx   <= '0;
      stage <= '0;
      band  <= '0;
      seg   <= '0;
      coef  <= '0;
      flag  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        ST_IDLE: if (start) begin
          state <= ST_WINDOW;
          idx   <= '0;
        end
        ST_WINDOW: if (upd) begin
          idx <= idx + 1'b1;
          if (int'(idx) == NFFT - 1) begin
            state <= ST_STFT;
            stage <= '0;
          end
        end
        ST_STFT: if (upd) begin
          idx <= idx + 1'b1;
          if (int'(idx) == NFFT/2 - 1) begin
            idx <= '0;
            if (int'(stage) == LOGN - 1) state <= ST_REVERSE;
            else                          stage <= stage + 1'b1;
          end
        end
        ST_REVERSE: if (upd || !step_valid) begin
          idx <= idx + 1'b1;
          if (int'(idx) == NFFT - 1) begin
            state <= ST_POWER;
            flag  <= 1'b0;
          end
        end
        ST_POWER: if (upd) begin
          if (flag) begin                   // bin NFFT/2 done
            state <= ST_MEL;
            idx   <= LOGN'(1);
            band  <= '0;
            flag  <= 1'b0;
          end else if (int'(idx) == NFFT/2 - 1) begin
            flag <= 1'b1;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        ST_MEL: if (upd) begin
          if (upd_code == UPD_ALT) begin
            if (int'(band) == NMEL - 1) begin
              state <= ST_LN;
              band  <= '0;
              seg   <= '0;
            end else begin
              band <= band + 1'b1;
            end
          end else if (int'(idx) == NFFT/2) begin
            flag <= 1'b1;                    // every later step closes its band
          end else begin
            idx <= idx + 1'b1;
          end
        end
        ST_LN: if (upd) begin
          if (upd_code == UPD_ALT) begin
            seg <= seg + 1'b1;
          end else begin
            seg <= '0;
            if (int'(band) == NMEL - 1) begin
              state <= ST_DCT;
              band  <= '0;
              coef  <= '0;
            end else begin
              band <= band + 1'b1;
            end
          end
        end
        ST_DCT: if (upd) begin
          if (int'(band) == NMEL - 1) begin
            band <= '0;
            if (int'(coef) == NDCT - 1) state <= ST_DONE;
            else                        coef  <= coef + 1'b1;
          end else begin
            band <= band + 1'b1;
          end
        end
        ST_DONE: begin
          done  <= 1'b1;
          state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end
endmodule
