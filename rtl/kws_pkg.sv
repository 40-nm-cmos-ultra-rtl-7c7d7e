// kws_pkg: types and constants shared by the keyword-spotting accelerator.
//
// The accelerator has an MFCC front end (one global FSM stepping through
// window, FFT, bit reversal, power, Mel, log and DCT states) and a DSCNN
// back end that runs one layer at a time on a single compute engine.  This
// package holds the state encoding of the MFCC controller, the step record
// it hands to the computation module, the DSCNN layer configuration record
// and the fixed layout of the MFCC coefficient (LUT) SRAM.
//
// Taken from the design description: the list and order of MFCC states, the
// three addresses per step, the DSCNN layer sequence (CL, four depthwise /
// pointwise pairs, average pooling, fully connected).  The numeric layout of
// the LUT SRAM and the field widths are this design's own choices.
package kws_pkg;

  // ---------------------------------------------------------------- MFCC
  typedef enum logic [3:0] {
    ST_IDLE    = 4'd0,
    ST_WINDOW  = 4'd1,
    ST_STFT    = 4'd2,
    ST_REVERSE = 4'd3,
    ST_POWER   = 4'd4,
    ST_MEL     = 4'd5,
    ST_LN      = 4'd6,
    ST_DCT     = 4'd7,
    ST_DONE    = 4'd8
  } mfcc_state_e;

  // Progress codes returned by the computation module with each update pulse.
  typedef enum logic [0:0] {
    UPD_NEXT = 1'b0,   // advance the primary index (sample, butterfly, bin, band)
    UPD_ALT  = 1'b1    // MEL: close band and go to next band; LN: try next segment
  } upd_e;

  localparam int MFCC_AW = 11;   // address width used on the control interface

  // One step handed from cal_fsm to cal_mode.
  typedef struct packed {
    mfcc_state_e         st;
    logic [MFCC_AW-1:0]  a0;     // data SRAM address (first operand / result)
    logic [MFCC_AW-1:0]  a1;     // data SRAM address (second operand / result)
    logic [MFCC_AW-1:0]  a2;     // LUT SRAM address
    logic                last;   // DCT: last term of a coefficient sum
  } mfcc_step_t;

  // LUT SRAM layout (16-bit words), for an FFT of NFFT points, NMEL bands
  // and NDCT cepstral coefficients.
  //   [0            , NFFT/2)        half Hamming window, Q1.15 (symmetric)
  //   [NFFT/2       , NFFT/2+3*NFFT/2) twiddles k = 0..NFFT/2-1, 3 words each:
  //                                  cos, sin-cos, sin+cos, Q2.14
  //   [MEL base     , +NMEL)         last FFT bin of each Mel band
  //   [LN base      , +3*8)          per log segment: upper bound, slope, offset
  //   [DCT base     , +NDCT*NMEL)    DCT-II matrix row-major, Q1.15
  function automatic int lut_win_base();                    return 0;                 endfunction
  function automatic int lut_tw_base (int nfft);            return nfft/2;            endfunction
  function automatic int lut_mel_base(int nfft);            return nfft/2 + 3*(nfft/2); endfunction
  function automatic int lut_ln_base (int nfft, int nmel);  return lut_mel_base(nfft) + nmel; endfunction
  function automatic int lut_dct_base(int nfft, int nmel);  return lut_ln_base(nfft, nmel) + 3*8; endfunction

  // ---------------------------------------------------------------- DSCNN
  typedef enum logic [1:0] {
    L_CONV = 2'd0,    // standard convolution, one input channel
    L_DW   = 2'd1,    // depthwise 3x3, stride 1, zero padding 1, in place
    L_PW   = 2'd2,    // pointwise 1x1 (also used for the fully connected layer)
    L_AP   = 2'd3     // global average pooling
  } layer_kind_e;

  typedef struct packed {
    layer_kind_e  kind;
    logic [14:0]  in_base;    // activation SRAM base of the input
    logic [14:0]  out_base;   // activation SRAM base of the output
    logic [14:0]  w_base;     // weight SRAM base
    logic [7:0]   in_h;       // input rows (time)
    logic [7:0]   in_w;       // input columns (frequency)
    logic [7:0]   in_c;       // input channels
    logic [7:0]   out_h;
    logic [7:0]   out_w;
    logic [7:0]   out_c;
    logic [3:0]   kh;         // kernel rows
    logic [3:0]   kw;         // kernel columns
    logic [1:0]   sh;         // stride rows
    logic [1:0]   sw;         // stride columns
    logic [3:0]   pad_t;      // zero rows above the input
    logic [3:0]   pad_l;      // zero columns left of the input
    logic [15:0]  scale;      // post-processing coefficient C
    logic [5:0]   shift;      // post-processing shift S
    logic         relu;       // 1: clip to [0,255]; 0: clip to [-128,127]
    logic         in_signed;  // input activations are two's complement
  } layer_cfg_t;

  localparam int N_MAC_LAYERS = 10;  // CL, DW0, PW0, ..., DW3, PW3, FC
endpackage
