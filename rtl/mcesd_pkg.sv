// mcesd_pkg: types and constants shared by the seizure-detector blocks.
//
// Fixed-point formats follow the feature/parameter table of the design:
//   CM 4.12 unsigned, Band0..2 9.7 unsigned, LLS_COEF_CM 12.4 signed,
//   LLS_COEF_BAND1/2 7.9 signed, constant {CONST1,CONST2} 16.16 signed,
//   DETSWD_TH_SWS 16.0 signed, DETSWS_TH_LOW/HIGH 9.7 unsigned,
//   LLS output 17.16 signed (33 bits).
// ch_cfg_t is the per-channel configuration taken from the I2C control
// registers; ch_status_t is the per-channel result bundle read back through
// the I2C status registers.
package mcesd_pkg;

  localparam int unsigned SAMPLE_W = 8;   // ADC sample width
  localparam int unsigned FEAT_W   = 16;  // CM and band features
  localparam int unsigned LLS_W    = 33;  // LLS_on-line, 17.16

  typedef struct packed {
    logic [SAMPLE_W-1:0]       threshold;     // r, 8.0
    logic signed [FEAT_W-1:0]  coef_cm;       // 12.4
    logic signed [FEAT_W-1:0]  coef_band1;    // 7.9
    logic signed [FEAT_W-1:0]  coef_band2;    // 7.9
    logic signed [FEAT_W-1:0]  coef_const1;   // integer part of the constant
    logic [FEAT_W-1:0]         coef_const2;   // fractional part of the constant
    logic signed [FEAT_W-1:0]  th_sws;        // DETSWD_TH_SWS: LLS threshold in sleep, 16.0
    logic [FEAT_W-1:0]         sws_low;       // DETSWS_TH_LOW, 9.7
    logic [FEAT_W-1:0]         sws_high;      // DETSWS_TH_HIGH, 9.7
    logic [3:0]                det_window;    // consecutive seizure windows to stimulate
    logic [3:0]                det_stim;      // stimulation length in windows
  } ch_cfg_t;

  typedef struct packed {
    logic [FEAT_W-1:0]         ffto;          // last band magnitude, 9.7
    logic [FEAT_W-1:0]         cmo;           // last CM, 4.12
    logic signed [LLS_W-1:0]   llso;          // last LLS output, 17.16
    logic                      r_lls;         // last window classified as seizure
  } ch_status_t;

endpackage
