// mcesd_top: core of the multi-channel closed-loop epileptic seizure
// detector (MCESD) chip.
//
// An external ADC delivers 8-bit EEG samples of two channels in turn on
// datain, paced by the 400 Hz sampling clock r_i; channel tells which
// channel's sample is due. Each channel runs its own detector at 3.2 kHz
// (16 detector cycles per sample): every 32 samples it judges the last 64
// (0.32 s) from an entropy-based regularity measure CM and the FFT band
// powers Band0..2 with a linear classifier whose threshold rises in sleep,
// and raises stim[ch] after DET_WINDOW seizure windows in a row.
//
//   clk_gen        chip clock -> 3.2 kHz tick, clk_500k and clk_out outputs
//   data_receiver  r_i, channel, sample capture
//   i2c_regbank    ctrl0..38 parameters in, readin0..17 results out
//   seizure_detector_2ch  two detector channels behind a switch
//
// Control map (8-bit registers): DIV_3200 = {ctrl1[3:0],ctrl0},
// DIV_500K = ctrl1[7:4], MODE = ctrl2[1:0]; channel c (base 3 + 18c):
// THRESHOLD, LLS_COEF_CM, _BAND1, _BAND2, _CONST1, _CONST2, DETSWD_TH_SWS,
// DETSWS_TH_LOW, DETSWS_TH_HIGH (16-bit values low byte first), then
// {DET_STIM, DET_WINDOW}. Status map, channel c at 9c: FFTo (2 bytes), CMo
// (2 bytes), LLSo (33 bits in 5 bytes, bit 32 in byte 4 bit 0), R_LLS in
// byte 4 bit 1. The register map is the design's. clken low pauses the
// detector, the receiver and r_i; rst_n (active low) clears everything.
// The SDA pad itself is outside: sda_out/sda_oe drive it, sda_in reads it.
module mcesd_top
  import mcesd_pkg::*;
#(
  parameter logic [3:0] I2C_DEV_ID = 4'b1010
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clken,
  input  logic [SAMPLE_W-1:0] datain,
  output logic                channel,
  output logic                r_i,
  output logic [1:0]          stim,
  output logic                clk_out,
  output logic                clk_500k,
  input  logic                i2c_addr,
  input  logic                i2c_scl,
  input  logic                i2c_sda_in,
  output logic                i2c_sda_out,
  output logic                i2c_sda_oe
);

  logic [7:0]  ctrl   [64];
  logic [7:0]  readin [64];
  logic        tick_3200, clk_3200, ce;
  logic [SAMPLE_W-1:0] sample;
  logic        sample_valid, sample_ch;
  ch_cfg_t     cfg    [2];
  ch_status_t  status [2];
  logic [1:0]  sleep, decision;

  function automatic ch_cfg_t cfg_from_ctrl(int b);
    ch_cfg_t c;
    c.threshold   = ctrl[b];
    c.coef_cm     = {ctrl[b+2],  ctrl[b+1]};
    c.coef_band1  = {ctrl[b+4],  ctrl[b+3]};
    c.coef_band2  = {ctrl[b+6],  ctrl[b+5]};
    c.coef_const1 = {ctrl[b+8],  ctrl[b+7]};
    c.coef_const2 = {ctrl[b+10], ctrl[b+9]};
    c.th_sws      = {ctrl[b+12], ctrl[b+11]};
    c.sws_low     = {ctrl[b+14], ctrl[b+13]};
    c.sws_high    = {ctrl[b+16], ctrl[b+15]};
    c.det_window  = ctrl[b+17][3:0];
    c.det_stim    = ctrl[b+17][7:4];
    return c;
  endfunction

  always_comb begin
    cfg[0] = cfg_from_ctrl(3);
    cfg[1] = cfg_from_ctrl(21);
    for (int i = 0; i < 64; i++) readin[i] = 8'h00;
    for (int c = 0; c < 2; c++) begin
      readin[9*c + 0] = status[c].ffto[7:0];
      readin[9*c + 1] = status[c].ffto[15:8];
      readin[9*c + 2] = status[c].cmo[7:0];
      readin[9*c + 3] = status[c].cmo[15:8];
      readin[9*c + 4] = status[c].llso[7:0];
      readin[9*c + 5] = status[c].llso[15:8];
      readin[9*c + 6] = status[c].llso[23:16];
      readin[9*c + 7] = status[c].llso[31:24];
      readin[9*c + 8] = {6'd0, status[c].r_lls, status[c].llso[32]};
    end
  end

  clk_gen u_clkgen (
    .clk, .rst_n,
    .div_3200  ({ctrl[1][3:0], ctrl[0]}),
    .div_500k  (ctrl[1][7:4]),
    .mode      (ctrl[2][1:0]),
    .tick_3200, .clk_3200, .clk_500k, .clk_out
  );

  assign ce = tick_3200 && clken;

  data_receiver u_rx (
    .clk, .rst_n, .tick (ce), .datain,
    .r_i, .channel, .sample, .sample_valid, .sample_ch
  );

  i2c_regbank #(.DEV_ID(I2C_DEV_ID)) u_i2c (
    .clk, .rst_n,
    .scl     (i2c_scl),
    .sda_in  (i2c_sda_in),
    .sda_out (i2c_sda_out),
    .sda_oe  (i2c_sda_oe),
    .saddr   ({2'b00, i2c_addr}),
    .ctrl, .readin
  );

  seizure_detector_2ch u_det (
    .clk, .rst_n, .ce, .sample, .sample_valid, .sample_ch,
    .cfg, .status, .stim, .sleep, .decision
  );

  // clk_3200, sleep and decision are internal observation points
  logic unused;
  assign unused = ^{clk_3200, sleep, decision, ctrl[2][7:2]};

endmodule
