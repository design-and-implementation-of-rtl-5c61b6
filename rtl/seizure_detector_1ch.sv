// seizure_detector_1ch: the complete detector for one EEG channel.
//
// Samples (din, strobed by din_valid) go into read_mem. After every sample
// read_mem feeds the entropy extractor with the sample pairs of the current
// 16-point part, and it feeds each 64-point window (a new one every 32
// samples, 50% overlap) to the FFT as early as the samples exist, so that only
// the pipeline flush is left after the window's last sample. The FFT output
// feeds fft_process (Band0..2), whose bands_valid also tells read_mem that the
// next frame may open.
// When the window's CM and its three bands are both ready, the LLS classifier
// starts and updates llso, r_lls and stim; decision pulses then.
//
// ADC codes are taken as offset binary (code 128 is zero), so the FFT sees
// code - 128 as its 9-bit signed input; the entropy measure only uses
// differences and is not affected.
//
// Timing, in detector cycles (ce): one sample per 16 cycles; CM is ready 21
// cycles after the last entropy pair of a window, the bands about 100 cycles
// after the window's last sample, the decision 6 cycles later (108 cycles,
// 34 ms, measured): well inside the 512 cycles between windows. status carries the values read back
// through the I2C status registers. The chain of blocks follows the design;
// the ready/start handshake between them is this implementation's own.
module seizure_detector_1ch
  import mcesd_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic [SAMPLE_W-1:0] din,
  input  logic                din_valid,
  input  ch_cfg_t             cfg,
  output ch_status_t          status,
  output logic                stim,
  output logic                sleep,
  output logic                decision
);

  logic [SAMPLE_W-1:0] ui0, ui1, uj0, uj1, fft_data;
  logic                ent_valid, ent_part_end, fft_start, fft_valid;
  logic [3:0]          state;
  logic [1:0]          part;
  logic [FEAT_W-1:0]   cm, band0, band1, band2, ffto;
  logic                cm_valid, bands_valid;
  logic                fo_valid;
  logic signed [14:0]  fo_re, fo_im;
  logic [5:0]          fo_addr;
  logic                cm_rdy, bands_rdy, lls_start;
  logic signed [LLS_W-1:0] llso;
  logic                r_lls;

  read_mem u_rmem (
    .clk, .rst_n, .ce, .din, .din_valid,
    .ent_ui0 (ui0), .ent_ui1 (ui1), .ent_uj0 (uj0), .ent_uj1 (uj1),
    .ent_valid, .ent_part_end, .state, .part,
    .fft_start, .fft_data, .fft_valid, .fft_done (bands_valid)
  );

  entropy_extractor u_ent (
    .clk, .rst_n, .ce, .r (cfg.threshold),
    .ui0, .ui1, .uj0, .uj1,
    .pair_valid (ent_valid), .part_end (ent_part_end),
    .cm, .cm_valid
  );

  fft64 u_fft (
    .clk, .rst_n, .ce, .start (fft_start), .in_valid (fft_valid),
    .in_re    ({~fft_data[7], ~fft_data[7], fft_data[6:0]}),   // code - 128
    .out_valid (fo_valid), .out_re (fo_re), .out_im (fo_im), .out_addr (fo_addr),
    .busy     ()
  );

  fft_process u_fproc (
    .clk, .rst_n, .ce, .frame_start (fft_start),
    .in_valid (fo_valid), .dr (16'(fo_re)), .di (16'(fo_im)), .addr (fo_addr),
    .band0, .band1, .band2, .bands_valid, .ffto
  );

  // wait for both feature sets of a window, then start the classifier
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cm_rdy    <= 1'b0;
      bands_rdy <= 1'b0;
    end else if (ce) begin
      if (lls_start) begin
        cm_rdy    <= 1'b0;
        bands_rdy <= 1'b0;
      end else begin
        if (cm_valid)    cm_rdy    <= 1'b1;
        if (bands_valid) bands_rdy <= 1'b1;
      end
    end
  end

  assign lls_start = cm_rdy && bands_rdy;

  lls_classifier u_lls (
    .clk, .rst_n, .ce, .start (lls_start),
    .cm, .band0, .band1, .band2, .cfg,
    .llso, .r_lls, .stim, .sleep, .done (decision)
  );

  assign status = '{ffto: ffto, cmo: cm, llso: llso, r_lls: r_lls};

  // state and part are informative only
  logic unused;
  assign unused = ^{state, part};

endmodule
