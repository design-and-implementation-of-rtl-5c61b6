// seizure_detector_2ch: two independent one-channel detectors behind a
// switch. Each received sample carries its channel number (sample_ch); the
// switch routes its strobe to that channel's detector only. Each channel has
// its own parameters (cfg[ch]) and results (status[ch], stim[ch]). Both
// channels run on the same detector clock enable. Structure follows the
// design; the strobe-plus-channel form of the switch is this
// implementation's choice.
module seizure_detector_2ch
  import mcesd_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic [SAMPLE_W-1:0] sample,
  input  logic                sample_valid,
  input  logic                sample_ch,
  input  ch_cfg_t             cfg [2],
  output ch_status_t          status [2],
  output logic [1:0]          stim,
  output logic [1:0]          sleep,
  output logic [1:0]          decision
);

  for (genvar c = 0; c < 2; c++) begin : g_ch
    seizure_detector_1ch u_det (
      .clk, .rst_n, .ce,
      .din       (sample),
      .din_valid (sample_valid && (sample_ch == 1'(c))),
      .cfg       (cfg[c]),
      .status    (status[c]),
      .stim      (stim[c]),
      .sleep     (sleep[c]),
      .decision  (decision[c])
    );
  end

endmodule
