// tb_seizure_detector_1ch: one channel end to end on synthetic EEG: wake
// noise, a seizure rhythm, wake, a sleep-like slow wave, wake. With
// LLS = CM - 2 (wake threshold 0) the seizure and the sleep wave both have a
// high CM; only the Band0 threshold switch keeps the sleep wave from being
// called a seizure. For every window it checks CM exactly against the
// reference, Band0/1/2 within 8 LSB (2 LSB of |X|) of the direct DFT, LLS
// exactly from the features, r_lls/stim against the window-counter model,
// and that the decision comes before the next window is complete. It counts
// stimulation windows, sleep windows and sleep-suppressed detections and
// fails if one never happens.
module tb_seizure_detector_1ch;
  import mcesd_pkg::*;
  import mcesd_ref_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, din_valid = 0;
  logic [7:0] din = '0;
  ch_cfg_t cfg;
  ch_status_t status;
  logic stim, sleep, decision;
  int checks = 0, failures = 0;

  seizure_detector_1ch dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ce <= ~ce;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int u [4096];
  int nsamp = 0, nwin = 0, since_win = 0, max_lat = 0;
  int m_cnt = 0, m_stim_cnt = 0;
  bit m_sleep = 0;
  int n_stim = 0, n_sleep = 0, n_suppressed = 0, n_seiz = 0;

  task automatic fail(string s);
    failures++;
    $display("FAIL window %0d: %s", nwin, s);
  endtask

  // latency from the window's last sample to the decision
  always @(posedge clk) if (rst_n && ce) begin
    since_win++;
    if (din_valid && (nsamp + 1) >= 64 && (nsamp + 1) % 32 == 0) since_win = 0;
  end

  always @(posedge clk) if (rst_n && ce && decision) begin
    int w[64], c[64];
    int ecm, eb[3];
    longint l;
    bit seiz, m_stim;
    for (int k = 0; k < 64; k++) begin w[k] = u[32 * nwin + k]; c[k] = w[k] - 128; end
    ecm = ref_cm(w, int'(cfg.threshold));
    eb[0] = ref_band(c, 0); eb[1] = ref_band(c, 4); eb[2] = ref_band(c, 7);
    checks += 6;
    if (int'(status.cmo) != ecm) fail($sformatf("CM %0d expected %0d", status.cmo, ecm));
    if (int'(dut.band0) > eb[0] + 8 || int'(dut.band0) < eb[0] - 8) fail($sformatf("band0 %0d exp %0d", dut.band0, eb[0]));
    if (int'(dut.band1) > eb[1] + 8 || int'(dut.band1) < eb[1] - 8) fail($sformatf("band1 %0d exp %0d", dut.band1, eb[1]));
    if (int'(dut.band2) > eb[2] + 8 || int'(dut.band2) < eb[2] - 8) fail($sformatf("band2 %0d exp %0d", dut.band2, eb[2]));
    l = ref_lls(int'(status.cmo), int'(dut.band1), int'(dut.band2), int'(cfg.coef_cm),
                int'(cfg.coef_band1), int'(cfg.coef_band2), int'(cfg.coef_const1), int'(cfg.coef_const2));
    if (longint'(status.llso) != l) fail("LLS");
    if (since_win >= 512 || since_win < 0) fail($sformatf("decision %0d cycles after window", since_win));
    if (since_win > max_lat) max_lat = since_win;
    if (int'(dut.band0) > int'(cfg.sws_high)) m_sleep = 1;
    else if (int'(dut.band0) < int'(cfg.sws_low)) m_sleep = 0;
    seiz = l > (m_sleep ? longint'(cfg.th_sws) * 65536 : 0);
    if (m_sleep && l > 0 && !seiz) n_suppressed++;
    m_cnt = seiz ? (m_cnt < 15 ? m_cnt + 1 : 15) : 0;
    if (seiz && m_cnt >= int'(cfg.det_window)) begin m_stim = 1; m_stim_cnt = int'(cfg.det_stim); end
    else begin m_stim = m_stim_cnt > 1; if (m_stim_cnt > 0) m_stim_cnt--; end
    checks += 3;
    if (sleep != m_sleep) fail("sleep");
    if (status.r_lls != seiz) fail("r_lls");
    if (stim != m_stim) fail("stim");
    if (stim) n_stim++;
    if (sleep) n_sleep++;
    if (seiz) n_seiz++;
    nwin++;
  end

  initial begin
    int seg_kind [5] = '{0, 1, 0, 2, 0};
    int seg_len  [5] = '{192, 320, 192, 256, 160};
    cfg = '0;
    cfg.threshold   = 8'd5;
    cfg.coef_cm     = 16'sd16;       // 1.0 in 12.4
    cfg.coef_const1 = -16'sd2;       // constant -2.0
    cfg.th_sws      = 16'sd10;       // sleep: LLS must exceed 10
    cfg.sws_high    = 16'd8000;      // Band0 levels, 9.7
    cfg.sws_low     = 16'd6000;
    cfg.det_window  = 4'd3;
    cfg.det_stim    = 4'd3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 5; g++)
      for (int k = 0; k < seg_len[g]; k++) begin
        u[nsamp] = eeg_sample(seg_kind[g], nsamp);
        @(negedge clk); while (!ce) @(negedge clk);
        din = 8'(u[nsamp]); din_valid = 1;
        @(posedge clk);
        nsamp++;
        @(negedge clk); din_valid = 0;
        repeat (15) begin @(negedge clk); while (!ce) @(negedge clk); end
      end
    repeat (1200) @(posedge clk);
    $display("windows=%0d seizure_windows=%0d stim_windows=%0d sleep_windows=%0d suppressed=%0d max_latency=%0d cycles",
             nwin, n_seiz, n_stim, n_sleep, n_suppressed, max_lat);
    checks += 4;
    if (nwin != (nsamp - 64) / 32 + 1) fail("window count");
    if (n_stim == 0) fail("no stimulation");
    if (n_sleep == 0) fail("no sleep state");
    if (n_suppressed == 0) fail("sleep threshold never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
