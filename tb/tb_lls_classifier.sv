// tb_lls_classifier: 400 windows with random features and coefficients,
// including sequences of seizure windows, checked against a model written
// from the classifier equations: LLS (17.16, saturated), the Band0 sleep
// hysteresis and threshold switch, the consecutive-window counter, DET_WINDOW
// and DET_STIM. done must follow start by 6 enabled cycles. Counts how often
// sleep threshold, saturation and stimulation occur and fails if one never
// does.
module tb_lls_classifier;
  import mcesd_pkg::*;
  import mcesd_ref_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, start = 0;
  logic [15:0] cm = '0, band0 = '0, band1 = '0, band2 = '0;
  ch_cfg_t cfg;
  logic signed [32:0] llso;
  logic r_lls, stim, sleep, done;
  int checks = 0, failures = 0;

  lls_classifier dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ce <= $urandom_range(2) != 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step;
    @(negedge clk); while (!ce) @(negedge clk);
  endtask

  // model state
  bit m_sleep = 0;
  int m_cnt = 0, m_stim_cnt = 0;
  int n_sleep = 0, n_sat = 0, n_stim = 0, n_seiz = 0;

  initial begin
    longint l, th;
    bit seiz, m_stim;
    int lat;
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 400; w++) begin
      if (w % 50 == 0) begin
        cfg.coef_cm     = 16'($urandom);
        cfg.coef_band1  = 16'($urandom);
        cfg.coef_band2  = 16'($urandom);
        cfg.coef_const1 = 16'($urandom_range(200)) - 16'd100;
        cfg.coef_const2 = 16'($urandom);
        cfg.th_sws      = 16'($urandom_range(2000));
        cfg.sws_low     = 16'($urandom_range(20000));
        cfg.sws_high    = cfg.sws_low + 16'($urandom_range(20000));
        cfg.det_window  = 4'($urandom_range(1, 4));
        cfg.det_stim    = 4'($urandom_range(1, 4));
      end
      cm    = 16'($urandom_range(16384));
      band0 = 16'($urandom);
      band1 = 16'($urandom);
      band2 = 16'($urandom);
      // runs of windows with a strongly positive sum to provoke detections
      if ((w / 10) % 2 == 1) begin
        cfg.coef_cm = 16'sd2000; cfg.coef_band1 = 16'sd1000; cfg.coef_band2 = 16'sd1000;
      end
      // full-scale windows to reach the 17.16 saturation
      if (w % 37 == 5) begin
        cm = 16'd16384; band1 = 16'hFFFF; band2 = 16'hFFFF;
        cfg.coef_cm = 16'sd32767; cfg.coef_band1 = 16'sd32767; cfg.coef_band2 = 16'sd32767;
      end
      if (w % 41 == 7) begin
        cm = 16'd16384; band1 = 16'hFFFF; band2 = 16'hFFFF;
        cfg.coef_cm = -16'sd32768; cfg.coef_band1 = -16'sd32768; cfg.coef_band2 = -16'sd32768;
      end
      // model
      l = ref_lls(int'(cm), int'(band1), int'(band2), int'(cfg.coef_cm), int'(cfg.coef_band1),
                  int'(cfg.coef_band2), int'(cfg.coef_const1), int'(cfg.coef_const2));
      if (l == 64'sd4294967295 || l == -64'sd4294967296) n_sat++;
      if (band0 > cfg.sws_high) m_sleep = 1;
      else if (band0 < cfg.sws_low) m_sleep = 0;
      th = m_sleep ? longint'(cfg.th_sws) * 65536 : 0;
      if (m_sleep) n_sleep++;
      seiz = l > th;
      if (seiz) n_seiz++;
      m_cnt = seiz ? (m_cnt < 15 ? m_cnt + 1 : 15) : 0;
      if (seiz && m_cnt >= int'(cfg.det_window)) begin
        m_stim = 1; m_stim_cnt = int'(cfg.det_stim);
      end else begin
        m_stim = m_stim_cnt > 1;
        if (m_stim_cnt > 0) m_stim_cnt--;
      end
      if (m_stim) n_stim++;
      // run the DUT
      step(); start = 1;
      step(); start = 0;
      lat = 1;
      while (!done) begin step(); lat++; end
      checks += 5;
      if (lat != 6) begin failures++; $display("latency %0d", lat); end
      if (longint'(llso) != l) begin failures++; $display("w%0d llso %0d exp %0d", w, llso, l); end
      if (r_lls != seiz) begin failures++; $display("w%0d r_lls", w); end
      if (sleep != m_sleep) begin failures++; $display("w%0d sleep", w); end
      if (stim != m_stim) begin failures++; $display("w%0d stim %0d exp %0d", w, stim, m_stim); end
      repeat ($urandom_range(3)) step();
    end
    $display("sleep=%0d saturated=%0d seizure=%0d stim=%0d", n_sleep, n_sat, n_seiz, n_stim);
    checks += 3;
    if (n_sleep == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_stim == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
