// tb_seizure_detector_2ch: interleaves two channels through the switch, as
// the data receiver does (one sample every 8 detector cycles, channels
// alternating). Channel 0 carries a seizure rhythm after a stretch of wake
// noise, channel 1 only wake noise. Every window's CM of each channel must
// equal the reference computed from that channel's own samples, channel 0
// must stimulate and channel 1 must never.
module tb_seizure_detector_2ch;
  import mcesd_pkg::*;
  import mcesd_ref_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0;
  logic [7:0] sample = '0;
  logic sample_valid = 0, sample_ch = 0;
  ch_cfg_t cfg [2];
  ch_status_t status [2];
  logic [1:0] stim, sleep, decision;
  int checks = 0, failures = 0;

  seizure_detector_2ch dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ce <= ~ce;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int u [2][2048];
  int ns [2] = '{0, 0};
  int nw [2] = '{0, 0};
  int n_stim [2] = '{0, 0};

  always @(posedge clk) if (rst_n && ce) begin
    for (int c = 0; c < 2; c++) if (decision[c]) begin
      int w[64];
      for (int k = 0; k < 64; k++) w[k] = u[c][32 * nw[c] + k];
      checks++;
      if (int'(status[c].cmo) != ref_cm(w, 5)) begin
        failures++; $display("ch%0d window %0d CM %0d exp %0d", c, nw[c], status[c].cmo, ref_cm(w, 5));
      end
      if (stim[c]) n_stim[c]++;
      nw[c]++;
    end
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      cfg[c] = '0;
      cfg[c].threshold   = 8'd5;
      cfg[c].coef_cm     = 16'sd16;
      cfg[c].coef_const1 = -16'sd2;
      cfg[c].th_sws      = 16'sd10;
      cfg[c].sws_high    = 16'd8000;
      cfg[c].sws_low     = 16'd6000;
      cfg[c].det_window  = 4'd3;
      cfg[c].det_stim    = 4'd3;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2 * 480; s++) begin
      int c, v;
      c = s % 2;
      v = eeg_sample((c == 0 && ns[0] >= 160) ? 1 : 0, ns[c]);
      u[c][ns[c]] = v;
      ns[c]++;
      @(negedge clk); while (!ce) @(negedge clk);
      sample = 8'(v); sample_ch = 1'(c); sample_valid = 1;
      @(negedge clk); while (!ce) @(negedge clk);
      sample_valid = 0;
      repeat (6) begin @(negedge clk); while (!ce) @(negedge clk); end
    end
    repeat (1200) @(posedge clk);
    $display("windows ch0=%0d ch1=%0d, stim windows ch0=%0d ch1=%0d", nw[0], nw[1], n_stim[0], n_stim[1]);
    checks += 3;
    if (nw[0] != 14 || nw[1] != 14) begin failures++; $display("window count"); end
    if (n_stim[0] == 0) begin failures++; $display("channel 0 never stimulated"); end
    if (n_stim[1] != 0) begin failures++; $display("channel 1 stimulated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
