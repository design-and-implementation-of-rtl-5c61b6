// tb_mcesd_top: the whole chip core at its default parameters, end to end.
//
// 1. An I2C master writes all 39 control registers (DIV_3200 = 312, i.e. a
//    1 MHz chip clock; both channels with LLS = CM - 2, sleep threshold 10,
//    Band0 levels 6000/8000, DET_WINDOW = DET_STIM = 3) and reads them back.
// 2. An ADC model answers every rising edge of R_I with the next sample of
//    the channel shown on CHANNEL. Channel 0: wake noise, a seizure rhythm,
//    wake. Channel 1: wake, a sleep-like slow wave, wake.
// 3. Every decision of each channel is checked: CM exactly against the
//    reference from that channel's samples, and the decision must come within
//    the 512 detector cycles of a window.
// 4. Clken is held low for a while: R_I must stop and no sample may be taken.
// 5. MODE is switched to 11 and back over I2C: CLK_OUT and CLK_500K must
//    stop and restart.
// 6. The results of both channels are read back over I2C and compared with
//    the detector's own values.
// Counted mechanisms: stimulation (channel 0), sleep-state threshold switch
// (channel 1), Clken pause, MODE gating, I2C status read-back; each must
// happen at least once, and channel 1 must never stimulate.
module tb_mcesd_top;
  import mcesd_pkg::*;
  import mcesd_ref_pkg::*;
  logic clk = 0, rst_n = 0, clken = 1;
  logic [7:0] datain = '0;
  logic channel, r_i, clk_out, clk_500k;
  logic [1:0] stim;
  logic i2c_sda_out, i2c_sda_oe;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  i2c_master_bfm #(.HALF(10)) m (.clk);
  assign m.s_out = i2c_sda_out;
  assign m.s_oe  = i2c_sda_oe;

  mcesd_top dut (
    .clk, .rst_n, .clken, .datain, .channel, .r_i, .stim, .clk_out, .clk_500k,
    .i2c_addr (1'b1), .i2c_scl (m.scl), .i2c_sda_in (m.sda),
    .i2c_sda_out, .i2c_sda_oe
  );

  localparam logic [6:0] DEV = 7'b1010_001;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // ---- ADC model: a new sample for CHANNEL at each R_I rising edge
  int u [2][4096];
  int ns [2] = '{0, 0};
  logic r_i_d = 1'b0;
  function automatic int kind_of(int c, int n);
    if (c == 0) return (n >= 128 && n < 384) ? 1 : 0;
    else        return (n >= 160 && n < 416) ? 2 : 0;
  endfunction
  always @(posedge clk) begin
    r_i_d <= rst_n ? r_i : 1'b0;
    if (rst_n && r_i && !r_i_d) begin
      int c;
      c = int'(channel);
      u[c][ns[c]] = eeg_sample(kind_of(c, ns[c]), ns[c]);
      datain <= 8'(u[c][ns[c]]);
      ns[c]++;
    end
  end

  // ---- decision monitor
  int nw [2] = '{0, 0};
  int n_stim [2] = '{0, 0};
  int n_sleep [2] = '{0, 0};
  int since [2] = '{0, 0};
  int taken [2] = '{0, 0};
  always @(posedge clk) if (rst_n && dut.ce) begin
    for (int c = 0; c < 2; c++) begin
      since[c]++;
      if (dut.sample_valid && dut.sample_ch == 1'(c)) begin
        taken[c]++;
        if (taken[c] >= 64 && taken[c] % 32 == 0) since[c] = 0;
      end
      if (dut.decision[c]) begin
        int w[64];
        for (int k = 0; k < 64; k++) w[k] = u[c][32 * nw[c] + k];
        chk(int'(dut.status[c].cmo) == ref_cm(w, 5),
            $sformatf("ch%0d window %0d CM %0d exp %0d", c, nw[c], dut.status[c].cmo, ref_cm(w, 5)));
        chk(since[c] < 512, $sformatf("ch%0d decision latency %0d", c, since[c]));
        if (stim[c]) n_stim[c]++;
        if (dut.sleep[c]) n_sleep[c]++;
        nw[c]++;
      end
    end
  end

  initial begin
    logic [7:0] cfgb [];
    logic [7:0] rd [];
    int nacks, ri_toggles, taken_before, n_pause, n_mode, n_readback;
    logic ri_prev;
    n_pause = 0; n_mode = 0; n_readback = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // ---- 1. configuration
    cfgb = new[39];
    foreach (cfgb[i]) cfgb[i] = 8'h00;
    cfgb[0] = 8'd56; cfgb[1] = 8'h01;             // DIV_3200 = 312, DIV_500K = 0
    cfgb[2] = 8'h00;                              // MODE 00
    for (int c = 0; c < 2; c++) begin
      int b;
      b = 3 + 18 * c;
      cfgb[b]      = 8'd5;                        // r
      cfgb[b + 1]  = 8'd16;                       // LLS_COEF_CM = 1.0
      cfgb[b + 7]  = 8'hFE; cfgb[b + 8] = 8'hFF;  // CONST1 = -2
      cfgb[b + 11] = 8'd10;                       // DETSWD_TH_SWS = 10
      cfgb[b + 13] = 8'h70; cfgb[b + 14] = 8'h17; // DETSWS_TH_LOW = 6000
      cfgb[b + 15] = 8'h40; cfgb[b + 16] = 8'h1F; // DETSWS_TH_HIGH = 8000
      cfgb[b + 17] = 8'h33;                       // DET_STIM 3, DET_WINDOW 3
    end
    m.write_regs(DEV, 8'd0, cfgb, nacks);
    chk(nacks == 0, "configuration acknowledged");
    m.read_regs(DEV, 8'd0, 39, rd, nacks);
    for (int i = 0; i < 39; i++) chk(rd[i] == cfgb[i], $sformatf("ctrl%0d read back", i));
    // ---- 2./3. run channels through their segments
    wait (ns[0] >= 200);
    // ---- 4. Clken pause
    @(negedge clk);
    clken = 0;
    taken_before = taken[0] + taken[1];
    ri_prev = r_i; ri_toggles = 0;
    repeat (20000) begin @(posedge clk); if (r_i != ri_prev) ri_toggles++; ri_prev = r_i; end
    chk(ri_toggles == 0 && taken[0] + taken[1] == taken_before, "Clken pause");
    if (ri_toggles == 0) n_pause++;
    @(negedge clk);
    clken = 1;
    // ---- 5. MODE gating
    begin
      int t_out, t_500;
      cfgb = new[1]; cfgb[0] = 8'h03;
      m.write_regs(DEV, 8'd2, cfgb, nacks);
      t_out = 0; t_500 = 0;
      repeat (100) begin @(negedge clk); if (!clk_out) t_out++; if (!clk_500k) t_500++; end
      chk(t_out == 0 && t_500 == 0, "MODE 11 holds both clocks high");
      cfgb[0] = 8'h00;
      m.write_regs(DEV, 8'd2, cfgb, nacks);
      t_out = 0; t_500 = 0;
      repeat (100) begin @(negedge clk); if (!clk_out) t_out++; if (!clk_500k) t_500++; end
      chk(t_out == 100 && t_500 == 50, "MODE 00 runs both clocks");
      if (t_out == 100) n_mode++;
    end
    wait (ns[0] >= 520 && ns[1] >= 520);
    repeat (700 * 312) @(posedge clk);   // let the last decisions finish
    // ---- 6. status read-back
    m.read_regs(DEV, 8'd64, 18, rd, nacks);
    for (int c = 0; c < 2; c++) begin
      ch_status_t s;
      s = dut.status[c];
      chk({rd[9*c+1], rd[9*c]} == s.ffto, $sformatf("ch%0d FFTo read-back", c));
      chk({rd[9*c+3], rd[9*c+2]} == s.cmo, $sformatf("ch%0d CMo read-back", c));
      chk({rd[9*c+8][0], rd[9*c+7], rd[9*c+6], rd[9*c+5], rd[9*c+4]} == s.llso,
          $sformatf("ch%0d LLSo read-back", c));
      chk(rd[9*c+8][1] == s.r_lls, $sformatf("ch%0d R_LLS read-back", c));
      if ({rd[9*c+3], rd[9*c+2]} == s.cmo) n_readback++;
    end
    $display("windows ch0=%0d ch1=%0d stim ch0=%0d ch1=%0d sleep ch0=%0d ch1=%0d pause=%0d mode=%0d readback=%0d",
             nw[0], nw[1], n_stim[0], n_stim[1], n_sleep[0], n_sleep[1], n_pause, n_mode, n_readback);
    chk(nw[0] >= 14 && nw[1] >= 14, "enough windows");
    chk(n_stim[0] > 0, "channel 0 stimulated");
    chk(n_stim[1] == 0, "channel 1 never stimulated");
    chk(n_sleep[1] > 0, "channel 1 sleep threshold used");
    chk(n_pause > 0 && n_mode > 0 && n_readback == 2, "pause, mode and read-back happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
