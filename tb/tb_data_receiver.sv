// tb_data_receiver: with a tick every 5 clocks (and Clken-style gaps),
// checks that R_I is a square wave of 8 ticks (4 high), that each sample is
// the byte present on the last tick of its R_I period, that sample_valid is
// seen by exactly one tick, and that channels alternate 0, 1, 0, ...
module tb_data_receiver;
  import mcesd_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0;
  logic [7:0] datain = '0;
  logic r_i, channel, sample_valid, sample_ch;
  logic [7:0] sample;
  int checks = 0, failures = 0;

  data_receiver dut (.*);

  always #5 clk = ~clk;
  int cc = 0;
  always @(posedge clk) begin
    cc <= cc + 1;
    tick <= (cc % 5 == 0) && (cc % 400 < 300);   // pauses imitate Clken low
  end
  // the ADC changes its output on every tick
  always @(posedge clk) if (tick) datain <= 8'($urandom);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nt = 0, nsamp = 0, exp_ch = 0, hi = 0;
  logic [7:0] exp_byte;
  bit pending = 0;

  always @(posedge clk) if (rst_n && tick) begin
    // sample_valid seen by this tick: check it against the byte captured
    if (sample_valid) begin
      checks += 3;
      if (!pending) begin failures++; $display("unexpected sample"); end
      if (sample != exp_byte) begin failures++; $display("sample %0d exp %0d", sample, exp_byte); end
      if (sample_ch != 1'(exp_ch)) begin failures++; $display("channel"); end
      exp_ch ^= 1;
      pending = 0;
      nsamp++;
    end
    if (r_i) hi++;
    if (nt % 8 == 7) begin
      checks++;
      if (hi != 4) begin failures++; $display("R_I high for %0d ticks", hi); end
      checks++;
      if (channel != 1'(exp_ch)) begin failures++; $display("CHANNEL pad"); end
      hi = 0;
      exp_byte = datain;
      pending = 1;
    end
    nt++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (60000) @(posedge clk);
    checks++;
    if (nsamp < 100) begin failures++; $display("only %0d samples", nsamp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
