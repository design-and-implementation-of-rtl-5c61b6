// tb_clk_gen: measures the tick period for several DIV_3200 values (312 for
// a 1 MHz clock, 3125 for 10 MHz, 1, 7), the clk_3200 duty, the clk_500k
// half period for DIV_500K = 0..15 (N = 2..32) and the four MODE settings
// of Table-style gating (CLK_OUT / CLK_500K forced to 1).
module tb_clk_gen;
  logic clk = 0, rst_n = 0;
  logic [11:0] div_3200 = 12'd312;
  logic [3:0]  div_500k = 4'd0;
  logic [1:0]  mode = 2'b00;
  logic tick_3200, clk_3200, clk_500k, clk_out;
  int checks = 0, failures = 0;

  clk_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic measure_tick(int div);
    int t0, t1, highs;
    div_3200 = 12'(div);
    repeat (2 * div + 4) @(posedge clk);
    @(posedge clk iff tick_3200);
    t0 = 0; highs = 0;
    do begin @(posedge clk); t0++; if (clk_3200) highs++; end while (!tick_3200);
    chk(t0 == ((div <= 1) ? 1 : div), $sformatf("tick period %0d for div %0d", t0, div));
    if (div >= 4) chk(highs == div / 2, $sformatf("clk_3200 high %0d of %0d", highs, div));
  endtask

  task automatic measure_500k(int d);
    int n;
    div_500k = 4'(d);
    repeat (80) @(posedge clk);
    @(posedge clk iff clk_500k == 1'b0);
    @(posedge clk iff clk_500k == 1'b1);
    n = 0;
    do begin @(posedge clk); n++; end while (clk_500k == 1'b1);
    chk(2 * n == 2 * (d + 1), $sformatf("500k half period %0d for div %0d", n, d));
  endtask

  initial begin
    int toggles;
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure_tick(312);
    measure_tick(3125);
    measure_tick(7);
    measure_tick(1);
    for (int d = 0; d < 16; d++) measure_500k(d);
    for (int md = 0; md < 4; md++) begin
      mode = 2'(md);
      div_500k = 4'd0;
      toggles = 0;
      repeat (40) begin
        @(negedge clk); if (clk_out == 1'b0) toggles++;
      end
      chk(md[1] ? (toggles == 0) : (toggles == 40), $sformatf("clk_out mode %0d", md));
      toggles = 0;
      repeat (40) begin @(posedge clk); #1; if (clk_500k == 1'b0) toggles++; end
      chk(md[0] ? (toggles == 0) : (toggles == 20), $sformatf("clk_500k mode %0d (%0d)", md, toggles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
