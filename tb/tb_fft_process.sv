// tb_fft_process: streams 64 random (DR, DI) pairs per frame in bit-reversed
// address order, as the FFT does, and checks Band0/1/2 against
// floor(sqrt(16*(DR^2+DI^2))) for addresses 0, 4, 7, bands_valid once per
// frame, ffto = Band2 at the end, and that bands_valid comes 21 enabled
// cycles after the Band2 sample (one 18-cycle root plus hand-over).
module tb_fft_process;
  import mcesd_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, frame_start = 0, in_valid = 0;
  logic signed [15:0] dr = '0, di = '0;
  logic [5:0] addr = '0;
  logic [15:0] band0, band1, band2, ffto;
  logic bands_valid;
  int checks = 0, failures = 0;

  fft_process dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ce <= $urandom_range(1) != 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int isqrt(longint v);
    longint q;
    q = longint'($sqrt(real'(v)));
    while (q * q > v) q--;
    while ((q + 1) * (q + 1) <= v) q++;
    return int'(q);
  endfunction

  task automatic step;
    @(negedge clk); while (!ce) @(negedge clk);
  endtask

  int e [3];
  int nvalid;
  int since_b2;

  always @(posedge clk) if (rst_n && ce) begin
    since_b2++;
    if (in_valid && addr == 6'd7) since_b2 = 0;
    if (bands_valid) begin
      nvalid++;
      checks += 5;
      if (int'(band0) != e[0]) begin failures++; $display("band0 %0d exp %0d", band0, e[0]); end
      if (int'(band1) != e[1]) begin failures++; $display("band1 %0d exp %0d", band1, e[1]); end
      if (int'(band2) != e[2]) begin failures++; $display("band2 %0d exp %0d", band2, e[2]); end
      if (ffto != band2) begin failures++; $display("ffto"); end
      if (since_b2 != 21) begin failures++; $display("latency %0d", since_b2); end
    end
  end

  initial begin
    int a;
    logic signed [15:0] r_, i_;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      step(); frame_start = 1;
      step(); frame_start = 0;
      for (int p = 0; p < 64; p++) begin
        a = {p[0], p[1], p[2], p[3], p[4], p[5]};
        case (f)
          0: begin r_ = 16'sd16383; i_ = 16'sd0; end               // full-scale real
          1: begin r_ = -16'sd16384; i_ = -16'sd16384; end         // corner
          default: begin r_ = 16'($signed(15'($urandom))); i_ = 16'($signed(15'($urandom))); end
        endcase
        if (a == 0) e[0] = isqrt(16 * (longint'(r_) * r_ + longint'(i_) * i_));
        if (a == 4) e[1] = isqrt(16 * (longint'(r_) * r_ + longint'(i_) * i_));
        if (a == 7) e[2] = isqrt(16 * (longint'(r_) * r_ + longint'(i_) * i_));
        for (int k = 0; k < 3; k++) if (e[k] > 65535 && a == (k == 0 ? 0 : k == 1 ? 4 : 7)) e[k] = 65535;
        dr = r_; di = i_; addr = 6'(a); in_valid = 1;
        step();
      end
      in_valid = 0;
      repeat (80) step();
    end
    checks++;
    if (nvalid != 8) begin failures++; $display("bands_valid count %0d", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
