// tb_fft64: checks the 64-point FFT against a direct DFT computed here with
// real arithmetic. Three frames (random, a pure tone, full-scale constant)
// are sent with the clock enable high every other cycle; every one of the 64
// outputs per frame must match within 3 LSB, each frequency index must appear
// once, and the first result must follow the first input by 69 enabled cycles.
module tb_fft64;
  logic clk = 0, rst_n = 0, ce = 0, start = 0, in_valid = 0;
  logic signed [8:0]  in_re = '0;
  logic               out_valid, busy;
  logic signed [14:0] out_re, out_im;
  logic [5:0]         out_addr;
  int checks = 0, failures = 0;

  fft64 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ce <= ~ce;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [64];
  real ref_re [64], ref_im [64];
  bit  seen [64];
  int  ce_count, first_in, first_out, nout;

  always @(posedge clk) if (ce) ce_count++;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic run_frame(int kind);
    real a;
    for (int n = 0; n < 64; n++) begin
      case (kind)
        0: x[n] = int'($urandom_range(255));
        1: x[n] = 128 + int'($rtoi(100.0 * $cos(2.0 * 3.14159265358979 * 4.0 * n / 64.0)));
        default: x[n] = 255;
      endcase
    end
    for (int k = 0; k < 64; k++) begin
      ref_re[k] = 0.0; ref_im[k] = 0.0; seen[k] = 0;
      for (int n = 0; n < 64; n++) begin
        a = 2.0 * 3.14159265358979 * real'(n * k) / 64.0;
        ref_re[k] += real'(x[n]) * $cos(a);
        ref_im[k] -= real'(x[n]) * $sin(a);
      end
    end
    // start pulse in one enabled cycle, then 64 samples
    @(negedge clk); while (!ce) @(negedge clk);
    start = 1;
    @(negedge clk); while (!ce) @(negedge clk);
    start = 0;
    nout = 0;
    for (int n = 0; n < 64; n++) begin
      in_valid = 1; in_re = 9'(x[n]);
      if (n == 0) first_in = ce_count;
      @(negedge clk); while (!ce) @(negedge clk);
    end
    in_valid = 0;
    while (nout < 64) begin
      @(posedge clk);
      if (ce && out_valid) begin
        if (nout == 0) begin
          first_out = ce_count;
          checks++;
          if (first_out - first_in != 69) begin
            failures++;
            $display("latency %0d, expected 69", first_out - first_in);
          end
        end
        nout++;
        checks++;
        if (rabs(real'(out_re) - ref_re[out_addr]) > 3.0 ||
            rabs(real'(out_im) - ref_im[out_addr]) > 3.0 || seen[out_addr]) begin
          failures++;
          $display("frame %0d bin %0d: got %0d, %0d expected %f, %f", kind, out_addr,
                   out_re, out_im, ref_re[out_addr], ref_im[out_addr]);
        end
        seen[out_addr] = 1;
      end
    end
    repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    run_frame(0);
    run_frame(1);
    run_frame(2);
    run_frame(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
