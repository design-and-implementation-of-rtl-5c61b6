// tb_read_mem: feeds 200 random samples, one per 16 detector cycles with the
// clock enable high on two of every three clocks, and checks
//  - every entropy pair (u(i-1), u(i), u(j-1), u(j)) in order, the number of
//    pairs per sample (j-1), and ent_part_end on the last pair of a part;
//  - state and part after every sample;
//  - the FFT feed: frame f holds samples 32f .. 32f+63 oldest first; a frame
//    opens (fft_start) only after the previous frame was consumed (fft_done,
//    modelled here 80 enabled cycles after its 64th word), never in a cycle
//    with data; no sample is sent before it was written; the window's last
//    sample is sent within 2 enabled cycles of being written; 5 full frames.
module tb_read_mem;
  import mcesd_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, din_valid = 0;
  logic [7:0] din = '0;
  logic [7:0] ent_ui0, ent_ui1, ent_uj0, ent_uj1, fft_data;
  logic ent_valid, ent_part_end, fft_start, fft_valid;
  logic fft_done = 1'b1;
  logic [3:0] state;
  logic [1:0] part;
  int checks = 0, failures = 0;

  read_mem dut (.*);

  always #5 clk = ~clk;
  int phase3 = 0;
  always @(posedge clk) begin phase3 <= (phase3 + 1) % 3; ce <= (phase3 != 0); end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [256];
  int nsamp = 0;          // samples written so far
  int pair_i = 1;         // next expected pair index for the newest sample
  int fft_n = 0, fft_streams = 0, frame = -1, consumed = 1, done_cnt = -1;
  int since_wr = 0;
  int exp_streams;

  task automatic fail(string s);
    failures++;
    $display("FAIL %s (sample %0d)", s, nsamp);
  endtask

  // monitor: sampled on enabled edges
  always @(posedge clk) if (rst_n && ce) begin
    if (ent_valid) begin
      int n, j, base;
      n = nsamp - 1; j = n % 16; base = n - j;
      checks++;
      if (pair_i >= j) fail("extra pair");
      else if (ent_ui0 != 8'(hist[base+pair_i-1]) || ent_ui1 != 8'(hist[base+pair_i]) ||
               ent_uj0 != 8'(hist[base+j-1]) || ent_uj1 != 8'(hist[n]))
        fail($sformatf("pair %0d of j=%0d", pair_i, j));
      checks++;
      if (ent_part_end != (j == 15 && pair_i == 14)) fail("part_end");
      pair_i++;
    end
    if (din_valid) begin
      // previous sample's pair count must be complete
      if (nsamp > 0) begin
        int jp;
        jp = (nsamp - 1) % 16;
        checks++;
        if (jp >= 2 && pair_i != jp) fail("pair count");
      end
      hist[nsamp] = int'(din);
      nsamp++;
      pair_i = 1;
    end
    since_wr++;
    if (din_valid) since_wr = 0;
    if (fft_start) begin
      checks++;
      if (!consumed) fail("fft start before the previous frame was consumed");
      checks++;
      if (fft_valid) fail("fft start together with data");
      consumed = 0;
      frame++;
      fft_n = 0;
    end
    if (fft_valid) begin
      int idx;
      idx = 32 * frame + fft_n;
      checks++;
      if (frame < 0 || fft_n >= 64) fail("fft data outside a frame");
      else if (idx >= nsamp) fail($sformatf("fft sample %0d sent before written", idx));
      else if (fft_data != 8'(hist[idx])) fail($sformatf("fft data %0d of frame %0d", fft_n, frame));
      if (fft_n == 63) begin
        checks++;
        if (since_wr > 2) fail($sformatf("last sample sent %0d cycles after write", since_wr));
        fft_streams++;
        done_cnt = 80;
      end
      fft_n++;
    end
    // model of the FFT and band computation consuming a frame
    fft_done <= 1'b0;
    if (done_cnt > 0) done_cnt--;
    else if (done_cnt == 0) begin done_cnt = -1; fft_done <= 1'b1; consumed = 1; end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 200; s++) begin
      // wait for an enabled edge, present the sample for exactly that edge
      @(negedge clk); while (!ce) @(negedge clk);
      din = 8'($urandom); din_valid = 1;
      @(negedge clk); while (!ce) @(negedge clk);
      din_valid = 0;
      #1;
      checks++;
      if (state != 4'(s % 16) || part != 2'((s / 16) % 4)) fail("state/part");
      for (int k = 0; k < 14; k++) begin @(negedge clk); while (!ce) @(negedge clk); end
    end
    repeat (300) @(posedge clk);
    exp_streams = (200 - 64) / 32 + 1;
    checks++;
    if (fft_streams != exp_streams) fail($sformatf("streams %0d expected %0d", fft_streams, exp_streams));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
