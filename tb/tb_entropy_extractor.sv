// tb_entropy_extractor: presents the pair sequence of 12 parts of 16 samples
// (regular, noisy and strictly rising parts, the last giving S1 = 0 with
// r = 0) the way read_mem does, and compares every CM with the reference
// computed directly from eq. (3.7)-(3.11) on the 64-sample window. CM must
// come 21 enabled cycles after the last pair of the window and only at the
// end of every second part once four parts exist.
module tb_entropy_extractor;
  import mcesd_pkg::*;
  import mcesd_ref_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0;
  logic [7:0] r = 8'd5;
  logic [7:0] ui0 = '0, ui1 = '0, uj0 = '0, uj1 = '0;
  logic pair_valid = 0, part_end = 0;
  logic [15:0] cm;
  logic cm_valid;
  int checks = 0, failures = 0;

  entropy_extractor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ce <= $urandom_range(3) != 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int u [512];
  int win [64];
  int ncm = 0;
  int rpart [32];
  int exp_q [$];


  always @(posedge clk) if (rst_n && ce && cm_valid) begin
    int e;
    checks += 2;
    if (exp_q.size() == 0) begin failures++; $display("unexpected CM"); end
    else begin
      e = exp_q.pop_front();
      if (int'(cm) != e) begin failures++; $display("CM %0d expected %0d", cm, e); end
    end
    if (since_end != 21) begin
      failures++; $display("CM latency %0d", since_end);
    end
    ncm++;
  end

  // enabled cycles since the last pair of a part
  int since_end = 0;
  always @(posedge clk) if (ce) begin
    if (pair_valid && part_end) since_end = 0;
    else since_end++;
  end

  task automatic step;
    @(negedge clk); while (!ce) @(negedge clk);
  endtask

  initial begin
    int nparts;
    nparts = 12;
    for (int p = 0; p < nparts; p++)
      for (int k = 0; k < 16; k++) begin
        case (p % 3)
          0: u[16*p+k] = 100 + int'($urandom_range(8));                 // regular
          1: u[16*p+k] = int'($urandom_range(255));                     // noisy
          default: u[16*p+k] = 100 + 4 * k + int'($urandom_range(3));   // rising
        endcase
      end
    for (int k = 0; k < 16; k++) u[16*(nparts-1)+k] = 10 * k;          // S1 = 0 at r = 0
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < nparts; p++) begin
      if (p == nparts - 1) begin
        // wait until the previous CM is out before changing r
        repeat (200) step();
        r = 8'd0;
      end
      rpart[p] = int'(r);
      if (p >= 3 && p % 2 == 1) begin
        for (int k = 0; k < 64; k++) win[k] = u[16*(p-3)+k];
        exp_q.push_back(ref_cmp(win, 0, rpart[p-3]) + ref_cmp(win, 16, rpart[p-2]) +
                        ref_cmp(win, 32, rpart[p-1]) + ref_cmp(win, 48, int'(r)));
      end
      for (int j = 2; j < 16; j++)
        for (int i = 1; i < j; i++) begin
          step();
          ui0 = 8'(u[16*p+i-1]); ui1 = 8'(u[16*p+i]);
          uj0 = 8'(u[16*p+j-1]); uj1 = 8'(u[16*p+j]);
          pair_valid = 1;
          part_end = (j == 15 && i == 14);
        end
      step();
      pair_valid = 0; part_end = 0;
      repeat (30) step();
    end
    repeat (100) step();
    checks++;
    if (ncm != 5 || exp_q.size() != 0) begin failures++; $display("CM count %0d", ncm); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
