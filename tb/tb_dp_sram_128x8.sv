// tb_dp_sram_128x8: random writes on port A and reads on both ports, checked
// against a model array; read data must appear exactly one cycle after the
// address, port A must return the old word during a write, and a disabled
// port must hold its output.
module tb_dp_sram_128x8;
  logic clk = 0, en_a = 0, we_a = 0, en_b = 0;
  logic [6:0] addr_a = '0, addr_b = '0;
  logic [7:0] wdata_a = '0, rdata_a, rdata_b;
  int checks = 0, failures = 0;
  logic [7:0] model [128];
  logic [7:0] exp_a, exp_b;
  logic       chk_a, chk_b;

  dp_sram_128x8 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill the memory
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      en_a = 1; we_a = 1; addr_a = 7'(i); wdata_a = 8'($urandom); model[i] = wdata_a;
    end
    @(negedge clk); en_a = 0; we_a = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en_a = 1'($urandom); we_a = 1'($urandom); en_b = 1'($urandom);
      addr_a = 7'($urandom); addr_b = 7'($urandom); wdata_a = 8'($urandom);
      chk_a = en_a; chk_b = en_b;
      exp_a = en_a ? model[addr_a] : rdata_a;
      exp_b = en_b ? model[addr_b] : rdata_b;
      if (en_a && we_a) model[addr_a] = wdata_a;
      // port B reads the same address as a write: returns old data
      @(posedge clk); #1;
      checks += 2;
      if (rdata_a !== exp_a) begin failures++; $display("A mismatch n=%0d", n); end
      if (rdata_b !== exp_b) begin failures++; $display("B mismatch n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
