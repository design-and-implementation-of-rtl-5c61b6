// tb_i2c_regbank: drives the register bank with an I2C master model and
// checks the reset values, a 39-byte burst write of ctrl0..38 read back with
// a combined read, single writes, readin reads (random status values), that
// writes to the readin range change nothing, and that another device address
// is not acknowledged.
module tb_i2c_regbank;
  logic clk = 0, rst_n = 0;
  logic [2:0] saddr = 3'b001;
  logic [7:0] ctrl [64];
  logic [7:0] readin [64];
  logic sda_out, sda_oe;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  i2c_master_bfm #(.HALF(6)) m (.clk);
  assign m.s_out = sda_out;
  assign m.s_oe  = sda_oe;

  i2c_regbank dut (
    .clk, .rst_n, .scl (m.scl), .sda_in (m.sda), .sda_out, .sda_oe,
    .saddr, .ctrl, .readin
  );

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  localparam logic [6:0] DEV = 7'b1010_001;

  initial begin
    logic [7:0] wd [];
    logic [7:0] rd [];
    logic [7:0] model [64];
    int nacks;
    for (int i = 0; i < 64; i++) readin[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reset values
    chk(ctrl[0] == 8'd56 && ctrl[1] == 8'd1, "DIV_3200 reset");
    chk(ctrl[3] == 8'd5 && ctrl[21] == 8'd5, "THRESHOLD reset");
    chk(ctrl[20] == 8'h33 && ctrl[38] == 8'h33, "DET reset");
    for (int i = 0; i < 64; i++) model[i] = ctrl[i];
    // burst write of ctrl0..38
    wd = new[39];
    foreach (wd[i]) begin wd[i] = 8'($urandom); model[i] = wd[i]; end
    m.write_regs(DEV, 8'd0, wd, nacks);
    chk(nacks == 0, "burst write acks");
    for (int i = 0; i < 64; i++) chk(ctrl[i] == model[i], $sformatf("ctrl%0d after burst", i));
    // combined read back
    m.read_regs(DEV, 8'd0, 39, rd, nacks);
    chk(nacks == 0, "read acks");
    for (int i = 0; i < 39; i++) chk(rd[i] == model[i], $sformatf("read ctrl%0d", i));
    // single write in the middle
    wd = new[1]; wd[0] = 8'hA5; model[17] = 8'hA5;
    m.write_regs(DEV, 8'd17, wd, nacks);
    chk(nacks == 0 && ctrl[17] == 8'hA5, "single write");
    // status registers
    m.read_regs(DEV, 8'd64, 18, rd, nacks);
    for (int i = 0; i < 18; i++) chk(rd[i] == readin[i], $sformatf("readin%0d", i));
    // writes to the status range are ignored
    wd = new[2]; wd[0] = 8'h11; wd[1] = 8'h22;
    m.write_regs(DEV, 8'd64, wd, nacks);
    for (int i = 0; i < 64; i++) chk(ctrl[i] == model[i], $sformatf("ctrl%0d untouched", i));
    // wrong device address
    wd = new[1]; wd[0] = 8'h00;
    m.write_regs(7'b1010_011, 8'd3, wd, nacks);
    chk(nacks == 3 && ctrl[3] == model[3], "foreign address ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
