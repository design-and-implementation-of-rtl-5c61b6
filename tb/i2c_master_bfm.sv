// i2c_master_bfm: bit-banged I2C master for the testbenches. The bus is
// modelled as wired-AND with a pull-up: sda = master_sda & ~(slave_oe &
// ~slave_out). Each SCL phase lasts HALF clock cycles of clk.
interface i2c_master_bfm #(parameter int HALF = 10) (input logic clk);
  logic scl = 1'b1;
  logic m_sda = 1'b1;
  logic s_out, s_oe;
  logic sda;
  assign sda = m_sda & ~(s_oe & ~s_out);

  task automatic wait_half;
    repeat (HALF) @(posedge clk);
  endtask

  task automatic start_cond;
    m_sda = 1'b1; wait_half(); scl = 1'b1; wait_half();
    m_sda = 1'b0; wait_half(); scl = 1'b0; wait_half();
  endtask

  task automatic stop_cond;
    m_sda = 1'b0; wait_half(); scl = 1'b1; wait_half();
    m_sda = 1'b1; wait_half();
  endtask

  // send a byte, return the acknowledge bit (0 = ACK)
  task automatic write_byte(input logic [7:0] b, output logic ack);
    for (int i = 7; i >= 0; i--) begin
      m_sda = b[i]; wait_half(); scl = 1'b1; wait_half(); scl = 1'b0;
    end
    m_sda = 1'b1; wait_half(); scl = 1'b1; wait_half();
    ack = sda; scl = 1'b0;
  endtask

  task automatic read_byte(input logic send_ack, output logic [7:0] b);
    m_sda = 1'b1;
    for (int i = 7; i >= 0; i--) begin
      wait_half(); scl = 1'b1; wait_half(); b[i] = sda; scl = 1'b0;
    end
    m_sda = ~send_ack; wait_half(); scl = 1'b1; wait_half(); scl = 1'b0;
    wait_half(); m_sda = 1'b1;
  endtask

  task automatic write_regs(input logic [6:0] dev, input logic [7:0] ptr,
                            input logic [7:0] data [], output int nacks);
    logic a;
    nacks = 0;
    start_cond();
    write_byte({dev, 1'b0}, a); nacks += int'(a);
    write_byte(ptr, a);         nacks += int'(a);
    foreach (data[i]) begin write_byte(data[i], a); nacks += int'(a); end
    stop_cond();
  endtask

  task automatic read_regs(input logic [6:0] dev, input logic [7:0] ptr, input int n,
                           output logic [7:0] data [], output int nacks);
    logic a;
    nacks = 0;
    data = new[n];
    start_cond();
    write_byte({dev, 1'b0}, a); nacks += int'(a);
    write_byte(ptr, a);         nacks += int'(a);
    start_cond();
    write_byte({dev, 1'b1}, a); nacks += int'(a);
    for (int i = 0; i < n; i++) read_byte(i != n - 1, data[i]);
    stop_cond();
  endtask
endinterface
