// clk_gen: clock generator of the chip.
//
// From the chip clock (1-10 MHz) it derives
//   tick_3200 : a one-cycle enable pulse every div_3200 clocks (3.2 kHz when
//               div_3200 = f_clk / 3200; values 0 and 1 give every clock),
//   clk_3200  : the matching 3.2 kHz square wave (high in the first half),
//   clk_500k  : the chip clock divided by N = 2*(div_500k+1), 2..32,
//   clk_out   : the chip clock itself.
// mode[1] forces clk_out to 1 and mode[0] forces clk_500k to 1, so unused
// clock outputs stop toggling (MODE 00: both run, 11: both held high).
// The divider ratios and MODE follow the design; the 3.2 kHz clock is
// delivered as an enable pulse so that the detector stays in the chip clock
// domain. clk_out is the input clock passed through an OR gate, a clock
// path on purpose.
module clk_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] div_3200,
  input  logic [3:0]  div_500k,
  input  logic [1:0]  mode,
  output logic        tick_3200,
  output logic        clk_3200,
  output logic        clk_500k,
  output logic        clk_out
);

  logic [11:0] c3200;
  logic [3:0]  c500;
  logic        q500;
  logic        wrap;

  assign wrap = (div_3200 <= 12'd1) || (c3200 >= div_3200 - 12'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c3200     <= '0;
      tick_3200 <= 1'b0;
      clk_3200  <= 1'b0;
    end else begin
      c3200     <= wrap ? 12'd0 : c3200 + 12'd1;
      tick_3200 <= wrap;
      clk_3200  <= (wrap ? 12'd0 : c3200 + 12'd1) < (div_3200 >> 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c500 <= '0;
      q500 <= 1'b0;
    end else if (c500 >= div_500k) begin
      c500 <= '0;
      q500 <= ~q500;
    end else begin
      c500 <= c500 + 4'd1;
    end
  end

  assign clk_500k = mode[0] | q500;
  assign clk_out  = mode[1] | clk;

endmodule
