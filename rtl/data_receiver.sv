// data_receiver: ADC sampling clock and sample capture for two channels.
//
// Counts detector ticks (3.2 kHz, already gated by Clken) modulo 8 to make
// R_I, a 400 Hz square wave (high for ticks 0-3, low for 4-7). The ADC
// converts on the rising edge of R_I; on tick 7, the last of the period, the
// byte on datain is latched and offered to the detector with sample_valid
// and its channel number sample_ch. sample_valid stays high until the next
// tick, so exactly one detector cycle sees it. channel (the CHANNEL pad)
// names the channel of the current R_I period and alternates 0, 1, 0, ...,
// giving each channel 200 samples/s, one per 16 detector cycles. The rates
// follow the design; the phase of the capture is this implementation's
// choice.
module data_receiver
  import mcesd_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                tick,
  input  logic [SAMPLE_W-1:0] datain,
  output logic                r_i,
  output logic                channel,
  output logic [SAMPLE_W-1:0] sample,
  output logic                sample_valid,
  output logic                sample_ch
);

  logic [2:0] tcnt;

  assign r_i = ~tcnt[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt         <= '0;
      channel      <= 1'b0;
      sample       <= '0;
      sample_valid <= 1'b0;
      sample_ch    <= 1'b0;
    end else if (tick) begin
      tcnt         <= tcnt + 3'd1;
      sample_valid <= (tcnt == 3'd7);
      if (tcnt == 3'd7) begin
        sample    <= datain;
        sample_ch <= channel;
        channel   <= ~channel;
      end
    end
  end

endmodule
