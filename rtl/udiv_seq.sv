// udiv_seq: unsigned restoring divider, one quotient bit per enabled cycle.
//
// A start pulse (with ce) loads dividend and divisor; XW enabled cycles later
// done pulses for one enabled cycle with quotient = floor(dividend/divisor).
// A zero divisor gives a zero quotient. busy is high while dividing. Helper of
// the entropy extractor, which divides S2*2^12 by S1.
module udiv_seq #(
  parameter int unsigned XW = 19,   // dividend and quotient width
  parameter int unsigned DW = 7     // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  logic          start,
  input  logic [XW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic [XW-1:0] quotient,
  output logic          busy,
  output logic          done
);

  localparam int unsigned CW = $clog2(XW + 1);

  logic [XW-1:0] x_q;       // dividend bits still to shift in / quotient bits
  logic [DW:0]   rem_q;
  logic [DW-1:0] d_q;
  logic [CW-1:0] cnt;
  logic          zero_div;
  logic [DW:0]   rem_sh;

  assign rem_sh = {rem_q[DW-1:0], x_q[XW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q      <= '0;
      rem_q    <= '0;
      d_q      <= '0;
      cnt      <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      zero_div <= 1'b0;
      quotient <= '0;
    end else if (ce) begin
      done <= 1'b0;
      if (start) begin
        x_q      <= dividend;
        rem_q    <= '0;
        d_q      <= divisor;
        zero_div <= (divisor == '0);
        cnt      <= CW'(XW);
        busy     <= 1'b1;
      end else if (busy) begin
        if (rem_sh >= {1'b0, d_q}) begin
          rem_q <= rem_sh - {1'b0, d_q};
          x_q   <= {x_q[XW-2:0], 1'b1};
        end else begin
          rem_q <= rem_sh;
          x_q   <= {x_q[XW-2:0], 1'b0};
        end
        cnt <= cnt - CW'(1);
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quotient <= zero_div ? '0 :
                      (rem_sh >= {1'b0, d_q}) ? {x_q[XW-2:0], 1'b1} : {x_q[XW-2:0], 1'b0};
        end
      end
    end
  end

endmodule
