// isqrt_seq: integer square root, one root bit per enabled cycle.
//
// start (with ce) loads an RW-bit radicand; RW/2 enabled cycles later done
// pulses for one enabled cycle with root = floor(sqrt(radicand)). Classic
// digit-by-digit method: each step brings down two radicand bits and tries
// the trial divisor 4*root + 1. Helper of fft_process.
module isqrt_seq #(
  parameter int unsigned RW = 36,                 // radicand width, even
  localparam int unsigned QW = RW / 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  logic          start,
  input  logic [RW-1:0] radicand,
  output logic [QW-1:0] root,
  output logic          busy,
  output logic          done
);

  localparam int unsigned CW = $clog2(QW + 1);

  logic [RW-1:0] x_q;
  logic [QW+1:0] rem_q;
  logic [QW-1:0] q_q;
  logic [CW-1:0] cnt;
  logic [QW+1:0] rem_sh, trial;

  assign rem_sh = {rem_q[QW-1:0], x_q[RW-1:RW-2]};
  assign trial  = {q_q, 2'b01};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      rem_q <= '0;
      q_q   <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      root  <= '0;
    end else if (ce) begin
      done <= 1'b0;
      if (start) begin
        x_q   <= radicand;
        rem_q <= '0;
        q_q   <= '0;
        cnt   <= CW'(QW);
        busy  <= 1'b1;
      end else if (busy) begin
        x_q <= {x_q[RW-3:0], 2'b00};
        if (rem_sh >= trial) begin
          rem_q <= rem_sh - trial;
          q_q   <= {q_q[QW-2:0], 1'b1};
        end else begin
          rem_q <= rem_sh;
          q_q   <= {q_q[QW-2:0], 1'b0};
        end
        cnt <= cnt - CW'(1);
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          root <= (rem_sh >= trial) ? {q_q[QW-2:0], 1'b1} : {q_q[QW-2:0], 1'b0};
        end
      end
    end
  end

endmodule
