// fft_process: band powers from the FFT output stream.
//
// The FFT delivers DR + j*DI with its frequency index addr. For the three
// indices BIN0, BIN1, BIN2 (0, 4 and 7: Band0, Band1, Band2) the squared
// magnitude is formed on arrival with two multipliers and held; one shared
// bit-serial square root then turns each held value into
//   band = floor(sqrt(16 * (DR^2 + DI^2))),
// i.e. |X|/32 in 9.7 unsigned format, which holds the magnitude of any
// 64-point transform of 8-bit samples. Pending bands are done in order; when
// all three of a frame are done, bands_valid pulses for one enabled cycle.
// ffto follows the band computed last (Band2 at the end of a frame). Each
// root takes 18 enabled cycles. frame_start clears the pending bands.
//
// The bins, the magnitude sqrt(DR^2+DI^2) and the 9.7 output follow the
// design; the 1/32 scale and the shared serial root are this
// implementation's choices. Advances only when ce is high.
module fft_process
  import mcesd_pkg::*;
#(
  parameter int unsigned BIN0 = 0,
  parameter int unsigned BIN1 = 4,
  parameter int unsigned BIN2 = 7
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic                frame_start,
  input  logic                in_valid,
  input  logic signed [15:0]  dr,
  input  logic signed [15:0]  di,
  input  logic [5:0]          addr,
  output logic [FEAT_W-1:0]   band0,
  output logic [FEAT_W-1:0]   band1,
  output logic [FEAT_W-1:0]   band2,
  output logic                bands_valid,
  output logic [FEAT_W-1:0]   ffto
);

  logic [31:0] sq [3];          // DR^2 + DI^2 per band
  logic [2:0]  pending, done_m;
  logic [1:0]  cur;
  logic        sq_busy, sq_done, sq_start;
  logic [17:0] root;
  logic [31:0] mag2;
  logic [1:0]  hit_idx;
  logic        hit, pick_ok;
  logic [1:0]  pick;

  logic signed [31:0] dr_x, di_x;
  assign dr_x = 32'(dr);
  assign di_x = 32'(di);
  assign mag2 = 32'(dr_x * dr_x) + 32'(di_x * di_x);

  always_comb begin
    hit = in_valid;
    hit_idx = 2'd0;
    if (addr == 6'(BIN0))      hit_idx = 2'd0;
    else if (addr == 6'(BIN1)) hit_idx = 2'd1;
    else if (addr == 6'(BIN2)) hit_idx = 2'd2;
    else hit = 1'b0;
    pick_ok = 1'b1;
    if (pending[0])      pick = 2'd0;
    else if (pending[1]) pick = 2'd1;
    else if (pending[2]) pick = 2'd2;
    else begin
      pick = 2'd0;
      pick_ok = 1'b0;
    end
  end

  assign sq_start = ce && pick_ok && !sq_busy && !sq_done && !frame_start;

  isqrt_seq #(.RW(36)) u_sqrt (
    .clk      (clk),
    .rst_n    (rst_n),
    .ce       (ce),
    .start    (sq_start),
    .radicand ({sq[pick], 4'b0000}),
    .root     (root),
    .busy     (sq_busy),
    .done     (sq_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) sq[k] <= '0;
      pending     <= '0;
      done_m      <= '0;
      cur         <= '0;
      band0       <= '0;
      band1       <= '0;
      band2       <= '0;
      ffto        <= '0;
      bands_valid <= 1'b0;
    end else if (ce) begin
      bands_valid <= 1'b0;
      if (frame_start) begin
        pending <= '0;
        done_m  <= '0;
      end else begin
        if (sq_start) begin
          cur <= pick;
          pending[pick] <= 1'b0;
        end
        if (hit) begin
          sq[hit_idx]      <= mag2;
          pending[hit_idx] <= 1'b1;
        end
        if (sq_done) begin
          logic [FEAT_W-1:0] b;
          b = (root > 18'hFFFF) ? 16'hFFFF : root[15:0];
          ffto <= b;
          case (cur)
            2'd0:    band0 <= b;
            2'd1:    band1 <= b;
            default: band2 <= b;
          endcase
          if ((done_m | (3'b001 << cur)) == 3'b111) begin
            bands_valid <= 1'b1;
            done_m      <= '0;
          end else begin
            done_m <= done_m | (3'b001 << cur);
          end
        end
      end
    end
  end

endmodule
