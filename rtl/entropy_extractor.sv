// entropy_extractor: complexity measure CM of a 64-point EEG window.
//
// For each pair of samples (i', j') of a 16-point part, with i' < j' <= 14,
// read_mem presents u(i'), u(i'+1), u(j'), u(j'+1). Two subtracters form the
// distances and two comparators give the decision bits
//   A = |u(i') - u(j')| <= r,   B = |u(i'+1) - u(j'+1)| <= 2r,   C = A & B.
// Accumulators sum S1 = sum A and S2 = sum C over the part (at most 105 each).
// At the end of the part a sequential divider forms CM^p = S2/S1 with 12
// fractional bits (0 when S1 = 0). The last four CM^p are kept; at the end of
// every second part, once four parts exist, CM = CM^1 + .. + CM^4 is output in
// 4.12 format with a one-cycle cm_valid (one CM per 32 samples); cm_valid
// rises 21 enabled cycles after the last pair of the window (19 for the
// divider, two for hand-over and summing).
//
// Equations and formats follow the design's algorithm (m = 1, N = 16, r from
// the THRESHOLD register); the incremental schedule, the zero-S1 rule and the
// truncating divider are this implementation's choices. Everything advances
// only when ce is high; rst_n is asynchronous, active low.
module entropy_extractor
  import mcesd_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic [7:0]          r,
  input  logic [SAMPLE_W-1:0] ui0,
  input  logic [SAMPLE_W-1:0] ui1,
  input  logic [SAMPLE_W-1:0] uj0,
  input  logic [SAMPLE_W-1:0] uj1,
  input  logic                pair_valid,
  input  logic                part_end,
  output logic [FEAT_W-1:0]   cm,
  output logic                cm_valid
);

  localparam int unsigned FRAC = 12;

  logic signed [SAMPLE_W:0] d1, d2;
  logic [SAMPLE_W-1:0]      ad1, ad2;
  logic                     a_bit, b_bit, c_bit;
  logic [6:0]               s1, s2, s1_next, s2_next;
  logic [18:0]              q;
  logic                     div_done;
  logic [FRAC:0]            cmp [4];          // CM^p, 1.12
  logic [2:0]               parts_seen;
  logic                     odd_part;

  always_comb begin
    d1  = $signed({1'b0, ui0}) - $signed({1'b0, uj0});
    d2  = $signed({1'b0, ui1}) - $signed({1'b0, uj1});
    ad1 = d1[SAMPLE_W] ? SAMPLE_W'(-d1) : d1[SAMPLE_W-1:0];
    ad2 = d2[SAMPLE_W] ? SAMPLE_W'(-d2) : d2[SAMPLE_W-1:0];
    a_bit = ({1'b0, ad1} <= {1'b0, r});
    b_bit = ({1'b0, ad2} <= {r, 1'b0});
    c_bit = a_bit && b_bit;
    s1_next = s1 + 7'(a_bit);
    s2_next = s2 + 7'(c_bit);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
    end else if (ce && pair_valid) begin
      s1 <= part_end ? '0 : s1_next;
      s2 <= part_end ? '0 : s2_next;
    end
  end

  udiv_seq #(.XW(7 + FRAC), .DW(7)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .ce       (ce),
    .start    (pair_valid && part_end),
    .dividend ({s2_next, FRAC'(0)}),
    .divisor  (s1_next),
    .quotient (q),
    .busy     (),
    .done     (div_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) cmp[k] <= '0;
      parts_seen <= '0;
      odd_part   <= 1'b0;
      cm         <= '0;
      cm_valid   <= 1'b0;
    end else if (ce) begin
      cm_valid <= 1'b0;
      if (div_done) begin
        cmp[0] <= q[FRAC:0];
        for (int k = 1; k < 4; k++) cmp[k] <= cmp[k-1];
        if (parts_seen != 3'd4) parts_seen <= parts_seen + 3'd1;
        odd_part <= !odd_part;
        if (odd_part && parts_seen >= 3'd3) begin
          cm <= FEAT_W'(q[FRAC:0]) + FEAT_W'(cmp[0]) + FEAT_W'(cmp[1]) + FEAT_W'(cmp[2]);
          cm_valid <= 1'b1;
        end
      end
    end
  end

endmodule
