// fft64: 64-point FFT of a block of real samples.
//
// Six decimation-in-frequency SDF stages (fft_sdf_stage) in a row, delay
// lines 32, 16, 8, 4, 2, 1, each stage registered. The twiddles are grouped
// radix-2^3 (radix-2/4/8): stages 0 and 3 rotate by -j at most, stages 1 and
// 4 by multiples of W_8 (a swap/negation and one constant sqrt(2)/2
// multiplication), stage 2 has the one general complex multiplier with
// W_64 twiddles, and stage 5 needs none. A frame begins with
// start; then 64 samples are taken, one per enabled cycle with in_valid high
// (gaps stall the pipeline). After the 64th sample the block feeds zeros by
// itself to push the frame out. Stage s sees stream position t - L_s, with
// L_s = sum over k < s of (D_k + 1), which sets each stage's phase; the last
// register holds position t - 68. Results therefore leave 69 enabled cycles
// after the first input, 64 consecutive cycles with out_valid high, in
// bit-reversed order; out_addr gives the frequency index of each. A frame
// takes 132 enabled cycles; a start during a frame restarts it.
//
// Input: 9-bit signed real part (imaginary part 0). Output: 15-bit signed
// DR and DI, the plain DFT X(k) = sum x(n) W_64^(nk) without scaling. The
// datapath is 15 integer bits wide throughout, which holds any 64-point sum
// of 9-bit inputs, plus GUARD fractional bits that keep the rounding error
// of the twiddle products to about one output LSB; the result is rounded to
// integers at the end. The transform, the radix-2/4/8 twiddle grouping with
// constant multipliers, and the 9-bit input and 15-bit output formats follow
// the design. The single-path delay-feedback pipelining, its 132-cycle frame,
// the guard bits and the rounding are this implementation's choices; only
// the 64-point size is built (the original core also offered 8, 16 and 32).
module fft64 #(
  parameter int unsigned IN_W  = 9,
  parameter int unsigned OUT_W = 15,
  parameter int unsigned GUARD = 3             // fractional guard bits inside
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic                    start,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im,
  output logic [5:0]              out_addr,
  output logic                    busy
);

  localparam int unsigned N      = 64;
  localparam int unsigned STAGES = 6;
  localparam int unsigned LAT    = 68;          // position held by the last register
  localparam int unsigned FRAME  = N + LAT;     // 132 advance cycles

  logic [7:0]  t;
  logic        adv;
  localparam int unsigned IW = OUT_W + GUARD;
  logic signed [IW-1:0] s_re [STAGES+1];
  logic signed [IW-1:0] s_im [STAGES+1];
  logic signed [IW:0]   rnd_re, rnd_im;
  logic [5:0]  pos;

  assign adv = ce && busy && !start && ((t >= 8'(N)) || in_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      t         <= '0;
      out_valid <= 1'b0;
      pos       <= '0;
    end else if (ce) begin
      if (start) begin
        busy      <= 1'b1;
        t         <= '0;
        out_valid <= 1'b0;
      end else if (adv) begin
        t         <= t + 8'd1;
        out_valid <= (t >= 8'(LAT)) && (t < 8'(FRAME));
        pos       <= 6'(t - 8'(LAT));
        if (t == 8'(FRAME - 1)) busy <= 1'b0;
      end else begin
        out_valid <= 1'b0;
      end
    end
  end

  assign s_re[0] = (t < 8'(N)) ? (IW'(in_re) <<< GUARD) : '0;
  assign s_im[0] = '0;

  for (genvar g = 0; g < STAGES; g++) begin : g_stage
    localparam int unsigned D  = N >> (g + 1);
    localparam int unsigned PW = $clog2(2 * D);
    localparam int unsigned L  = (N - (N >> g)) + g;   // sum of (D_k + 1), k < g
    logic [7:0] rel, orel;
    assign rel  = t - 8'(L);
    assign orel = rel - 8'(D);                         // position leaving the butterfly
    fft_sdf_stage #(.N(N), .S(g), .W(IW)) u_st (
      .clk   (clk),
      .rst_n (rst_n),
      .adv   (adv),
      .phase (rel[PW-1:0]),
      .opos  (orel[5:0]),
      .x_re  (s_re[g]),
      .x_im  (s_im[g]),
      .y_re  (s_re[g+1]),
      .y_im  (s_im[g+1])
    );
  end

  // round the guard bits away (ties upward); the magnitude bound keeps the
  // rounded value inside OUT_W bits
  assign rnd_re = (IW+1)'(s_re[STAGES]) + (IW+1)'(1 << (GUARD - 1));
  assign rnd_im = (IW+1)'(s_im[STAGES]) + (IW+1)'(1 << (GUARD - 1));
  assign out_re = OUT_W'(rnd_re >>> GUARD);
  assign out_im = OUT_W'(rnd_im >>> GUARD);
  assign out_addr = {pos[0], pos[1], pos[2], pos[3], pos[4], pos[5]};

endmodule
