// fft_sdf_stage: one butterfly stage of a radix-2^3 (radix-2/4/8)
// single-path delay-feedback (SDF) FFT pipeline, with the twiddle rotation
// that follows it.
//
// Stage S of an N-point decimation-in-frequency transform has a delay line of
// D = N/2^(S+1) complex words; phase is the position of the current input
// within its block of 2D. In the first half of a block the input is pushed
// into the delay line and the delay line's output (the difference
// x[n]-x[n+D] of the previous block) leaves; in the second half the butterfly
// sends x[n]+x[n+D] out and pushes x[n]-x[n+D] into the delay line. The
// result is registered, so the stage delays the stream by D + 1 advance
// cycles. Everything moves only when adv is high.
//
// Twiddles. opos is the frame position of the word leaving the butterfly;
// its upper bits are the frequency bits k1..k(S+1) produced so far (MSB
// first) and its lower R = log2(N)-S-1 bits are the time bits not yet
// consumed. The radix-2 twiddles are regrouped in threes (radix-2^3), so that
// stage S multiplies by W_N^e with
//   S mod 3 = 0: W_4^(n * k(S+1))                  trivial, 1 or -j
//   S mod 3 = 1: W_8^(n * (k(S) + 2 k(S+1)))       -j and/or (1-j)*sqrt(2)/2
//   S mod 3 = 2: W_M^(nr * (k(S-1)+2k(S)+4k(S+1))) general, M = N/8^(S/3)
// where n is the next time bit and nr all R remaining time bits; a stage with
// R = 0 multiplies by 1. Only one stage in three needs a general complex
// multiplier; the other rotations are a swap and negation, or one constant
// multiplication by sqrt(2)/2. The exponent table and the cos/sin table
// (1.16 format, 18-bit signed) are computed at elaboration. Products are
// rounded to nearest and all results saturated to W bits.
//
// The radix-2/4/8 grouping with constant multipliers for +-j and
// sqrt(2)/2(1-j) follows the design; the SDF pipelining, formats and rounding
// are choices of this implementation.
module fft_sdf_stage #(
  parameter int unsigned N = 64,
  parameter int unsigned S = 0,
  parameter int unsigned W = 15,
  localparam int unsigned D  = N >> (S + 1),
  localparam int unsigned PW = $clog2(2 * D),
  localparam int unsigned LN = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                adv,
  input  logic [PW-1:0]       phase,
  input  logic [LN-1:0]       opos,
  input  logic signed [W-1:0] x_re,
  input  logic signed [W-1:0] x_im,
  output logic signed [W-1:0] y_re,
  output logic signed [W-1:0] y_im
);

  localparam int unsigned TW   = 18;
  localparam int unsigned R    = LN - S - 1;    // time bits left after stage
  localparam int unsigned KIND = (R == 0) ? 0 : (S % 3) + 1;  // 0 none, 1 -j, 2 W8, 3 general

  // exponent e (in units of W_N) for every output position
  function automatic logic [N*LN-1:0] gen_exp();
    logic [N*LN-1:0] t;
    int unsigned e, nb, kk;
    t = '0;
    for (int unsigned u = 0; u < N; u++) begin
      e = 0;
      if (R > 0) begin
        case (S % 3)
          0: begin
            nb = (u >> (R - 1)) & 1;
            kk = (u >> R) & 1;
            e  = nb * kk * (N / 4);
          end
          1: begin
            nb = (u >> (R - 1)) & 1;
            kk = ((u >> (R + 1)) & 1) + 2 * ((u >> R) & 1);
            e  = nb * kk * (N / 8);
          end
          default: begin
            nb = u & ((1 << R) - 1);
            kk = ((u >> (R + 2)) & 1) + 2 * ((u >> (R + 1)) & 1) + 4 * ((u >> R) & 1);
            e  = (nb * kk * (1 << (3 * (S / 3)))) % N;
          end
        endcase
      end
      t[u*LN +: LN] = LN'(e);
    end
    return t;
  endfunction

  function automatic logic [N*TW-1:0] gen_table(input bit want_sin);
    logic [N*TW-1:0] t;
    real ang, v;
    t = '0;
    for (int k = 0; k < N; k++) begin
      ang = 2.0 * 3.14159265358979323846 * real'(k) / real'(N);
      v   = want_sin ? $sin(ang) : $cos(ang);
      t[k*TW +: TW] = TW'($rtoi($floor(v * 65536.0 + 0.5)));
    end
    return t;
  endfunction

  localparam logic [N*LN-1:0] EXP_T = gen_exp();

  function automatic logic signed [W-1:0] sat(input logic signed [W+1:0] v);
    localparam logic signed [W+1:0] MAXV = (W+2)'((1 << (W - 1)) - 1);
    localparam logic signed [W+1:0] MINV = -(W+2)'(1 << (W - 1));
    return (v > MAXV) ? W'(MAXV) : (v < MINV) ? W'(MINV) : W'(v);
  endfunction

  logic signed [W-1:0] dl_re [D];
  logic signed [W-1:0] dl_im [D];
  logic signed [W-1:0] head_re, head_im;     // delay line output
  logic signed [W-1:0] push_re, push_im;     // delay line input
  logic signed [W-1:0] o_re, o_im;           // butterfly output
  logic signed [W-1:0] t_re, t_im;           // after twiddle
  logic                second_half;
  logic [LN-1:0]       e;

  assign head_re     = dl_re[D-1];
  assign head_im     = dl_im[D-1];
  assign second_half = phase[PW-1];
  assign e           = EXP_T[opos*LN +: LN];

  always_comb begin
    if (second_half) begin
      o_re    = head_re + x_re;
      o_im    = head_im + x_im;
      push_re = head_re - x_re;
      push_im = head_im - x_im;
    end else begin
      o_re    = head_re;
      o_im    = head_im;
      push_re = x_re;
      push_im = x_im;
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      dl_re[0] <= push_re;
      dl_im[0] <= push_im;
      for (int k = 1; k < D; k++) begin
        dl_re[k] <= dl_re[k-1];
        dl_im[k] <= dl_im[k-1];
      end
    end
  end

  if (KIND == 1 || KIND == 2) begin : g_const
    // e is a multiple of N/8: bit LN-2 selects -j, bit LN-3 (W8 stages
    // only) selects a further (1-j)*sqrt(2)/2
    localparam logic signed [TW-1:0] HALF_SQRT2 = 18'sd46341;
    logic signed [W-1:0]  j_re, j_im;
    logic signed [W:0]    sum, dif;
    logic signed [W+TW:0] m_re, m_im;
    logic                 rot8;

    // (a + jb)(-j) = b - ja
    assign j_re = e[LN-2] ? o_im : o_re;
    assign j_im = e[LN-2] ? sat(-(W+2)'(o_re)) : o_im;
    assign rot8 = (KIND == 2) && e[LN-3];

    always_comb begin
      // (a + jb)(1 - j) = (a + b) + j(b - a)
      sum  = (W+1)'(j_re) + (W+1)'(j_im);
      dif  = (W+1)'(j_im) - (W+1)'(j_re);
      m_re = (W+TW+1)'(sum) * (W+TW+1)'(HALF_SQRT2) + (W+TW+1)'(32768);
      m_im = (W+TW+1)'(dif) * (W+TW+1)'(HALF_SQRT2) + (W+TW+1)'(32768);
      if (rot8) begin
        t_re = sat((W+2)'(m_re >>> 16));
        t_im = sat((W+2)'(m_im >>> 16));
      end else begin
        t_re = j_re;
        t_im = j_im;
      end
    end
  end else if (KIND == 3) begin : g_general
    localparam logic [N*TW-1:0] COS_T = gen_table(1'b0);
    localparam logic [N*TW-1:0] SIN_T = gen_table(1'b1);
    localparam int unsigned PWD = W + TW + 1;
    logic signed [TW-1:0]  c, s;
    logic signed [PWD-1:0] a_x, b_x, c_x, s_x, p_re, p_im;

    always_comb begin
      c = COS_T[e*TW +: TW];
      s = SIN_T[e*TW +: TW];
      a_x = PWD'(o_re);
      b_x = PWD'(o_im);
      c_x = PWD'(c);
      s_x = PWD'(s);
      // (a + jb)(c - js) = (ac + bs) + j(bc - as), rounded at bit 16
      p_re = a_x * c_x + b_x * s_x + PWD'(32768);
      p_im = b_x * c_x - a_x * s_x + PWD'(32768);
      t_re = sat((W+2)'(p_re >>> 16));
      t_im = sat((W+2)'(p_im >>> 16));
    end
  end else begin : g_pass
    assign t_re = o_re;
    assign t_im = o_im;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_re <= '0;
      y_im <= '0;
    end else if (adv) begin
      y_re <= t_re;
      y_im <= t_im;
    end
  end

endmodule
