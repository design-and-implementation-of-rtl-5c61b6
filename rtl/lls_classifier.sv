// lls_classifier: linear least-squares seizure classifier with adaptive
// threshold, window counter and stimulation flag.
//
// On start (one per 32-sample window) it evaluates
//   LLS = CM*b_CM + Band1*b_Band1 + Band2*b_Band2 + b_const
// with one shared multiplier, one term per enabled cycle. Every product has
// 16 fractional bits (4.12 x 12.4 and 9.7 x 7.9); b_const is {CONST1,CONST2}
// in signed 16.16. The sum is saturated to 33 bits (signed 17.16, llso).
// Band0 selects the threshold: a sleep flag is set when Band0 > sws_high and
// cleared when Band0 < sws_low; in sleep LLS_Th = th_sws (16.0), otherwise
// LLS_Th = TH_WAKE. A window is a seizure window (r_lls) when LLS > LLS_Th.
// A counter of consecutive seizure windows is cleared by any other window;
// when it reaches det_window the stimulation flag stim is raised and kept for
// det_stim windows, re-armed while the seizure goes on. done pulses one
// enabled cycle when llso, r_lls and stim are updated, 6 enabled cycles after
// start.
//
// The formula, formats, the band-0 threshold switch, DET_WINDOW and DET_STIM
// follow the design. Its single threshold register is read as the sleep
// threshold and the wake threshold is the parameter TH_WAKE; the hysteresis
// reading of the two band-0 levels and the re-arming are this
// implementation's choices. Advances only when ce is high.
module lls_classifier
  import mcesd_pkg::*;
#(
  parameter logic signed [31:0] TH_WAKE = 32'sd0    // 16.16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ce,
  input  logic                  start,
  input  logic [FEAT_W-1:0]     cm,
  input  logic [FEAT_W-1:0]     band0,
  input  logic [FEAT_W-1:0]     band1,
  input  logic [FEAT_W-1:0]     band2,
  input  ch_cfg_t               cfg,
  output logic signed [LLS_W-1:0] llso,
  output logic                  r_lls,
  output logic                  stim,
  output logic                  sleep,
  output logic                  done
);

  typedef enum logic [2:0] {S_IDLE, S_CM, S_B1, S_B2, S_CMP, S_DEC} st_t;
  st_t st;

  localparam int unsigned AW = 36;
  logic signed [AW-1:0] acc;
  logic signed [16:0]   m_a;      // feature, zero-extended
  logic signed [15:0]   m_b;      // coefficient
  logic signed [32:0]   prod;
  logic signed [AW-1:0] lls_th;
  logic signed [LLS_W-1:0] lls_sat;
  logic                 seiz;
  logic [3:0]           win_cnt, win_next, stim_cnt;
  localparam logic signed [AW-1:0] LMAX = AW'({1'b0, {(LLS_W-1){1'b1}}});
  localparam logic signed [AW-1:0] LMIN = -AW'({1'b0, {(LLS_W-1){1'b1}}}) - AW'(1);

  always_comb begin
    unique case (st)
      S_CM:    begin m_a = {1'b0, cm};    m_b = cfg.coef_cm;    end
      S_B1:    begin m_a = {1'b0, band1}; m_b = cfg.coef_band1; end
      S_B2:    begin m_a = {1'b0, band2}; m_b = cfg.coef_band2; end
      default: begin m_a = '0;            m_b = '0;             end
    endcase
    prod    = 33'(m_a) * 33'(m_b);
    lls_sat = (acc > LMAX) ? LLS_W'(LMAX) : (acc < LMIN) ? LLS_W'(LMIN) : LLS_W'(acc);
    lls_th  = sleep ? AW'($signed({cfg.th_sws, 16'h0000})) : AW'(TH_WAKE);
    seiz    = (AW'(lls_sat) > lls_th);
    win_next = seiz ? ((win_cnt == 4'hF) ? 4'hF : win_cnt + 4'd1) : 4'd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      acc      <= '0;
      llso     <= '0;
      r_lls    <= 1'b0;
      stim     <= 1'b0;
      sleep    <= 1'b0;
      done     <= 1'b0;
      win_cnt  <= '0;
      stim_cnt <= '0;
    end else if (ce) begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          acc <= AW'($signed({cfg.coef_const1, cfg.coef_const2}));
          if (band0 > cfg.sws_high)     sleep <= 1'b1;
          else if (band0 < cfg.sws_low) sleep <= 1'b0;
          st <= S_CM;
        end
        S_CM:  begin acc <= acc + AW'(prod); st <= S_B1;  end
        S_B1:  begin acc <= acc + AW'(prod); st <= S_B2;  end
        S_B2:  begin acc <= acc + AW'(prod); st <= S_CMP; end
        S_CMP: begin
          llso    <= lls_sat;
          r_lls   <= seiz;
          win_cnt <= win_next;
          st      <= S_DEC;
        end
        default: begin   // S_DEC: window counter and stimulation hold
          if (r_lls && win_cnt >= cfg.det_window) stim_cnt <= cfg.det_stim;
          else if (stim_cnt != 4'd0)              stim_cnt <= stim_cnt - 4'd1;
          stim <= (r_lls && win_cnt >= cfg.det_window) ? (cfg.det_stim != 4'd0)
                                                       : (stim_cnt > 4'd1);
          done <= 1'b1;
          st   <= S_IDLE;
        end
      endcase
    end
  end

endmodule
