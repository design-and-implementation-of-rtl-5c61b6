// read_mem: sample store and operand sequencer of one detector channel.
//
// Every received sample is written into a 128x8 two-port RAM used as a ring
// buffer. Samples are grouped in 16-point parts (four parts per 64-point
// window, a new window every 32 samples, i.e. 50% overlap).
//
// Entropy operands (port A): after sample j of a part is written, the pairs
// i = 1..j-1 are read out, one per detector cycle. Each pair presents
// u(i-1), u(i) from the RAM together with u(j-1), u(j) held in registers, so
// that the extractor sees both differences u(i-1)-u(j-1) and u(i)-u(j) of one
// decision bit pair at once. Over a part this visits every pair i' < j' <= 14
// exactly once. ent_part_end marks the last pair of a part (j = 15). With one
// sample every 16 detector cycles the longest sequence (14 pairs, 15 reads)
// ends before the next sample arrives.
//
// FFT operands (port B): one FFT frame per window, fed as early as the data
// allows so that little work is left after the window's last sample. A frame
// opens (fft_start, one enabled cycle, no data in that cycle) once the
// previous frame has been consumed (fft_done, the band results of the last
// frame; high after reset). Its samples are then read oldest first, one per
// cycle, as long as they are already in the RAM: the 32 samples it shares
// with the previous window at once, the 32 new ones each right after it is
// written. fft_valid follows each read by one cycle. After the 64th the
// window base moves on by 32 samples.
//
// All state advances only in cycles with ce high (detector clock enable);
// the valid outputs are meaningful only in those cycles. rst_n is active low
// and asynchronous. The memory organisation and the ports (State, Part,
// ER_o, FR_o, Start) follow the design; the incremental pair schedule and
// the early FFT feeding are this implementation's own.
module read_mem
  import mcesd_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIN   = 64,
  parameter int unsigned HOP   = 32,
  parameter int unsigned PART  = 16,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned SW   = $clog2(PART),
  localparam int unsigned WW   = $clog2(WIN)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic [SAMPLE_W-1:0] din,
  input  logic                din_valid,
  // entropy side
  output logic [SAMPLE_W-1:0] ent_ui0,     // u(i-1)
  output logic [SAMPLE_W-1:0] ent_ui1,     // u(i)
  output logic [SAMPLE_W-1:0] ent_uj0,     // u(j-1)
  output logic [SAMPLE_W-1:0] ent_uj1,     // u(j)
  output logic                ent_valid,
  output logic                ent_part_end,
  output logic [SW-1:0]       state,
  output logic [1:0]          part,
  // FFT side
  output logic                fft_start,
  output logic [SAMPLE_W-1:0] fft_data,
  output logic                fft_valid,
  input  logic                fft_done
);

  logic [AW-1:0]       wp;          // next write address

  // entropy read sequencer
  logic                rd_active;
  logic [SW-1:0]       rd_idx, rd_j;
  logic [AW-1:0]       rd_base;
  logic                ret_valid, ret_last;
  logic [SW-1:0]       ret_idx, ret_j;
  logic [SAMPLE_W-1:0] prev_q;

  // FFT read sequencer
  logic                f_run;       // frame open, samples still to feed
  logic                f_idle;      // previous frame consumed
  logic [WW:0]         f_fed;       // samples fed in this frame
  logic [AW-1:0]       f_base;      // address of the window's oldest sample
  logic [AW-1:0]       f_avail;     // window samples already written
  logic                rd_b;

  logic [SAMPLE_W-1:0] rdata_a;
  logic                wr, rd_a;
  logic [AW-1:0]       addr_a;
  logic [SW-1:0]       j_new;

  assign wr    = ce && din_valid;
  assign rd_a  = ce && rd_active && !din_valid;
  assign addr_a = din_valid ? wp : rd_base + AW'(rd_idx);
  assign j_new = state + SW'(1);

  dp_sram_128x8 #(.DEPTH(DEPTH), .WIDTH(SAMPLE_W)) u_ram (
    .clk     (clk),
    .en_a    (wr || rd_a),
    .we_a    (wr),
    .addr_a  (addr_a),
    .wdata_a (din),
    .rdata_a (rdata_a),
    .en_b    (rd_b),
    .addr_b  (f_base + AW'(f_fed)),
    .rdata_b (fft_data)
  );

  // sample bookkeeping
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp      <= '0;
      state   <= SW'(PART - 1);
      part    <= 2'd3;
      ent_uj0 <= '0;
      ent_uj1 <= '0;
    end else if (wr) begin
      wp      <= wp + AW'(1);
      state   <= j_new;
      if (state == SW'(PART - 1)) part <= part + 2'd1;
      ent_uj0 <= ent_uj1;
      ent_uj1 <= din;
    end
  end

  // entropy pair reads on port A
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_active <= 1'b0;
      rd_idx    <= '0;
      rd_j      <= '0;
      rd_base   <= '0;
      ret_valid <= 1'b0;
      ret_last  <= 1'b0;
      ret_idx   <= '0;
      ret_j     <= '0;
      prev_q    <= '0;
    end else if (ce) begin
      if (ret_valid) prev_q <= rdata_a;
      ret_valid <= 1'b0;
      if (din_valid) begin
        rd_active <= (j_new >= SW'(2));
        rd_idx    <= '0;
        rd_j      <= j_new;
        rd_base   <= wp - AW'(j_new);
      end else if (rd_active) begin
        ret_valid <= 1'b1;
        ret_idx   <= rd_idx;
        ret_j     <= rd_j;
        ret_last  <= (rd_idx == rd_j - SW'(1));
        rd_idx    <= rd_idx + SW'(1);
        if (rd_idx == rd_j - SW'(1)) rd_active <= 1'b0;
      end
    end
  end

  assign ent_ui0      = prev_q;
  assign ent_ui1      = rdata_a;
  assign ent_valid    = ret_valid && (ret_idx != '0);
  assign ent_part_end = ent_valid && ret_last && (ret_j == SW'(PART - 1));

  // FFT stream on port B
  assign f_avail = wp - f_base;
  assign rd_b    = ce && f_run && !fft_start && (f_fed != (WW+1)'(WIN)) &&
                   ((WW+1)'(f_avail) > f_fed);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_run     <= 1'b0;
      f_idle    <= 1'b1;
      f_fed     <= '0;
      f_base    <= '0;
      fft_start <= 1'b0;
      fft_valid <= 1'b0;
    end else if (ce) begin
      fft_valid <= rd_b;
      fft_start <= 1'b0;
      if (fft_done) f_idle <= 1'b1;
      if (!f_run && f_idle) begin
        fft_start <= 1'b1;
        f_run     <= 1'b1;
        f_idle    <= 1'b0;
        f_fed     <= '0;
      end else if (rd_b) begin
        f_fed <= f_fed + (WW+1)'(1);
        if (f_fed == (WW+1)'(WIN - 1)) begin
          f_run  <= 1'b0;
          f_base <= f_base + AW'(HOP);
        end
      end
    end
  end

  // A new sample must not arrive while the pair sequence is still reading.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (ce && din_valid) |-> !rd_active);

  // The FFT reader must never fall a whole RAM behind the writer.
  a_window_kept: assert property (@(posedge clk) disable iff (!rst_n)
    ce |-> (f_avail <= AW'(WIN + HOP)));

endmodule
