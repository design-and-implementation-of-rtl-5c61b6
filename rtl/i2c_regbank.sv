// i2c_regbank: I2C slave with a bank of 8-bit registers.
//
// 64 control registers (ctrl, read/write) configure the detector and 64
// status inputs (readin, read-only) report its results. Register pointer
// 0-63 selects ctrl[ptr], 64-127 selects readin[ptr-64]; the pointer
// auto-increments after every data byte, wrapping at 128.
//   write : S, {DEV_ID,saddr,0}, A, ptr, A, data, A, data, A, ..., P
//   read  : S, {DEV_ID,saddr,0}, A, ptr, A, Sr, {DEV_ID,saddr,1}, A,
//           data, A(master), ..., data, N(master), P
// A byte to another address is not acknowledged and the slave stays idle
// until the next START. SCL and SDA are sampled by the system clock through
// two-flop synchronizers; incoming bits are taken on SCL rising edges and
// the slave changes SDA only after SCL falling edges, so SCL must stay high
// and low for at least 4 system clocks. sda_oe is high while the slave
// drives the bus, with the value on sda_out (the pad makes it open-drain).
// Reset loads ctrl with the design's defaults (THRESHOLD 5, DET_WINDOW 3,
// DET_STIM 3 for both channels, DIV_3200 = DIV3200_RST), zeros elsewhere.
// The register counts follow the design; the protocol details, DEV_ID and
// reset values other than the three named defaults are this
// implementation's choices.
module i2c_regbank #(
  parameter logic [3:0]  DEV_ID      = 4'b1010,
  parameter int unsigned N_CTRL      = 64,
  parameter int unsigned N_READIN    = 64,
  parameter logic [11:0] DIV3200_RST = 12'd312
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl,
  input  logic       sda_in,
  output logic       sda_out,
  output logic       sda_oe,
  input  logic [2:0] saddr,
  output logic [7:0] ctrl   [N_CTRL],
  input  logic [7:0] readin [N_READIN]
);

  typedef enum logic [2:0] {
    I_IDLE, I_ADDR, I_ACK_ADDR, I_REG, I_ACK_REG, I_WDATA, I_ACK_W, I_RDATA
  } ist_t;

  ist_t        st;
  logic [2:0]  scl_sy, sda_sy;
  logic        scl_rise, scl_fall, start_c, stop_c;
  logic [3:0]  bitcnt;
  logic [7:0]  shreg, txbyte;
  logic [6:0]  ptr;
  logic        rw, in_rack, master_ack;
  logic [7:0]  rd_byte;

  function automatic logic [7:0] ctrl_reset(int i);
    case (i)
      0:       return DIV3200_RST[7:0];
      1:       return {4'd0, DIV3200_RST[11:8]};
      3, 21:   return 8'd5;     // THRESHOLD (r)
      20, 38:  return 8'h33;    // DET_STIM, DET_WINDOW
      default: return 8'h00;
    endcase
  endfunction

  function automatic logic [7:0] reg_read(logic [6:0] p);
    if (!p[6]) return (int'(p[5:0]) < N_CTRL)   ? ctrl[p[5:0]]   : 8'h00;
    else       return (int'(p[5:0]) < N_READIN) ? readin[p[5:0]] : 8'h00;
  endfunction

  assign rd_byte = reg_read(ptr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sy <= 3'b111;
      sda_sy <= 3'b111;
    end else begin
      scl_sy <= {scl_sy[1:0], scl};
      sda_sy <= {sda_sy[1:0], sda_in};
    end
  end

  assign scl_rise = scl_sy[1] && !scl_sy[2];
  assign scl_fall = !scl_sy[1] && scl_sy[2];
  assign start_c  = scl_sy[1] && scl_sy[2] && !sda_sy[1] && sda_sy[2];
  assign stop_c   = scl_sy[1] && scl_sy[2] && sda_sy[1] && !sda_sy[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= I_IDLE;
      bitcnt     <= '0;
      shreg      <= '0;
      txbyte     <= '0;
      ptr        <= '0;
      rw         <= 1'b0;
      in_rack    <= 1'b0;
      master_ack <= 1'b0;
      sda_out    <= 1'b1;
      sda_oe     <= 1'b0;
      for (int i = 0; i < N_CTRL; i++) ctrl[i] <= ctrl_reset(i);
    end else if (start_c) begin
      st      <= I_ADDR;
      bitcnt  <= '0;
      in_rack <= 1'b0;
      sda_oe  <= 1'b0;
    end else if (stop_c) begin
      st     <= I_IDLE;
      sda_oe <= 1'b0;
    end else if (scl_rise) begin
      unique case (st)
        I_ADDR, I_REG, I_WDATA: begin
          shreg  <= {shreg[6:0], sda_sy[1]};
          bitcnt <= bitcnt + 4'd1;
        end
        I_RDATA: begin
          if (in_rack) master_ack <= !sda_sy[1];
          else         bitcnt     <= bitcnt + 4'd1;
        end
        default: ;
      endcase
    end else if (scl_fall) begin
      unique case (st)
        I_ADDR: if (bitcnt == 4'd8) begin
          bitcnt <= '0;
          if (shreg[7:1] == {DEV_ID, saddr}) begin
            rw      <= shreg[0];
            st      <= I_ACK_ADDR;
            sda_oe  <= 1'b1;
            sda_out <= 1'b0;
          end else begin
            st <= I_IDLE;
          end
        end
        I_ACK_ADDR: begin
          if (rw) begin
            txbyte  <= rd_byte;
            ptr     <= ptr + 7'd1;
            sda_out <= rd_byte[7];
            sda_oe  <= 1'b1;
            in_rack <= 1'b0;
            st      <= I_RDATA;
          end else begin
            sda_oe <= 1'b0;
            st     <= I_REG;
          end
        end
        I_REG: if (bitcnt == 4'd8) begin
          bitcnt  <= '0;
          ptr     <= shreg[6:0];
          st      <= I_ACK_REG;
          sda_oe  <= 1'b1;
          sda_out <= 1'b0;
        end
        I_WDATA: if (bitcnt == 4'd8) begin
          bitcnt <= '0;
          if (!ptr[6] && int'(ptr[5:0]) < N_CTRL) ctrl[ptr[5:0]] <= shreg;
          ptr     <= ptr + 7'd1;
          st      <= I_ACK_W;
          sda_oe  <= 1'b1;
          sda_out <= 1'b0;
        end
        I_ACK_REG, I_ACK_W: begin
          sda_oe <= 1'b0;
          st     <= I_WDATA;
        end
        I_RDATA: begin
          if (in_rack) begin
            // end of the master's acknowledge bit
            in_rack <= 1'b0;
            bitcnt  <= '0;
            if (master_ack) begin
              txbyte  <= rd_byte;
              ptr     <= ptr + 7'd1;
              sda_out <= rd_byte[7];
              sda_oe  <= 1'b1;
            end else begin
              sda_oe <= 1'b0;
              st     <= I_IDLE;
            end
          end else if (bitcnt == 4'd8) begin
            in_rack <= 1'b1;       // release for the master's acknowledge
            sda_oe  <= 1'b0;
          end else begin
            sda_out <= txbyte[3'd7 - bitcnt[2:0]];
          end
        end
        default: ;
      endcase
    end
  end

endmodule
