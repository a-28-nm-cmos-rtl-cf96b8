`timescale 1ps/1fs
// I2C slave with the configuration registers of the chip.
//
// SCL and SDA are synchronised into the 160 MHz clock and their edges
// detected there, so SCL must stay below a few MHz (standard and fast mode
// are fine). SDA is open drain: `sda_oe` high pulls the line low.
// Protocol: START, 7-bit device address DEV_ADDR and R/W bit, ACK. A write
// then carries a register pointer byte and data bytes (each acknowledged,
// pointer incremented after each); a read returns the register at the
// pointer and the following ones while the master acknowledges. STOP ends.
// Register map (reset value):
//   0  header byte of the output protocol      (8'h3C)
//   1  idle byte of the output protocol        (8'hBC)
//   2  [1:0] TDC resolution regime (0 High .. 3 Low), [2] writing 1 starts
//      DCO calibration (one-cycle pulse on cfg.cal_start, reads as 0)
//   3..6 codes of the four sigma-delta DACs    (8'h80)
// That the chip is configured over I2C and that header and idle bytes are
// programmable follows the document; the register map, the device address
// and the reset values are this design's choices.
module i2c_cfg
  import tsp_pkg::*;
#(
  parameter logic [6:0] DEV_ADDR = 7'h2A
) (
  input  logic clk160,
  input  logic rst_n,
  input  logic scl,
  input  logic sda_i,
  output logic sda_oe,
  output cfg_t cfg
);
  localparam int NREG = 7;

  typedef enum logic [2:0] {I_IDLE, I_ADDR, I_PTR, I_WDATA, I_RDATA, I_WAIT} istate_t;
  istate_t state;

  logic [2:0] scl_s, sda_s;
  logic       scl_rise, scl_fall, start_c, stop_c;
  logic [7:0] regs [NREG];
  logic [7:0] sr, tx, ptr;
  logic [3:0] bitcnt;
  logic       rw, macked, cal_pulse;

  always_ff @(posedge clk160 or negedge rst_n)
    if (!rst_n) begin
      scl_s <= '1; sda_s <= '1;
    end else begin
      scl_s <= {scl_s[1:0], scl};
      sda_s <= {sda_s[1:0], sda_i};
    end

  assign scl_rise = !scl_s[2] &&  scl_s[1];
  assign scl_fall =  scl_s[2] && !scl_s[1];
  assign start_c  =  scl_s[1] &&  scl_s[2] &&  sda_s[2] && !sda_s[1];
  assign stop_c   =  scl_s[1] &&  scl_s[2] && !sda_s[2] &&  sda_s[1];

  logic [7:0] rdv;   // register at the pointer, 0 beyond the map
  assign rdv = (int'(ptr) < NREG) ? regs[ptr[2:0]] : 8'h00;

  always_ff @(posedge clk160 or negedge rst_n)
    if (!rst_n) begin
      state <= I_IDLE; sr <= '0; tx <= '0; ptr <= '0; bitcnt <= '0;
      rw <= 1'b0; macked <= 1'b0; sda_oe <= 1'b0; cal_pulse <= 1'b0;
      regs[0] <= 8'h3C; regs[1] <= 8'hBC; regs[2] <= 8'h00;
      for (int i = 3; i < NREG; i++) regs[i] <= 8'h80;
    end else begin
      cal_pulse <= 1'b0;
      if (start_c) begin
        state <= I_ADDR; bitcnt <= '0; sda_oe <= 1'b0;
      end else if (stop_c) begin
        state <= I_IDLE; sda_oe <= 1'b0;
      end else if (state == I_RDATA) begin
        if (scl_rise && bitcnt == 4'd8) macked <= !sda_s[1];
        if (scl_fall) begin
          if (bitcnt < 4'd7) begin
            sda_oe <= !tx[6]; tx <= tx << 1; bitcnt <= bitcnt + 1'b1;
          end else if (bitcnt == 4'd7) begin
            sda_oe <= 1'b0; bitcnt <= 4'd8;
          end else if (macked) begin
            tx <= rdv; sda_oe <= !rdv[7];
            ptr <= ptr + 1'b1; bitcnt <= '0;
          end else begin
            state <= I_WAIT; sda_oe <= 1'b0;
          end
        end
      end else if (state inside {I_ADDR, I_PTR, I_WDATA}) begin
        if (scl_rise && bitcnt < 4'd8) begin
          sr <= {sr[6:0], sda_s[1]}; bitcnt <= bitcnt + 1'b1;
        end
        if (scl_fall && bitcnt == 4'd8) begin
          bitcnt <= 4'd9;
          unique case (state)
            I_ADDR: if (sr[7:1] == DEV_ADDR) begin
                      sda_oe <= 1'b1; rw <= sr[0];
                    end else state <= I_WAIT;
            I_PTR:  begin sda_oe <= 1'b1; ptr <= sr; end
            default: begin
              sda_oe <= 1'b1;
              if (int'(ptr) < NREG) begin
                if (ptr == 8'd2) begin
                  regs[2]   <= {5'b0, sr[2], sr[1:0]} & 8'h03;
                  cal_pulse <= sr[2];
                end else regs[ptr[2:0]] <= sr;
              end
              ptr <= ptr + 1'b1;
            end
          endcase
        end else if (scl_fall && bitcnt == 4'd9) begin
          bitcnt <= '0; sda_oe <= 1'b0;
          if (state == I_ADDR) begin
            if (rw) begin
              state <= I_RDATA; tx <= rdv; sda_oe <= !rdv[7];
              ptr <= ptr + 1'b1;
            end else state <= I_PTR;
          end else state <= I_WDATA;
        end
      end
    end

  assign cfg.header    = regs[0];
  assign cfg.idle      = regs[1];
  assign cfg.regime    = res_regime_t'(regs[2][1:0]);
  assign cfg.cal_start = cal_pulse;
  for (genvar k = 0; k < 4; k++) begin : g_dac
    assign cfg.dac_code[k] = regs[3 + k];
  end
endmodule
