`timescale 1ps/1fs
// Automatic calibration of the Vernier oscillator pair of one pixel.
//
// The resolution (LSB) of the Vernier TDC is the period difference T0-T1.
// A calibration trial runs the TDC in calibration mode: it returns, as
// `tdc_fine`+1, the number of DCO_1 periods needed to gain one full DCO_0
// period, i.e. the lap count T0/(T0-T1). The target lap count of each
// resolution regime is T0 divided by the typical LSB of that regime
// (9, 20, 31, 42 ps for High, Mid-High, Mid-Low, Low, with T0 = 1.2 ns).
// After each trial the fine code of DCO_1 is stepped by one: up (faster
// DCO_1, larger LSB) while the lap count is above target, down while it
// is below. Calibration ends when the count equals the target, when the
// step direction reverses (target crossed), at a code limit, or after
// MAX_ITER trials. That DCO_1 is tuned just faster than DCO_0 and the four
// regimes follow the document; the search procedure is this design's.
//
// Interface: a one-cycle `start` pulse begins; `cal_mode` is held for the
// whole calibration; `cal_trig` starts one trial once the TDC is idle;
// `tdc_ack` takes each result; `done` is high when no calibration runs.
// `fine1` is the DCO_1 fine code (reset value FINE_INIT).
module dco_calib
  import tsp_pkg::*;
#(
  parameter int N_HIGH    = 133,
  parameter int N_MIDHIGH = 60,
  parameter int N_MIDLOW  = 39,
  parameter int N_LOW     = 29,
  parameter int MAX_ITER  = 64,
  parameter logic [4:0] FINE_INIT = 5'd4
) (
  input  logic              clk160,
  input  logic              rst_n,
  input  logic              start,
  input  res_regime_t       regime,
  input  logic              tdc_busy,
  input  logic              tdc_valid,
  input  logic [FINE_W-1:0] tdc_fine,
  output logic              cal_mode,
  output logic              cal_trig,
  output logic              tdc_ack,
  output logic [4:0]        fine1,
  output logic              done
);
  typedef enum logic [1:0] {C_IDLE, C_TRIG, C_WAIT} cstate_t;
  cstate_t     state;
  logic [6:0]  iter;
  logic        last_up, have_dir;
  logic [9:0]  target, lap;

  always_comb begin
    unique case (regime)
      RES_HIGH:    target = 10'(N_HIGH);
      RES_MIDHIGH: target = 10'(N_MIDHIGH);
      RES_MIDLOW:  target = 10'(N_MIDLOW);
      default:     target = 10'(N_LOW);
    endcase
  end

  assign lap = 10'(tdc_fine) + 10'd1;

  always_ff @(posedge clk160 or negedge rst_n)
    if (!rst_n) begin
      state <= C_IDLE; iter <= '0; last_up <= 1'b0; have_dir <= 1'b0;
      fine1 <= FINE_INIT;
    end else begin
      unique case (state)
        C_IDLE: if (start) begin
          state <= C_TRIG; iter <= '0; have_dir <= 1'b0;
        end
        C_TRIG: if (!tdc_busy) state <= C_WAIT;
        C_WAIT: if (tdc_valid) begin
          iter <= iter + 1'b1;
          if (lap == target || int'(iter) + 1 >= MAX_ITER) begin
            state <= C_IDLE;
          end else if (lap > target) begin
            if (fine1 == '1 || (have_dir && !last_up)) state <= C_IDLE;
            else begin fine1 <= fine1 + 1'b1; state <= C_TRIG; end
            last_up <= 1'b1; have_dir <= 1'b1;
          end else begin
            if (fine1 == '0 || (have_dir && last_up)) state <= C_IDLE;
            else begin fine1 <= fine1 - 1'b1; state <= C_TRIG; end
            last_up <= 1'b0; have_dir <= 1'b1;
          end
        end
        default: state <= C_IDLE;
      endcase
    end

  assign cal_mode = (state != C_IDLE);
  assign cal_trig = (state == C_TRIG) && !tdc_busy;
  assign tdc_ack  = (state == C_WAIT) && tdc_valid;
  assign done     = (state == C_IDLE);
endmodule
