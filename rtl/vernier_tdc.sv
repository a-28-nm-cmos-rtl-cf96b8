`timescale 1ps/1fs
// Vernier time-to-digital converter of one pixel (controller and counters;
// the two oscillators are separate `dco` instances).
//
// A hit is the rising edge of the discriminator output `disc`. It starts the
// slow oscillator DCO_0; the next rising edge of the 40 MHz master clock
// starts the fast oscillator DCO_1, whose period is a little shorter. Counter
// cnt_0 counts DCO_0 edges, cnt_1 counts DCO_1 edges, and an edge-coincidence
// detector (a flip-flop clocked by DCO_1 sampling DCO_0) raises EOC at the
// first DCO_1 edge that has overtaken a DCO_0 edge (sample falls 1 -> 0).
// EOC freezes both counters and stops DCO_1. With T0, T1 the two periods:
//   fine   = DCO_1 edges before the coincidence edge
//   coarse = cnt_0 - fine
//   hit-to-clock interval = coarse*T0 + fine*(T0-T1) - e,  0 < e <= T0-T1
// In parallel DCO_0 keeps counting while `disc` is high: the time over
// threshold in DCO_0 periods (8 bits, saturating). DCO_0 stops when both
// measurements are over. All of this follows the document (Fig. 7 scheme,
// TA against the 40 MHz clock, TOT at about 1 ns, 300 ns dead time); the
// detector, the word layout and the hand-over are this design's choices.
//
// Calibration mode (`cal_mode`): a `cal_trig` pulse starts DCO_0, the first
// DCO_0 edge starts DCO_1, the first coincidence restarts cnt_1 and the
// second one ends the run, so `fine`+1 is the lap count T0/(T0-T1).
//
// Hand-over (clk160 domain): the end of the measurement is synchronised
// into clk160; `valid` rises once the measurement is over and at least
// DEAD_CYCLES clk160 cycles (300 ns) passed since the hit was seen; `word`
// is stable while `valid` is high; `ack` clears the DCO-domain counters
// (asynchronously, both oscillators being stopped) and rearms the TDC.
// `busy` is high from the hit until rearming: hits then are ignored.
// After reset the FSM issues one clear pulse before arming.
module vernier_tdc
  import tsp_pkg::*;
#(
  parameter int DEAD_CYCLES = 48
) (
  input  logic      clk160,
  input  logic      clk40,
  input  logic      rst_n,
  input  logic      disc,
  input  logic      cal_mode,
  input  logic      cal_trig,
  input  logic      dco0_clk,
  input  logic      dco1_clk,
  output logic      dco0_en,
  output logic      dco1_en,
  output tdc_word_t word,
  output logic      valid,
  input  logic      ack,
  output logic      busy
);
  localparam int N0_W = FINE_W + 1;

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_BUSY, S_VALID, S_CLEAR} state_t;
  state_t state;

  logic clr_q;              // clk160: clears the measurement
  logic armed;              // clk160: TDC accepts a hit
  logic arst;
  assign arst = clr_q | ~rst_n;

  // ---------------- start / stop ----------------
  logic hit_q, cal_q, started;
  logic stop_clk, stop_cal, stop;

  always_ff @(posedge disc or posedge arst)
    if (arst)       hit_q <= 1'b0;
    else if (armed) hit_q <= 1'b1;

  always_ff @(posedge clk40 or posedge arst)
    if (arst)       stop_clk <= 1'b0;
    else if (hit_q) stop_clk <= 1'b1;

  always_ff @(posedge dco0_clk or posedge arst)
    if (arst)          stop_cal <= 1'b0;
    else if (cal_mode) stop_cal <= 1'b1;

  assign started = hit_q | cal_q;
  assign stop    = cal_mode ? stop_cal : stop_clk;

  // ---------------- DCO_1 domain: cnt_1 and coincidence detector --------
  logic              eoc, prev_s, first_done;
  logic [FINE_W-1:0] n1;
  logic              coin;

  assign coin = prev_s & ~dco0_clk;

  always_ff @(posedge dco1_clk or posedge arst)
    if (arst) begin
      eoc <= 1'b0; prev_s <= 1'b0; first_done <= 1'b0; n1 <= '0;
    end else if (!eoc) begin
      prev_s <= dco0_clk;
      if (coin && cal_mode && !first_done) begin
        first_done <= 1'b1;
        n1         <= '0;
      end else if (coin) begin
        eoc <= 1'b1;
      end else if (n1 == '1) begin
        eoc <= 1'b1;                 // no coincidence within range
      end else begin
        n1 <= n1 + 1'b1;
      end
    end

  // ---------------- DCO_0 domain: cnt_0 and TOT ----------------
  logic [N0_W-1:0]  n0;
  logic [TOT_W-1:0] tot;
  logic             tot_done;

  always_ff @(posedge dco0_clk or posedge arst)
    if (arst)                    n0 <= '0;
    else if (!eoc && n0 != '1)   n0 <= n0 + 1'b1;

  always_ff @(posedge dco0_clk or posedge arst)
    if (arst) begin
      tot <= '0; tot_done <= 1'b0;
    end else if (!tot_done) begin
      if (disc && !cal_mode && tot != '1) tot <= tot + 1'b1;
      else                                tot_done <= 1'b1;
    end

  logic meas_done;
  assign meas_done = eoc & tot_done;
  assign dco0_en   = started & ~meas_done;
  assign dco1_en   = stop & ~eoc;

  // ---------------- result ----------------
  logic [N0_W-1:0] crs_full;
  assign crs_full    = (n0 > N0_W'(n1)) ? n0 - N0_W'(n1) : '0;
  assign word.tot    = tot;
  assign word.coarse = (crs_full > N0_W'((1 << CRS_W) - 1)) ? '1 : crs_full[CRS_W-1:0];
  assign word.fine   = n1;

  // ---------------- clk160 domain control ----------------
  logic [1:0] st_sync, dn_sync;
  logic [7:0] dead_cnt;

  always_ff @(posedge clk160 or negedge rst_n)
    if (!rst_n) begin
      st_sync <= '0; dn_sync <= '0;
    end else if (clr_q) begin
      st_sync <= '0; dn_sync <= '0;
    end else begin
      st_sync <= {st_sync[0], started};
      dn_sync <= {dn_sync[0], meas_done};
    end

  always_ff @(posedge clk160 or negedge rst_n)
    if (!rst_n) begin
      state <= S_INIT; clr_q <= 1'b0; cal_q <= 1'b0; dead_cnt <= '0; armed <= 1'b0;
    end else begin
      clr_q <= 1'b0;
      case (state)
        S_IDLE: begin
          armed <= !cal_mode;
          dead_cnt <= '0;
          if (cal_mode && cal_trig) begin
            cal_q <= 1'b1; armed <= 1'b0; state <= S_BUSY;
          end else if (st_sync[1]) begin
            armed <= 1'b0; state <= S_BUSY;
          end
        end
        S_BUSY: begin
          armed <= 1'b0;
          if (dead_cnt != 8'hFF) dead_cnt <= dead_cnt + 1'b1;
          if (dn_sync[1] && (cal_mode || int'(dead_cnt) >= DEAD_CYCLES - 3))
            state <= S_VALID;
        end
        S_VALID: if (ack) begin
          state <= S_CLEAR; clr_q <= 1'b1; cal_q <= 1'b0;
        end
        S_INIT: begin                // clear pulse after reset
          state <= S_CLEAR; clr_q <= 1'b1;
        end
        default: state <= S_IDLE;   // S_CLEAR: one cycle for clr_q to act
      endcase
    end

  assign valid = (state == S_VALID);
  assign busy  = (state != S_IDLE) | hit_q;

endmodule
