`timescale 1ps/1fs
// Shared widths and types of the pixel read-out chip.
//
// The TDC word of one hit is 23 bits: time over threshold (8 bits, in DCO_0
// periods), coarse interval (6 bits, whole DCO_0 periods) and Vernier fine
// count (9 bits). The periphery appends a 9-bit bunch-crossing timestamp,
// and the read-out tree prefixes the 8-bit pixel address, giving the 40-bit
// word that the FIFOs hold and the framer sends as five bytes.
// The 23/9/8/40-bit sizes follow the document; the split of the 23-bit TDC
// word into its three fields is this design's choice.
package tsp_pkg;

  localparam int TDC_W  = 23;
  localparam int TOT_W  = 8;
  localparam int CRS_W  = 6;
  localparam int FINE_W = 9;
  localparam int TS_W   = 9;
  localparam int HIT_W  = TDC_W + TS_W;   // 32: TDC word plus timestamp
  localparam int ADDR_W = 8;
  localparam int WORD_W = ADDR_W + HIT_W; // 40: FIFO word

  typedef struct packed {
    logic [TOT_W-1:0]  tot;
    logic [CRS_W-1:0]  coarse;
    logic [FINE_W-1:0] fine;
  } tdc_word_t;

  typedef struct packed {
    tdc_word_t         tdc;
    logic [TS_W-1:0]   ts;
  } hit_t;

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    hit_t              hit;
  } rot_word_t;

  // DCO resolution regimes (calibration targets)
  typedef enum logic [1:0] {
    RES_HIGH    = 2'd0,
    RES_MIDHIGH = 2'd1,
    RES_MIDLOW  = 2'd2,
    RES_LOW     = 2'd3
  } res_regime_t;

  // Configuration written over I2C
  typedef struct packed {
    logic [7:0]  header;
    logic [7:0]  idle;
    res_regime_t regime;
    logic        cal_start;
    logic [3:0][7:0] dac_code;
  } cfg_t;

endpackage
