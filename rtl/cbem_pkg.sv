// cbem_pkg: shared constants and types of the Configurable Bandwidth
// Estimation Module (CBEM).
//
// The estimator turns a stream of captured Ethernet packet lengths into one
// byte count per measurement period (the observation D_t) and forecasts the
// next period's traffic with either a simple moving average over N periods
// or exponential smoothing with weight alpha. Every configuration register
// holds its value minus one, as the host display of the reference board
// shows them: period register 4 = 0.5 s, MA register 19 = N of 20,
// ES register 9 = alpha of 0.10. The period unit of 0.1 s, the alpha
// step of 0.01 and all widths are this design's choices.
package cbem_pkg;

  // Board oscillator is 50 MHz; one period unit is 0.1 s.
  localparam int unsigned CLK_HZ          = 50_000_000;
  localparam int unsigned UNIT_CYCLES_DEF = CLK_HZ / 10;

  localparam int unsigned PE_W     = 8;    // period register, period = (PE+1) * 0.1 s
  localparam int unsigned MA_N_W   = 5;    // MA register, N = value + 1, so N <= 32
  localparam int unsigned ES_A_W   = 7;    // ES register, alpha = (value + 1) / 100
  localparam int unsigned ES_A_MAX = 99;   // register values above 99 act as 99 (alpha = 1.00)
  localparam int unsigned ES_SCALE = 100;  // alpha denominator

  localparam int unsigned LEN_W    = 16;   // packet length field in bytes
  localparam int unsigned CNT_W    = 32;   // bytes per period
  localparam int unsigned ES_FRAC  = 8;    // fraction bits kept in the ES forecast

  // Which forecast drives the traffic-estimation output towards the marker
  // and the policer/shaper (the configuration switch).
  typedef enum logic {
    MODE_MA = 1'b0,
    MODE_ES = 1'b1
  } est_mode_e;

endpackage
