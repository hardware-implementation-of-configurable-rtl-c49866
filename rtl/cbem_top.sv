// cbem_top: Configurable Bandwidth Estimation Module (CBEM), FPGA logic.
//
// Measures the bandwidth of one stream of captured Ethernet packets and
// forecasts it for the next measurement period with two estimators that run
// side by side: a simple moving average over N periods and exponential
// smoothing with weight alpha. A configuration switch (`cfg_mode`) selects
// which forecast is handed to the traffic conditioner (marker and
// policer/shaper) on `est_rate`; both results, and an interrupt, go to the
// host. Data path:
//
//   pkt_valid/pkt_len -> packet FIFO -> FIFO read process (bytes per period)
//        -> Moving Average process      -+-> Interrupt Generation -> irq, ma_out, es_out
//        -> Exponential Smoothing proc. -+-> configuration switch -> est_rate
//
// All rates are in bytes per measurement period; a rate in bit/s is
// value * 8 / ((cfg_period + 1) * 0.1 s). Configuration registers hold
// value - 1 (see cbem_pkg). `est_valid` pulses one clock after the chosen
// estimator's result; `irq` rises one clock after both results are in,
// about 50 clocks after a period ends, and stays high until `irq_ack`.
// The block structure follows the reference design's functional diagram;
// the packet-record interface, the units and the host-side handshake are
// this design's choices.
module cbem_top #(
  parameter int unsigned UNIT_CYCLES = cbem_pkg::UNIT_CYCLES_DEF,
  parameter int unsigned FIFO_DEPTH  = 64,
  parameter int unsigned CNT_W       = cbem_pkg::CNT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // packet records from the MAC side
  input  logic                       pkt_valid,
  input  logic [cbem_pkg::LEN_W-1:0] pkt_len,
  output logic                       pkt_full,
  output logic [15:0]                pkt_drop_cnt,
  // host configuration
  input  logic [cbem_pkg::PE_W-1:0]   cfg_period,   // period = (value + 1) * 0.1 s
  input  logic [cbem_pkg::MA_N_W-1:0] cfg_ma_n,     // N = value + 1
  input  logic [cbem_pkg::ES_A_W-1:0] cfg_es_alpha, // alpha = (value + 1) / 100
  input  cbem_pkg::est_mode_e         cfg_mode,
  // observation of the period just ended
  output logic                       obs_valid,
  output logic [CNT_W-1:0]           obs_bytes,
  // host results
  output logic                       irq,
  input  logic                       irq_ack,
  output logic [CNT_W-1:0]           ma_out,
  output logic [CNT_W-1:0]           es_out,
  output logic                       sat_out,
  output logic [15:0]                period_cnt,
  output logic                       overrun,
  // traffic estimation towards marker and policer/shaper
  output logic                       est_valid,
  output logic [CNT_W-1:0]           est_rate
);

  import cbem_pkg::*;

  logic             fifo_empty, fifo_rd, fifo_drop;
  logic [LEN_W-1:0] fifo_len;
  logic             obs_sat;
  logic             ma_busy, ma_valid, es_busy, es_valid;
  logic [CNT_W-1:0] ma_result, es_result;
  logic [CNT_W+ES_FRAC-1:0] es_forecast;

  cbem_pkt_fifo #(.LEN_W(LEN_W), .DEPTH(FIFO_DEPTH), .DROP_W(16)) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (pkt_valid),
    .wr_len   (pkt_len),
    .full     (pkt_full),
    .rd_en    (fifo_rd),
    .rd_len   (fifo_len),
    .empty    (fifo_empty),
    .drop     (fifo_drop),
    .drop_cnt (pkt_drop_cnt)
  );

  cbem_fifo_read #(.LEN_W(LEN_W), .CNT_W(CNT_W), .PE_W(PE_W), .UNIT_CYCLES(UNIT_CYCLES)) u_read (
    .clk          (clk),
    .rst_n        (rst_n),
    .cfg_period   (cfg_period),
    .fifo_empty   (fifo_empty),
    .fifo_len     (fifo_len),
    .fifo_rd      (fifo_rd),
    .sample_valid (obs_valid),
    .sample       (obs_bytes),
    .sample_sat   (obs_sat)
  );

  cbem_ma #(.CNT_W(CNT_W), .N_W(MA_N_W)) u_ma (
    .clk          (clk),
    .rst_n        (rst_n),
    .cfg_n        (cfg_ma_n),
    .sample_valid (obs_valid),
    .sample       (obs_bytes),
    .busy         (ma_busy),
    .result_valid (ma_valid),
    .result       (ma_result)
  );

  cbem_es #(.CNT_W(CNT_W), .A_W(ES_A_W), .FRAC(ES_FRAC)) u_es (
    .clk          (clk),
    .rst_n        (rst_n),
    .cfg_alpha    (cfg_es_alpha),
    .sample_valid (obs_valid),
    .sample       (obs_bytes),
    .busy         (es_busy),
    .result_valid (es_valid),
    .result       (es_result),
    .forecast     (es_forecast)
  );

  cbem_irq_gen #(.CNT_W(CNT_W), .PCNT_W(16)) u_irq (
    .clk        (clk),
    .rst_n      (rst_n),
    .ma_valid   (ma_valid),
    .ma_result  (ma_result),
    .es_valid   (es_valid),
    .es_result  (es_result),
    .sat_in     (obs_sat),
    .irq_ack    (irq_ack),
    .irq        (irq),
    .ma_out     (ma_out),
    .es_out     (es_out),
    .sat_out    (sat_out),
    .period_cnt (period_cnt),
    .overrun    (overrun)
  );

  // Configuration switch: the selected estimator's newest result drives the
  // traffic-estimation output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est_valid <= 1'b0;
      est_rate  <= '0;
    end else begin
      est_valid <= (cfg_mode == MODE_MA) ? ma_valid : es_valid;
      if (cfg_mode == MODE_MA && ma_valid) est_rate <= ma_result;
      if (cfg_mode == MODE_ES && es_valid) est_rate <= es_result;
    end
  end

endmodule
