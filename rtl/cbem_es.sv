// cbem_es: Exponential Smoothing process.
//
// Forecasts the next period as F_{t+1} = alpha * D_t + (1 - alpha) * F_t,
// with alpha = (cfg_alpha + 1) / 100 (register value 9 gives the alpha of
// 0.10 used by the reference design; values above 99 act as 99, alpha = 1).
// The forecast is kept with FRAC fraction bits so that small alphas do not
// stall it:
//   F' = floor(((a * D_t << FRAC) + (100 - a) * F) / 100),  a = cfg_alpha + 1,
// computed with two multiplications and a serial division by 100. `result`
// is the integer part of F'. The forecast starts at zero after reset; a
// change of alpha takes effect with the next observation.
//
// Timing: `result_valid` pulses NUM_W + 2 clocks after `sample_valid`
// (NUM_W = CNT_W + FRAC + 7). Observations must be at least that far apart
// (an assertion checks it). Equation (2) is the reference design's; the
// alpha encoding in hundredths, the fixed-point forecast and the zero start
// are this design's choices.
module cbem_es #(
  parameter int unsigned CNT_W = cbem_pkg::CNT_W,
  parameter int unsigned A_W   = cbem_pkg::ES_A_W,
  parameter int unsigned FRAC  = cbem_pkg::ES_FRAC
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [A_W-1:0]   cfg_alpha,     // alpha * 100 - 1
  input  logic             sample_valid,
  input  logic [CNT_W-1:0] sample,
  output logic             busy,
  output logic             result_valid,
  output logic [CNT_W-1:0] result,
  output logic [CNT_W+FRAC-1:0] forecast   // F with FRAC fraction bits
);

  import cbem_pkg::ES_A_MAX;
  import cbem_pkg::ES_SCALE;

  localparam int unsigned F_W   = CNT_W + FRAC;
  localparam int unsigned NUM_W = F_W + 7;      // 100 * F fits in F_W + 7 bits

  logic [6:0]       a_w, b_w;                   // alpha and 1 - alpha in hundredths
  logic [NUM_W-1:0] num;
  logic [NUM_W-1:0] num_q;
  logic             div_start, div_busy, div_done;
  logic [NUM_W-1:0] div_q;
  logic [6:0]       div_rem;

  always_comb begin
    if (cfg_alpha > A_W'(ES_A_MAX)) a_w = 7'(ES_SCALE);
    else                            a_w = 7'(cfg_alpha) + 7'd1;
    b_w = 7'(ES_SCALE) - a_w;
    num = NUM_W'(a_w) * NUM_W'({sample, FRAC'(0)}) + NUM_W'(b_w) * NUM_W'(forecast);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num_q     <= '0;
      div_start <= 1'b0;
    end else begin
      div_start <= sample_valid;
      if (sample_valid) num_q <= num;
    end
  end

  cbem_div #(.NUM_W(NUM_W), .DEN_W(7)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (div_start),
    .dividend (num_q),
    .divisor  (7'(ES_SCALE)),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q),
    .remainder(div_rem)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      forecast     <= '0;
      result_valid <= 1'b0;
      result       <= '0;
    end else begin
      result_valid <= div_done;
      if (div_done) begin
        // A weighted mean of values that fit F_W bits fits F_W bits.
        forecast <= F_W'(div_q);
        result   <= div_q[F_W-1:FRAC];
      end
    end
  end

  assign busy = div_start || div_busy || result_valid;

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) sample_valid |-> !busy)
    else $error("cbem_es: observation arrived while the previous one was still being divided");

endmodule
