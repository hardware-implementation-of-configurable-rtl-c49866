// cbem_ma: Moving Average process.
//
// Forecasts the next period as the mean of the last N observations,
// MA_{t+1} = (D_t + D_{t-1} + ... + D_{t-N+1}) / N, with N = cfg_n + 1
// (register value 19 gives the N of 20 used by the reference design).
// The last MAX_N observations sit in a circular window; a running sum is
// updated by adding D_t and subtracting the observation it overwrites, and
// a serial divider divides the sum by N. Periods before the window has
// filled count as zero traffic. When the host changes N the window is
// emptied and refilled, starting with the observation that arrives next.
//
// Timing: `sample_valid` loads the window in one clock and starts the
// divider; `result_valid` pulses SUM_W + 2 clocks after `sample_valid`
// with `result` = floor(sum / N). Observations must be at least that far
// apart (an assertion checks it); measurement periods are millions of
// cycles long. Equation (1) is the reference design's; the window
// organisation, the divider, the truncating division and the refill on a
// change of N are this design's choices.
module cbem_ma #(
  parameter int unsigned CNT_W  = cbem_pkg::CNT_W,
  parameter int unsigned N_W    = cbem_pkg::MA_N_W,
  parameter int unsigned MAX_N  = 2 ** N_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_W-1:0]   cfg_n,         // N - 1
  input  logic             sample_valid,
  input  logic [CNT_W-1:0] sample,
  output logic             busy,
  output logic             result_valid,
  output logic [CNT_W-1:0] result
);

  localparam int unsigned SUM_W = CNT_W + N_W;
  localparam int unsigned AW    = N_W;

  logic [CNT_W-1:0] win_q [MAX_N];
  logic [AW-1:0]    wp_q;
  logic [N_W-1:0]   n_used_q;
  logic             primed_q;        // window holds observations taken with n_used_q
  logic [SUM_W-1:0] sum_q;

  logic             restart;
  logic [SUM_W-1:0] sum_next;
  logic [AW-1:0]    wp_next, wp_base;

  always_comb begin
    restart  = !primed_q || (cfg_n != n_used_q);
    wp_base  = restart ? '0 : wp_q;
    if (restart) sum_next = SUM_W'(sample);
    else         sum_next = sum_q + SUM_W'(sample) - SUM_W'(win_q[wp_q]);
    wp_next  = (wp_base == AW'(cfg_n)) ? '0 : wp_base + 1'b1;
  end

  // Divider
  logic             div_start, div_busy, div_done;
  logic [SUM_W-1:0] div_q;
  logic [N_W:0]     div_rem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(MAX_N); i++) win_q[i] <= '0;
      wp_q      <= '0;
      n_used_q  <= '0;
      primed_q  <= 1'b0;
      sum_q     <= '0;
      div_start <= 1'b0;
    end else begin
      div_start <= 1'b0;
      if (sample_valid) begin
        if (restart)
          for (int i = 0; i < int'(MAX_N); i++) win_q[i] <= '0;
        win_q[wp_base] <= sample;
        wp_q      <= wp_next;
        n_used_q  <= cfg_n;
        primed_q  <= 1'b1;
        sum_q     <= sum_next;
        div_start <= 1'b1;
      end
    end
  end

  // The divisor is the N the window was filled with.
  cbem_div #(.NUM_W(SUM_W), .DEN_W(N_W + 1)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (div_start),
    .dividend (sum_q),
    .divisor  ({1'b0, n_used_q} + 1'b1),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q),
    .remainder(div_rem)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result_valid <= 1'b0;
      result       <= '0;
    end else begin
      result_valid <= div_done;
      if (div_done) result <= CNT_W'(div_q);  // sum / N never exceeds the largest observation
    end
  end

  assign busy = div_start || div_busy || result_valid;

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) sample_valid |-> !busy)
    else $error("cbem_ma: observation arrived while the previous one was still being divided");

endmodule
