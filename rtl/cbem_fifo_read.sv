// cbem_fifo_read: FIFO read process with the measurement-period timer.
//
// Pops one packet record per cycle whenever the packet FIFO is not empty
// and adds its length to the byte count of the current measurement period.
// A free-running prescaler marks one period unit every UNIT_CYCLES clocks
// (0.1 s at the 50 MHz board clock); a period lasts (cfg_period + 1) units,
// so register value 4 gives 0.5 s. At the last clock of a period the
// finished count, including a packet popped in that same clock, is
// presented as the observation D_t on `sample` with a one-cycle
// `sample_valid` pulse, and counting restarts from zero. The count
// saturates at all ones; `sample_sat` marks a saturated observation.
// The reference design names this process and shows the period setting
// on the host display; the per-packet byte counting, the prescaler and the
// saturation are this design's choices.
module cbem_fifo_read #(
  parameter int unsigned LEN_W       = cbem_pkg::LEN_W,
  parameter int unsigned CNT_W       = cbem_pkg::CNT_W,
  parameter int unsigned PE_W        = cbem_pkg::PE_W,
  parameter int unsigned UNIT_CYCLES = cbem_pkg::UNIT_CYCLES_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PE_W-1:0]  cfg_period,     // period = (cfg_period + 1) units
  // FIFO side
  input  logic             fifo_empty,
  input  logic [LEN_W-1:0] fifo_len,
  output logic             fifo_rd,
  // observation output
  output logic             sample_valid,
  output logic [CNT_W-1:0] sample,
  output logic             sample_sat
);

  localparam int unsigned PS_W = (UNIT_CYCLES > 1) ? $clog2(UNIT_CYCLES) : 1;

  logic [PS_W-1:0]  ps_q;        // clocks within the current unit
  logic [PE_W-1:0]  unit_q;      // units within the current period
  logic [CNT_W-1:0] bytes_q;
  logic             sat_q;

  logic             unit_end, period_end;
  logic [CNT_W:0]   bytes_sum;
  logic [CNT_W-1:0] bytes_next;
  logic             sat_next;

  always_comb begin
    fifo_rd    = !fifo_empty;
    unit_end   = ps_q == PS_W'(UNIT_CYCLES - 1);
    // ">=" keeps the timer sane when the host lowers the period mid-way.
    period_end = unit_end && (unit_q >= cfg_period);
    bytes_sum  = {1'b0, bytes_q} + (fifo_rd ? (CNT_W+1)'(fifo_len) : '0);
    sat_next   = sat_q || bytes_sum[CNT_W];
    bytes_next = bytes_sum[CNT_W] ? '1 : bytes_sum[CNT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps_q         <= '0;
      unit_q       <= '0;
      bytes_q      <= '0;
      sat_q        <= 1'b0;
      sample_valid <= 1'b0;
      sample       <= '0;
      sample_sat   <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      ps_q <= unit_end ? '0 : ps_q + 1'b1;
      if (unit_end) unit_q <= period_end ? '0 : unit_q + 1'b1;
      if (period_end) begin
        sample_valid <= 1'b1;
        sample       <= bytes_next;
        sample_sat   <= sat_next;
        bytes_q      <= '0;
        sat_q        <= 1'b0;
      end else begin
        bytes_q <= bytes_next;
        sat_q   <= sat_next;
      end
    end
  end

endmodule
