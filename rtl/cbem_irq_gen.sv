// cbem_irq_gen: Interrupt Generation process.
//
// Collects the MA and ES results of one measurement period, which finish at
// different clocks, and when both are in copies them to the host-visible
// result registers and raises the level interrupt `irq`. The host reads
// `ma_out`, `es_out`, `sat_out` and `period_cnt` and pulses `irq_ack`,
// which drops `irq`. If the next pair completes before the acknowledge the
// registers are overwritten with the newer pair, `irq` stays high and the
// sticky `overrun` flag is set; `overrun` clears with an acknowledge.
// A new pair arriving in the same clock as `irq_ack` wins over it.
// The reference design names this process and shows it fed by the two
// estimators; the level interrupt, the acknowledge and the overrun flag
// are this design's choices.
module cbem_irq_gen #(
  parameter int unsigned CNT_W = cbem_pkg::CNT_W,
  parameter int unsigned PCNT_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ma_valid,
  input  logic [CNT_W-1:0]  ma_result,
  input  logic              es_valid,
  input  logic [CNT_W-1:0]  es_result,
  input  logic              sat_in,        // the period's observation saturated
  input  logic              irq_ack,
  output logic              irq,
  output logic [CNT_W-1:0]  ma_out,
  output logic [CNT_W-1:0]  es_out,
  output logic              sat_out,
  output logic [PCNT_W-1:0] period_cnt,    // pairs delivered since reset (wraps)
  output logic              overrun
);

  logic             ma_have_q, es_have_q;
  logic [CNT_W-1:0] ma_hold_q, es_hold_q;
  logic             ma_have, es_have, pair_done;
  logic [CNT_W-1:0] ma_now, es_now;

  always_comb begin
    ma_have   = ma_have_q || ma_valid;
    es_have   = es_have_q || es_valid;
    ma_now    = ma_valid ? ma_result : ma_hold_q;
    es_now    = es_valid ? es_result : es_hold_q;
    pair_done = ma_have && es_have;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ma_have_q  <= 1'b0;
      es_have_q  <= 1'b0;
      ma_hold_q  <= '0;
      es_hold_q  <= '0;
      irq        <= 1'b0;
      ma_out     <= '0;
      es_out     <= '0;
      sat_out    <= 1'b0;
      period_cnt <= '0;
      overrun    <= 1'b0;
    end else begin
      if (ma_valid) ma_hold_q <= ma_result;
      if (es_valid) es_hold_q <= es_result;
      if (pair_done) begin
        ma_have_q  <= 1'b0;
        es_have_q  <= 1'b0;
        ma_out     <= ma_now;
        es_out     <= es_now;
        sat_out    <= sat_in;
        period_cnt <= period_cnt + 1'b1;
        irq        <= 1'b1;
        overrun    <= (irq && !irq_ack) || (overrun && !irq_ack);
      end else begin
        ma_have_q <= ma_have;
        es_have_q <= es_have;
        if (irq_ack) begin
          irq     <= 1'b0;
          overrun <= 1'b0;
        end
      end
    end
  end

  // A second result of the same kind before the pair completes means the
  // two estimators lost step.
  a_ma_once: assert property (@(posedge clk) disable iff (!rst_n) ma_valid |-> !ma_have_q);
  a_es_once: assert property (@(posedge clk) disable iff (!rst_n) es_valid |-> !es_have_q);

endmodule
