// tb_cbem_fig9_workload: the reference measurement setting on bursty traffic.
//
// Settings: period register 4 (0.5 s), MA register 19 (N = 20), ES register
// 9 (alpha = 0.10), as in the reference board test, over 100 periods (50 s).
// Traffic: idle, with four bursts at about 8 Mbit/s lasting 2.5 s, 2 s,
// 2 s and 0.5 s, starting at 6 s, 13.5 s, 28 s and 35.5 s.
//
// The time axis is compressed: the period unit is 1,000 clocks instead of
// 5,000,000, so one 0.5 s period is 5,000 clocks. The byte counts are those
// of the real time scale: a burst period carries 500 packets of 1,000 bytes,
// which is 500,000 bytes or 8 Mbit/s over 0.5 s. Every period's count, MA
// and ES result is checked against models in this testbench. The peaks
// (in bit/s) of the actual rate and of the two estimates are printed for each
// burst. ES must react faster than MA in the first burst period, and MA must
// fall back to exactly zero 20 idle periods after the last burst.
module tb_cbem_fig9_workload;
  localparam int U       = 1000;
  localparam int PERIOD  = 5 * U;
  localparam int NPER    = 100;

  logic clk = 0, rst_n = 0;
  logic pkt_valid = 0;
  logic [15:0] pkt_len = 16'd1000;
  logic pkt_full;
  logic [15:0] pkt_drop_cnt;
  logic [7:0] cfg_period = 8'd4;
  logic [4:0] cfg_ma_n = 5'd19;
  logic [6:0] cfg_es_alpha = 7'd9;
  cbem_pkg::est_mode_e cfg_mode = cbem_pkg::MODE_ES;
  logic obs_valid;
  logic [31:0] obs_bytes;
  logic irq, irq_ack = 0;
  logic [31:0] ma_out, es_out, est_rate;
  logic sat_out, overrun, est_valid;
  logic [15:0] period_cnt;

  cbem_top #(.UNIT_CYCLES(U)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Burst periods: [12,17) [27,31) [56,60) [71,72)
  function automatic bit in_burst(int p);
    return (p >= 12 && p < 17) || (p >= 27 && p < 31) || (p >= 56 && p < 60) || (p == 71);
  endfunction

  // Source: one 1000-byte packet every 10 clocks during burst periods,
  // placed away from the period edges.
  longint cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    pkt_valid <= in_burst(int'(cyc / PERIOD)) && (cyc % 10) == 3;
  end

  // Models
  longint hist[$];
  longint f_fix = 0;
  longint exp_d[$], exp_ma[$], exp_es[$];

  initial begin
    for (int p = 0; p < NPER; p++) begin
      longint d, s;
      d = in_burst(p) ? 500_000 : 0;
      s = 0;
      hist.push_back(d);
      for (int i = 0; i < 20; i++) if (hist.size() > i) s += hist[hist.size() - 1 - i];
      f_fix = (10 * (d << 8) + 90 * f_fix) / 100;
      exp_d.push_back(d);
      exp_ma.push_back(s / 20);
      exp_es.push_back(f_fix >> 8);
    end
  end

  function automatic longint bps(longint bytes_per_period);
    return bytes_per_period * 8 * 2;   // 0.5 s periods
  endfunction

  longint pk_d = 0, pk_ma = 0, pk_es = 0;
  int burst_no = 0;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p < NPER; p++) begin
      @(posedge irq);
      @(negedge clk);
      check(obs_bytes == 32'(exp_d[p]), $sformatf("bytes in period %0d: %0d", p, obs_bytes));
      check(ma_out == 32'(exp_ma[p]), "MA result");
      check(es_out == 32'(exp_es[p]), "ES result");
      check(est_rate == 32'(exp_es[p]), "estimate output");
      check(!overrun, "no overrun");
      if (p == 12)
        check(es_out > ma_out, "ES reacts faster than MA at the first burst");
      if (bps(obs_bytes) > pk_d) pk_d = bps(obs_bytes);
      if (bps(ma_out) > pk_ma) pk_ma = bps(ma_out);
      if (bps(es_out) > pk_es) pk_es = bps(es_out);
      if (!in_burst(p) && p > 0 && in_burst(p - 1)) begin
        burst_no++;
        $display("burst %0d: actual %0d bit/s, MA peak %0d bit/s, ES peak %0d bit/s",
                 burst_no, pk_d, pk_ma, pk_es);
        pk_d = 0; pk_ma = 0; pk_es = 0;
      end
      if (p == 71 + 20) check(ma_out == 0, "MA back to zero 20 periods after the last burst");
      irq_ack = 1;
      @(negedge clk);
      irq_ack = 0;
    end
    check(burst_no == 4, "four bursts seen");
    check(period_cnt == 16'(NPER), "period count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPER * PERIOD + 10 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
