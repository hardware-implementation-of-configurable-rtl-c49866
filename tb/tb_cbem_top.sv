// tb_cbem_top: end-to-end test of the bandwidth estimation module.
//
// A random packet source feeds the module while a host process services the
// interrupt. Independent models predict, per measurement period, the byte
// count (a packet written in one clock is counted in the period of the next
// clock, when the read process pops it), the moving average over the newest
// N counts and the fixed-point exponential smoothing forecast. The host
// checks every delivered pair, the period counter and the overrun flag; a
// monitor checks the traffic-estimation output against the mode selected.
//
// Short periods (UNIT_CYCLES = 100) and a 20-bit count keep the run short.
// Phases: reference settings (N = 20, alpha = 0.10), a change of N that
// restarts the window, a change of alpha, a switch of the output mode, a
// change of the period, a late acknowledge (overrun) and a line-rate burst
// that saturates the count. Each mechanism is counted and must occur.
module tb_cbem_top;
  localparam int U     = 100;
  localparam int CNT_W = 20;
  localparam int FRAC  = 8;
  localparam longint CMAX = (64'd1 << CNT_W) - 1;

  logic clk = 0, rst_n = 0;
  logic pkt_valid = 0;
  logic [15:0] pkt_len = '0;
  logic pkt_full;
  logic [15:0] pkt_drop_cnt;
  logic [7:0] cfg_period = 8'd0;
  logic [4:0] cfg_ma_n = 5'd19;
  logic [6:0] cfg_es_alpha = 7'd9;
  cbem_pkg::est_mode_e cfg_mode = cbem_pkg::MODE_MA;
  logic obs_valid;
  logic [CNT_W-1:0] obs_bytes;
  logic irq, irq_ack = 0;
  logic [CNT_W-1:0] ma_out, es_out, est_rate;
  logic sat_out, overrun, est_valid;
  logic [15:0] period_cnt;

  cbem_top #(.UNIT_CYCLES(U), .FIFO_DEPTH(16), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Mechanism counters
  int n_periods = 0, n_irq = 0, n_ack = 0, n_overrun = 0, n_restart = 0;
  int n_alpha_change = 0, n_est_ma = 0, n_est_es = 0, n_period_change = 0, n_sat = 0;

  // ---------------- traffic source ----------------
  int load_pct = 30;       // chance of a packet per clock, in percent
  bit line_rate = 0;       // back-to-back maximum-size packets
  always @(posedge clk) begin
    #1;
    if (line_rate) begin
      pkt_valid <= 1; pkt_len <= 16'd1518;
    end else begin
      pkt_valid <= $urandom_range(0, 99) < load_pct;
      pkt_len   <= 16'($urandom_range(0, 9) == 0 ? $urandom_range(1000, 1518) : $urandom_range(64, 300));
    end
  end

  // ---------------- period model ----------------
  longint acc = 0, pend = 0, in_period = 0;
  bit     exp_obs_pulse = 0;
  longint exp_obs = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      acc = 0; pend = 0; in_period = 0; exp_obs_pulse = 0;
    end else begin
      acc += pend;
      pend = pkt_valid ? pkt_len : 0;
      in_period++;
      exp_obs_pulse = in_period == longint'(U) * (cfg_period + 1);
      if (exp_obs_pulse) begin
        exp_obs = acc;
        acc = 0;
        in_period = 0;
      end
    end
  end

  // ---------------- estimator models ----------------
  longint hist[$];
  logic [127:0] f_fix = '0;
  longint exp_ma[$], exp_es[$];   // indexed by period number - 1
  bit     exp_sat[$];
  int     n_used = 20;

  function automatic longint ma_model(int n);
    longint s = 0;
    for (int i = 0; i < n; i++)
      if (hist.size() > i) s += hist[hist.size() - 1 - i];
    return s / n;
  endfunction

  always @(negedge clk) if (rst_n) begin
    check(obs_valid == exp_obs_pulse, "period end at the predicted clock");
    if (exp_obs_pulse) begin
      longint d;
      int a;
      n_periods++;
      d = (exp_obs > CMAX) ? CMAX : exp_obs;
      check(obs_bytes == CNT_W'(d), "bytes in period");
      if (exp_obs > CMAX) n_sat++;
      if (cfg_ma_n + 1 != n_used) begin
        hist.delete();
        n_used = cfg_ma_n + 1;
        n_restart++;
      end
      hist.push_back(d);
      exp_ma.push_back(ma_model(n_used));
      a = (cfg_es_alpha > 99) ? 100 : cfg_es_alpha + 1;
      f_fix = (128'(a) * (128'(d) << FRAC) + 128'(100 - a) * f_fix) / 128'd100;
      exp_es.push_back(longint'(f_fix >> FRAC));
      exp_sat.push_back(exp_obs > CMAX);
    end
  end

  // ---------------- traffic-estimation output ----------------
  always @(negedge clk) if (rst_n && est_valid) begin
    if (cfg_mode == cbem_pkg::MODE_MA) begin
      check(est_rate == CNT_W'(exp_ma[exp_ma.size() - 1]), "estimate output in MA mode");
      n_est_ma++;
    end else begin
      check(est_rate == CNT_W'(exp_es[exp_es.size() - 1]), "estimate output in ES mode");
      n_est_es++;
    end
  end

  // ---------------- host ----------------
  int seen = 0;
  bit skip_ack = 0;        // leave the next interrupt unacknowledged
  bit unacked = 0;

  task automatic host_period();
    int guard = 0;
    while (int'(period_cnt) == seen && guard < 10000) begin
      @(negedge clk);
      guard++;
    end
    check(guard < 10000, "interrupt arrives");
    seen++;
    check(int'(period_cnt) == seen, "one pair per period");
    check(irq, "interrupt raised");
    n_irq++;
    check(ma_out == CNT_W'(exp_ma[seen-1]), "MA result to host");
    check(es_out == CNT_W'(exp_es[seen-1]), "ES result to host");
    check(sat_out == exp_sat[seen-1], "saturation flag to host");
    check(overrun == unacked, "overrun flag");
    if (overrun) n_overrun++;
    if (skip_ack) begin
      unacked = 1;
      skip_ack = 0;
    end else begin
      repeat ($urandom_range(1, 8)) @(negedge clk);
      irq_ack = 1;
      @(negedge clk);
      irq_ack = 0;
      check(!irq && !overrun, "acknowledge clears interrupt and overrun");
      n_ack++;
      unacked = 0;
    end
  endtask

  task automatic run_periods(input int k);
    for (int i = 0; i < k; i++) host_period();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    // Reference settings: N = 20, alpha = 0.10, MA drives the output
    run_periods(25);
    // Window restart: N = 4
    cfg_ma_n = 5'd3;
    run_periods(8);
    // alpha = 0.30
    cfg_es_alpha = 7'd29; n_alpha_change++;
    run_periods(6);
    // Switch the configuration to exponential smoothing
    cfg_mode = cbem_pkg::MODE_ES;
    run_periods(6);
    // Late acknowledge: the next pair overruns the unread one
    skip_ack = 1;
    run_periods(3);
    // Longer period, changed right after a period ended
    @(posedge obs_valid); @(negedge clk);
    cfg_period = 8'd7; n_period_change++;
    run_periods(1);   // the period that was already running at the change
    line_rate = 1;
    run_periods(3);
    line_rate = 0;
    cfg_mode = cbem_pkg::MODE_MA;
    run_periods(3);
    check(n_periods >= seen && seen == 55, "periods delivered");
    check(pkt_drop_cnt == 0 && !pkt_full, "FIFO keeps up with the line");
    $display("periods=%0d irq=%0d ack=%0d overrun=%0d restart=%0d alpha_change=%0d est_ma=%0d est_es=%0d period_change=%0d saturated=%0d",
             n_periods, n_irq, n_ack, n_overrun, n_restart, n_alpha_change, n_est_ma, n_est_es, n_period_change, n_sat);
    check(n_irq > 0 && n_ack > 0, "interrupt and acknowledge exercised");
    check(n_overrun > 0, "overrun exercised");
    check(n_restart > 0, "MA window restart exercised");
    check(n_alpha_change > 0, "alpha change exercised");
    check(n_est_ma > 0 && n_est_es > 0, "both output modes exercised");
    check(n_period_change > 0, "period change exercised");
    check(n_sat > 0, "count saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
