// tb_cbem_alpha_sweep: bursty UDP-like traffic against three weightings.
//
// Four on/off flows share the link. In any period a flow is silent, or with
// probability 0.8 % it sends a burst at 8 Mbit/s peak, which gives a mean of
// 64 kbit/s per flow. Periods are 1 ms (one burst period = 1,000 bytes) and
// the time axis is compressed to 200 clocks per period. The same traffic
// drives three copies of the module with alpha = 0.10, 0.20 and 0.30, all with
// N = 20. Every period's count, MA and ES results are checked against
// models in this testbench. Then the peaks are compared: a larger alpha must
// give a higher ES peak (it follows bursts more closely), and the MA peak
// (N = 20) must stay below all of them.
module tb_cbem_alpha_sweep;
  localparam int U      = 200;
  localparam int NPER   = 1500;
  localparam int NCFG   = 3;

  logic clk = 0, rst_n = 0;
  logic pkt_valid = 0;
  logic [15:0] pkt_len = 16'd1000;
  logic [6:0] alpha_reg [NCFG] = '{7'd9, 7'd19, 7'd29};

  logic        obs_valid [NCFG];
  logic [31:0] obs_bytes [NCFG];
  logic        irq [NCFG];
  logic [31:0] ma_out [NCFG], es_out [NCFG], est_rate [NCFG];
  logic        sat_out [NCFG], overrun [NCFG], est_valid [NCFG], pkt_full [NCFG];
  logic [15:0] period_cnt [NCFG], drop_cnt [NCFG];
  logic        irq_ack = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_dut
    cbem_top #(.UNIT_CYCLES(U)) dut (
      .clk, .rst_n, .pkt_valid, .pkt_len,
      .pkt_full(pkt_full[g]), .pkt_drop_cnt(drop_cnt[g]),
      .cfg_period(8'd0), .cfg_ma_n(5'd19), .cfg_es_alpha(alpha_reg[g]),
      .cfg_mode(cbem_pkg::MODE_ES),
      .obs_valid(obs_valid[g]), .obs_bytes(obs_bytes[g]),
      .irq(irq[g]), .irq_ack,
      .ma_out(ma_out[g]), .es_out(es_out[g]), .sat_out(sat_out[g]),
      .period_cnt(period_cnt[g]), .overrun(overrun[g]),
      .est_valid(est_valid[g]), .est_rate(est_rate[g]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Traffic plan: number of bursting flows in each period.
  int nburst [NPER];
  initial
    for (int p = 0; p < NPER; p++) begin
      nburst[p] = 0;
      for (int f = 0; f < 4; f++) if ($urandom_range(0, 999) < 8) nburst[p]++;
    end

  // One 1000-byte packet per bursting flow, early in the period.
  longint cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    pkt_valid <= (cyc % U) >= 10 && (cyc % U) < 10 + nburst[int'(cyc / U) % NPER];
  end

  // Models
  longint hist[$];
  longint f_fix [NCFG];
  longint pk_ma = 0, pk_es [NCFG], total = 0;

  initial begin
    int p;
    longint d, s;
    for (int g = 0; g < NCFG; g++) begin f_fix[g] = 0; pk_es[g] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (p = 0; p < NPER; p++) begin
      @(posedge irq[NCFG-1]);
      @(negedge clk);
      d = 1000 * nburst[p];
      total += d;
      hist.push_back(d);
      s = 0;
      for (int i = 0; i < 20; i++) if (hist.size() > i) s += hist[hist.size() - 1 - i];
      for (int g = 0; g < NCFG; g++) begin
        f_fix[g] = ((alpha_reg[g] + 1) * (d << 8) + (99 - alpha_reg[g]) * f_fix[g]) / 100;
        check(irq[g], "interrupt");
        check(obs_bytes[g] == 32'(d), "bytes in period");
        check(ma_out[g] == 32'(s / 20), "MA result");
        check(es_out[g] == 32'(f_fix[g] >> 8), "ES result");
        if (es_out[g] > pk_es[g]) pk_es[g] = es_out[g];
      end
      if (ma_out[0] > pk_ma) pk_ma = ma_out[0];
      irq_ack = 1;
      @(negedge clk);
      irq_ack = 0;
    end
    // bit/s = bytes per 1 ms period * 8000
    $display("mean %0d bit/s; peaks: MA(N=20) %0d, ES(0.1) %0d, ES(0.2) %0d, ES(0.3) %0d bit/s",
             total * 8000 / NPER, pk_ma * 8000, pk_es[0] * 8000, pk_es[1] * 8000, pk_es[2] * 8000);
    check(total > 0, "traffic present");
    check(pk_es[0] < pk_es[1] && pk_es[1] < pk_es[2], "larger alpha follows bursts more closely");
    check(pk_ma < pk_es[0], "MA(N=20) smoother than every ES setting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NPER + 5) * U) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
