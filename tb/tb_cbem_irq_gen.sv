// tb_cbem_irq_gen: self-checking test of the Interrupt Generation process.
//
// Runs 300 rounds. In each round an MA and an ES result arrive in random
// order, at most 12 clocks apart or in the same clock; the host acknowledges
// at a random clock, sometimes only after the next round (an overrun) and
// sometimes exactly when the next pair completes. The expected state is
// derived per round: the interrupt must rise the clock after the second
// result, the result registers must carry that round's pair, the period
// counter must count rounds, and the overrun flag must be set exactly when
// a pair completed while the previous interrupt was unacknowledged.
module tb_cbem_irq_gen;
  localparam int CNT_W = 32;

  logic clk = 0, rst_n = 0;
  logic ma_valid = 0, es_valid = 0, sat_in = 0, irq_ack = 0;
  logic [CNT_W-1:0] ma_result = '0, es_result = '0;
  logic irq, sat_out, overrun;
  logic [CNT_W-1:0] ma_out, es_out;
  logic [15:0] period_cnt;

  int checks = 0, failures = 0;
  int n_overrun = 0, n_same = 0, n_ack_collide = 0;

  cbem_irq_gen #(.CNT_W(CNT_W), .PCNT_W(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bit irq_m = 0, ovr_m = 0;   // expected host-visible flags

  // Drive one clock: inputs set at the negedge before, state updated after.
  task automatic tick(input bit m, input bit e, input bit ack, input bit pair_now);
    ma_valid = m; es_valid = e; irq_ack = ack;
    @(posedge clk);
    #1;
    ma_valid = 0; es_valid = 0; irq_ack = 0;
    if (pair_now) begin
      ovr_m = (irq_m && !ack) || (ovr_m && !ack);
      irq_m = 1;
    end else if (ack) begin
      irq_m = 0; ovr_m = 0;
    end
    check(irq == irq_m, "interrupt level");
    check(overrun == ovr_m, "overrun flag");
  endtask

  initial begin
    logic [CNT_W-1:0] mv, ev;
    bit sv;
    int d_ma, d_es, last, t_ack;
    bit ack_late, ack_collide;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 1; r <= 300; r++) begin
      mv = $urandom; ev = $urandom; sv = $urandom_range(0, 1);
      ma_result = mv; es_result = ev; sat_in = sv;
      d_ma = $urandom_range(0, 12);
      d_es = ($urandom_range(0, 4) == 0) ? d_ma : $urandom_range(0, 12);
      if (d_ma == d_es) n_same++;
      last = (d_ma > d_es) ? d_ma : d_es;
      ack_collide = $urandom_range(0, 5) == 0 && irq_m;
      if (ack_collide) n_ack_collide++;
      for (int c = 0; c <= last; c++)
        tick(c == d_ma, c == d_es, ack_collide && c == last, c == last);
      check(ma_out == mv, "MA result register");
      check(es_out == ev, "ES result register");
      check(sat_out == sv, "saturation flag");
      check(period_cnt == 16'(r), "period counter");
      if (ovr_m) n_overrun++;
      // Host reaction: acknowledge now, or leave it for the next round.
      ack_late = $urandom_range(0, 3) == 0;
      if (!ack_late) begin
        t_ack = $urandom_range(0, 5);
        for (int c = 0; c < t_ack; c++) tick(0, 0, 0, 0);
        tick(0, 0, 1, 0);
        check(!irq, "acknowledge drops the interrupt");
      end
      repeat ($urandom_range(1, 4)) tick(0, 0, 0, 0);
    end
    check(n_overrun > 0, "overrun exercised");
    check(n_same > 0, "simultaneous results exercised");
    check(n_ack_collide > 0, "acknowledge colliding with a new pair exercised");
    $display("overruns=%0d simultaneous=%0d collisions=%0d", n_overrun, n_same, n_ack_collide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
