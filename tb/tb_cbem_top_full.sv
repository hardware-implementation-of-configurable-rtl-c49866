// tb_cbem_top_full: the module at its default parameters (50 MHz clock,
// 0.1 s period unit, 32-bit counts, 64-entry FIFO) through three complete
// measurement periods of 0.1 s each (5,000,000 clocks).
//
// A 1000-byte packet arrives every 100 clocks, 8 Mbit/s of 100 Mbit/s
// line rate, so every period holds 50,000 packets = 50,000,000 bytes.
// With N = 2 and alpha = 0.10 the expected results, worked out by hand,
// are: MA 25,000,000 then 50,000,000 twice; ES 5,000,000, 9,500,000 and
// 13,550,000. The host checks each pair when the interrupt rises, and the
// interrupt must rise 51 clocks after the period's last clock.
module tb_cbem_top_full;
  logic clk = 0, rst_n = 0;
  logic pkt_valid = 0;
  logic [15:0] pkt_len = 16'd1000;
  logic pkt_full;
  logic [15:0] pkt_drop_cnt;
  logic [7:0] cfg_period = 8'd0;      // 0.1 s
  logic [4:0] cfg_ma_n = 5'd1;        // N = 2
  logic [6:0] cfg_es_alpha = 7'd9;    // alpha = 0.10
  cbem_pkg::est_mode_e cfg_mode = cbem_pkg::MODE_ES;
  logic obs_valid;
  logic [31:0] obs_bytes;
  logic irq, irq_ack = 0;
  logic [31:0] ma_out, es_out, est_rate;
  logic sat_out, overrun, est_valid;
  logic [15:0] period_cnt;

  cbem_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  longint cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    pkt_valid <= (cyc % 100) == 49;
  end

  longint t_obs = 0;
  always @(posedge clk) if (obs_valid) t_obs = cyc;

  longint exp_ma[3] = '{25_000_000, 50_000_000, 50_000_000};
  longint exp_es[3] = '{5_000_000, 9_500_000, 13_550_000};

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      @(posedge irq);
      @(negedge clk);
      check(obs_bytes == 32'd50_000_000, "bytes per period");
      check(ma_out == 32'(exp_ma[p]), "MA result");
      check(es_out == 32'(exp_es[p]), "ES result");
      check(est_rate == 32'(exp_es[p]), "estimate output (ES mode)");
      check(period_cnt == 16'(p + 1), "period counter");
      check(!overrun && !sat_out, "no overrun, no saturation");
      // The count is registered at the period's last clock edge E; the ES
      // process takes it at E+1 and answers 49 clocks later, irq one clock after.
      check(cyc - t_obs == 51, $sformatf("interrupt latency %0d", cyc - t_obs));
      check(t_obs == longint'(5_000_000) * (p + 1), "period length");
      irq_ack = 1;
      @(negedge clk);
      irq_ack = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (16_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
