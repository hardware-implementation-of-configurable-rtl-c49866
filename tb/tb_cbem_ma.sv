// tb_cbem_ma: self-checking test of the Moving Average process.
//
// Feeds observations 60 clocks apart and keeps the full history since the
// last change of N. The expected forecast is the sum of the newest N
// history entries (missing entries count as zero) divided by N, rounded
// down, worked out with 64-bit integers. Each result must arrive exactly
// SUM_W + 2 clocks after its observation. N runs through 20 (the reference
// setting), 1, 32, 5 and 3, with values up to the 32-bit maximum.
module tb_cbem_ma;
  localparam int CNT_W = 32;
  localparam int N_W   = 5;
  localparam int LAT   = CNT_W + N_W + 2;

  logic clk = 0, rst_n = 0;
  logic [N_W-1:0]   cfg_n = 5'd19;
  logic             sample_valid = 0;
  logic [CNT_W-1:0] sample = '0;
  logic             busy, result_valid;
  logic [CNT_W-1:0] result;

  int checks = 0, failures = 0;
  longint hist[$];
  longint cyc = 0, t_sample = 0;
  longint exp_q[$];
  int results = 0;

  cbem_ma #(.CNT_W(CNT_W), .N_W(N_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic longint window_mean(int n);
    longint s = 0;
    for (int i = 0; i < n; i++)
      if (hist.size() > i) s += hist[hist.size() - 1 - i];
    return s / n;
  endfunction

  always @(negedge clk) if (rst_n && result_valid) begin
    results++;
    check(exp_q.size() > 0, "result expected");
    if (exp_q.size() > 0) check(result == CNT_W'(exp_q.pop_front()), "moving average value");
    check(cyc - t_sample == LAT + 1, $sformatf("latency %0d", cyc - t_sample - 1));
  end

  task automatic feed(input logic [CNT_W-1:0] d);
    @(negedge clk);
    check(!busy, "idle before observation");
    sample = d; sample_valid = 1;
    hist.push_back(d);
    exp_q.push_back(window_mean(cfg_n + 1));
    t_sample = cyc;
    @(posedge clk);
    #1 sample_valid = 0;
    repeat (60) @(posedge clk);
  endtask

  task automatic set_n(input int n);
    @(negedge clk);
    cfg_n = N_W'(n - 1);
    hist.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Reference setting N = 20: ramp-up, steady state, bursts
    set_n(20);
    for (int i = 0; i < 45; i++)
      feed((i % 9 == 3) ? 32'($urandom_range(400000, 500000)) : 32'($urandom_range(0, 8000)));
    set_n(1);
    for (int i = 0; i < 5; i++) feed($urandom);
    set_n(32);
    for (int i = 0; i < 40; i++) feed((i % 2) ? 32'hffff_ffff : $urandom);
    set_n(5);
    for (int i = 0; i < 12; i++) feed($urandom);
    set_n(3);
    for (int i = 0; i < 8; i++) feed(32'(i * 1000 + 7));
    repeat (LAT + 2) @(posedge clk);
    check(results == 110, "one result per observation");
    check(exp_q.size() == 0, "all results delivered");
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
