// tb_cbem_es: self-checking test of the Exponential Smoothing process.
//
// Two models follow each observation. A fixed-point model with the same
// 8 fraction bits must match the forecast register exactly; a real-valued
// model of F' = alpha * D + (1 - alpha) * F must stay close to
// the integer result (fixed-point truncation drifts by at most
// 1 / (256 * alpha) units, so the bound is two units). Each result must arrive exactly NUM_W + 2 clocks
// after its observation. alpha runs through 0.10 (the reference test
// setting), 0.20, 0.30, 0.01, 1.00 and a register value above the range,
// which must act as alpha = 1.00.
module tb_cbem_es;
  localparam int CNT_W = 32;
  localparam int FRAC  = 8;
  localparam int LAT   = CNT_W + FRAC + 7 + 2;

  logic clk = 0, rst_n = 0;
  logic [6:0]       cfg_alpha = 7'd9;
  logic             sample_valid = 0;
  logic [CNT_W-1:0] sample = '0;
  logic             busy, result_valid;
  logic [CNT_W-1:0] result;
  logic [CNT_W+FRAC-1:0] forecast;

  int checks = 0, failures = 0;
  longint cyc = 0, t_sample = 0;
  // fixed-point model; 128-bit arithmetic keeps the products exact
  logic [127:0] f_fix = '0;
  real          f_real = 0.0;
  logic [127:0] exp_fix[$];
  real          exp_real[$];
  int results = 0;

  cbem_es #(.CNT_W(CNT_W), .A_W(7), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk) if (rst_n && result_valid) begin
    logic [127:0] ef;
    real er;
    results++;
    check(exp_fix.size() > 0, "result expected");
    if (exp_fix.size() > 0) begin
      ef = exp_fix.pop_front();
      er = exp_real.pop_front();
      check(forecast == (CNT_W+FRAC)'(ef), "fixed-point forecast");
      check(result == CNT_W'(ef >> FRAC), "integer result");
      check(real'(result) <= er + 2.0 && real'(result) >= er - 2.0, "close to real-valued smoothing");
    end
    check(cyc - t_sample == LAT + 1, $sformatf("latency %0d", cyc - t_sample - 1));
  end

  task automatic feed(input logic [CNT_W-1:0] d);
    int a;
    @(negedge clk);
    check(!busy, "idle before observation");
    a = (cfg_alpha > 99) ? 100 : cfg_alpha + 1;
    f_fix  = (128'(a) * (128'(d) << FRAC) + 128'(100 - a) * f_fix) / 128'd100;
    f_real = (real'(a) / 100.0) * real'(d) + (1.0 - real'(a) / 100.0) * f_real;
    exp_fix.push_back(f_fix);
    exp_real.push_back(f_real);
    sample = d; sample_valid = 1;
    t_sample = cyc;
    @(posedge clk);
    #1 sample_valid = 0;
    repeat (LAT + 5) @(posedge clk);
  endtask

  task automatic run_alpha(input int reg_val, input int count);
    @(negedge clk);
    cfg_alpha = 7'(reg_val);
    for (int i = 0; i < count; i++)
      feed((i % 11 == 2) ? 32'($urandom_range(400000, 500000)) : 32'($urandom_range(0, 9000)));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_alpha(9, 40);     // 0.10
    run_alpha(19, 30);    // 0.20
    run_alpha(29, 30);    // 0.30
    run_alpha(0, 20);     // 0.01
    run_alpha(99, 5);     // 1.00
    check(result == sample, "alpha 1.00 follows the observation");
    run_alpha(127, 5);    // beyond range, acts as 1.00
    check(result == sample, "out-of-range alpha acts as 1.00");
    @(negedge clk);
    cfg_alpha = 7'd9;
    for (int i = 0; i < 10; i++) feed(32'hffff_ffff);
    repeat (LAT + 2) @(posedge clk);
    check(results == 140, "one result per observation");
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
