// tb_cbem_fifo_read: self-checking test of the FIFO read process.
//
// A random packet source stands in for the FIFO (empty flag and head
// length change every clock). A cycle-counting model sums the lengths the
// process must pop and predicts the clock at which each period ends:
// every UNIT*(PE+1) clocks after reset. Each `sample_valid` pulse must
// come exactly at that clock and carry the model's sum. A second instance
// with a 12-bit count sees the same packets and must saturate. The test
// runs three period settings, with a reset between them.
module tb_cbem_fifo_read;
  localparam int UNIT = 10;

  logic clk = 0, rst_n = 0;
  logic [7:0]  cfg_period = '0;
  logic        fifo_empty = 1;
  logic [15:0] fifo_len = '0;
  logic        fifo_rd, fifo_rd_s;
  logic        sample_valid, sample_sat, sv_s, sat_s;
  logic [31:0] sample;
  logic [11:0] sample_s;

  int checks = 0, failures = 0;
  int pulses = 0, sat_seen = 0;

  cbem_fifo_read #(.LEN_W(16), .CNT_W(32), .PE_W(8), .UNIT_CYCLES(UNIT)) dut (
    .clk, .rst_n, .cfg_period, .fifo_empty, .fifo_len, .fifo_rd,
    .sample_valid, .sample, .sample_sat);

  cbem_fifo_read #(.LEN_W(16), .CNT_W(12), .PE_W(8), .UNIT_CYCLES(UNIT)) dut_small (
    .clk, .rst_n, .cfg_period, .fifo_empty, .fifo_len, .fifo_rd(fifo_rd_s),
    .sample_valid(sv_s), .sample(sample_s), .sample_sat(sat_s));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Model, evaluated on the values present before each rising edge.
  longint acc = 0, cyc = 0;
  bit     exp_pulse = 0;
  longint exp_val = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      acc = 0; cyc = 0; exp_pulse = 0;
    end else begin
      check(fifo_rd == !fifo_empty, "pop whenever not empty");
      if (!fifo_empty) acc += fifo_len;
      exp_pulse = (cyc % (UNIT * (cfg_period + 1))) == UNIT * (cfg_period + 1) - 1;
      if (exp_pulse) begin
        exp_val = acc;
        acc = 0;
      end
      cyc++;
    end
  end

  // Compare just after each edge.
  always @(negedge clk) if (rst_n) begin
    check(sample_valid == exp_pulse, "period end at the predicted clock");
    check(sv_s == exp_pulse, "period end, small counter");
    if (exp_pulse) begin
      pulses++;
      check(sample == 32'(exp_val), "bytes in period");
      check(!sample_sat, "no saturation at 32 bits");
      check(sample_s == ((exp_val > 4095) ? 12'hfff : 12'(exp_val)), "saturating 12-bit count");
      check(sat_s == (exp_val > 4095), "saturation flag");
      if (sat_s) sat_seen++;
    end
  end

  // Stimulus: new FIFO state shortly after every edge.
  always @(posedge clk) begin
    #1;
    fifo_empty <= $urandom_range(0, 3) == 0;
    fifo_len   <= 16'($urandom_range(0, 7) == 0 ? $urandom_range(1000, 1518) : $urandom_range(40, 200));
  end

  int cfg_period_set[3] = '{0, 4, 2};

  initial begin
    for (int p = 0; p < 3; p++) begin
      rst_n = 0;
      cfg_period = 8'(cfg_period_set[p]);
      repeat (3) @(posedge clk);
      #2 rst_n = 1;
      repeat (UNIT * (cfg_period_set[p] + 1) * 6 + 3) @(posedge clk);
    end
    #2;
    check(pulses == 18, "number of periods");
    check(sat_seen > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
