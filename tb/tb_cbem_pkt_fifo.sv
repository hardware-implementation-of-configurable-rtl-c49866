// tb_cbem_pkt_fifo: self-checking test of the packet FIFO.
//
// Drives random pushes and pops against a queue model: every popped length
// must match the model's head, `empty` and `full` must match the model's
// size, a push into a full FIFO must be dropped and counted, and a phase
// with the reader held fills the FIFO to exactly DEPTH entries. A watchdog
// ends the run after a fixed number of clocks.
module tb_cbem_pkt_fifo;
  localparam int DEPTH = 8;
  localparam int LEN_W = 16;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [LEN_W-1:0] wr_len = '0, rd_len;
  logic full, empty, drop;
  logic [15:0] drop_cnt;

  int checks = 0, failures = 0;
  logic [LEN_W-1:0] model[$];
  int exp_drops = 0;

  cbem_pkt_fifo #(.LEN_W(LEN_W), .DEPTH(DEPTH), .DROP_W(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One clock with the given request; checks against the model before the edge.
  task automatic step(input bit w, input bit r, input logic [LEN_W-1:0] len);
    bit accept;
    wr_en = w; rd_en = r; wr_len = len;
    #1;
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    if (r && model.size() > 0) check(rd_len == model[0], "pop data");
    accept = model.size() < DEPTH;
    @(posedge clk);
    #1;
    if (r && model.size() > 0) void'(model.pop_front());
    if (w) begin
      if (accept) model.push_back(len);
      else exp_drops++;
    end
    wr_en = 0; rd_en = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // Random traffic
    for (int i = 0; i < 400; i++)
      step($urandom_range(0, 1) == 1, $urandom_range(0, 2) != 0, LEN_W'($urandom_range(64, 1518)));
    // Drain
    while (model.size() > 0) step(0, 1, '0);
    // Fill with the reader held, then overflow by three
    for (int i = 0; i < DEPTH + 3; i++) step(1, 0, LEN_W'(100 + i));
    check(model.size() == DEPTH, "model filled");
    check(full, "full after DEPTH pushes");
    check(drop_cnt == 16'(exp_drops), "drop counter");
    check(exp_drops >= 3, "overflow exercised");
    // Drain in order
    for (int i = 0; i < DEPTH; i++) begin
      #1 check(rd_len == LEN_W'(100 + i), "order after overflow");
      step(0, 1, '0);
    end
    check(empty, "empty after drain");
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
