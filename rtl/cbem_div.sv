// cbem_div: unsigned iterative (restoring) divider shared by the moving
// average and exponential smoothing processes.
//
// A pulse on `start` loads `dividend` and `divisor`; one quotient bit is
// produced per clock, most significant first, so `done` pulses NUM_W + 1
// cycles after `start` with `quotient` = floor(dividend / divisor) and the
// remainder. `busy` is high from the cycle after `start` until `done`.
// A start while busy is ignored. Division by zero returns an all-ones
// quotient. A serial divider is this design's choice: the estimators need
// one division per measurement period, which lasts millions of cycles.
module cbem_div #(
  parameter int unsigned NUM_W = 40,
  parameter int unsigned DEN_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] dividend,
  input  logic [DEN_W-1:0] divisor,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quotient,
  output logic [DEN_W-1:0] remainder
);

  localparam int unsigned CNT_W = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] num_q;
  logic [DEN_W-1:0] den_q;
  logic [DEN_W:0]   rem_q;
  logic [CNT_W-1:0] cnt_q;

  // One restoring step: shift the next dividend bit into the remainder and
  // subtract the divisor when it fits.
  logic [DEN_W:0] rem_shift;
  logic           fits;
  always_comb begin
    rem_shift = {rem_q[DEN_W-1:0], num_q[NUM_W-1]};
    fits      = rem_shift >= {1'b0, den_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num_q     <= '0;
      den_q     <= '0;
      rem_q     <= '0;
      cnt_q     <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          num_q <= dividend;
          den_q <= divisor;
          rem_q <= '0;
          cnt_q <= CNT_W'(NUM_W);
          busy  <= 1'b1;
        end
      end else begin
        // The dividend register shifts left and collects quotient bits.
        num_q <= {num_q[NUM_W-2:0], fits};
        rem_q <= fits ? (rem_shift - {1'b0, den_q}) : rem_shift;
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CNT_W'(1)) begin
          busy      <= 1'b0;
          done      <= 1'b1;
          quotient  <= {num_q[NUM_W-2:0], fits};
          remainder <= fits ? DEN_W'(rem_shift - {1'b0, den_q}) : DEN_W'(rem_shift);
        end
      end
    end
  end

endmodule
