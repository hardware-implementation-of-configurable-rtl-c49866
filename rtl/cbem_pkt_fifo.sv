// cbem_pkt_fifo: synchronous FIFO between the Ethernet MAC side and the
// FIFO read process.
//
// The MAC side pushes one record per captured packet: its length in bytes.
// `wr_en` with `full` low stores `wr_len`; `wr_en` while full drops the
// record, pulses `drop` and increments the saturating `drop_cnt`.
// `rd_en` with `empty` low pops the oldest record; `rd_len` shows the
// oldest record at all times (first-word fall-through), so the value popped
// is the one visible in the same cycle. A push and a pop may happen in the
// same cycle; a push while full is dropped even if a pop frees a slot in
// that cycle. The FIFO itself is named by the reference design; what an
// entry holds, its depth and the drop counter are this design's choices.
module cbem_pkt_fifo #(
  parameter int unsigned LEN_W = cbem_pkg::LEN_W,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned DROP_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [LEN_W-1:0] wr_len,
  output logic             full,
  input  logic             rd_en,
  output logic [LEN_W-1:0] rd_len,
  output logic             empty,
  output logic             drop,
  output logic [DROP_W-1:0] drop_cnt
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [LEN_W-1:0] mem [DEPTH];
  logic [AW-1:0]    wp_q, rp_q;
  logic [AW:0]      count_q;

  logic do_wr, do_rd;
  always_comb begin
    full   = count_q == (AW+1)'(DEPTH);
    empty  = count_q == '0;
    do_wr  = wr_en && !full;
    do_rd  = rd_en && !empty;
    rd_len = mem[rp_q];
  end

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp_q] <= wr_len;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q     <= '0;
      rp_q     <= '0;
      count_q  <= '0;
      drop     <= 1'b0;
      drop_cnt <= '0;
    end else begin
      if (do_wr) wp_q <= next_ptr(wp_q);
      if (do_rd) rp_q <= next_ptr(rp_q);
      case ({do_wr, do_rd})
        2'b10:   count_q <= count_q + 1'b1;
        2'b01:   count_q <= count_q - 1'b1;
        default: count_q <= count_q;
      endcase
      drop <= wr_en && full;
      if (wr_en && full && drop_cnt != '1) drop_cnt <= drop_cnt + 1'b1;
    end
  end

  // The count never leaves 0..DEPTH.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count_q <= (AW+1)'(DEPTH));

endmodule
