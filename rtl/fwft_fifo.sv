// First-word-fall-through FIFO.
//
// Used for the per-VL head-of-line records: the entry at the head is always
// visible on rd_data while empty is low, and rd_en removes it. This lets the
// scheduler deciders look at the arrival time and length of every queue's
// head-of-line frame before choosing one.
//
// Interface: wr_en/wr_data push, rd_en pops (ignored when empty). A push into
// a full FIFO is dropped and flagged on overflow for one cycle; a push and a
// pop in the same cycle are both performed. count is the number of entries.
// Timing: a pushed entry is visible on rd_data the cycle after the push.
// Storage is a plain array with asynchronous read of the head; the depth is
// this implementation's choice.
module fwft_fifo #(
  parameter int WIDTH = 80,
  parameter int DEPTH = 64,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count,
  output logic             overflow
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && !full;
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
