// Per-VL frame byte FIFO.
//
// Holds the bytes of the frames queued on one virtual link, each frame
// preceded by its two-byte length header, and reports how many bytes it
// holds. That byte count is the key of the Longest Queue scheduler.
//
// Interface: wr_en/wr_data push one byte, rd_en pops the head byte shown on
// rd_data (first-word fall-through). count is 32 bits wide as the queue size
// used by the Longest Queue decider. A push into a full FIFO is dropped and
// flagged on overflow for one cycle. Timing: a byte pushed in cycle t can be
// read in cycle t+1. The default depth of 4096 bytes (one 36 Kb block RAM) is
// this implementation's choice.
module frame_fifo #(
  parameter int DEPTH = 4096,
  parameter int CNT_W = 32,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [7:0]       wr_data,
  input  logic             rd_en,
  output logic [7:0]       rd_data,
  output logic             empty,
  output logic             full,
  output logic [CNT_W-1:0] count,
  output logic             overflow
);

  logic [7:0]    mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == CNT_W'(DEPTH));
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && !full;
  assign rd_data = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  // DEPTH is a power of two here, so the pointers wrap by overflowing.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      count <= count + CNT_W'(do_wr) - CNT_W'(do_rd);
    end
  end

  initial assert (DEPTH == (1 << AW)) else $error("frame_fifo: DEPTH must be a power of two");

endmodule
