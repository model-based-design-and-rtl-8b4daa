// Scheduler decider for one scheduling algorithm.
//
// On a trigger the Masker stage registers one key per queue, replacing the
// key of every queue that is not eligible by the worst possible value: all
// ones for the algorithms that pick the minimum (Smallest BAG on the BAG,
// FIFO on the head-of-line arrival time, Smallest Size on the head-of-line
// length) and zero for Longest Queue, which picks the maximum byte count.
// The pipelined finder tree then returns the best key and its queue. If the
// best key still equals the mask value no queue was eligible: found stays
// low and the server triggers the decider again.
//
// Interface: trig (deciderTrig) starts a decision on the eligible vector and
// keys of that cycle; done (deciderDone) pulses LATENCY cycles later with
// found, index (binary) and onehot (the chosen queue as a bit vector),
// which stay valid until the next trigger's result replaces them.
// LATENCY is 1 + finder levels: 3 cycles for 8 queues, 4 for 32. Ties go to
// the lower queue index.
module scheduler_decider #(
  parameter int N        = 8,
  parameter int W        = 32,
  parameter bit FIND_MAX = 1'b0,
  localparam int IW      = (N > 1) ? $clog2(N) : 1,
  localparam int LATENCY = 1 + es_pkg::finder_levels(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          trig,
  input  logic [N-1:0]  eligible,
  input  logic [W-1:0]  key      [N],
  output logic          done,
  output logic          found,
  output logic [IW-1:0] index,
  output logic [N-1:0]  onehot
);

  localparam logic [W-1:0] SENTINEL = FIND_MAX ? '0 : '1;

  logic [W-1:0]       masked [N];
  logic [W-1:0]       best_val;
  logic [IW-1:0]      best_idx;
  logic [LATENCY-1:0] busy;

  // Masker
  always_ff @(posedge clk) begin
    if (trig) begin
      for (int q = 0; q < N; q++) masked[q] <= eligible[q] ? key[q] : SENTINEL;
    end
  end

  extremum_finder #(.N(N), .W(W), .FIND_MAX(FIND_MAX)) u_find (
    .clk, .in_val(masked), .out_val(best_val), .out_idx(best_idx)
  );

  // Trigger travels alongside the data through the masker and the tree.
  always_ff @(posedge clk) begin
    if (!rst_n) busy <= '0;
    else        busy <= {busy[LATENCY-2:0], trig};
  end

  // The tree output only changes after a new trigger, so the decision can be
  // read straight from it.
  assign found  = (best_val != SENTINEL);
  assign index  = best_idx;
  assign onehot = found ? (N'(1) << best_idx) : '0;

  assign done = busy[LATENCY-1];

endmodule
