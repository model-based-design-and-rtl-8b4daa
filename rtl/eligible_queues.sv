// Eligible-queue tracker.
//
// A VL becomes eligible when the shaper reports it ready (frame waiting, BAG
// elapsed) and stays eligible until the scheduler decides to serve it; the
// served pulse clears it. The eligible vector is what the scheduler deciders
// mask with, and its rising edge starts the VL's jitter count.
//
// Interface: status from the shaper, served one-cycle grant from the server,
// eligible registered output. Timing: eligible rises the cycle after status
// and falls the cycle after served. A served pulse wins over a ready status
// in the same cycle.
module eligible_queues #(
  parameter int NUM_VL = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_VL-1:0] status,
  input  logic [NUM_VL-1:0] served,
  output logic [NUM_VL-1:0] eligible
);

  always_ff @(posedge clk) begin
    if (!rst_n) eligible <= '0;
    else        eligible <= (eligible | status) & ~served;
  end

endmodule
