// Jitter calculator: per-VL scheduling jitter in clock cycles.
//
// For each VL a counter runs while the VL is eligible, from the cycle it
// becomes eligible (its BAG has elapsed and a frame is waiting) up to the
// cycle the scheduler decides to serve it. In that decision cycle the count
// is presented as QueueJitter with a one-cycle QueueEnable, and the counter
// restarts from zero. A VL that is granted in the first cycle it is
// eligible therefore reports 0.
//
// Interface: eligible and served vectors from the dynamic server;
// queue_jitter/queue_enable per VL towards the BRAM wrapper. Timing:
// queue_jitter and queue_enable are registered and valid the cycle after
// the grant. The counter saturates at its maximum, a choice of this
// implementation.
module jitter_calculator
  import es_pkg::*;
#(
  parameter int NUM_VL = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_VL-1:0] eligible,
  input  logic [NUM_VL-1:0] served,
  output logic [JIT_W-1:0]  queue_jitter [NUM_VL],
  output logic [NUM_VL-1:0] queue_enable
);

  logic [JIT_W-1:0] cnt [NUM_VL];

  for (genvar q = 0; q < NUM_VL; q++) begin : g_vl
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        cnt[q]          <= '0;
        queue_jitter[q] <= '0;
        queue_enable[q] <= 1'b0;
      end else begin
        queue_enable[q] <= served[q];
        if (served[q]) begin
          queue_jitter[q] <= cnt[q];
          cnt[q]          <= '0;
        end else if (eligible[q]) begin
          if (cnt[q] != '1) cnt[q] <= cnt[q] + 1'b1;
        end else begin
          cnt[q] <= '0;
        end
      end
    end
  end

endmodule
