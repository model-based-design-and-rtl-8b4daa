// Traffic shaper: per-VL leaky bucket driven by the Bandwidth Allocation Gap.
//
// Each virtual link owns a BAG register (in clock cycles) and a down counter.
// When the scheduler picks a VL (served pulse) the counter is loaded with the
// BAG; the VL may start its next frame only once the counter has run down to
// zero. status marks the queues that are ready: a head-of-line frame is
// waiting and the BAG since the previous frame has elapsed. This spaces the
// frames of one VL at least one BAG apart, smoothing bursts as the leaky
// bucket of the ARINC-664 end system does.
//
// Interface: bag_we/bag_idx/bag_val write one BAG register; bag exposes all
// of them (the key of the Smallest BAG scheduler). frame_ready is the
// head-of-line-valid vector of the VL memory. Timing: a served pulse in cycle
// t makes status low from t+1, and status can be high again from cycle
// t+BAG. Counting the BAG from the decision, and the reset value DEFAULT_BAG
// (50 us at 125 MHz), are this implementation's choices.
module shaper
  import es_pkg::*;
#(
  parameter int          NUM_VL      = 8,
  parameter logic [31:0] DEFAULT_BAG = 32'd6250,
  localparam int         IDX_W       = (NUM_VL > 1) ? $clog2(NUM_VL) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bag_we,
  input  logic [IDX_W-1:0]  bag_idx,
  input  logic [BAG_W-1:0]  bag_val,
  output logic [BAG_W-1:0]  bag         [NUM_VL],
  input  logic [NUM_VL-1:0] frame_ready,
  input  logic [NUM_VL-1:0] served,
  output logic [NUM_VL-1:0] status
);

  logic [BAG_W-1:0] gap_cnt [NUM_VL];

  for (genvar q = 0; q < NUM_VL; q++) begin : g_vl
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        bag[q]     <= DEFAULT_BAG;
        gap_cnt[q] <= '0;
      end else begin
        if (bag_we && bag_idx == IDX_W'(q)) bag[q] <= bag_val;
        if (served[q])            gap_cnt[q] <= (bag[q] == '0) ? '0 : bag[q] - 1'b1;
        else if (gap_cnt[q] != 0) gap_cnt[q] <= gap_cnt[q] - 1'b1;
      end
    end
    assign status[q] = frame_ready[q] && (gap_cnt[q] == '0) && !served[q];
  end

endmodule
