// Dynamic scheduler decider: the four ARINC-664 end-system scheduling
// algorithms side by side, one chosen at run time.
//
//   SB   (sel 0) smallest BAG            - minimum over 32-bit BAG values
//   LQ   (sel 1) longest queue           - maximum over 32-bit byte counts
//   FIFO (sel 2) earliest HoL arrival    - minimum over 64-bit arrival times
//   SS   (sel 3) smallest HoL frame      - minimum over 16-bit frame lengths
//
// Every trigger starts all four deciders on the same eligible vector; the
// select value sampled with the trigger picks whose result is reported, so a
// select change never mixes two algorithms within one decision. The code for
// SS (3) matches the design's switching example; the other codes follow the
// order SB, LQ, FIFO, SS.
//
// Interface and timing are those of scheduler_decider: done pulses LATENCY
// cycles after trig (3 for 8 queues) with found, index and onehot.
module dynamic_scheduler_decider
  import es_pkg::*;
#(
  parameter int NUM_VL   = 8,
  localparam int IW      = (NUM_VL > 1) ? $clog2(NUM_VL) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  sched_sel_e         sel,
  input  logic               trig,
  input  logic [NUM_VL-1:0]  eligible,
  input  logic [BAG_W-1:0]   bag         [NUM_VL],
  input  logic [QSIZE_W-1:0] queue_bytes [NUM_VL],
  input  hol_t               hol         [NUM_VL],
  output logic               done,
  output logic               found,
  output logic [IW-1:0]      index,
  output logic [NUM_VL-1:0]  onehot,
  output sched_sel_e         active_sel
);

  logic [TIME_W-1:0] arrival [NUM_VL];
  logic [LEN_W-1:0]  length  [NUM_VL];

  // Split the 80-bit head-of-line record into its two keys.
  always_comb begin
    for (int q = 0; q < NUM_VL; q++) begin
      arrival[q] = hol[q].arrival;
      length[q]  = hol[q].length;
    end
  end

  logic [3:0]        d_done, d_found;
  logic [IW-1:0]     d_index  [4];
  logic [NUM_VL-1:0] d_onehot [4];

  scheduler_decider #(.N(NUM_VL), .W(BAG_W), .FIND_MAX(1'b0)) u_sb (
    .clk, .rst_n, .trig, .eligible, .key(bag),
    .done(d_done[SCH_SB]), .found(d_found[SCH_SB]), .index(d_index[SCH_SB]), .onehot(d_onehot[SCH_SB]));

  scheduler_decider #(.N(NUM_VL), .W(QSIZE_W), .FIND_MAX(1'b1)) u_lq (
    .clk, .rst_n, .trig, .eligible, .key(queue_bytes),
    .done(d_done[SCH_LQ]), .found(d_found[SCH_LQ]), .index(d_index[SCH_LQ]), .onehot(d_onehot[SCH_LQ]));

  scheduler_decider #(.N(NUM_VL), .W(TIME_W), .FIND_MAX(1'b0)) u_fifo (
    .clk, .rst_n, .trig, .eligible, .key(arrival),
    .done(d_done[SCH_FIFO]), .found(d_found[SCH_FIFO]), .index(d_index[SCH_FIFO]), .onehot(d_onehot[SCH_FIFO]));

  scheduler_decider #(.N(NUM_VL), .W(LEN_W), .FIND_MAX(1'b0)) u_ss (
    .clk, .rst_n, .trig, .eligible, .key(length),
    .done(d_done[SCH_SS]), .found(d_found[SCH_SS]), .index(d_index[SCH_SS]), .onehot(d_onehot[SCH_SS]));

  always_ff @(posedge clk) begin
    if (!rst_n)    active_sel <= SCH_SB;
    else if (trig) active_sel <= sel;
  end

  assign done   = d_done[active_sel];
  assign found  = d_found[active_sel];
  assign index  = d_index[active_sel];
  assign onehot = d_onehot[active_sel];

endmodule
