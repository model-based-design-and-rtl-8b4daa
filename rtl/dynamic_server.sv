// Dynamic server: the schedulable part of the end-system transmitter.
//
// Wires the traffic shaper (per-VL BAG leaky bucket), the eligible-queue
// tracker, the dynamic scheduler decider (SB / LQ / FIFO / SS, chosen by
// sel at run time) and the scheduler server. The shaper marks a VL ready
// when it has a head-of-line frame and its BAG has elapsed; ready VLs become
// eligible; the server triggers a decision over the eligible VLs, grants the
// winner and sends its frame one byte per clock. The grant pops the VL's
// head-of-line record and restarts its BAG.
//
// Interface: the VL memory's head-of-line records, byte counts and byte
// read port; BAG configuration writes; the scheduler select; the served byte
// stream; eligible and served vectors for the jitter calculator; stall and
// retrigger pulses for monitoring. Timing follows the sub-blocks: a decision
// takes 3 cycles for 8 queues, the grant one more, and the frame header two
// byte cycles before the first frame byte.
module dynamic_server
  import es_pkg::*;
#(
  parameter int          NUM_VL      = 8,
  parameter logic [31:0] DEFAULT_BAG = 32'd6250,
  localparam int         IW          = (NUM_VL > 1) ? $clog2(NUM_VL) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  sched_sel_e         sel,
  input  logic               bag_we,
  input  logic [IW-1:0]      bag_idx,
  input  logic [BAG_W-1:0]   bag_val,
  input  hol_t               hol         [NUM_VL],
  input  logic [NUM_VL-1:0]  hol_valid,
  output logic [NUM_VL-1:0]  hol_pop,
  input  logic [QSIZE_W-1:0] queue_bytes [NUM_VL],
  input  logic [7:0]         byte_data   [NUM_VL],
  input  logic [NUM_VL-1:0]  byte_valid,
  output logic [NUM_VL-1:0]  byte_pop,
  output logic               tx_valid,
  output logic [7:0]         tx_data,
  output logic               tx_sof,
  output logic               tx_eof,
  output logic [IW-1:0]      tx_vl,
  output logic [NUM_VL-1:0]  eligible,
  output logic [NUM_VL-1:0]  served,
  output logic [NUM_VL-1:0]  shaper_status,
  output sched_sel_e         active_sel,
  output logic               stall,
  output logic               retrigger
);

  logic [BAG_W-1:0]  bag [NUM_VL];
  logic              dec_trig, dec_done, dec_found;
  logic [IW-1:0]     dec_index;
  logic [NUM_VL-1:0] dec_onehot;
  logic              busy;

  shaper #(.NUM_VL(NUM_VL), .DEFAULT_BAG(DEFAULT_BAG)) u_shaper (
    .clk, .rst_n, .bag_we, .bag_idx, .bag_val, .bag,
    .frame_ready(hol_valid), .served, .status(shaper_status)
  );

  eligible_queues #(.NUM_VL(NUM_VL)) u_elig (
    .clk, .rst_n, .status(shaper_status), .served, .eligible
  );

  dynamic_scheduler_decider #(.NUM_VL(NUM_VL)) u_decider (
    .clk, .rst_n, .sel, .trig(dec_trig), .eligible, .bag, .queue_bytes, .hol,
    .done(dec_done), .found(dec_found), .index(dec_index), .onehot(dec_onehot), .active_sel
  );

  scheduler_server #(.NUM_VL(NUM_VL)) u_server (
    .clk, .rst_n, .dec_trig, .dec_done, .dec_found, .dec_index, .served,
    .byte_data, .byte_valid, .byte_pop,
    .tx_valid, .tx_data, .tx_sof, .tx_eof, .tx_vl, .busy, .stall
  );

  assign hol_pop   = served;
  assign retrigger = dec_done && !dec_found;

  // Only an eligible VL may be granted, and only one at a time.
  a_grant_eligible: assert property (@(posedge clk) disable iff (!rst_n)
    (served != '0) |-> ($onehot(served) && ((served & eligible) == served)));

endmodule
