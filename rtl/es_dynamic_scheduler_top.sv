// ARINC-664 end-system transmit scheduler with run-time selectable
// scheduling algorithm (programmable-logic part of the dynamic scheduler
// system on chip).
//
// Frames arrive per virtual link (VL) from the traffic loaders: a length
// push starts a frame and stamps its arrival time, then its bytes are pushed
// one per cycle. The VL memory queues them. The dynamic server lets a VL
// compete only when its BAG has elapsed since its previous frame (leaky
// bucket), picks among the eligible VLs with the algorithm currently
// selected (smallest BAG, longest queue, earliest arrival or smallest frame)
// and sends the chosen frame at one byte per 125 MHz clock. The jitter
// calculator counts, per VL, the cycles from becoming eligible to being
// chosen; the BRAM wrapper writes each value into the block RAM shared with
// the processor, and reads back the scheduler select the processor writes
// at byte address 0x200.
//
// Interface: loader inputs per VL; a BAG configuration write port (BAG in
// clock cycles); the served byte stream tx_*; the processor side (port A)
// of the shared block RAM, clocked by clk; status outputs for monitoring.
// The processor and its bus adapter are outside this module.
module es_dynamic_scheduler_top
  import es_pkg::*;
#(
  parameter int          NUM_VL      = 8,
  parameter int          FRAME_DEPTH = 4096,
  parameter int          HOL_DEPTH   = 64,
  parameter logic [31:0] DEFAULT_BAG = 32'd6250,
  parameter int          POLL_PERIOD = 16,
  localparam int         IW          = (NUM_VL > 1) ? $clog2(NUM_VL) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // traffic loaders
  input  logic [LEN_W-1:0]   ld_len       [NUM_VL],
  input  logic [NUM_VL-1:0]  ld_len_push,
  input  logic [7:0]         ld_data      [NUM_VL],
  input  logic [NUM_VL-1:0]  ld_data_push,
  // BAG configuration
  input  logic               bag_we,
  input  logic [IW-1:0]      bag_idx,
  input  logic [BAG_W-1:0]   bag_val,
  // served byte stream
  output logic               tx_valid,
  output logic [7:0]         tx_data,
  output logic               tx_sof,
  output logic               tx_eof,
  output logic [IW-1:0]      tx_vl,
  // processor side of the shared block RAM
  input  logic               bram_a_en,
  input  logic [3:0]         bram_a_we,
  input  logic [11:0]        bram_a_addr,
  input  logic [31:0]        bram_a_din,
  output logic [31:0]        bram_a_dout,
  // monitoring
  output sched_sel_e         sch_select,
  output logic [NUM_VL-1:0]  eligible,
  output logic [NUM_VL-1:0]  served,
  output logic [QSIZE_W-1:0] queue_bytes  [NUM_VL],
  output logic [NUM_VL-1:0]  overflow,
  output logic               stall,
  output logic               retrigger,
  output logic               jitter_dropped
);

  hol_t              hol        [NUM_VL];
  logic [NUM_VL-1:0] hol_valid, hol_pop;
  logic [7:0]        byte_data  [NUM_VL];
  logic [NUM_VL-1:0] byte_valid, byte_pop;
  logic [TIME_W-1:0] now;
  logic [NUM_VL-1:0] shaper_status;
  sched_sel_e        active_sel;
  logic [JIT_W-1:0]  queue_jitter [NUM_VL];
  logic [NUM_VL-1:0] queue_enable;
  logic              b_en;
  logic [3:0]        b_we;
  logic [11:0]       b_addr;
  logic [31:0]       b_din, b_dout;

  vl_memory #(.NUM_VL(NUM_VL), .FRAME_DEPTH(FRAME_DEPTH), .HOL_DEPTH(HOL_DEPTH)) u_memory (
    .clk, .rst_n, .ld_len, .ld_len_push, .ld_data, .ld_data_push,
    .hol, .hol_valid, .hol_pop, .queue_bytes, .byte_data, .byte_valid, .byte_pop,
    .overflow, .now
  );

  dynamic_server #(.NUM_VL(NUM_VL), .DEFAULT_BAG(DEFAULT_BAG)) u_server (
    .clk, .rst_n, .sel(sch_select), .bag_we, .bag_idx, .bag_val,
    .hol, .hol_valid, .hol_pop, .queue_bytes, .byte_data, .byte_valid, .byte_pop,
    .tx_valid, .tx_data, .tx_sof, .tx_eof, .tx_vl,
    .eligible, .served, .shaper_status, .active_sel, .stall, .retrigger
  );

  jitter_calculator #(.NUM_VL(NUM_VL)) u_jitter (
    .clk, .rst_n, .eligible, .served, .queue_jitter, .queue_enable
  );

  bram_wrapper #(.NUM_VL(NUM_VL), .POLL_PERIOD(POLL_PERIOD), .ADDR_W(12)) u_wrapper (
    .clk, .rst_n, .queue_jitter, .queue_enable,
    .b_en, .b_we, .b_addr, .b_din, .b_dout, .sch_select, .jitter_dropped
  );

  tdp_bram #(.ADDR_W(12), .DATA_W(32)) u_bram (
    .clka(clk), .ena(bram_a_en), .wea(bram_a_we), .addra(bram_a_addr), .dina(bram_a_din), .douta(bram_a_dout),
    .clkb(clk), .enb(b_en), .web(b_we), .addrb(b_addr), .dinb(b_din), .doutb(b_dout)
  );

endmodule
