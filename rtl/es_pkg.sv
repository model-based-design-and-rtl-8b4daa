// Shared types and constants of the ARINC-664 End System transmit scheduler.
//
// Widths follow the scheduler description: BAG and queue byte counts are
// 32 bits, head-of-line arrival times 64 bits, frame lengths 16 bits, and the
// head-of-line record kept per queued frame is the 80-bit concatenation
// {arrival time, length}. Time is counted in cycles of the 125 MHz byte clock
// (one byte per cycle is 1 Gbit/s).
//
// The scheduler select encoding puts Smallest Size at 3, as the design's
// run-time switching example does; the other three codes follow the order
// SB, LQ, FIFO, SS starting from 0 (a choice of this implementation).
package es_pkg;

  localparam int TIME_W  = 64;   // free-running arrival time counter
  localparam int LEN_W   = 16;   // frame length
  localparam int QSIZE_W = 32;   // bytes stored in a VL queue
  localparam int BAG_W   = 32;   // bandwidth allocation gap, in clock cycles
  localparam int JIT_W   = 32;   // jitter, in clock cycles

  // Head-of-line record stored in the per-VL first-word-fall-through FIFO.
  typedef struct packed {
    logic [TIME_W-1:0] arrival;
    logic [LEN_W-1:0]  length;
  } hol_t;

  localparam int HOL_W = $bits(hol_t);  // 80

  typedef enum logic [1:0] {
    SCH_SB   = 2'd0,  // smallest BAG
    SCH_LQ   = 2'd1,  // longest queue (most bytes stored)
    SCH_FIFO = 2'd2,  // earliest head-of-line arrival
    SCH_SS   = 2'd3   // smallest head-of-line frame
  } sched_sel_e;

  // Byte map of the block RAM shared with the processor (32-bit words).
  localparam logic [11:0] JITTER_BASE = 12'h010;  // QueueJitter q at 0x10*(q+1)
  localparam logic [11:0] ADDR_STRIDE = 12'h010;
  localparam logic [11:0] SEL_ADDR    = 12'h200;  // Scheduler Select word

  // Clock stages of the min/max finder tree for n inputs: groups of four
  // while more than two candidates remain, then a final pair.
  function automatic int finder_levels(int n);
    int c = n;
    int l = 0;
    while (c > 1) begin
      c = (c > 2) ? (c + 3) / 4 : (c + 1) / 2;
      l++;
    end
    return l;
  endfunction

endpackage
