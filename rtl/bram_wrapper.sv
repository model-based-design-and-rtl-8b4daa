// BRAM wrapper: the logic side (channel B) of the block RAM through which
// the scheduler logic and the processor exchange jitter values and the
// scheduler select.
//
// Address map (byte addresses of 32-bit words; for 8 queues):
//   0x10, 0x20 ... 0x80   QueueJitter of queues 1..8
//   0x90, 0xA0 ... 0x100  QueueEnable of queues 1..8
//   0x200                 Scheduler Select
// In general QueueJitter q sits at 0x10*(q+1) and QueueEnable q at
// 0x10*(NUM_VL+1) + 0x10*q.
//
// When the jitter calculator reports a new jitter for a queue, the wrapper
// writes the value to the queue's QueueJitter word and, in the next cycle,
// 1 to its QueueEnable word; the processor polls QueueEnable, reads the
// jitter and clears QueueEnable. Jitters reported while the port is busy
// wait in a per-queue holding register and are written lowest queue first;
// a second jitter for a queue whose previous one is still waiting replaces
// it and pulses jitter_dropped. Every POLL_PERIOD cycles the wrapper reads
// the Scheduler Select word and drives sch_select from its two low bits
// (one cycle after the read). Port B is idle while rst_n is low. The write
// ordering, the holding registers and the poll period are choices of this
// implementation.
module bram_wrapper
  import es_pkg::*;
#(
  parameter int NUM_VL      = 8,
  parameter int POLL_PERIOD = 16,
  parameter int ADDR_W      = 12,
  localparam int IW         = (NUM_VL > 1) ? $clog2(NUM_VL) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [JIT_W-1:0]  queue_jitter [NUM_VL],
  input  logic [NUM_VL-1:0] queue_enable,
  output logic              b_en,
  output logic [3:0]        b_we,
  output logic [ADDR_W-1:0] b_addr,
  output logic [31:0]       b_din,
  input  logic [31:0]       b_dout,
  output sched_sel_e        sch_select,
  output logic              jitter_dropped
);

  localparam logic [ADDR_W-1:0] JIT_BASE = ADDR_W'(JITTER_BASE);
  localparam logic [ADDR_W-1:0] STRIDE   = ADDR_W'(ADDR_STRIDE);
  localparam logic [ADDR_W-1:0] EN_BASE  = ADDR_W'(JITTER_BASE + ADDR_STRIDE * NUM_VL);
  localparam int               PW       = (POLL_PERIOD > 1) ? $clog2(POLL_PERIOD) : 1;

  logic [NUM_VL-1:0] pend;
  logic [JIT_W-1:0]  pend_val [NUM_VL];
  logic              en_phase;     // second write of a pair is due
  logic [IW-1:0]     en_q;
  logic [PW-1:0]     poll_cnt;
  logic              poll_due, rd_wait;
  logic              pick_any;
  logic [IW-1:0]     pick_q;

  // Lowest waiting queue.
  always_comb begin
    pick_any = 1'b0;
    pick_q   = '0;
    for (int q = NUM_VL - 1; q >= 0; q--) begin
      if (pend[q]) begin
        pick_any = 1'b1;
        pick_q   = IW'(q);
      end
    end
  end

  assign poll_due = (poll_cnt == '0);

  typedef enum logic [1:0] {OP_NONE, OP_EN, OP_POLL, OP_JIT} op_e;
  op_e op;

  // no port B access while reset is asserted, whatever the registers hold
  always_comb begin
    if (!rst_n)        op = OP_NONE;
    else if (en_phase) op = OP_EN;
    else if (poll_due) op = OP_POLL;
    else if (pick_any) op = OP_JIT;
    else               op = OP_NONE;
  end

  always_comb begin
    b_en   = (op != OP_NONE);
    b_we   = '0;
    b_addr = '0;
    b_din  = '0;
    unique case (op)
      OP_EN: begin
        b_we   = '1;
        b_addr = EN_BASE + STRIDE * ADDR_W'(en_q);
        b_din  = 32'd1;
      end
      OP_POLL: b_addr = ADDR_W'(SEL_ADDR);
      OP_JIT: begin
        b_we   = '1;
        b_addr = JIT_BASE + STRIDE * ADDR_W'(pick_q);
        b_din  = 32'(pend_val[pick_q]);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend           <= '0;
      en_phase       <= 1'b0;
      en_q           <= '0;
      poll_cnt       <= PW'(POLL_PERIOD - 1);
      rd_wait        <= 1'b0;
      sch_select     <= SCH_SB;
      jitter_dropped <= 1'b0;
    end else begin
      // a due poll waits while the second write of a pair takes the port
      if (op == OP_POLL)  poll_cnt <= PW'(POLL_PERIOD - 1);
      else if (!poll_due) poll_cnt <= poll_cnt - 1'b1;
      rd_wait  <= (op == OP_POLL);
      if (rd_wait) sch_select <= sched_sel_e'(b_dout[1:0]);

      en_phase <= (op == OP_JIT);
      if (op == OP_JIT) en_q <= pick_q;

      jitter_dropped <= 1'b0;
      for (int q = 0; q < NUM_VL; q++) begin
        if (op == OP_JIT && pick_q == IW'(q)) pend[q] <= 1'b0;
        if (queue_enable[q]) begin
          pend[q]     <= 1'b1;
          pend_val[q] <= queue_jitter[q];
          if (pend[q] && !(op == OP_JIT && pick_q == IW'(q))) jitter_dropped <= 1'b1;
        end
      end
    end
  end

endmodule
