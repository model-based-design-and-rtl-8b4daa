// Memory module of the End System: the virtual-link queues.
//
// Every VL has two FIFOs. The frame FIFO takes the frame bytes (two-byte
// length header first) one byte per push and reports how many bytes it
// holds. The head-of-line FIFO takes, when a frame starts to be loaded, the
// 80-bit record {arrival time, length}; the arrival time is the value of a
// 64-bit free-running cycle counter in the cycle of the length push. The
// schedulers read these records without popping them (first-word fall-
// through) to compare arrival times (FIFO scheduling) and lengths (Smallest
// Size scheduling) of the queues' head-of-line frames.
//
// Interface per VL: ld_len/ld_len_push and ld_data/ld_data_push from the
// traffic loaders; hol/hol_valid/hol_pop and byte_data/byte_valid/byte_pop
// towards the server; queue_bytes is the frame FIFO's byte count. overflow
// pulses when a push to a full FIFO of that VL was dropped. Timing: pushes
// are visible one cycle later. FIFO depths are this implementation's choice.
module vl_memory
  import es_pkg::*;
#(
  parameter int NUM_VL      = 8,
  parameter int FRAME_DEPTH = 4096,
  parameter int HOL_DEPTH   = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  // traffic loader side
  input  logic [LEN_W-1:0]   ld_len       [NUM_VL],
  input  logic [NUM_VL-1:0]  ld_len_push,
  input  logic [7:0]         ld_data      [NUM_VL],
  input  logic [NUM_VL-1:0]  ld_data_push,
  // server side
  output hol_t               hol          [NUM_VL],
  output logic [NUM_VL-1:0]  hol_valid,
  input  logic [NUM_VL-1:0]  hol_pop,
  output logic [QSIZE_W-1:0] queue_bytes  [NUM_VL],
  output logic [7:0]         byte_data    [NUM_VL],
  output logic [NUM_VL-1:0]  byte_valid,
  input  logic [NUM_VL-1:0]  byte_pop,
  output logic [NUM_VL-1:0]  overflow,
  output logic [TIME_W-1:0]  now
);

  always_ff @(posedge clk) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  for (genvar q = 0; q < NUM_VL; q++) begin : g_vl
    logic hol_empty, hol_full, hol_ovf;
    logic frm_empty, frm_full, frm_ovf;
    logic [$clog2(HOL_DEPTH):0] hol_count;
    hol_t hol_in, hol_out;

    assign hol_in = '{arrival: now, length: ld_len[q]};

    fwft_fifo #(.WIDTH(HOL_W), .DEPTH(HOL_DEPTH)) u_hol (
      .clk, .rst_n,
      .wr_en(ld_len_push[q]), .wr_data(hol_in),
      .rd_en(hol_pop[q]),     .rd_data(hol_out),
      .empty(hol_empty), .full(hol_full), .count(hol_count), .overflow(hol_ovf)
    );

    frame_fifo #(.DEPTH(FRAME_DEPTH), .CNT_W(QSIZE_W)) u_frame (
      .clk, .rst_n,
      .wr_en(ld_data_push[q]), .wr_data(ld_data[q]),
      .rd_en(byte_pop[q]),     .rd_data(byte_data[q]),
      .empty(frm_empty), .full(frm_full), .count(queue_bytes[q]), .overflow(frm_ovf)
    );

    assign hol[q]        = hol_out;
    assign hol_valid[q]  = !hol_empty;
    assign byte_valid[q] = !frm_empty;
    assign overflow[q]   = hol_ovf || frm_ovf;
  end

endmodule
