// Scheduler server: turns scheduling decisions into a byte stream.
//
// When idle the server pulses deciderTrig (dec_trig) and waits for
// deciderDone. If no queue was eligible it triggers again at once; otherwise
// it grants the chosen VL for one cycle (served), which clears its
// eligibility, restarts its BAG and ends its jitter count, and then serves
// the VL's head-of-line frame from its frame FIFO: first the two-byte length
// header (most significant byte first), then that many frame bytes, one byte
// per clock (1 Gbit/s at 125 MHz). If a byte has not yet been loaded into the
// FIFO the server waits for it.
//
// Interface: dec_* to/from the decider; byte_data/byte_valid/byte_pop to the
// VL memory; tx_valid/tx_data with tx_sof/tx_eof marking the first and last
// frame byte and tx_vl the link being served. Timing: trigger, decision after
// the decider latency, grant the following cycle, two header cycles, then the
// frame bytes; the next trigger is issued in the cycle after the last byte.
// The header format and the wait-for-data behaviour are this
// implementation's choices.
module scheduler_server
  import es_pkg::*;
#(
  parameter int NUM_VL = 8,
  localparam int IW    = (NUM_VL > 1) ? $clog2(NUM_VL) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              dec_trig,
  input  logic              dec_done,
  input  logic              dec_found,
  input  logic [IW-1:0]     dec_index,
  output logic [NUM_VL-1:0] served,
  input  logic [7:0]        byte_data  [NUM_VL],
  input  logic [NUM_VL-1:0] byte_valid,
  output logic [NUM_VL-1:0] byte_pop,
  output logic              tx_valid,
  output logic [7:0]        tx_data,
  output logic              tx_sof,
  output logic              tx_eof,
  output logic [IW-1:0]     tx_vl,
  output logic              busy,
  output logic              stall
);

  typedef enum logic [2:0] {S_TRIG, S_WAIT, S_GRANT, S_HDR_HI, S_HDR_LO, S_DATA} state_e;

  state_e         state;
  logic [IW-1:0]  vl;
  logic [LEN_W-1:0] len_hi_byte_q;
  logic [LEN_W-1:0] remaining;
  logic           first;
  logic           head_valid;
  logic [7:0]     head_byte;

  assign head_valid = byte_valid[vl];
  assign head_byte  = byte_data[vl];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_TRIG;
      vl            <= '0;
      len_hi_byte_q <= '0;
      remaining     <= '0;
      first         <= 1'b0;
    end else begin
      unique case (state)
        S_TRIG: state <= S_WAIT;
        S_WAIT: if (dec_done) begin
          if (dec_found) begin
            vl    <= dec_index;
            state <= S_GRANT;
          end else begin
            state <= S_TRIG;
          end
        end
        S_GRANT: state <= S_HDR_HI;
        S_HDR_HI: if (head_valid) begin
          len_hi_byte_q <= LEN_W'(head_byte);
          state         <= S_HDR_LO;
        end
        S_HDR_LO: if (head_valid) begin
          remaining <= {len_hi_byte_q[7:0], head_byte};
          first     <= 1'b1;
          state     <= ({len_hi_byte_q[7:0], head_byte} == '0) ? S_TRIG : S_DATA;
        end
        S_DATA: if (head_valid) begin
          first     <= 1'b0;
          remaining <= remaining - 1'b1;
          if (remaining == LEN_W'(1)) state <= S_TRIG;
        end
        default: state <= S_TRIG;
      endcase
    end
  end

  always_comb begin
    dec_trig = (state == S_TRIG);
    served   = '0;
    byte_pop = '0;
    if (state == S_GRANT) served[vl] = 1'b1;
    if ((state == S_HDR_HI || state == S_HDR_LO || state == S_DATA) && head_valid)
      byte_pop[vl] = 1'b1;
  end

  assign tx_valid = (state == S_DATA) && head_valid;
  assign tx_data  = head_byte;
  assign tx_sof   = tx_valid && first;
  assign tx_eof   = tx_valid && (remaining == LEN_W'(1));
  assign tx_vl    = vl;
  assign busy     = (state == S_GRANT) || (state == S_HDR_HI) || (state == S_HDR_LO) || (state == S_DATA);
  assign stall    = (state == S_HDR_HI || state == S_HDR_LO || state == S_DATA) && !head_valid;

endmodule
