// Self-checking testbench for dynamic_server with 32 VLs, the size at which
// the extremum tree grows a third level (Min4, Min4, Min2) and a decision
// takes 4 cycles. It is the 8-VL testbench with wider VL indices, a lighter
// offered load per VL, loader pauses of 1 to 4 cycles, and latency bounds for the longer decision. Frames
// are loaded through a vl_memory instance by one loader process per VL;
// the scheduler select cycles through SB, LQ, FIFO and SS. Checked:
//  - every frame leaves intact and in order per VL, with tx_sof/tx_eof/tx_vl;
//  - grants on a VL are at least its BAG apart (leaky bucket);
//  - each grant goes to the VL the selected algorithm must choose among the
//    VLs eligible when the decision was triggered (lowest index on ties);
//  - a frame loaded into an idle server starts 10 to 14 cycles after its
//    length push (eligibility 2 cycles, trigger phase 0-4, decision 4,
//    grant 1, header 2);
//  - stall, empty decisions and BAG holds all occur.
module tb_dynamic_server_32vl;
  import es_pkg::*;
  localparam int NUM_VL = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [LEN_W-1:0]   ld_len [NUM_VL];
  logic [NUM_VL-1:0]  ld_len_push, ld_data_push, hol_valid, hol_pop, byte_valid, byte_pop, overflow;
  logic [7:0]         ld_data [NUM_VL];
  hol_t               hol [NUM_VL];
  logic [QSIZE_W-1:0] queue_bytes [NUM_VL];
  logic [7:0]         byte_data [NUM_VL];
  logic [TIME_W-1:0]  now;
  sched_sel_e         sel, active_sel;
  logic               bag_we;
  logic [4:0]         bag_idx;
  logic [BAG_W-1:0]   bag_val;
  logic               tx_valid, tx_sof, tx_eof, stall, retrigger;
  logic [7:0]         tx_data;
  logic [4:0]         tx_vl;
  logic [NUM_VL-1:0]  eligible, served, shaper_status;

  vl_memory #(.NUM_VL(NUM_VL)) u_mem (.*);
  dynamic_server #(.NUM_VL(NUM_VL)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  int         m_bag [NUM_VL];
  logic [7:0] exp_bytes [NUM_VL][$];   // frame bytes (no header) in load order
  int         exp_len [NUM_VL][$];
  longint     cyc = 0;
  longint     last_grant [NUM_VL];
  int         expected_pick = -1;
  int         n_dec [4] = '{0, 0, 0, 0};
  int         n_stall = 0, n_retrig = 0, n_hold = 0, n_frames = 0, n_lat = 0;
  bit         loading = 1'b1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) cyc <= cyc + 1;

  // reference decision, taken at each trigger
  function automatic int reference_pick();
    int best = -1;
    for (int q = 0; q < NUM_VL; q++) begin
      if (!eligible[q]) continue;
      if (best < 0) begin best = q; continue; end
      case (sel)
        SCH_SB:   if (m_bag[q] < m_bag[best]) best = q;
        SCH_LQ:   if (queue_bytes[q] > queue_bytes[best]) best = q;
        SCH_FIFO: if (hol[q].arrival < hol[best].arrival) best = q;
        default:  if (hol[q].length < hol[best].length) best = q;
      endcase
    end
    return best;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (dut.dec_trig) expected_pick = reference_pick();
    if (dut.dec_trig && expected_pick >= 0) n_dec[sel]++;
    if (stall) n_stall++;
    if (retrigger) n_retrig++;
    for (int q = 0; q < NUM_VL; q++) if (hol_valid[q] && !shaper_status[q] && !eligible[q] && !served[q]) n_hold++;
    if (served != '0) begin
      int q;
      q = $clog2(served);
      check(served == NUM_VL'(1) << q, "single grant");
      check(q == expected_pick, $sformatf("sel %0d granted vl%0d expected vl%0d", active_sel, q, expected_pick));
      check(cyc - last_grant[q] >= m_bag[q], $sformatf("BAG spacing vl%0d: %0d < %0d", q, cyc - last_grant[q], m_bag[q]));
      last_grant[q] = cyc;
    end
  end

  // output stream checker
  int out_pos = 0, out_vl = -1, out_len = 0;
  always @(posedge clk) if (rst_n && tx_valid) begin
    if (out_pos == 0) begin
      out_vl = tx_vl;
      check(tx_sof, "sof on first byte");
      check(exp_len[out_vl].size() > 0, "frame expected");
      out_len = (exp_len[out_vl].size() > 0) ? exp_len[out_vl].pop_front() : 1;
    end else check(!tx_sof && tx_vl == 5'(out_vl), "sof only at start / vl steady");
    check(exp_bytes[out_vl].size() > 0 && tx_data == exp_bytes[out_vl][0], $sformatf("byte vl%0d pos %0d", out_vl, out_pos));
    if (exp_bytes[out_vl].size() > 0) void'(exp_bytes[out_vl].pop_front());
    out_pos++;
    check(tx_eof == (out_pos == out_len), "eof at frame end");
    if (out_pos == out_len) begin out_pos = 0; n_frames++; end
  end

  task automatic load_frame(int q, int len);
    if (len > 0) exp_len[q].push_back(len);   // an empty frame sends nothing
    for (int i = 0; i < len + 2; i++) begin
      @(negedge clk);
      ld_len_push[q]  = (i == 0);
      ld_len[q]       = 16'(len);
      ld_data_push[q] = 1'b1;
      if (i == 0)      ld_data[q] = 8'(len >> 8);
      else if (i == 1) ld_data[q] = 8'(len);
      else begin
        ld_data[q] = 8'($urandom());
        exp_bytes[q].push_back(ld_data[q]);
      end
      // occasionally a byte arrives late
      if (i >= 2 && $urandom_range(0, 30) == 0) begin
        @(negedge clk);
        ld_len_push[q] = 1'b0; ld_data_push[q] = 1'b0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    @(negedge clk);
    ld_len_push[q] = 1'b0; ld_data_push[q] = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; ld_len_push = '0; ld_data_push = '0; bag_we = 1'b0; bag_idx = '0; bag_val = '0;
    sel = SCH_SB;
    for (int q = 0; q < NUM_VL; q++) begin ld_len[q] = '0; ld_data[q] = '0; last_grant[q] = -100000; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int q = 0; q < NUM_VL; q++) begin
      m_bag[q] = 100 + 60 * q + $urandom_range(0, 40);
      @(negedge clk);
      bag_we = 1'b1; bag_idx = 5'(q); bag_val = 32'(m_bag[q]);
    end
    @(negedge clk);
    bag_we = 1'b0;
    repeat (20) @(negedge clk);

    // idle-start latency: one frame into an idle server, several phases
    for (int k = 0; k < 8; k++) begin
      longint t0;
      int lat;
      t0 = cyc + 1;   // the length push is sampled at the end of the next cycle
      fork load_frame((5 * k) % NUM_VL, 20); join_none
      while (!(tx_valid && tx_sof)) @(posedge clk);
      lat = int'(cyc - t0);
      check(lat >= 10 && lat <= 14, $sformatf("idle start latency %0d", lat));
      n_lat++;
      repeat (700 + k) @(negedge clk);
    end

    // random traffic on all VLs while the select changes
    fork
      for (int s = 0; s < 16; s++) begin
        @(negedge clk);
        sel = sched_sel_e'(s % 4);
        repeat (9000) @(negedge clk);
      end
      begin
        for (int q = 0; q < NUM_VL; q++) begin
          automatic int qq = q;
          fork
            while (loading) begin
              load_frame(qq, $urandom_range(0, 9) == 0 ? 0 : $urandom_range(8, 120));
              repeat ($urandom_range(600, 2800 + 400 * qq)) @(negedge clk);
            end
          join_none
        end
      end
    join
    loading = 1'b0;
    repeat (20000) @(negedge clk);
    for (int q = 0; q < NUM_VL; q++) check(exp_len[q].size() == 0 && exp_bytes[q].size() == 0, $sformatf("vl%0d drained", q));
    for (int s = 0; s < 4; s++) check(n_dec[s] > 50, $sformatf("decisions with select %0d: %0d", s, n_dec[s]));
    check(n_stall > 0 && n_retrig > 0 && n_hold > 0 && n_frames > 500,
          $sformatf("stall %0d retrigger %0d hold %0d frames %0d", n_stall, n_retrig, n_hold, n_frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
