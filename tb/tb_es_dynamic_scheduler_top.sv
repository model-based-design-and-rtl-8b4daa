// End-to-end testbench of es_dynamic_scheduler_top at its default
// parameters (8 VLs, 4 KB frame FIFOs, 125 MHz cycle time base).
//
// Traffic: configuration "scenario 1" of the design's evaluation - per VL a
// frame length of 1400, 1200, ... 100 bytes, a BAG of 50, 100, ... 400 us
// (6250 x k cycles) and Poisson arrivals of 220, 92, 50, 30, 16, 8, 3 and
// 1 Mbit/s (mean gap = length x 1000 / rate cycles). One loader process per
// VL pushes each frame's length, then its header and bytes at one byte per
// cycle, pausing now and then for 1 to 16 cycles; it holds a frame back while the
// VL's frame FIFO lacks room for it.
//
// Processor model: a polling loop on BRAM port A that, for each queue, reads
// QueueEnable, and if set reads QueueJitter, clears QueueEnable and updates
// that queue's running maximum and frame count; it then writes the
// Scheduler Select word at 0x200. Phase 1 (10 ms) rotates the algorithm
// SB -> LQ -> FIFO -> SS every 2.5 ms. Phase 2 restarts the statistics
// with SB from a cold start - the queues are first drained, then every
// VL's first frame arrives in the same cycle - and switches to SS once the
// maximum jitter of queue 5 exceeds 2000 cycles, then runs 2.5 ms more.
// Phase 3 drains the queues again and runs configuration "scenario 2"
// (lengths 160, 320, ... 1280 bytes, the same BAGs, 25 Mbit/s per VL) for
// 5 ms under SB and 5 ms under SS.
//
// Checked: every frame leaves intact, in order per VL; grants of a VL are
// at least one BAG apart; every jitter the processor reads equals the
// eligible-to-grant time measured on the top's eligible/served ports; the
// applied algorithm follows the select word; no FIFO overflows; all frames
// are accounted for at the end. Counted, and required at least once: each
// algorithm deciding, select switches, the queue-5 threshold switch, BAG
// holds, empty decisions (retrigger), server stalls.
module tb_es_dynamic_scheduler_top;
  import es_pkg::*;
  localparam int NUM_VL = 8;
  localparam longint MS = 125000;   // cycles per millisecond

  logic clk = 1'b0;
  always #4 clk = ~clk;             // 8 ns: 125 MHz
  logic rst_n;
  logic [LEN_W-1:0]   ld_len [NUM_VL];
  logic [NUM_VL-1:0]  ld_len_push, ld_data_push, eligible, served, overflow;
  logic [7:0]         ld_data [NUM_VL];
  logic               bag_we, tx_valid, tx_sof, tx_eof, stall, retrigger, jitter_dropped;
  logic [2:0]         bag_idx, tx_vl;
  logic [BAG_W-1:0]   bag_val;
  logic [7:0]         tx_data;
  logic               bram_a_en;
  logic [3:0]         bram_a_we;
  logic [11:0]        bram_a_addr;
  logic [31:0]        bram_a_din, bram_a_dout;
  sched_sel_e         sch_select;
  logic [QSIZE_W-1:0] queue_bytes [NUM_VL];

  es_dynamic_scheduler_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  int LEN  [NUM_VL] = '{1400, 1200, 1000, 800, 600, 400, 200, 100};
  int RATE [NUM_VL] = '{220, 92, 50, 30, 16, 8, 3, 1};
  int BAGC [NUM_VL];

  longint cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  // ---------------- watchdog ----------------
  initial begin
    repeat (60 * MS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- loaders ----------------
  logic [7:0] exp_bytes [NUM_VL][$];
  int         exp_len   [NUM_VL][$];
  int         n_loaded  [NUM_VL];
  bit         loading = 1'b0;
  int         reserved  [NUM_VL];   // bytes pushed but not yet visible in queue_bytes

  task automatic load_frame(int q, int len);
    exp_len[q].push_back(len);
    n_loaded[q]++;
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
      if (i >= 2 && $urandom_range(0, 300) == 0) begin   // loader pause
        @(negedge clk);
        ld_len_push[q] = 1'b0; ld_data_push[q] = 1'b0;
        repeat ($urandom_range(0, 15)) @(negedge clk);
      end
    end
    @(negedge clk);
    ld_len_push[q] = 1'b0; ld_data_push[q] = 1'b0;
  endtask

  task automatic loader(int q, bit cold_start);
    real mean_gap;
    longint next_t;
    bit first;
    mean_gap = real'(LEN[q]) * 1000.0 / real'(RATE[q]);
    next_t = cyc;
    first = cold_start;
    while (loading) begin
      real u;
      u = (real'($urandom_range(1, 1000000))) / 1000001.0;
      if (!first) next_t = next_t + longint'(-mean_gap * $ln(u));
      first = 1'b0;
      while (cyc < next_t && loading) @(negedge clk);
      if (!loading) break;
      // wait for room in the frame FIFO (4096 bytes)
      while (queue_bytes[q] + LEN[q] + 2 > 4096) @(negedge clk);
      load_frame(q, LEN[q]);
    end
  endtask

  // ---------------- output checker ----------------
  int out_pos = 0, out_vl = 0, out_len = 0;
  int n_sent [NUM_VL];
  always @(posedge clk) if (rst_n && tx_valid) begin
    if (out_pos == 0) begin
      out_vl = tx_vl;
      check(tx_sof && exp_len[out_vl].size() > 0, "frame start expected");
      out_len = (exp_len[out_vl].size() > 0) ? exp_len[out_vl].pop_front() : 1;
    end
    if (exp_bytes[out_vl].size() > 0) begin
      if (tx_data != exp_bytes[out_vl][0] || tx_vl != 3'(out_vl)) check(1'b0, $sformatf("byte vl%0d pos %0d", out_vl, out_pos));
      void'(exp_bytes[out_vl].pop_front());
    end else check(1'b0, "unexpected byte");
    out_pos++;
    if (tx_eof != (out_pos == out_len)) check(1'b0, "eof");
    if (out_pos == out_len) begin out_pos = 0; n_sent[out_vl]++; checks++; end
  end

  // ---------------- reference jitter and mechanism counters ----------------
  longint elig_start [NUM_VL];
  longint last_grant [NUM_VL];
  int     ref_jit [NUM_VL][$];
  logic [NUM_VL-1:0] elig_prev = '0;
  int n_dec [4] = '{0, 0, 0, 0};
  int n_hold = 0, n_stall = 0, n_retrig = 0, n_switch = 0, n_overflow = 0;
  sched_sel_e sel_prev = SCH_SB;
  always @(posedge clk) if (rst_n) begin
    for (int q = 0; q < NUM_VL; q++) begin
      if (eligible[q] && !elig_prev[q]) elig_start[q] = cyc;
      if (served[q]) begin
        ref_jit[q].push_back(int'(cyc - elig_start[q]));
        if (cyc - last_grant[q] < BAGC[q]) check(1'b0, $sformatf("BAG spacing vl%0d", q));
        else checks++;
        last_grant[q] = cyc;
      end
      if (dut.hol_valid[q] && !dut.shaper_status[q] && !eligible[q] && !served[q]) n_hold++;
    end
    elig_prev = eligible;
    if (served != '0) n_dec[dut.active_sel]++;
    if (stall) n_stall++;
    if (retrigger) n_retrig++;
    if (overflow != '0) n_overflow++;
    if (sch_select != sel_prev) n_switch++;
    sel_prev = sch_select;
  end

  // ---------------- processor model on BRAM port A ----------------
  int  ps_max [NUM_VL];
  int  ps_cnt [NUM_VL];
  bit  threshold_switch = 0;
  longint switch_time = 0;

  task automatic bram_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    bram_a_en = 1'b1; bram_a_we = 4'h0; bram_a_addr = a;
    @(negedge clk);
    bram_a_en = 1'b0;
    d = bram_a_dout;
  endtask

  task automatic bram_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    bram_a_en = 1'b1; bram_a_we = 4'hF; bram_a_addr = a; bram_a_din = d;
    @(negedge clk);
    bram_a_en = 1'b0; bram_a_we = 4'h0;
  endtask

  task automatic ps_poll_once();
    logic [31:0] en, jit;
    for (int q = 0; q < NUM_VL; q++) begin
      bram_read(12'h090 + 12'(16 * q), en);
      if (en[0]) begin
        bram_read(12'h010 + 12'(16 * q), jit);
        bram_write(12'h090 + 12'(16 * q), 32'd0);
        if (ref_jit[q].size() == 0) check(1'b0, $sformatf("jitter of q%0d without a grant", q + 1));
        else begin
          int r;
          r = ref_jit[q].pop_front();
          check(int'(jit) == r, $sformatf("q%0d jitter %0d, measured %0d", q + 1, jit, r));
        end
        if (int'(jit) > ps_max[q]) ps_max[q] = int'(jit);
        ps_cnt[q]++;
      end
    end
  endtask

  task automatic ps_run(longint t_until, bit rotate, bit threshold);
    while (cyc < t_until) begin
      ps_poll_once();
      if (rotate) bram_write(12'h200, 32'((cyc / (MS * 5 / 2)) % 4));
      if (threshold && !threshold_switch && ps_max[4] > 2000) begin
        bram_write(12'h200, 32'(SCH_SS));
        threshold_switch = 1;
        switch_time = cyc;
        $display("queue 5 maximum jitter %0d cycles: switching SB -> SS at %0d us", ps_max[4], cyc / 125);
      end
    end
  endtask

  initial begin
    longint t_end;
    rst_n = 1'b0; ld_len_push = '0; ld_data_push = '0; bag_we = 1'b0; bag_idx = '0; bag_val = '0;
    bram_a_en = 1'b0; bram_a_we = '0; bram_a_addr = '0; bram_a_din = '0;
    for (int q = 0; q < NUM_VL; q++) begin
      ld_len[q] = '0; ld_data[q] = '0; BAGC[q] = 6250 * (q + 1); last_grant[q] = -1000000;
      n_loaded[q] = 0; n_sent[q] = 0; ps_max[q] = 0; ps_cnt[q] = 0; elig_start[q] = 0;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int q = 0; q < NUM_VL; q++) begin
      @(negedge clk);
      bag_we = 1'b1; bag_idx = 3'(q); bag_val = 32'(BAGC[q]);
    end
    @(negedge clk);
    bag_we = 1'b0;

    loading = 1'b1;
    for (int q = 0; q < NUM_VL; q++) begin
      automatic int qq = q;
      fork loader(qq, 1'b0); join_none
    end

    // phase 1: rotate the algorithm every 2.5 ms for 10 ms
    ps_run(10 * MS, 1'b1, 1'b0);
    // phase 2: SB from a cold start (queues drained, then every VL's first
    // frame arrives in the same cycle); switch to SS when queue 5's maximum
    // jitter exceeds 2000 cycles
    loading = 1'b0;
    bram_write(12'h200, 32'(SCH_SB));
    ps_run(cyc + 2 * MS, 1'b0, 1'b0);
    for (int q = 0; q < NUM_VL; q++) ps_max[q] = 0;
    @(negedge clk);
    loading = 1'b1;
    for (int q = 0; q < NUM_VL; q++) begin
      automatic int qq = q;
      fork loader(qq, 1'b1); join_none
    end
    t_end = 30 * MS;
    while (cyc < t_end) begin
      ps_run(cyc + MS / 10, 1'b0, 1'b1);
      if (threshold_switch && t_end > switch_time + MS * 5 / 2) t_end = switch_time + MS * 5 / 2;
    end
    loading = 1'b0;
    ps_run(cyc + 2 * MS, 1'b0, 1'b0);
    for (int q = 0; q < NUM_VL; q++) $display("Q%0d: phase 2 maximum jitter %0d cycles", q + 1, ps_max[q]);

    // phase 3: scenario 2 traffic, 5 ms under SB then 5 ms under SS
    for (int q = 0; q < NUM_VL; q++) begin
      LEN[q] = 160 * (q + 1); RATE[q] = 25;
    end
    for (int s = 0; s < 2; s++) begin
      for (int q = 0; q < NUM_VL; q++) ps_max[q] = 0;
      bram_write(12'h200, (s == 0) ? 32'(SCH_SB) : 32'(SCH_SS));
      loading = 1'b1;
      for (int q = 0; q < NUM_VL; q++) begin
        automatic int qq = q;
        fork loader(qq, 1'b0); join_none
      end
      ps_run(cyc + 5 * MS, 1'b0, 1'b0);
      loading = 1'b0;
      ps_run(cyc + 2 * MS, 1'b0, 1'b0);
      for (int q = 0; q < NUM_VL; q++)
        $display("scenario 2 %s Q%0d: maximum jitter %0d cycles", (s == 0) ? "SB" : "SS", q + 1, ps_max[q]);
    end

    for (int q = 0; q < NUM_VL; q++) begin
      check(n_sent[q] == n_loaded[q] && exp_bytes[q].size() == 0, $sformatf("vl%0d all frames sent (%0d of %0d)", q, n_sent[q], n_loaded[q]));
      check(ps_cnt[q] == n_sent[q], $sformatf("q%0d jitter reports %0d frames %0d", q + 1, ps_cnt[q], n_sent[q]));
      $display("Q%0d: frames %0d", q + 1, n_sent[q]);
    end
    $display("decisions SB %0d LQ %0d FIFO %0d SS %0d; select switches %0d; BAG holds %0d; retriggers %0d; stalls %0d",
             n_dec[0], n_dec[1], n_dec[2], n_dec[3], n_switch, n_hold, n_retrig, n_stall);
    for (int s = 0; s < 4; s++) check(n_dec[s] > 0, $sformatf("algorithm %0d used", s));
    check(n_switch >= 4, "select switches");
    check(threshold_switch, "queue-5 threshold switch happened");
    check(n_hold > 0, "BAG hold happened");
    check(n_retrig > 0, "empty decision happened");
    check(n_stall > 0, "server stall happened");
    check(n_overflow == 0, "no FIFO overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
