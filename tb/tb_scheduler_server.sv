// Self-checking testbench for scheduler_server (8 VLs). The decider is a
// testbench model answering each trigger 3 cycles later, either with "no
// queue" (the server must trigger again) or with a VL that has a frame
// queued. The VL byte queues are modelled too, holding frames with their
// big-endian two-byte length header; their valid flags drop at random to
// make the server wait. Checked: one grant per decision for the chosen VL,
// one cycle after deciderDone; the frame bytes in order with tx_sof/tx_eof
// and tx_vl; the first byte 3 cycles after the grant when no byte is
// missing; a new trigger the cycle after the last byte; zero-length frames.
module tb_scheduler_server;
  localparam int NUM_VL = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, dec_trig, dec_done, dec_found, tx_valid, tx_sof, tx_eof, busy, stall;
  logic [2:0] dec_index, tx_vl;
  logic [NUM_VL-1:0] served, byte_valid, byte_pop;
  logic [7:0] byte_data [NUM_VL];
  logic [7:0] tx_data;

  scheduler_server dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] q_bytes [NUM_VL][$];
  int         q_frames [NUM_VL][$];   // frame lengths queued per VL
  bit         hold [NUM_VL];
  int n_retrig = 0, n_frames = 0, n_stall = 0, n_zero = 0, n_fast = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  task automatic add_frame(int q, int len);
    q_frames[q].push_back(len);
    q_bytes[q].push_back(8'(len >> 8));
    q_bytes[q].push_back(8'(len));
    for (int i = 0; i < len; i++) q_bytes[q].push_back(8'(q * 16 + i));
  endtask

  // byte queue heads, with random holes (byte not loaded yet); refreshed
  // every time unit so that queue changes are seen before the next edge
  always #1
    for (int q = 0; q < NUM_VL; q++) begin
      byte_valid[q] = (q_bytes[q].size() > 0) && !hold[q];
      byte_data[q]  = (q_bytes[q].size() > 0) ? q_bytes[q][0] : 8'h00;
    end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d frames served", n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decider model
  int pick;
  initial begin
    dec_done = 0; dec_found = 0; dec_index = 0;
    forever begin
      @(negedge clk);
      if (dec_trig && rst_n) begin
        int cand[$];
        cand.delete();
        for (int q = 0; q < NUM_VL; q++) if (q_frames[q].size() > 0) cand.push_back(q);
        repeat (3) @(posedge clk);
        #1;
        dec_done = 1;
        if (cand.size() == 0 || $urandom_range(0, 4) == 0) begin
          dec_found = 0; pick = -1;
        end else begin
          dec_found = 1; pick = cand[$urandom_range(0, cand.size() - 1)];
          dec_index = 3'(pick);
        end
        @(posedge clk);
        #1;
        dec_done = 0;
      end
    end
  end

  // checker of the server's behaviour, cycle by cycle
  initial begin
    int state_vl, exp_len, got, cyc_grant, first_cyc;
    bit missed, will_pop;
    rst_n = 0;
    for (int q = 0; q < NUM_VL; q++) hold[q] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int q;
      q = $urandom_range(0, NUM_VL - 1);
      add_frame(q, ($urandom_range(0, 9) == 0) ? 0 : $urandom_range(1, 60));
    end
    while (n_frames < 400) begin
      // wait for a decision
      @(negedge clk);
      while (!dec_done) @(negedge clk);
      if (!dec_found) begin
        n_retrig++;
        @(negedge clk);
        check(dec_trig, "retrigger after an empty decision");
        continue;
      end
      state_vl = pick;
      @(negedge clk);
      check(served == NUM_VL'(1) << state_vl, "grant one cycle after done");
      exp_len = q_frames[state_vl].pop_front();
      @(negedge clk);
      got = 0; missed = 0; first_cyc = 0;
      for (int i = 0; i < exp_len + 2 || exp_len == 0 && i < 2; ) begin
        // random holes in the byte stream
        for (int k = 0; k < NUM_VL; k++) hold[k] = ($urandom_range(0, 5) == 0);
        #2;
        if (!byte_valid[state_vl]) begin
          missed = 1; n_stall++;
          check(stall && !tx_valid && byte_pop == '0, "stall while byte missing");
        end else begin
          check(byte_pop == NUM_VL'(1) << state_vl, "pop of the served VL");
          if (i >= 2) begin
            check(tx_valid && tx_vl == 3'(state_vl) && tx_data == q_bytes[state_vl][0], "frame byte");
            check(tx_sof == (i == 2) && tx_eof == (i == exp_len + 1), $sformatf("sof/eof i=%0d len=%0d sof=%b eof=%b", i, exp_len, tx_sof, tx_eof));
            if (i == 2) first_cyc = 1;
          end else check(!tx_valid, "no output during header");
        end
        will_pop = byte_pop[state_vl];
        check(byte_pop == (will_pop ? NUM_VL'(1) << state_vl : '0), "pops only the served VL");
        @(posedge clk);
        if (will_pop) begin
          void'(q_bytes[state_vl].pop_front());
          i++;
        end
        @(negedge clk);
        got++;
      end
      for (int k = 0; k < NUM_VL; k++) hold[k] = 0;
      if (exp_len == 0) n_zero++;
      if (!missed && exp_len > 0) begin
        n_fast++;
        check(got == exp_len + 2, "one byte per cycle without holes");
      end
      check(dec_trig, "trigger after the frame");
      n_frames++;
    end
    check(n_retrig > 10 && n_stall > 10 && n_zero > 5 && n_fast > 10, $sformatf("retrigger %0d, stall %0d, empty %0d, fast %0d", n_retrig, n_stall, n_zero, n_fast));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
