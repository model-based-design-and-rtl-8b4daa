// Self-checking testbench for vl_memory (8 VLs, default FIFO depths).
// Loads frames (length push, then header and bytes) on random VLs at random
// times and checks per VL: the head-of-line record {arrival time, length},
// where the arrival time must equal the cycle count since reset at the
// length push; the byte count; the byte order; and the overflow flag when a
// VL's head-of-line FIFO is filled past its depth.
module tb_vl_memory;
  import es_pkg::*;
  localparam int NUM_VL = 8;
  localparam int HOL_DEPTH = 64;

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

  vl_memory dut (.*);

  int checks = 0, failures = 0;
  hol_t       m_hol [NUM_VL][$];
  logic [7:0] m_byte [NUM_VL][$];
  longint     cyc;
  int         n_ovf = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle counter of the testbench: cycles since reset was released
  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  task automatic cycle_step(input bit allow_load, input bit allow_pop);
    for (int q = 0; q < NUM_VL; q++) begin
      ld_len_push[q]  = allow_load && ($urandom_range(0, 9) == 0);
      ld_len[q]       = 16'($urandom_range(1, 1500));
      ld_data_push[q] = allow_load && ($urandom_range(0, 1) == 0);
      ld_data[q]      = 8'($urandom());
      hol_pop[q]      = allow_pop && ($urandom_range(0, 7) == 0);
      byte_pop[q]     = allow_pop && ($urandom_range(0, 2) == 0);
    end
    @(posedge clk);
    for (int q = 0; q < NUM_VL; q++) begin
      if (hol_pop[q] && m_hol[q].size() > 0) void'(m_hol[q].pop_front());
      if (byte_pop[q] && m_byte[q].size() > 0) void'(m_byte[q].pop_front());
      if (ld_len_push[q]) begin
        if (m_hol[q].size() < HOL_DEPTH) m_hol[q].push_back('{arrival: 64'(cyc), length: ld_len[q]});
      end
      if (ld_data_push[q]) m_byte[q].push_back(ld_data[q]);
    end
    @(negedge clk);
    for (int q = 0; q < NUM_VL; q++) begin
      if (overflow[q]) n_ovf++;
      check(hol_valid[q] == (m_hol[q].size() > 0), $sformatf("hol_valid vl%0d", q));
      if (m_hol[q].size() > 0)
        check(hol[q] == m_hol[q][0], $sformatf("hol vl%0d: %h vs %h", q, hol[q], m_hol[q][0]));
      check(queue_bytes[q] == m_byte[q].size(), $sformatf("bytes vl%0d", q));
      check(byte_valid[q] == (m_byte[q].size() > 0), $sformatf("byte_valid vl%0d", q));
      if (m_byte[q].size() > 0) check(byte_data[q] == m_byte[q][0], $sformatf("byte vl%0d", q));
    end
  endtask

  initial begin
    rst_n = 1'b0;
    ld_len_push = '0; ld_data_push = '0; hol_pop = '0; byte_pop = '0;
    for (int q = 0; q < NUM_VL; q++) begin ld_len[q] = '0; ld_data[q] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) cycle_step(1'b1, 1'b1);
    for (int i = 0; i < 800; i++)  cycle_step(1'b1, 1'b0);   // fills the HoL FIFOs past 64
    check(n_ovf > 0, "overflow exercised");
    for (int i = 0; i < 3000; i++) cycle_step(1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
