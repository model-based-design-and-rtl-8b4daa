// Self-checking testbench for bram_wrapper (8 VLs, poll period 16). The
// block RAM is modelled in the testbench with one-cycle read latency.
// Random QueueEnable pulses with random jitters, in bursts over several
// queues, must each produce a write of the latest jitter to 0x10*(q+1)
// followed in the next cycle by a write of 1 to 0x90+0x10*(q-1) (queue q
// counted from 1); every pulse is either written or reported as dropped.
// Values written into the Scheduler Select word (0x200) must appear on
// sch_select within one poll period plus the read latency.
module tb_bram_wrapper;
  import es_pkg::*;
  localparam int NUM_VL = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [JIT_W-1:0]  queue_jitter [NUM_VL];
  logic [NUM_VL-1:0] queue_enable;
  logic              b_en, jitter_dropped;
  logic [3:0]        b_we;
  logic [11:0]       b_addr;
  logic [31:0]       b_din, b_dout;
  sched_sel_e        sch_select;

  bram_wrapper dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] mem [1024];
  int  latest [NUM_VL];
  bit  pending [NUM_VL];
  int  n_pulse = 0, n_written = 0, n_drop = 0, n_sel = 0, n_lost = 0, n_drop_cycles = 0;
  int  last_jit_q = -1;
  bit  lost;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  // block RAM model, port B, with a writer for port A (the processor)
  logic [31:0] sel_word_q;
  always_ff @(posedge clk) begin
    if (b_en) begin
      b_dout <= mem[b_addr[11:2]];
      if (b_we == 4'hF) mem[b_addr[11:2]] <= b_din;
    end
  end

  // Every write must follow the jitter-then-enable pattern.
  always @(negedge clk) if (rst_n) begin
    if (b_en && b_we != 0) begin
      int a;
      a = int'(b_addr);
      if (last_jit_q >= 0) begin
        check(a == 'h90 + 'h10 * last_jit_q && b_din == 1, $sformatf("enable write after jitter, addr %h", a));
        last_jit_q = -1;
      end else begin
        int q;
        q = a / 16 - 1;
        check(a % 16 == 0 && q >= 0 && q < NUM_VL, $sformatf("jitter write address %h", a));
        if (q >= 0 && q < NUM_VL) begin
          check(pending[q] && b_din == 32'(latest[q]), $sformatf("jitter value q%0d", q));
          pending[q] = 0;
          n_written++;
          last_jit_q = q;
        end
      end
    end else if (last_jit_q >= 0) begin
      check(1'b0, "enable write missing");
      last_jit_q = -1;
    end
    if (jitter_dropped) n_drop++;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mem[i]) mem[i] = '0;
    rst_n = 1'b0; queue_enable = '0;
    for (int q = 0; q < NUM_VL; q++) begin queue_jitter[q] = '0; pending[q] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(sch_select == SCH_SB, "select resets to SB");
    for (int i = 0; i < 20000; i++) begin
      // the negedge checker above has already run for this edge
      #1;
      queue_enable = '0;
      if ($urandom_range(0, 5) == 0) begin
        queue_enable = NUM_VL'($urandom()) & NUM_VL'($urandom());
        lost = 0;
        for (int q = 0; q < NUM_VL; q++) if (queue_enable[q]) begin
          if (pending[q]) begin n_lost++; lost = 1; end
          queue_jitter[q] = $urandom_range(0, 100000);
          latest[q] = int'(queue_jitter[q]);
          pending[q] = 1;
          n_pulse++;
        end
        if (lost) n_drop_cycles++;
      end
      if (i % 500 == 250) begin
        sel_word_q = 32'($urandom_range(0, 3));
        mem['h200 >> 2] = sel_word_q;
        n_sel++;
      end
      if (i % 500 == 250 + 16 + 4) check(sch_select == sched_sel_e'(sel_word_q[1:0]), "select follows 0x200");
      @(negedge clk);
    end
    queue_enable = '0;
    repeat (100) @(negedge clk);
    for (int q = 0; q < NUM_VL; q++) begin
      check(!pending[q], "all jitters written");
      check(mem[('h90 + 'h10 * q) >> 2] == 1 || latest[q] == 0, "enable word set");
    end
    check(n_written + n_lost == n_pulse, $sformatf("written %0d + replaced %0d == pulses %0d", n_written, n_lost, n_pulse));
    check(n_drop == n_drop_cycles && n_drop > 0, $sformatf("dropped pulses %0d vs %0d", n_drop, n_drop_cycles));
    check(n_written > 1000 && n_sel > 10, "activity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
