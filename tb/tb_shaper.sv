// Self-checking testbench for shaper (8 VLs). BAGs of a few tens of cycles
// are written through the configuration port; a random grant pattern that
// only serves ready VLs is applied, and status is compared every cycle with
// a model: ready when a frame waits and at least BAG cycles have passed
// since the VL was last served. It also checks the BAG read-back, the reset
// BAG and that a served VL is not ready again before exactly BAG cycles.
module tb_shaper;
  import es_pkg::*;
  localparam int NUM_VL = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, bag_we;
  logic [2:0] bag_idx;
  logic [BAG_W-1:0] bag_val;
  logic [BAG_W-1:0] bag [NUM_VL];
  logic [NUM_VL-1:0] frame_ready, served, status;

  shaper dut (.*);

  int checks = 0, failures = 0;
  longint last_served [NUM_VL];
  longint cyc = 0;
  int     m_bag [NUM_VL];
  int     n_hold = 0, n_exact = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; bag_we = 1'b0; bag_idx = '0; bag_val = '0; frame_ready = '0; served = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(bag[0] == 32'd6250 && bag[7] == 32'd6250, "reset BAG");
    for (int q = 0; q < NUM_VL; q++) begin
      m_bag[q] = 10 * (q + 1) + $urandom_range(0, 5);
      bag_we = 1'b1; bag_idx = 3'(q); bag_val = m_bag[q];
      @(negedge clk);
    end
    bag_we = 1'b0;
    for (int q = 0; q < NUM_VL; q++) begin
      check(bag[q] == m_bag[q], "BAG read-back");
      last_served[q] = -1000;
    end
    for (int i = 0; i < 20000; i++) begin
      frame_ready = NUM_VL'($urandom());
      served = '0;
      // status is combinational on frame_ready; compare before the edge
      #1;
      for (int q = 0; q < NUM_VL; q++) begin
        bit exp;
        exp = frame_ready[q] && (cyc - last_served[q] >= m_bag[q]);
        check(status[q] == exp, $sformatf("status vl%0d cyc %0d", q, cyc));
        if (frame_ready[q] && !exp) n_hold++;
        if (exp && cyc - last_served[q] == m_bag[q]) n_exact++;
      end
      for (int q = 0; q < NUM_VL; q++)
        if (status[q] && $urandom_range(0, 3) == 0) begin served[q] = 1'b1; last_served[q] = cyc; end
      @(negedge clk);
      cyc++;
    end
    check(n_hold > 100 && n_exact > 10, "BAG holding and exact release exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
