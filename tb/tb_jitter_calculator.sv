// Self-checking testbench for jitter_calculator (8 VLs). Each VL is made
// eligible at a random cycle and granted a random number of cycles later;
// the reported QueueJitter must equal that number of cycles and QueueEnable
// must pulse exactly once, the cycle after the grant. Grants on several VLs
// in the same cycle and a grant in the first eligible cycle are included.
module tb_jitter_calculator;
  import es_pkg::*;
  localparam int NUM_VL = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [NUM_VL-1:0] eligible, served, queue_enable;
  logic [JIT_W-1:0]  queue_jitter [NUM_VL];

  jitter_calculator dut (.*);

  int checks = 0, failures = 0;
  int wait_left [NUM_VL];
  int elig_age  [NUM_VL];
  int expect_j  [NUM_VL];
  bit expect_en [NUM_VL];
  int n_zero = 0, n_multi = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; eligible = '0; served = '0;
    for (int q = 0; q < NUM_VL; q++) begin wait_left[q] = 0; elig_age[q] = 0; expect_en[q] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // outputs of the previous cycle's grants
      for (int q = 0; q < NUM_VL; q++) begin
        check(queue_enable[q] == expect_en[q], $sformatf("enable vl%0d", q));
        if (expect_en[q]) check(queue_jitter[q] == JIT_W'(expect_j[q]),
                                $sformatf("jitter vl%0d %0d vs %0d", q, queue_jitter[q], expect_j[q]));
        expect_en[q] = 0;
      end
      // eligible/served drive for this cycle
      served = '0;
      for (int q = 0; q < NUM_VL; q++) begin
        if (!eligible[q]) begin
          if ($urandom_range(0, 9) == 0) begin
            eligible[q] = 1'b1;
            elig_age[q] = 0;
            wait_left[q] = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 300);
          end
        end else begin
          elig_age[q]++;
        end
        if (eligible[q] && wait_left[q] == 0) begin
          served[q] = 1'b1;
          expect_j[q] = elig_age[q];
          expect_en[q] = 1;
          if (elig_age[q] == 0) n_zero++;
        end else if (eligible[q]) wait_left[q]--;
      end
      if ($countones(served) > 1) n_multi++;
      @(posedge clk);
      #1;
      for (int q = 0; q < NUM_VL; q++) if (served[q]) eligible[q] = 1'b0;
    end
    check(n_zero > 0 && n_multi > 0, "zero jitter and simultaneous grants exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
