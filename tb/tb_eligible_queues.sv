// Self-checking testbench for eligible_queues (8 VLs): random status and
// grant vectors, eligible compared each cycle with the model
// eligible' = (eligible | status) & ~served.
module tb_eligible_queues;
  localparam int NUM_VL = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [NUM_VL-1:0] status, served, eligible, model;

  eligible_queues dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; status = '0; served = '0; model = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(eligible == '0, "reset");
    for (int i = 0; i < 5000; i++) begin
      status = NUM_VL'($urandom()) & NUM_VL'($urandom());
      served = NUM_VL'($urandom()) & NUM_VL'($urandom()) & NUM_VL'($urandom());
      model  = (model | status) & ~served;
      @(negedge clk);
      check(eligible == model, $sformatf("eligible %b vs %b", eligible, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
