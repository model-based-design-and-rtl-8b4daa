// Self-checking testbench for extremum_finder. Three instances: 8 inputs
// minimum (32-bit, as Smallest BAG), 8 inputs maximum (32-bit, as Longest
// Queue) and 32 inputs minimum (the 32-queue tree). New random inputs every
// cycle, often with repeated values to exercise ties; each output is
// compared with a reference computed when the inputs were applied, LATENCY
// cycles earlier (2 for 8 inputs, 3 for 32), lowest index winning ties.
module tb_extremum_finder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] v8 [8];
  logic [31:0] v32 [32];
  logic [31:0] min8_v, max8_v, min32_v;
  logic [2:0]  min8_i, max8_i;
  logic [4:0]  min32_i;

  extremum_finder #(.N(8),  .W(32), .FIND_MAX(1'b0)) u_min8  (.clk, .in_val(v8),  .out_val(min8_v),  .out_idx(min8_i));
  extremum_finder #(.N(8),  .W(32), .FIND_MAX(1'b1)) u_max8  (.clk, .in_val(v8),  .out_val(max8_v),  .out_idx(max8_i));
  extremum_finder #(.N(32), .W(32), .FIND_MAX(1'b0)) u_min32 (.clk, .in_val(v32), .out_val(min32_v), .out_idx(min32_i));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  typedef struct { logic [31:0] v; int i; } res_t;
  res_t e_min8[$], e_max8[$], e_min32[$];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rv();
    return ($urandom_range(0, 1) == 0) ? 32'($urandom_range(0, 7)) : $urandom();
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      res_t a, b, c;
      @(negedge clk);
      foreach (v8[k])  v8[k]  = rv();
      foreach (v32[k]) v32[k] = rv();
      a = '{v8[0], 0}; b = '{v8[0], 0}; c = '{v32[0], 0};
      for (int k = 1; k < 8; k++) begin
        if (v8[k] < a.v) a = '{v8[k], k};
        if (v8[k] > b.v) b = '{v8[k], k};
      end
      for (int k = 1; k < 32; k++) if (v32[k] < c.v) c = '{v32[k], k};
      e_min8.push_back(a); e_max8.push_back(b); e_min32.push_back(c);
      if (e_min8.size() > 2) begin
        a = e_min8.pop_front(); b = e_max8.pop_front();
        check(min8_v == a.v && min8_i == 3'(a.i), "min of 8");
        check(max8_v == b.v && max8_i == 3'(b.i), "max of 8");
      end
      if (e_min32.size() > 3) begin
        c = e_min32.pop_front();
        check(min32_v == c.v && min32_i == 5'(c.i), $sformatf("min of 32: %0d@%0d vs %0d@%0d", min32_v, min32_i, c.v, c.i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
