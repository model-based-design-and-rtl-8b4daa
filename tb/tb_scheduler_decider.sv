// Self-checking testbench for scheduler_decider: a minimum decider (32-bit
// keys, as Smallest BAG) and a maximum decider (as Longest Queue), 8 queues.
// For random eligible vectors and keys it triggers a decision and checks
// that deciderDone comes exactly 3 cycles after the trigger, that found is
// low when no queue is eligible, and that the chosen queue is the eligible
// one with the best key (lowest index on ties), in binary and one-hot.
module tb_scheduler_decider;
  localparam int N = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, trig;
  logic [N-1:0] eligible;
  logic [31:0]  key [N];
  logic         done_mn, found_mn, done_mx, found_mx;
  logic [2:0]   idx_mn, idx_mx;
  logic [N-1:0] oh_mn, oh_mx;

  scheduler_decider #(.N(N), .W(32), .FIND_MAX(1'b0)) u_min (.clk, .rst_n, .trig, .eligible, .key,
    .done(done_mn), .found(found_mn), .index(idx_mn), .onehot(oh_mn));
  scheduler_decider #(.N(N), .W(32), .FIND_MAX(1'b1)) u_max (.clk, .rst_n, .trig, .eligible, .key,
    .done(done_mx), .found(found_mx), .index(idx_mx), .onehot(oh_mx));

  int checks = 0, failures = 0;
  int n_none = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; trig = 1'b0; eligible = '0;
    foreach (key[k]) key[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int emn, emx, lat;
      @(negedge clk);
      eligible = ($urandom_range(0, 7) == 0) ? '0 : N'($urandom());
      foreach (key[k]) key[k] = 32'($urandom_range(1, 20));
      emn = -1; emx = -1;
      for (int k = 0; k < N; k++) if (eligible[k]) begin
        if (emn < 0 || key[k] < key[emn]) emn = k;
        if (emx < 0 || key[k] > key[emx]) emx = k;
      end
      trig = 1'b1;
      @(negedge clk);
      trig = 1'b0;
      // keys change after the trigger and must not matter
      foreach (key[k]) key[k] = $urandom();
      eligible = N'($urandom());
      lat = 1;
      while (!done_mn && lat < 10) begin @(negedge clk); lat++; end
      check(lat == 3, $sformatf("decider latency %0d", lat));
      check(done_mx, "max decider done together");
      if (emn < 0) begin
        n_none++;
        check(!found_mn && !found_mx && oh_mn == '0, "nothing eligible");
      end else begin
        check(found_mn && idx_mn == 3'(emn) && oh_mn == N'(1) << emn, $sformatf("min pick %0d vs %0d", idx_mn, emn));
        check(found_mx && idx_mx == 3'(emx) && oh_mx == N'(1) << emx, $sformatf("max pick %0d vs %0d", idx_mx, emx));
      end
    end
    check(n_none > 0, "empty decision exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
