// Self-checking testbench for fwft_fifo at its default size (80 bits x 64).
// Random pushes and pops are compared with a queue model: head word, empty,
// full, count and the overflow pulse on a push into a full FIFO. A fill phase
// drives the FIFO to full and beyond, a drain phase empties it.
module tb_fwft_fifo;
  localparam int WIDTH = 80;
  localparam int DEPTH = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic wr_en, rd_en, empty, full, overflow;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH):0] count;

  fwft_fifo dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model[$];
  int n_ovf = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  function automatic logic [WIDTH-1:0] rnd_word();
    return {$urandom(), $urandom(), $urandom()};
  endfunction

  task automatic step(input bit w, input bit r);
    bit exp_ovf;
    wr_en = w; rd_en = r; wr_data = rnd_word();
    exp_ovf = w && (model.size() == DEPTH);
    @(posedge clk);
    if (r && model.size() > 0) void'(model.pop_front());
    if (w && !exp_ovf) model.push_back(wr_data);
    @(negedge clk);
    check(overflow == exp_ovf, "overflow");
    if (exp_ovf) n_ovf++;
    check(count == model.size(), $sformatf("count %0d vs %0d", count, model.size()));
    check(empty == (model.size() == 0), "empty");
    check(full == (model.size() == DEPTH), "full");
    if (model.size() > 0) check(rd_data == model[0], "head word");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; rd_en = 1'b0; wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(empty && count == 0, "empty after reset");
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 1) == 1, $urandom_range(0, 2) == 0);
    for (int i = 0; i < DEPTH + 4; i++) step(1'b1, 1'b0);          // fill and overflow
    for (int i = 0; i < 500; i++) step($urandom_range(0, 1) == 1, $urandom_range(0, 1) == 1);
    for (int i = 0; i < DEPTH + 4; i++) step(1'b0, 1'b1);          // drain
    check(n_ovf >= 4, "overflow exercised");
    check(empty, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
