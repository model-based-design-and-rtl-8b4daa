// Self-checking testbench for dynamic_scheduler_decider (8 VLs). For each of
// the four select values (0 SB, 1 LQ, 2 FIFO, 3 SS) and random eligible
// vectors, BAGs, byte counts and head-of-line records, it triggers a
// decision and checks the chosen VL against a reference: smallest BAG,
// largest byte count, earliest 64-bit arrival time, smallest length, among
// eligible VLs, lowest index on ties. It also checks the 3-cycle latency and
// that changing sel while a decision is in flight does not change it.
module tb_dynamic_scheduler_decider;
  import es_pkg::*;
  localparam int NUM_VL = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, trig, done, found;
  sched_sel_e sel, active_sel;
  logic [NUM_VL-1:0] eligible, onehot;
  logic [BAG_W-1:0]  bag [NUM_VL];
  logic [QSIZE_W-1:0] queue_bytes [NUM_VL];
  hol_t hol [NUM_VL];
  logic [2:0] index;

  dynamic_scheduler_decider dut (.*);

  int checks = 0, failures = 0;
  int per_sel [4] = '{0, 0, 0, 0};
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint key_of(sched_sel_e s, int q);
    case (s)
      SCH_SB:   return longint'(bag[q]);
      SCH_LQ:   return -longint'(queue_bytes[q]);       // larger is better
      SCH_FIFO: return longint'(hol[q].arrival >> 1);   // keep the sign bit clear
      default:  return longint'(hol[q].length);
    endcase
  endfunction

  initial begin
    rst_n = 1'b0; trig = 1'b0; eligible = '0; sel = SCH_SB;
    for (int q = 0; q < NUM_VL; q++) begin bag[q] = '0; queue_bytes[q] = '0; hol[q] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int best, lat;
      sched_sel_e s;
      @(negedge clk);
      s = sched_sel_e'(i % 4);
      sel = s;
      eligible = ($urandom_range(0, 9) == 0) ? '0 : NUM_VL'($urandom());
      for (int q = 0; q < NUM_VL; q++) begin
        bag[q]         = 32'(6250 * $urandom_range(1, 8));
        queue_bytes[q] = 32'($urandom_range(0, 3000));
        hol[q].arrival = {$urandom_range(0, 3), 28'h0, $urandom()} & 64'hC000_0000_FFFF_FFFF;
        hol[q].arrival = hol[q].arrival & 64'h7FFF_FFFF_FFFF_FFFE;
        hol[q].length  = 16'($urandom_range(64, 1518));
      end
      best = -1;
      for (int q = 0; q < NUM_VL; q++)
        if (eligible[q] && (best < 0 || key_of(s, q) < key_of(s, best))) best = q;
      trig = 1'b1;
      @(negedge clk);
      trig = 1'b0;
      sel = sched_sel_e'($urandom_range(0, 3));   // must not disturb this decision
      lat = 1;
      while (!done && lat < 10) begin @(negedge clk); lat++; end
      check(lat == 3, $sformatf("latency %0d", lat));
      check(active_sel == s, "active select");
      if (best < 0) check(!found, "nothing eligible");
      else begin
        check(found && index == 3'(best) && onehot == NUM_VL'(1) << best,
              $sformatf("sel %s picked %0d expected %0d", s.name(), index, best));
        per_sel[s]++;
      end
    end
    for (int k = 0; k < 4; k++) check(per_sel[k] > 100, "each algorithm exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
