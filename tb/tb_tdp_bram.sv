// Self-checking testbench for tdp_bram at its default size (4 KB, 32-bit
// words). Both ports issue random reads and byte-masked writes on one clock,
// never writing the same word in the same cycle; every read is compared,
// one cycle later, with a word-array model (read-first on the port's own
// write). It also checks that memory starts cleared.
module tb_tdp_bram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        ena, enb;
  logic [3:0]  wea, web;
  logic [11:0] addra, addrb;
  logic [31:0] dina, dinb, douta, doutb;

  tdp_bram dut (.clka(clk), .ena, .wea, .addra, .dina, .douta,
                .clkb(clk), .enb, .web, .addrb, .dinb, .doutb);

  int checks = 0, failures = 0;
  logic [31:0] model [1024];
  logic [31:0] exp_a, exp_b;
  bit          chk_a, chk_b;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] be);
    for (int b = 0; b < 4; b++) if (be[b]) old[b*8 +: 8] = d[b*8 +: 8];
    return old;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    ena = 0; enb = 0; wea = 0; web = 0; addra = 0; addrb = 0; dina = 0; dinb = 0;
    chk_a = 0; chk_b = 0;
    for (int i = 0; i < 10000; i++) begin
      @(negedge clk);
      if (chk_a) check(douta == exp_a, $sformatf("port A read %h vs %h", douta, exp_a));
      if (chk_b) check(doutb == exp_b, $sformatf("port B read %h vs %h", doutb, exp_b));
      ena = $urandom_range(0, 3) != 0;
      enb = $urandom_range(0, 3) != 0;
      addra = {$urandom_range(0, 63), 2'($urandom())} ;
      addrb = {$urandom_range(0, 63), 2'($urandom())} ;
      wea = ($urandom_range(0, 1) == 0) ? 4'($urandom()) : 4'h0;
      web = ($urandom_range(0, 1) == 0) ? 4'($urandom()) : 4'h0;
      if (addra[11:2] == addrb[11:2]) web = 4'h0;
      dina = $urandom(); dinb = $urandom();
      chk_a = ena; chk_b = enb;
      exp_a = model[addra[11:2]];
      exp_b = model[addrb[11:2]];
      if (ena) model[addra[11:2]] = merge(model[addra[11:2]], dina, wea);
      if (enb) model[addrb[11:2]] = merge(model[addrb[11:2]], dinb, web);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
