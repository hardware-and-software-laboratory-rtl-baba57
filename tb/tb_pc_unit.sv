// tb_pc_unit: self-checking test of the program counter.
// Checks reset to 0, increment, wrap-around from FFFF, branch-target load,
// load taking priority over increment, and holding when neither is set.
module tb_pc_unit;
  import simple_pkg::*;

  logic  clk = 0, reset = 1, inc = 0, load = 0;
  word_t lv = 0, pc, model;
  int    checks = 0, failures = 0;

  pc_unit dut (.clk(clk), .reset(reset), .inc(inc), .load(load), .load_value(lv), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic i, input logic l, input word_t v);
    inc = i; load = l; lv = v;
    @(posedge clk);
    if (l) model = v; else if (i) model = model + 1;
    #1;
    checks++;
    if (pc !== model) begin
      failures++;
      if (failures < 10) $display("FAIL inc=%b load=%b pc=%h expected %h", i, l, pc, model);
    end
  endtask

  initial begin
    model = 0;
    @(posedge clk); #1 reset = 0;
    checks++; if (pc !== 16'h0) failures++;
    step(1, 0, 0);
    step(1, 0, 0);
    step(0, 0, 0);
    step(0, 1, 16'hfffe);
    step(1, 0, 0);
    step(1, 0, 0);          // wraps to 0000
    step(1, 1, 16'h0100);   // load wins
    repeat (1000) step(1'($urandom), ($urandom_range(0, 7) == 0), word_t'($urandom));
    reset = 1; @(posedge clk); #1 reset = 0; model = 0;
    checks++; if (pc !== 16'h0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
