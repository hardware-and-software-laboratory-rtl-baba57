// tb_main_memory: self-checking test of the main memory at its full 64 KW.
// Writes a pattern at the falling edge, reads it back one falling edge later,
// checks read-before-write at the same edge, and covers the lowest and
// highest addresses. A second, smaller instance checks that addresses at or
// above WORDS read as 0 and ignore writes.
module tb_main_memory;
  import simple_pkg::*;

  logic  clk = 0;
  logic  we = 0, we2 = 0;
  word_t addr = 0, wdata = 0, rdata;
  word_t addr2 = 0, wdata2 = 0, rdata2;
  word_t shadow [word_t];
  int    checks = 0, failures = 0;

  main_memory dut (.clk(clk), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata));
  main_memory #(.WORDS(1000)) u_small (.clk(clk), .addr(addr2), .we(we2), .wdata(wdata2), .rdata(rdata2));

  always #5 clk = ~clk;

  task automatic expect_eq(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  // Present address/data after a rising edge, let the falling edge act.
  task automatic cycle(input word_t a, input logic w, input word_t d);
    @(posedge clk); #1;
    addr = a; we = w; wdata = d;
    @(negedge clk); #1;
    we = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t a, d;
    // Edge addresses.
    cycle(16'h0000, 1, 16'h1234);
    cycle(16'hffff, 1, 16'hbeef);
    cycle(16'h0000, 0, 0); expect_eq(rdata, 16'h1234, "addr 0");
    cycle(16'hffff, 0, 0); expect_eq(rdata, 16'hbeef, "addr ffff");
    // Read-before-write at the same edge returns the old word.
    cycle(16'h0000, 1, 16'h5678); expect_eq(rdata, 16'h1234, "read-first");
    cycle(16'h0000, 0, 0);        expect_eq(rdata, 16'h5678, "after write");
    shadow[16'h0000] = 16'h5678;
    shadow[16'hffff] = 16'hbeef;
    // Random traffic.
    repeat (3000) begin
      a = word_t'($urandom_range(0, 255)) << $urandom_range(0, 8);
      if ($urandom_range(0, 1) == 1 || !shadow.exists(a)) begin
        d = word_t'($urandom);
        cycle(a, 1, d);
        shadow[a] = d;
      end else begin
        cycle(a, 0, 0);
        expect_eq(rdata, shadow[a], "random read");
      end
    end
    // Out of range on the 1000-word instance.
    @(posedge clk); #1 addr2 = 16'd999; we2 = 1; wdata2 = 16'h0abc;
    @(posedge clk); #1 addr2 = 16'd1999; we2 = 1; wdata2 = 16'hdead;
    @(posedge clk); #1 addr2 = 16'd999; we2 = 0;
    @(posedge clk); expect_eq(rdata2, 16'h0abc, "small last word");
    #1 addr2 = 16'd1000;
    @(posedge clk); expect_eq(rdata2, 16'h0000, "small out of range");
    #1 addr2 = 16'd1999;
    @(posedge clk); expect_eq(rdata2, 16'h0000, "small out of range write ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
