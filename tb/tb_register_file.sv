// tb_register_file: self-checking test of the 8 x 16-bit register file.
// Checks that reset clears every register, then performs random writes
// (with and without we) while a shadow array tracks the expected contents,
// and reads both ports after every clock edge.
module tb_register_file;
  import simple_pkg::*;

  logic     clk = 0, reset = 1, we = 0;
  reg_idx_t ra = 0, rb = 0, wa = 0;
  word_t    wd = 0, da, db;
  word_t    shadow [8];
  int       checks = 0, failures = 0;

  register_file dut (.clk(clk), .reset(reset), .raddr_a(ra), .raddr_b(rb),
                     .rdata_a(da), .rdata_b(db), .we(we), .waddr(wa), .wdata(wd));

  always #5 clk = ~clk;

  task automatic expect_eq(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int i = 0; i < 8; i++) begin
      ra = 3'(i); rb = 3'(7 - i); #1;
      expect_eq(da, 16'h0, "reset port a");
      expect_eq(db, 16'h0, "reset port b");
    end
    repeat (2000) begin
      we = ($urandom_range(0, 3) != 0);
      wa = 3'($urandom); wd = word_t'($urandom);
      @(posedge clk);
      if (we) shadow[wa] = wd;
      #1 we = 0;
      ra = 3'($urandom); rb = 3'($urandom); #1;
      expect_eq(da, shadow[ra], "port a");
      expect_eq(db, shadow[rb], "port b");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
