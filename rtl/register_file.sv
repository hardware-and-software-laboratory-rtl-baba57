// register_file: the eight 16-bit general purpose registers r[0]..r[7].
//
// Two asynchronous read ports feed AR and BR in phase p2; one synchronous
// write port is used in phase p5 and takes effect on the rising clock edge
// when we = 1. A read of the register being written returns the old value
// (the phases never read and write in the same cycle). Reset clears all
// registers; the architecture does not say what reset does to them, so
// clearing is this design's choice. Eight registers and 16 bits are the
// architecture's numbers.
module register_file
  import simple_pkg::*;
#(
  parameter int unsigned NREGS = 8
) (
  input  logic                      clk,
  input  logic                      reset,
  input  logic [$clog2(NREGS)-1:0]  raddr_a,
  input  logic [$clog2(NREGS)-1:0]  raddr_b,
  output word_t                     rdata_a,
  output word_t                     rdata_b,
  input  logic                      we,
  input  logic [$clog2(NREGS)-1:0]  waddr,
  input  word_t                     wdata
);

  word_t regs [NREGS];

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

endmodule
