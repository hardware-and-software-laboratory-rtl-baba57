// pc_unit: the program counter of SIMPLE/B with its +1 adder.
//
// In p1 (inc = 1) the PC steps to PC + 1 while the instruction at the old
// PC is fetched, so during p2..p5 the PC already holds the address of the
// next instruction, which is the base of PC-relative branches
// (PC + 1 + sign_ext(d)). In p5 of a taken branch (load = 1) the PC takes
// the target computed in p3 and held in DR. Both updates happen on the
// rising clock edge; load wins if both are asserted. Reset clears the PC to
// 0, as the architecture's reset description asks.
module pc_unit
  import simple_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  inc,
  input  logic  load,
  input  word_t load_value,
  output word_t pc
);

  word_t pc_plus1;

  assign pc_plus1 = pc + word_t'(1);

  always_ff @(posedge clk) begin
    if (reset)     pc <= '0;
    else if (load) pc <= load_value;
    else if (inc)  pc <= pc_plus1;
  end

endmodule
