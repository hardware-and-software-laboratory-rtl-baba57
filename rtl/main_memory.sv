// main_memory: SIMPLE/B's main memory, a word-addressed synchronous RAM.
//
// WORDS 16-bit words (65536 = 64 KW, the whole address space, by default;
// an FPGA with less block RAM can set e.g. 33792 for 33 KW). Addresses go to
// the RAM unchanged. The RAM is clocked on the FALLING edge of the processor
// clock: the address bus (PC in p1, DR in p4) is stable from the preceding
// rising edge, the RAM reads or writes at mid-phase, and rdata is ready for
// IR or MDR to capture at the rising edge that ends the phase. This
// half-cycle arrangement is this design's choice; the architecture only
// says the RAM works in sync with the clock and that IR or MDR take its
// output.
//   we = 1 : mem[addr] <= wdata at the falling edge (data comes from AR)
//   rdata  : mem[addr] as it was before any write at the same edge;
//            0 for an address at or above WORDS
// INIT_FILE, when not empty, names a $readmemh image loaded at start-up.
module main_memory
  import simple_pkg::*;
#(
  parameter int unsigned WORDS     = 65536,
  parameter string       INIT_FILE = ""
) (
  input  logic  clk,
  input  word_t addr,
  input  logic  we,
  input  word_t wdata,
  output word_t rdata
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  word_t mem [WORDS];

  logic            in_range;
  logic [AW-1:0]   index;

  assign in_range = (32'(addr) < WORDS);
  assign index    = AW'(addr);

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(negedge clk) begin
    if (in_range) begin
      rdata <= mem[index];
      if (we) mem[index] <= wdata;
    end else begin
      rdata <= '0;
    end
  end

endmodule
