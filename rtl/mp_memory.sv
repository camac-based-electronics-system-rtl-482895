// 64-word x 24-bit read-write memory of the memory processor.
//
// Built in the original from Intel 3101 16-word x 4-bit static RAMs, split into
// two 12-bit halves that are written separately (one wire address at a time)
// and read together as one 24-bit computer word. Modelled as an array with a
// write enable per half.
//
// Interface: addr word address, we_hi / we_lo write the upper / lower half with
// wdata (the same 12-bit address is presented to both halves), rdata the whole
// word at addr. Timing: writes at the clock edge; reads are asynchronous, like
// the 3101. Contents are not reset.
module mp_memory
  import pwc_pkg::*;
#(
  parameter int unsigned WORDS = 64
) (
  input  logic                         clk,
  input  logic [$clog2(WORDS)-1:0]     addr,
  input  logic                         we_hi,
  input  logic                         we_lo,
  input  logic [HALF_BITS-1:0]         wdata,
  output logic [WORD_BITS-1:0]         rdata
);

  logic [HALF_BITS-1:0] mem_hi [WORDS];
  logic [HALF_BITS-1:0] mem_lo [WORDS];

  always_ff @(posedge clk) begin
    if (we_hi) mem_hi[addr] <= wdata;
    if (we_lo) mem_lo[addr] <= wdata;
  end

  assign rdata = {mem_hi[addr], mem_lo[addr]};

endmodule
