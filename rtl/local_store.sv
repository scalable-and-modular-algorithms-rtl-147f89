// Local storage of one MAC: s words holding the intermediate results c'_ij
// of the C elements that MAC is in charge of (a block RAM on an FPGA).
//
// One read port and one write port.  The read is asynchronous (the value at
// rd_addr is on rd_data in the same cycle), which is what lets the adder read
// c'_ij in its first stage and write the sum back from its last stage, as in
// the read-then-write-back timing of the data-hazard discussion.  A write
// takes effect at the clock edge.  A read and a write of the same address in
// the same cycle return the old value; the PE's controller keeps the update
// period above the adder depth so that this never matters.
//
// Addresses are $clog2(DEPTH+1) bits wide, the width the PEs use for their
// word counters.  When DEPTH is a power of two the top address bit is
// therefore never set and a linter reports it as unused and the index as
// wider than the array; both are harmless.
module local_store
  import mm_pkg::*;
#(
  parameter int unsigned DEPTH = 20
) (
  input  logic                           clk,
  input  logic                           we,
  input  logic [$clog2(DEPTH+1)-1:0]     wr_addr,
  input  fp_t                            wr_data,
  input  logic [$clog2(DEPTH+1)-1:0]     rd_addr,
  output fp_t                            rd_data
);

  fp_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];

endmodule
