// loop_buffer: the small tagless instruction store that sits between IL1 and
// the core.
//
// Each entry holds one instruction. There are no tags and no addresses: the
// loop buffer controller fills it sequentially from entry 0 with the predicted
// instruction trace of one innermost loop and later reads the same trace back
// with its own entry counter. ENTRIES = 256 instructions (1 KB of 32-bit
// instructions) is the size at which the design saves the most fetch energy in
// its evaluation; 16..512 entries (64 B..2 KB) were evaluated.
//
// Interface and timing: one write port (we/waddr/wdata, written at the rising
// clock edge) and one read port. The read is combinational so that an
// instruction addressed in a cycle is delivered in the same fetch cycle, like
// the IL1 model it replaces. rdata is zero when re is low, so the array is only
// read in cycles where the controller actually fetches from it. The contents
// are not reset: the controller never reads an entry it has not written.
module loop_buffer
  import hclb_pkg::*;
#(
  parameter int unsigned ENTRIES = 256,
  localparam int unsigned AW = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  instr_t        wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output instr_t        rdata
);

  instr_t mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = re ? mem[raddr] : '0;

endmodule
