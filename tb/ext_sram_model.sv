// ext_sram_model: behavioural model of the external deinterleaver memory
// (64K x 8 synchronous SRAM; the deinterleaver uses at most 65032 words).
// Not synthesizable design content: it stands in for an off-chip part.
// One write port, one read port; rdata is valid one cycle after re and
// holds while re is low; a read of the word written in the same cycle
// returns the old word. Contents start at zero.
module ext_sram_model #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];
  initial begin
    foreach (mem[i]) mem[i] = '0;
    rdata = '0;
  end
  always @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end
endmodule
