// dp_sram: simple dual-port synchronous RAM (one write port, one read port),
// written as an array so synthesis can map it to an embedded SRAM macro.
//
// Interface: when we is high, wdata is stored at waddr on the rising edge.
// When re is high, rdata shows the word at raddr one cycle later; a read of
// the address being written in the same cycle returns the old word. rdata
// holds between reads. Contents are not reset.
module dp_sram #(
  parameter int unsigned DEPTH = 376,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
