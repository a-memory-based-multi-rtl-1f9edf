// rs_buffer: codeword store of the multi-mode RS decoder.
//
// The decoder needs the message symbols of four codewords at once: one
// being received, two being decoded and one being corrected and read out.
// They are kept in two banks of 2*KMAX = 376 bytes each (two dual-port SRAMs
// of 376x8). Codewords are interleaved over the banks: slot s goes to bank
// s[0], half s[1], so codeword n is written into bank n mod 2 while codeword
// n-3, in the other bank, is read and corrected. This organisation follows
// the design description.
//
// Interface: wr_en/wr_slot/wr_idx/wr_data write message symbol wr_idx of the
// codeword in slot wr_slot. rd_en/rd_slot/rd_idx request a symbol; rd_data
// is valid one cycle after rd_en.
module rs_buffer
  import fec_pkg::*;
#(
  parameter int unsigned K_MAX = KMAX
) (
  input  logic       clk,
  input  logic       wr_en,
  input  logic [1:0] wr_slot,
  input  logic [7:0] wr_idx,
  input  logic [7:0] wr_data,
  input  logic       rd_en,
  input  logic [1:0] rd_slot,
  input  logic [7:0] rd_idx,
  output logic [7:0] rd_data
);

  localparam int unsigned DEPTH = 2 * K_MAX;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [AW-1:0] waddr, raddr;
  logic [7:0]    rdata0, rdata1;
  logic          rbank_q;

  assign waddr = AW'(wr_idx) + (wr_slot[1] ? AW'(K_MAX) : AW'(0));
  assign raddr = AW'(rd_idx) + (rd_slot[1] ? AW'(K_MAX) : AW'(0));

  dp_sram #(.DEPTH(DEPTH), .WIDTH(8)) u_bank0 (
    .clk, .we(wr_en && !wr_slot[0]), .waddr, .wdata(wr_data),
    .re(rd_en && !rd_slot[0]), .raddr, .rdata(rdata0));

  dp_sram #(.DEPTH(DEPTH), .WIDTH(8)) u_bank1 (
    .clk, .we(wr_en && wr_slot[0]), .waddr, .wdata(wr_data),
    .re(rd_en && rd_slot[0]), .raddr, .rdata(rdata1));

  always_ff @(posedge clk)
    if (rd_en) rbank_q <= rd_slot[0];

  assign rd_data = rbank_q ? rdata1 : rdata0;

endmodule
