// conv_deinterleaver: universal (I,J) convolutional deinterleaver for all
// J.83 annexes, built on one external memory and an address generator.
//
// Mode selects the parameters: annexes A/C (12,17), annex D (52,4), annex B
// any (I,J) given on cfg_i/cfg_j (128x1..8, 64x2, 32x4, 16x8, 8x16). Symbol
// n of a group of I goes to branch n, which is delayed by (I-1-n)*J symbols
// of that branch; the last branch has no delay and bypasses the memory. Each
// accepted symbol reads the oldest symbol of its branch and writes itself in
// its place ahead of it, so one read and one write per symbol suffice. The
// memory holds J*I*(I-1)/2 + J words, at most 65032 for (128,8). The
// parameters and the algorithm follow the design description.
//
// Interface: restart reloads the mode and configuration and aligns the next
// symbol with branch 0; the same load happens in the first cycle after
// reset, and in_ready is low in a loading cycle. in_valid/in_ready/in_data input,
// out_valid/out_ready/out_data output, one cycle of latency. Memory port:
// mem_we/mem_waddr/mem_wdata write, mem_re/mem_raddr read, mem_rdata is
// valid the cycle after mem_re and must hold while mem_re is low (a
// synchronous SRAM). mem_bound reports the memory words in use. The
// handshake and memory timing are this design's own.
module conv_deinterleaver
  import fec_pkg::*;
#(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  fec_mode_e     mode,
  input  logic [7:0]    cfg_i,
  input  logic [4:0]    cfg_j,
  input  logic          restart,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data,
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output logic [DW-1:0] mem_wdata,
  output logic          mem_re,
  output logic [AW-1:0] mem_raddr,
  input  logic [DW-1:0] mem_rdata,
  output logic [AW:0]   mem_bound
);

  logic [7:0]    i_sel;
  logic [4:0]    j_sel;
  logic          take, direct;
  logic [AW-1:0] waddr, raddr;
  logic          direct_q;
  logic [DW-1:0] bypass_q;

  always_comb begin
    case (mode)
      J83_B:   begin i_sel = cfg_i;  j_sel = cfg_j;  end
      J83_D:   begin i_sel = 8'd52;  j_sel = 5'd4;   end
      default: begin i_sel = 8'd12;  j_sel = 5'd17;  end
    endcase
  end

  // The configuration is loaded on restart and, automatically, in the first
  // cycle after reset; no symbol is taken in a loading cycle.
  logic loaded, load;
  assign load = restart || !loaded;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    loaded <= 1'b0;
    else if (load) loaded <= 1'b1;

  assign in_ready = !load && (!out_valid || out_ready);
  assign take     = in_valid && in_ready;

  deint_addr_gen #(.AW(AW)) u_agen (
    .clk, .rst_n, .restart(load), .cfg_i(i_sel), .cfg_j(j_sel), .step(take),
    .waddr, .raddr, .direct, .mem_bound);

  assign mem_we    = take && !direct;
  assign mem_waddr = waddr;
  assign mem_wdata = in_data;
  assign mem_re    = take && !direct;
  assign mem_raddr = raddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      direct_q  <= 1'b0;
      bypass_q  <= '0;
    end else if (load) begin
      out_valid <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (take) begin
        direct_q <= direct;
        bypass_q <= in_data;
      end
    end
  end

  assign out_data = direct_q ? bypass_q : mem_rdata;

endmodule
