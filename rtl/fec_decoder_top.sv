// fec_decoder_top: multi-standard ITU-T J.83 (annexes A, B, C, D) FEC
// decoder.
//
// Two input paths share one deinterleaver and one RS decoder, selected by
// mode. Annexes A/C/D: de-mapped bytes go straight to the universal
// convolutional deinterleaver, then the multi-mode RS decoder, then the
// A/C/D de-randomizer. Annex B: punctured trellis groups go through the
// trellis decoder (two Viterbi decoders) and the GF(128) de-randomizer; the
// resulting 7-bit symbols are deinterleaved and RS decoded, and the RS output
// is the decoder output. The block structure and the two multiplexers follow
// the design description. The deinterleaver memory (up to 65032 bytes) is
// external, reached through the mem_* port; the RS decoder's two 376-byte
// banks are inside.
//
// Interface: mode and cfg_i/cfg_j (annex B interleaver I and J) are static;
// apply rst_n after changing mode, or pulse restart after changing cfg_i or
// cfg_j in annex B. A/C/D input: sym_valid/sym_ready/sym_data. Annex B input:
// grp_valid/grp_ready/grp_i/grp_q (five received bits per rail per four
// trellis steps) and b_frame_start, which marks the next trellis-decoded
// symbol as the first of an FEC frame. Frame synchronisation is not part of
// this block: b_frame_start, and d_field_sync for the annex D
// de-randomizer (a pulse at any time before the RS output packet that
// starts a field; it is held until that packet begins), come from outside. mem_bound reports the deinterleaver memory
// words in use. Output: out_valid/out_data/out_sop/out_eop, one
// decoded message byte (annex B: 7-bit symbol in bits [6:0]) per cycle;
// out_fail flags bytes of an uncorrectable codeword.
module fec_decoder_top
  import fec_pkg::*;
#(
  parameter int unsigned MEM_AW = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fec_mode_e         mode,
  input  logic [7:0]        cfg_i,
  input  logic [4:0]        cfg_j,
  input  logic              restart,
  // annex A/C/D input
  input  logic              sym_valid,
  output logic              sym_ready,
  input  logic [7:0]        sym_data,
  // annex B input
  input  logic              grp_valid,
  output logic              grp_ready,
  input  logic [4:0]        grp_i,
  input  logic [4:0]        grp_q,
  input  logic              b_frame_start,
  input  logic              d_field_sync,
  // external deinterleaver memory
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_waddr,
  output logic [7:0]        mem_wdata,
  output logic              mem_re,
  output logic [MEM_AW-1:0] mem_raddr,
  input  logic [7:0]        mem_rdata,
  output logic [MEM_AW:0]   mem_bound,
  // decoded output
  output logic              out_valid,
  output logic              out_sop,
  output logic              out_eop,
  output logic [7:0]        out_data,
  output logic              out_fail
);

  logic is_b;
  assign is_b = (mode == J83_B);

  // ---------------------------------------------------------------- annex B front end
  logic       tr_valid, ds_b_valid, b_fs_pend;
  logic [6:0] tr_sym, ds_b_data;

  trellis_decoder_b u_trellis (
    .clk, .rst_n, .restart, .grp_valid(grp_valid && is_b), .grp_ready,
    .grp_i, .grp_q, .out_valid(tr_valid), .out_sym(tr_sym));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   b_fs_pend <= 1'b0;
    else if (b_frame_start)       b_fs_pend <= 1'b1;
    else if (tr_valid)            b_fs_pend <= 1'b0;
  end

  descrambler_b u_descr_b (
    .clk, .rst_n, .frame_start(tr_valid && (b_fs_pend || b_frame_start)),
    .in_valid(tr_valid), .in_data(tr_sym), .out_valid(ds_b_valid), .out_data(ds_b_data));

  // ---------------------------------------------------------------- input multiplexer
  logic       di_valid, di_ready;
  logic [7:0] di_data;

  assign di_valid  = is_b ? ds_b_valid : sym_valid;
  assign di_data   = is_b ? {1'b0, ds_b_data} : sym_data;
  assign sym_ready = !is_b && di_ready;

  // ---------------------------------------------------------------- deinterleaver
  logic       dq_valid, dq_ready;
  logic [7:0] dq_data;

  conv_deinterleaver #(.AW(MEM_AW)) u_deint (
    .clk, .rst_n, .mode, .cfg_i, .cfg_j, .restart,
    .in_valid(di_valid), .in_ready(di_ready), .in_data(di_data),
    .out_valid(dq_valid), .out_ready(dq_ready), .out_data(dq_data),
    .mem_we, .mem_waddr, .mem_wdata, .mem_re, .mem_raddr, .mem_rdata, .mem_bound);

  // ---------------------------------------------------------------- RS decoder
  logic       rs_valid, rs_sop, rs_eop, rs_fail;
  logic [7:0] rs_data;

  rs_decoder u_rs (
    .clk, .rst_n, .mode,
    .in_valid(dq_valid), .in_ready(dq_ready), .in_data(dq_data),
    .out_valid(rs_valid), .out_data(rs_data), .out_sop(rs_sop), .out_eop(rs_eop),
    .out_fail(rs_fail));

  // ---------------------------------------------------------------- A/C/D back end
  logic       da_valid, da_sop;
  logic [7:0] da_data;
  logic       fail_q, eop_q, d_fs_pend, d_fs_now;

  // A field-sync request is held until the next RS output packet starts.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     d_fs_pend <= 1'b0;
    else if (rs_valid && rs_sop)    d_fs_pend <= 1'b0;
    else if (d_field_sync)          d_fs_pend <= 1'b1;
  end
  assign d_fs_now = (d_fs_pend || d_field_sync) && rs_valid && rs_sop;

  descrambler_acd u_descr_acd (
    .clk, .rst_n, .mode, .field_sync(d_fs_now),
    .in_valid(rs_valid && !is_b), .in_sop(rs_sop), .in_data(rs_data),
    .out_valid(da_valid), .out_sop(da_sop), .out_data(da_data));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail_q <= 1'b0;
      eop_q  <= 1'b0;
    end else begin
      fail_q <= rs_fail;
      eop_q  <= rs_eop && !is_b;
    end
  end

  // ---------------------------------------------------------------- output multiplexer
  assign out_valid = is_b ? rs_valid : da_valid;
  assign out_sop   = is_b ? rs_sop   : da_sop;
  assign out_eop   = is_b ? rs_eop   : eop_q;
  assign out_data  = is_b ? rs_data  : da_data;
  assign out_fail  = is_b ? rs_fail  : (fail_q && da_valid);

  // The annex B path cannot be stalled: a symbol leaving the de-randomizer
  // must find the deinterleaver ready.
  a_b_no_drop: assert property (@(posedge clk) disable iff (!rst_n)
                                (is_b && ds_b_valid) |-> di_ready)
    else $error("annex B symbol dropped at the deinterleaver input");

endmodule
