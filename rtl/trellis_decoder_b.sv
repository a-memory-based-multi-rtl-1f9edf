// trellis_decoder_b: J.83 annex B trellis decoder core: depuncturing, two
// Viterbi decoders and packing of the decoded bits into 7-bit RS symbols.
//
// Annex B protects the least significant bits of the QAM constellation with
// two punctured rate-4/5 convolutional codes (G = (25,37) octal, puncture
// matrix P1 = 0001, P2 = 1111), one for the I rail and one for the Q rail,
// which is why this block holds two Viterbi decoders. Each punctured group
// of five received bits per rail carries four trellis steps: four c2 bits
// and one c1 bit for the fourth step. The depuncturer feeds one trellis
// step per cycle to both decoders, marking c1 as erased on the first three
// steps. The decoded bits are interleaved I then Q per step and packed MSB
// first into 7-bit symbols.
//
// The code, the puncturing and the two-decoder structure follow the design
// description; the group bit layout (bits [3:0] = c2 of steps 0..3, bit 4 =
// c1 of step 3), the I/Q bit order, and leaving the uncoded QAM bits and
// frame synchronisation outside this block are this design's own choices.
//
// Interface: grp_valid/grp_ready with grp_i/grp_q (one group per rail);
// a group is taken when grp_ready is high and occupies the decoders for four
// cycles. restart clears the decoders and the packer. out_valid/out_sym
// carry the 7-bit symbols; the first symbols appear once each decoder has
// seen TL = 40 steps.
module trellis_decoder_b #(
  parameter int unsigned TL = 40
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       restart,
  input  logic       grp_valid,
  output logic       grp_ready,
  input  logic [4:0] grp_i,
  input  logic [4:0] grp_q,
  output logic       out_valid,
  output logic [6:0] out_sym
);

  logic [4:0] gi, gq;
  logic [2:0] step;     // 0 = idle, 1..4 = step being fed
  logic       v_in, c1_en;
  logic       vo_i, vo_q, bit_i, bit_q;

  assign grp_ready = (step == 3'd0) || (step == 3'd4);
  assign v_in      = (step != 3'd0);
  assign c1_en     = (step == 3'd4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= '0; gi <= '0; gq <= '0;
    end else if (restart) begin
      step <= '0;
    end else if (grp_valid && grp_ready) begin
      gi <= grp_i; gq <= grp_q; step <= 3'd1;
    end else if (step == 3'd4) begin
      step <= '0;
    end else if (step != 3'd0) begin
      step <= step + 3'd1;
    end
  end

  viterbi_decoder #(.TL(TL)) u_vit_i (
    .clk, .rst_n, .restart, .in_valid(v_in), .in_c1(gi[4]), .in_c1_en(c1_en),
    .in_c2(gi[3'(step - 3'd1)]), .out_valid(vo_i), .out_bit(bit_i));

  viterbi_decoder #(.TL(TL)) u_vit_q (
    .clk, .rst_n, .restart, .in_valid(v_in), .in_c1(gq[4]), .in_c1_en(c1_en),
    .in_c2(gq[3'(step - 3'd1)]), .out_valid(vo_q), .out_bit(bit_q));

  // Packer: two bits per decoded step (I then Q), MSB first.
  logic [7:0] acc;
  logic [3:0] nb;
  logic [8:0] a;
  assign a = (9'(acc) << 2) | 9'({bit_i, bit_q});
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; nb <= '0; out_valid <= 1'b0; out_sym <= '0;
    end else if (restart) begin
      nb <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (vo_i && vo_q) begin
        if (nb + 4'd2 >= 4'd7) begin
          // symbol complete: bits a[nb+1 .. nb+2-7]
          out_valid <= 1'b1;
          out_sym   <= 7'(a >> (nb + 4'd2 - 4'd7));
          nb        <= nb + 4'd2 - 4'd7;
        end else begin
          nb <= nb + 4'd2;
        end
        acc <= a[7:0];
      end
    end
  end

endmodule
