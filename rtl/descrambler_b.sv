// descrambler_b: J.83 annex B de-randomizer over GF(128).
//
// A linear feedback shift register of three 7-bit GF(128) symbols produces
// a pseudo-noise symbol sequence with feedback polynomial
// f(x) = x^3 + x + alpha^3, alpha^7 + alpha^3 + 1 = 0, i.e.
//   p[n+3] = p[n+1] + alpha^3 * p[n],
// and each received 7-bit symbol is XORed with p[n]. At frame_start the three
// registers are preloaded to all ones. The polynomial and the preload
// follow the design description; the register order (output taken from the
// oldest register) and the frame_start timing are this design's own.
//
// Interface: in_valid/in_data (7-bit symbol); frame_start with in_valid marks
// the first symbol of a frame, which is descrambled with the preloaded
// state. Output one cycle later on out_valid/out_data.
module descrambler_b
  import fec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       frame_start,
  input  logic       in_valid,
  input  logic [6:0] in_data,
  output logic       out_valid,
  output logic [6:0] out_data
);

  logic [7:0] r0, r1, r2;        // p[n], p[n+1], p[n+2]
  logic [7:0] c0, c1, c2, fb, a3_mul;

  assign c0 = frame_start ? 8'h7F : r0;
  assign c1 = frame_start ? 8'h7F : r1;
  assign c2 = frame_start ? 8'h7F : r2;

  localparam logic [NSYN-1:0][7:0] POW7 = gen_pow_table(1'b1, 1'b0);

  rs_ffm u_mul (.a(c0), .b(POW7[3]), .gf7(1'b1), .c(a3_mul));
  assign fb = c1 ^ a3_mul;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= 8'h7F; r1 <= 8'h7F; r2 <= 8'h7F;
      out_valid <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= in_data ^ c0[6:0];
        r0 <= c1;
        r1 <= c2;
        r2 <= fb;
      end
    end
  end

endmodule
