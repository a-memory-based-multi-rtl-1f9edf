// descrambler_acd: energy-dispersal de-randomizer for J.83 annexes A/C and D,
// placed after the RS decoder.
//
// Annexes A/C: the PRBS 1 + x^14 + x^15 runs in a 15-bit register that is
// advanced eight bit-steps per byte, so the byte-serial stream is handled
// one byte per cycle without serial/parallel conversion. The eight new PRBS
// bits are XORed onto the data byte, first bit onto the MSB. The register
// is loaded with 100101010000000 (registers 1..15) at every inverted sync
// byte 0xB8, which starts a group of eight packets; that byte is restored to
// 0x47 and is not randomized. On the other seven sync bytes the PRBS keeps
// running but its output is gated off (the enable AND of the byte-wide
// structure). This follows the design description and the DVB convention.
//
// Annex D: a 16-bit generator x^16+x^13+x^12+x^11+x^7+x^6+x^3+x+1, preloaded
// to 0xF180 on field_sync, advanced one step per byte (Galois form). Which
// eight register outputs form the randomizing byte is this design's own
// choice: the eight most significant registers, X16 (MSB) down to X9.
//
// Interface: in_valid/in_data/in_sop (in_sop marks the first byte of an
// A/C packet); field_sync (annex D) preloads the generator for the next
// byte. Output one cycle later: out_valid/out_data/out_sop.
module descrambler_acd
  import fec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  fec_mode_e  mode,
  input  logic       field_sync,
  input  logic       in_valid,
  input  logic       in_sop,
  input  logic [7:0] in_data,
  output logic       out_valid,
  output logic       out_sop,
  output logic [7:0] out_data
);

  localparam logic [15:1] PRBS15_INIT = 15'b000000010101001; // reg1 = bit 1
  localparam logic [16:1] PRBS16_INIT = 16'hF180;            // reg k = bit k
  // p(x) without x^16 (x^13+x^12+x^11+x^7+x^6+x^3+x+1), register k holding x^(k-1)
  localparam logic [16:1] PRBS16_FB   = 16'h38CB;

  logic [15:1] s15;
  logic [16:1] s16;

  // Eight bit-steps of the 15-bit PRBS; returns new state and the 8 bits.
  function automatic logic [22:0] prbs15_step8(logic [15:1] s);
    logic [7:0] b;
    logic fb;
    for (int k = 7; k >= 0; k--) begin
      fb   = s[14] ^ s[15];
      b[k] = fb;
      s    = {s[14:1], fb};
    end
    return {s, b};
  endfunction

  // One Galois step of the 16-bit generator (multiply by x mod p(x)).
  function automatic logic [16:1] prbs16_step(logic [16:1] s);
    logic msb;
    msb = s[16];
    s   = {s[15:1], 1'b0};
    if (msb) s = s ^ PRBS16_FB;
    return s;
  endfunction

  logic [22:0] st8;
  logic        is_ac;
  assign st8   = prbs15_step8(s15);
  assign is_ac = (mode != J83_D);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s15 <= PRBS15_INIT;
      s16 <= PRBS16_INIT;
      out_valid <= 1'b0; out_sop <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= in_valid;
      out_sop   <= in_valid && in_sop;
      if (!is_ac && field_sync) s16 <= PRBS16_INIT;
      if (in_valid) begin
        if (is_ac) begin
          if (in_sop && in_data == 8'hB8) begin
            s15      <= PRBS15_INIT;
            out_data <= 8'h47;
          end else if (in_sop) begin
            s15      <= st8[22:8];
            out_data <= in_data;
          end else begin
            s15      <= st8[22:8];
            out_data <= in_data ^ st8[7:0];
          end
        end else if (!field_sync) begin
          out_data <= in_data ^ s16[16:9];
          s16      <= prbs16_step(s16);
        end else begin
          out_data <= in_data ^ PRBS16_INIT[16:9];
          s16      <= prbs16_step(PRBS16_INIT);
        end
      end
    end
  end

endmodule
