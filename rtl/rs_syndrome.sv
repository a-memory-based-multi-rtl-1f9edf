// rs_syndrome: multi-mode RS syndrome calculator (20 Horner cells).
//
// Each cell SC_i evaluates the received polynomial at alpha^i by Horner's
// rule, one received symbol per accepted input: acc <- acc*alpha^i + r.
// Cells 1..6 are dual-field cells whose constant multiplier is alpha^i of
// GF(2^8) or of GF(2^7) depending on the mode; the others are GF(2^8) only.
// Annexes A/C use cells 0..15 (roots alpha^0..alpha^15), annex D cells
// 0..19, annex B cells 1..6 of GF(2^7). These groupings follow the design
// description.
//
// Annex B extended code: the 128th (last) symbol is the extended parity
// C_ = C(alpha^6), so it is added to S_6 without a Horner step and the other
// cells hold; the first 127 symbols are handled as a normal codeword. This
// treatment of the extended symbol is this design's own choice.
//
// Interface: in_valid/in_data with in_first on the first symbol and in_last
// on the last symbol of a codeword. One cycle after the last symbol,
// syn_valid pulses and syn[0..19] holds S_1..S_20 (S_j for j > 2t is zero)
// until the next codeword ends. syn_low_zero is set when S_1..S_t are all
// zero, which for up to t errors means the codeword is error free.
module rs_syndrome
  import fec_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  fec_mode_e       mode,
  input  logic            in_valid,
  input  logic            in_first,
  input  logic            in_last,
  input  logic [7:0]      in_data,
  output logic            syn_valid,
  output logic [7:0]      syn [NSYN],
  output logic            syn_low_zero
);

  logic       gf7;
  logic [7:0] acc   [NSYN];
  logic [7:0] prod  [NSYN];
  logic [7:0] cnst  [NSYN];
  logic [7:0] nxt   [NSYN];
  logic [4:0] two_t;
  logic [4:0] tval;
  logic [7:0] s_map [NSYN];

  assign gf7   = (mode == J83_B);
  assign tval  = 5'(rs_t(mode));
  assign two_t = tval << 1;

  // Constant multipliers alpha^i of the selected field.
  localparam logic [NSYN-1:0][7:0] POW8 = gen_pow_table(1'b0, 1'b0);
  localparam logic [NSYN-1:0][7:0] POW7 = gen_pow_table(1'b1, 1'b0);
  always_comb
    for (int i = 0; i < NSYN; i++)
      cnst[i] = (gf7 && i >= 1 && i <= 6) ? POW7[i] : POW8[i];

  for (genvar i = 0; i < NSYN; i++) begin : g_cell
    rs_ffm u_mul (.a(acc[i]), .b(cnst[i]), .gf7(gf7), .c(prod[i]));
  end

  always_comb begin
    for (int i = 0; i < NSYN; i++) begin
      if (in_first)
        nxt[i] = in_data;
      else if (gf7 && in_last)
        nxt[i] = (i == 6) ? (acc[i] ^ in_data) : acc[i];
      else
        nxt[i] = prod[i] ^ in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSYN; i++) acc[i] <= '0;
    end else if (in_valid) begin
      for (int i = 0; i < NSYN; i++) acc[i] <= nxt[i];
    end
  end

  // Map cells to S_1..S_2t: A/C/D start at alpha^0 (cell 0), B at alpha^1.
  always_comb begin
    for (int j = 0; j < NSYN; j++) begin
      if (gf7)
        s_map[j] = (j < 6) ? nxt[j + 1] : 8'd0;
      else
        s_map[j] = (5'(j) < two_t) ? nxt[j] : 8'd0;
    end
  end

  logic low_zero;
  always_comb begin
    low_zero = 1'b1;
    for (int j = 0; j < NSYN; j++)
      if (5'(j) < tval && s_map[j] != 8'd0) low_zero = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      syn_valid    <= 1'b0;
      syn_low_zero <= 1'b0;
      for (int j = 0; j < NSYN; j++) syn[j] <= '0;
    end else begin
      syn_valid <= in_valid && in_last;
      if (in_valid && in_last) begin
        for (int j = 0; j < NSYN; j++) syn[j] <= s_map[j];
        syn_low_zero <= low_zero;
      end
    end
  end

endmodule
