// rs_chien: multi-mode Chien search.
//
// Cell j holds p_j = sigma_j * alpha^(-j*l); at search step l the cells are
// summed, which gives sigma(alpha^-l). Every step each cell multiplies its
// register by its constant alpha^-j. Cells 0..3 are dual-field (GF(2^8) or
// GF(2^7) constant chosen by the mode), cells 4..10 are GF(2^8) only, and a
// further dual-field location cell starts at 1 and steps by alpha^-1 so that
// it always holds the current candidate root beta = alpha^-l. When the sum
// is zero, the location l and beta are stored into a 10-entry register file.
// This structure follows the design description; the step count and the
// failure rule below are this design's own choices.
//
// Positions: l is the power of x of a received symbol, so l = 0 is the last
// symbol of a codeword. Steps run l = 0..N-1 (annex B: l = 0..126, the
// extended parity symbol having no location). After the last step, done
// pulses and nroots, loc[], beta[] hold their values. fail is set when the
// number of roots differs from the locator degree deg, which marks the
// codeword as uncorrectable.
//
// Timing: start in idle; done follows N+1 cycles later (128 in annex B).
module rs_chien
  import fec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  fec_mode_e  mode,
  input  logic       start,
  input  logic [7:0] sigma [TMAX+1],
  input  logic [4:0] deg,
  output logic       busy,
  output logic       done,
  output logic [3:0] nroots,
  output logic       fail,
  output logic [7:0] loc  [TMAX],
  output logic [7:0] beta [TMAX]
);

  logic       gf7;
  logic [7:0] p     [TMAX+1];
  logic [7:0] p_nxt [TMAX+1];
  logic [7:0] cnst  [TMAX+1];
  logic [7:0] b_reg, b_nxt, b_cnst;
  logic [7:0] l_cnt, l_last;
  logic [7:0] sum;
  logic [4:0] deg_q;
  logic [4:0] found;
  logic       run;

  assign gf7    = (mode == J83_B);
  assign l_last = gf7 ? 8'd126 : 8'(rs_n(mode) - 1);
  assign busy   = run;

  localparam logic [NSYN-1:0][7:0] IPOW8 = gen_pow_table(1'b0, 1'b1);
  localparam logic [NSYN-1:0][7:0] IPOW7 = gen_pow_table(1'b1, 1'b1);
  always_comb
    for (int j = 0; j <= TMAX; j++)
      cnst[j] = (gf7 && j <= 3) ? IPOW7[j] : IPOW8[j];
  assign b_cnst = gf7 ? IPOW7[1] : IPOW8[1];

  for (genvar j = 0; j <= TMAX; j++) begin : g_cell
    rs_ffm u_mul (.a(p[j]), .b(cnst[j]), .gf7(gf7), .c(p_nxt[j]));
  end
  rs_ffm u_loc (.a(b_reg), .b(b_cnst), .gf7(gf7), .c(b_nxt));

  always_comb begin
    sum = '0;
    for (int j = 0; j <= TMAX; j++) sum ^= p[j];
  end

  // roots found including the present step
  logic [4:0] f;
  assign f = found + ((sum == 8'd0) ? 5'd1 : 5'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; done <= 1'b0; fail <= 1'b0; nroots <= '0;
      l_cnt <= '0; b_reg <= 8'd1; deg_q <= '0; found <= '0;
      for (int j = 0; j <= TMAX; j++) p[j] <= '0;
      for (int j = 0; j < TMAX; j++) begin loc[j] <= '0; beta[j] <= '0; end
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          for (int j = 0; j <= TMAX; j++) p[j] <= sigma[j];
          b_reg <= 8'd1;
          l_cnt <= '0;
          found <= '0;
          deg_q <= deg;
          run   <= 1'b1;
        end
      end else begin
        for (int j = 0; j <= TMAX; j++) p[j] <= p_nxt[j];
        b_reg <= b_nxt;
        if (sum == 8'd0) begin
          if (found < 5'(TMAX)) begin
            loc[found[3:0]]  <= l_cnt;
            beta[found[3:0]] <= b_reg;
          end
          found <= found + 5'd1;
        end
        l_cnt <= l_cnt + 8'd1;
        if (l_cnt == l_last) begin
          run    <= 1'b0;
          done   <= 1'b1;
          nroots <= (f > 5'(TMAX)) ? 4'(TMAX) : f[3:0];
          fail   <= (f != deg_q);
        end
      end
    end
  end

endmodule
