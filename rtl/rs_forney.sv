// rs_forney: multi-mode error value evaluator (Forney algorithm).
//
// For each root beta found by the Chien search the unit computes
//   annexes A, C, D (first root alpha^0): e = Omega(beta) / (beta * sigma'(beta))
//   annex B         (first root alpha^1): e = Omega(beta) / sigma'(beta)
// where sigma'(beta) = sigma_1 + sigma_3*beta^2 + sigma_5*beta^4 + ... is the
// formal derivative (odd part of sigma divided by x). Two multi-mode
// multipliers work in parallel: the upper one first squares beta and then
// runs Horner's rule on the odd sigma coefficients with beta^2, and in annexes
// A/C/D multiplies the result by beta; the lower one runs Horner's rule on
// Omega with beta. The denominator is inverted by a table lookup and the lower
// multiplier forms the quotient. This follows the evaluator described for
// the design; the cycle-by-cycle schedule is this design's own.
//
// Timing: after start, each root takes t+2 cycles (t = 3, 8, 10); done pulses
// once all nroots values are in err_val[]. fail is set if a denominator is
// zero (not a valid single root).
module rs_forney
  import fec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  fec_mode_e  mode,
  input  logic       start,
  input  logic [3:0] nroots,
  input  logic [7:0] beta  [TMAX],
  input  logic [7:0] sigma [TMAX+1],
  input  logic [7:0] omega [TMAX],
  output logic       busy,
  output logic       done,
  output logic       fail,
  output logic [7:0] err_val [TMAX]
);

  localparam logic [255:0][7:0] INV8 = gen_inv8();
  localparam logic [127:0][6:0] INV7 = gen_inv7();

  logic       gf7;
  logic [4:0] t;
  logic [3:0] kmax;
  logic       run;
  logic [3:0] r_idx, n_q;
  logic [4:0] c;
  logic [7:0] b, b2, u, v, inv_d;
  logic [7:0] up_a, up_b, up_c, lo_a, lo_b, lo_c;

  assign gf7  = (mode == J83_B);
  assign t    = 5'(rs_t(mode));
  assign kmax = 4'((t - 5'd1) >> 1);
  assign busy = run;
  assign b    = beta[r_idx];

  assign inv_d = gf7 ? {1'b0, INV7[u[6:0]]} : INV8[u];

  // Upper multiplier: beta*beta at c = 0, Horner with beta^2, then *beta.
  always_comb begin
    if (c == 5'd0) begin
      up_a = b; up_b = b;
    end else if (c < t) begin
      up_a = u; up_b = b2;
    end else begin
      up_a = u; up_b = b;
    end
  end
  rs_ffm u_up (.a(up_a), .b(up_b), .gf7(gf7), .c(up_c));

  // Lower multiplier: Horner on Omega with beta, then Omega(beta) * 1/den.
  always_comb begin
    lo_a = v;
    lo_b = (c == t + 5'd1) ? inv_d : b;
  end
  rs_ffm u_lo (.a(lo_a), .b(lo_b), .gf7(gf7), .c(lo_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; done <= 1'b0; fail <= 1'b0;
      r_idx <= '0; n_q <= '0; c <= '0; b2 <= '0; u <= '0; v <= '0;
      for (int k = 0; k < TMAX; k++) err_val[k] <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          fail  <= 1'b0;
          r_idx <= '0;
          n_q   <= nroots;
          c     <= '0;
          for (int k = 0; k < TMAX; k++) err_val[k] <= '0;
          if (nroots == 4'd0) done <= 1'b1;
          else                run  <= 1'b1;
        end
      end else begin
        c <= c + 5'd1;
        if (c == 5'd0) begin
          b2 <= up_c;
          u  <= sigma[4'({kmax, 1'b1})];
          v  <= omega[4'(t - 5'd1)];
        end else if (c < t) begin
          // Horner steps: Omega uses t-1 steps, sigma' uses kmax steps.
          v <= lo_c ^ omega[4'(t - 5'd1 - c)];
          if (c <= 5'(kmax)) u <= up_c ^ sigma[4'({4'(5'(kmax) - c), 1'b1})];
        end else if (c == t) begin
          if (!gf7) u <= up_c;
        end else begin
          err_val[r_idx] <= lo_c;
          if (u == 8'd0) fail <= 1'b1;
          c <= '0;
          if (r_idx == n_q - 4'd1) begin
            run  <= 1'b0;
            done <= 1'b1;
          end else begin
            r_idx <= r_idx + 4'd1;
          end
        end
      end
    end
  end

endmodule
