// rs_kes: multi-mode key equation solver (serial inversionless
// Berlekamp-Massey), giving the error locator sigma(x) and the error
// evaluator Omega(x) from the syndromes S_1..S_2t.
//
// Algorithm (from the design description): 2t iterations of
//   sigma_j <- delta*sigma_j + Delta*tau_{j-1}
//   if Delta == 0 or 2D >= i+1 : tau <- x*tau
//   else                        : D <- i+1-D, delta <- Delta, tau <- sigma(old)
//   next Delta = sum_j S_{i+2-j} * sigma_j(new)
// with sigma = tau = 1, D = 0, delta = 1, Delta = S_1 at the start. Omega is
// formed afterwards as Omega_i = sum_{j<=i} S_{i+1-j} sigma_j, i < t.
//
// Annex B extended code: when the extended parity symbol is in error only
// S_6 changes, so the last discrepancy is nonzero while S_1..S_5 already
// give the locator of the other errors. Following the design description,
// that discrepancy is forced to zero: in the last iteration a length change
// to a degree above t is not applied and sigma is kept. The extended symbol
// itself is not output, so its value is not computed.
//
// Hardware: sigma and tau are coefficient registers visited one coefficient
// per cycle, and three multi-mode multipliers do all the products: one for
// delta*sigma_j, one for Delta*tau_{j-1} and one for S*sigma_j, whose
// products accumulate the next discrepancy while sigma is being updated.
// During the Omega phase the S*sigma_j multiplier is reused. The coefficient
// serial schedule is this design's reading of the solver figure.
//
// Timing: start is accepted in IDLE; done pulses 2t(t+1) + t(t+1)/2 + 1
// cycles after the clock edge that takes start (t = 3, 8, 10), and
// sigma/omega/deg hold until the next start. With zero_in set (S_1..S_t all
// zero) the solver skips the iterations and returns sigma = 1, Omega = 0 one
// cycle after that edge.
module rs_kes
  import fec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  fec_mode_e  mode,
  input  logic       start,
  input  logic [7:0] syn [NSYN],
  input  logic       zero_in,
  output logic       busy,
  output logic       done,
  output logic [7:0] sigma [TMAX+1],
  output logic [7:0] omega [TMAX],
  output logic [4:0] deg
);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_OMEGA, S_DONE} state_e;
  state_e st;

  logic       gf7;
  logic [4:0] t;
  logic [7:0] s_reg [NSYN];
  logic [4:0] i_cnt;
  logic [3:0] j_cnt;
  logic [4:0] d_reg;
  logic [7:0] delta_prev;   // delta
  logic [7:0] disc;         // Delta^(i)
  logic [7:0] acc;
  logic [7:0] tau [TMAX+1];
  logic [7:0] tau_hold;
  logic       upd;

  // Multiplier operands.
  logic [7:0] m1_a, m1_b, m1_c;
  logic [7:0] m2_c, m3_c;
  logic [7:0] sig_old, tau_prev, sig_new;
  logic [5:0] s_idx;

  assign gf7 = (mode == J83_B);
  assign t   = 5'(rs_t(mode));
  assign busy = (st != S_IDLE);

  assign sig_old  = sigma[j_cnt];
  assign tau_prev = (j_cnt == 0) ? 8'd0 : tau_hold;
  assign upd      = (disc != 8'd0) && ({d_reg, 1'b0} < 6'(i_cnt) + 6'd1);

  // Annex B, last iteration: a length change here would give a locator of
  // degree 2t - D > t, which cannot come from t or fewer errors in the first
  // 127 symbols. The nonzero discrepancy is then taken as an error of the
  // extended symbol, which only S_6 sees, and the locator found from
  // S_1..S_5 is kept (the discrepancy is forced to zero).
  logic ext_err;
  assign ext_err = gf7 && (i_cnt == (t << 1) - 5'd1) && upd;

  rs_ffm u_ffm_sd (.a(delta_prev), .b(sig_old),  .gf7(gf7), .c(m3_c));
  rs_ffm u_ffm_dt (.a(disc),       .b(tau_prev), .gf7(gf7), .c(m2_c));
  assign sig_new = m3_c ^ m2_c;

  // Syndrome operand: S_{i+2-j} in the iterations, S_{i+1-j} for Omega.
  always_comb begin
    if (st == S_ITER) s_idx = 6'(i_cnt) + 6'd2 - 6'(j_cnt);
    else              s_idx = 6'(i_cnt) + 6'd1 - 6'(j_cnt);
    m1_a = (s_idx >= 6'd1 && s_idx <= 6'(NSYN)) ? s_reg[5'(s_idx - 6'd1)] : 8'd0;
    m1_b = (st == S_ITER) ? sig_new : sigma[j_cnt];
  end
  rs_ffm u_ffm_s (.a(m1_a), .b(m1_b), .gf7(gf7), .c(m1_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      done <= 1'b0;
      i_cnt <= '0; j_cnt <= '0; d_reg <= '0;
      delta_prev <= 8'd1; disc <= '0; acc <= '0; tau_hold <= '0;
      deg <= '0;
      for (int k = 0; k < NSYN; k++) s_reg[k] <= '0;
      for (int k = 0; k <= TMAX; k++) begin sigma[k] <= '0; tau[k] <= '0; end
      for (int k = 0; k < TMAX; k++) omega[k] <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          for (int k = 0; k < NSYN; k++) s_reg[k] <= syn[k];
          for (int k = 0; k <= TMAX; k++) begin
            sigma[k] <= (k == 0) ? 8'd1 : 8'd0;
            tau[k]   <= (k == 0) ? 8'd1 : 8'd0;
          end
          for (int k = 0; k < TMAX; k++) omega[k] <= '0;
          d_reg <= '0; delta_prev <= 8'd1; disc <= syn[0];
          acc <= '0; i_cnt <= '0; j_cnt <= '0; tau_hold <= '0;
          st <= zero_in ? S_DONE : S_ITER;
        end
        S_ITER: begin
          sigma[j_cnt] <= ext_err ? sig_old : sig_new;
          tau[j_cnt]   <= upd ? sig_old : tau_prev;
          tau_hold     <= tau[j_cnt];
          if (5'(j_cnt) == t) begin
            if (upd && !ext_err) begin
              delta_prev <= disc;
              d_reg      <= i_cnt + 5'd1 - d_reg;
            end
            disc  <= acc ^ m1_c;
            acc   <= '0;
            j_cnt <= '0;
            if (i_cnt == (t << 1) - 5'd1) begin
              i_cnt <= '0;
              st    <= S_OMEGA;
            end else begin
              i_cnt <= i_cnt + 5'd1;
            end
          end else begin
            acc   <= acc ^ m1_c;
            j_cnt <= j_cnt + 4'd1;
          end
        end
        S_OMEGA: begin
          if (5'(j_cnt) == i_cnt) begin
            omega[i_cnt[3:0]] <= acc ^ m1_c;
            acc   <= '0;
            j_cnt <= '0;
            if (i_cnt == t - 5'd1) st <= S_DONE;
            else i_cnt <= i_cnt + 5'd1;
          end else begin
            acc   <= acc ^ m1_c;
            j_cnt <= j_cnt + 4'd1;
          end
        end
        S_DONE: begin
          deg  <= d_reg;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
