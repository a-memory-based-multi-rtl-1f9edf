// tb_rs_forney: checks the multi-mode Forney error evaluator. For each mode,
// codewords get 1..t random errors at known powers l; the reference model
// gives the syndromes, the locator sigma = prod (1 + alpha^l x) scaled by a
// random factor, and Omega_i = sum_{j<=i} S_{i+1-j} sigma_j (the solver's
// convention). With beta_e = alpha^-l_e the evaluator must return every
// injected error value, with done at most nroots*(t+2) + 2 cycles after the
// edge that takes start. A locator with zero derivative (1 + x^2) must give
// fail = 1. Watchdog included.
module tb_rs_forney;
  import fec_pkg::*;
  import tb_rs_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fec_mode_e  mode;
  logic       start, busy, done, fail;
  logic [3:0] nroots;
  logic [7:0] beta    [TMAX];
  logic [7:0] sigma   [TMAX+1];
  logic [7:0] omega   [TMAX];
  logic [7:0] err_val [TMAX];

  rs_forney dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail_msg(string s);
    failures++;
    if (failures < 12) $display("%s", s);
  endtask

  task automatic run_forney(output int cyc);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    mode = J83_A; start = 0; nroots = 0;
    foreach (sigma[j]) sigma[j] = 0;
    foreach (omega[j]) omega[j] = 0;
    foreach (beta[j])  beta[j] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int md = 0; md < 4; md++) begin
      int n, k, t, m, np, ord;
      mode = fec_mode_e'(md);
      n = code_n(md); k = code_k(md); t = code_t(md);
      m = (md == 1) ? 7 : 8; ord = (1 << m) - 1;
      np = (md == 1) ? 127 : n;
      for (int c = 0; c < 20; c++) begin
        int msg [], cw [];
        int s [20];
        int sg [11];
        int locs [$], vals [$];
        int ne, cyc, sc;
        locs.delete(); vals.delete();
        msg = new[k];
        foreach (msg[i]) msg[i] = $urandom_range(ord);
        encode(md, msg, cw);
        ne = (c < t) ? c + 1 : $urandom_range(1, t);
        while (locs.size() < ne) begin
          int l;
          l = $urandom_range(np - 1);
          if (!(l inside {locs})) begin
            locs.push_back(l);
            vals.push_back($urandom_range(1, ord));
            cw[np - 1 - l] ^= vals[$];
          end
        end
        syndromes(md, cw, s);
        locator(md, locs, sg);
        sc = $urandom_range(1, ord);
        foreach (sg[j]) sg[j] = gmul(sg[j], sc, m);
        foreach (sigma[j]) sigma[j] = 8'(sg[j]);
        for (int i = 0; i < TMAX; i++) begin
          int o;
          o = 0;
          if (i < t) for (int j = 0; j <= i; j++) o ^= gmul(s[i - j], sg[j], m);
          omega[i] = 8'(o);
        end
        foreach (beta[e]) beta[e] = (e < ne) ? 8'(gpow((ord - locs[e]) % ord, m)) : 8'd0;
        nroots = 4'(ne);
        run_forney(cyc);
        checks++;
        if (cyc > ne * (t + 2) + 2 || fail)
          fail_msg($sformatf("mode %0d: done after %0d cycles, fail %b", md, cyc, fail));
        foreach (locs[e]) begin
          checks++;
          if (int'(err_val[e]) != vals[e])
            fail_msg($sformatf("mode %0d: value %0d = %h, expected %h", md, e, err_val[e], vals[e]));
        end
      end
      // zero derivative
      foreach (sigma[j]) sigma[j] = (j == 0 || j == 2) ? 8'd1 : 8'd0;
      beta[0] = 8'(gpow(5, m)); nroots = 1;
      begin
        int cyc;
        run_forney(cyc);
        checks++;
        if (!fail) fail_msg($sformatf("mode %0d: zero derivative not flagged", md));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
