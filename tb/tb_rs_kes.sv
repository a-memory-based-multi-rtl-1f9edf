// tb_rs_kes: checks the inversionless Berlekamp-Massey key equation solver
// in all four modes. Syndromes come from the reference model for codewords
// with 1..t random symbol errors at known powers l. Checks: done pulses
// exactly 2t(t+1) + t(t+1)/2 + 1 cycles after the edge that takes start;
// deg equals the number of errors; sigma, scaled by 1/sigma_0, equals prod (1 + alpha^l x); and the
// Forney formula applied to sigma and Omega by the reference arithmetic
// gives back every injected error value. The zero_in path (sigma = 1,
// Omega = 0, done one cycle after start) is checked too. Watchdog included.
module tb_rs_kes;
  import fec_pkg::*;
  import tb_rs_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fec_mode_e  mode;
  logic       start, zero_in, busy, done;
  logic [7:0] syn   [NSYN];
  logic [7:0] sigma [TMAX+1];
  logic [7:0] omega [TMAX];
  logic [4:0] deg;

  rs_kes dut (.*);

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

  // start the solver and return the cycles until done
  task automatic run_kes(output int cyc);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    mode = J83_A; start = 0; zero_in = 0;
    foreach (syn[j]) syn[j] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int md = 0; md < 4; md++) begin
      int n, k, t, m, h, np, lat;
      mode = fec_mode_e'(md);
      n = code_n(md); k = code_k(md); t = code_t(md);
      m = (md == 1) ? 7 : 8; h = (md == 1) ? 1 : 0;
      np = (md == 1) ? 127 : n;
      lat = 2 * t * (t + 1) + t * (t + 1) / 2 + 1;
      for (int c = 0; c < 30; c++) begin
        int msg [], cw [];
        int s [20];
        int sg [11];
        int locs [$], vals [$];
        int ne, cyc, s0i;
        locs.delete(); vals.delete();
        msg = new[k];
        foreach (msg[i]) msg[i] = $urandom_range((1 << m) - 1);
        encode(md, msg, cw);
        ne = (c < t) ? c + 1 : $urandom_range(1, t);
        while (locs.size() < ne) begin
          int l;
          l = $urandom_range(np - 1);
          if (!(l inside {locs})) begin
            locs.push_back(l);
            vals.push_back($urandom_range(1, (1 << m) - 1));
            cw[np - 1 - l] ^= vals[$];
          end
        end
        syndromes(md, cw, s);
        foreach (syn[j]) syn[j] = 8'(s[j]);
        zero_in = 0;
        run_kes(cyc);
        checks++;
        if (cyc != lat + 1) fail_msg($sformatf("mode %0d: done after %0d cycles, expected %0d", md, cyc, lat));
        checks++;
        if (int'(deg) != ne) fail_msg($sformatf("mode %0d: deg %0d, expected %0d", md, deg, ne));
        locator(md, locs, sg);
        s0i = ginv(int'(sigma[0]), m);
        for (int i = 0; i <= TMAX; i++) begin
          checks++;
          if (gmul(int'(sigma[i]), s0i, m) != sg[i])
            fail_msg($sformatf("mode %0d: sigma[%0d] scaled %h, expected %h", md, i,
                               gmul(int'(sigma[i]), s0i, m), sg[i]));
        end
        // error values by Forney from this sigma and Omega
        foreach (locs[e]) begin
          int b, om, dv, num, den, sv [], ov [];
          b = gpow(((1 << m) - 1 - locs[e]) % ((1 << m) - 1), m);
          ov = new[TMAX]; foreach (ov[i]) ov[i] = int'(omega[i]);
          sv = new[TMAX]; foreach (sv[i]) sv[i] = (i % 2 == 0) ? int'(sigma[i + 1]) : 0;
          num = peval(ov, b, m);
          dv  = peval(sv, b, m);
          den = (h == 0) ? gmul(dv, b, m) : dv;
          checks++;
          if (gmul(num, ginv(den, m), m) != vals[e])
            fail_msg($sformatf("mode %0d: error value at %0d wrong", md, locs[e]));
        end
      end
      // zero path
      foreach (syn[j]) syn[j] = 0;
      zero_in = 1;
      begin
        int cyc;
        run_kes(cyc);
        checks++;
        if (cyc != 2 || sigma[0] != 8'd1 || deg != 0 || omega[0] != 8'd0)
          fail_msg($sformatf("mode %0d: zero path cyc %0d sigma0 %h deg %0d", md, cyc, sigma[0], deg));
      end
      zero_in = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
