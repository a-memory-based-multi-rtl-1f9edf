// tb_rs_chien: checks the multi-mode Chien search. For each mode, locator
// polynomials prod (1 + alpha^l x) with 1..t distinct random powers l (in
// 0..N-1, annex B 0..126) are built by the reference arithmetic and scaled
// by a random nonzero factor, as the inversionless solver leaves them. The
// search must report exactly these l in increasing order, beta = alpha^-l,
// nroots = number of errors, fail = 0, and done N+1 cycles after the edge
// that takes start (128 in annex B). A locator whose degree input is one
// higher than its root count must give fail = 1. Watchdog included.
module tb_rs_chien;
  import fec_pkg::*;
  import tb_rs_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fec_mode_e  mode;
  logic       start, busy, done, fail;
  logic [7:0] sigma [TMAX+1];
  logic [4:0] deg;
  logic [3:0] nroots;
  logic [7:0] loc  [TMAX];
  logic [7:0] beta [TMAX];

  rs_chien dut (.*);

  int checks = 0, failures = 0, n_fail_seen = 0;

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

  initial begin
    mode = J83_A; start = 0; deg = 0;
    foreach (sigma[j]) sigma[j] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int md = 0; md < 4; md++) begin
      int n, t, m, np, ord;
      mode = fec_mode_e'(md);
      n = code_n(md); t = code_t(md);
      m = (md == 1) ? 7 : 8; ord = (1 << m) - 1;
      np = (md == 1) ? 127 : n;
      for (int c = 0; c < 20; c++) begin
        int locs [$];
        int sg [11];
        int ne, cyc, sc;
        bit bad_deg;
        locs.delete();
        bad_deg = (c == 19);
        ne = (c < t) ? c + 1 : $urandom_range(1, t);
        while (locs.size() < ne) begin
          int l;
          l = $urandom_range(np - 1);
          if (!(l inside {locs})) locs.push_back(l);
        end
        locs.sort();
        locator(md, locs, sg);
        sc = $urandom_range(1, ord);
        foreach (sigma[j]) sigma[j] = 8'(gmul(sg[j], sc, m));
        deg = 5'(bad_deg ? ne + 1 : ne);
        @(negedge clk); start = 1;
        @(negedge clk); start = 0;
        foreach (sigma[j]) sigma[j] = 8'($urandom_range(ord));   // must have been latched
        cyc = 1;
        while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
        checks++;
        if (cyc != (md == 1 ? 128 : n + 1))
          fail_msg($sformatf("mode %0d: done after %0d cycles", md, cyc));
        checks++;
        if (fail != bad_deg) fail_msg($sformatf("mode %0d: fail = %b", md, fail));
        if (fail) n_fail_seen++;
        checks++;
        if (int'(nroots) != ne) fail_msg($sformatf("mode %0d: nroots %0d, expected %0d", md, nroots, ne));
        foreach (locs[e]) begin
          checks++;
          if (int'(loc[e]) != locs[e] || int'(beta[e]) != gpow((ord - locs[e]) % ord, m))
            fail_msg($sformatf("mode %0d: root %0d at %0d (beta %h), expected %0d", md, e,
                               loc[e], beta[e], locs[e]));
        end
      end
    end
    $display("fail cases seen=%0d", n_fail_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
