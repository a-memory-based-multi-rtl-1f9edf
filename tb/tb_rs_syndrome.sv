// tb_rs_syndrome: checks the 20-cell multi-mode syndrome calculator in all
// four modes. Random codewords from the reference encoder get 0..t+2 random
// symbol errors and are fed with random input gaps; one cycle after the last
// symbol syn_valid must pulse, syn[] must equal the reference syndromes
// (zero beyond 2t) and syn_low_zero must be set exactly when the first t
// syndromes are zero. Watchdog included.
module tb_rs_syndrome;
  import fec_pkg::*;
  import tb_rs_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fec_mode_e  mode;
  logic       in_valid, in_first, in_last, syn_valid, syn_low_zero;
  logic [7:0] in_data;
  logic [7:0] syn [NSYN];

  rs_syndrome dut (.*);

  int checks = 0, failures = 0, n_zero = 0, n_nonzero = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = J83_A; in_valid = 0; in_first = 0; in_last = 0; in_data = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int md = 0; md < 4; md++) begin
      mode = fec_mode_e'(md);
      for (int c = 0; c < 25; c++) begin
        int msg [], cw [];
        int s [20];
        int n, k, t, ne;
        bit lz;
        n = code_n(md); k = code_k(md); t = code_t(md);
        msg = new[k];
        foreach (msg[i]) msg[i] = $urandom_range(md == 1 ? 127 : 255);
        encode(md, msg, cw);
        ne = (c % 3 == 0) ? 0 : $urandom_range(1, t + 2);
        repeat (ne) cw[$urandom_range(md == 1 ? n - 2 : n - 1)] ^= $urandom_range(1, md == 1 ? 127 : 255);
        syndromes(md, cw, s);
        for (int i = 0; i < n; i++) begin
          @(negedge clk);
          while ($urandom_range(4) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_data = 8'(cw[i]); in_first = (i == 0); in_last = (i == n - 1);
        end
        @(negedge clk);
        in_valid = 0; in_last = 0;
        checks++;
        if (!syn_valid) begin failures++; $display("syn_valid missing"); end
        lz = 1;
        for (int j = 0; j < 20; j++) begin
          if (j < t && s[j] != 0) lz = 0;
          checks++;
          if (int'(syn[j]) != s[j]) begin
            failures++;
            if (failures < 10) $display("mode %0d S[%0d] = %h, expected %h", md, j, syn[j], s[j]);
          end
        end
        checks++;
        if (syn_low_zero != lz) begin failures++; $display("mode %0d syn_low_zero %b", md, syn_low_zero); end
        if (lz) n_zero++; else n_nonzero++;
        @(negedge clk);
        checks++;
        if (syn_valid) begin failures++; $display("syn_valid longer than one cycle"); end
      end
    end
    $display("zero-syndrome codewords=%0d others=%0d", n_zero, n_nonzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
