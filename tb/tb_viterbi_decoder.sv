// tb_viterbi_decoder: checks the 16-state Viterbi decoder.
//
// A reference encoder (G1 = 25, G2 = 37 octal, state = last four input
// bits) encodes 6000 random bits; puncturing keeps c1 only on every fourth
// step (P1 = 0001, P2 = 1111, rate 4/5). Run 1 is error free, run 2 flips
// one transmitted bit in every 40-step window, run 3 uses the unpunctured
// rate-1/2 code with two flips per 40 steps. The decoded stream must equal
// the input exactly, with exactly TL = 40 steps of latency (the first output
// appears after the 40th step). Run 4 feeds a long noisy stream to exercise
// path-metric wrap-around; the modulo-normalised metrics must wrap and the
// output must still be correct.
module tb_viterbi_decoder;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic restart, in_valid, in_c1, in_c1_en, in_c2, out_valid, out_bit;

  viterbi_decoder dut (.*);

  int checks = 0, failures = 0, n_flips = 0, n_wraps = 0;
  bit src[$];
  int nout = 0, bad = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    if (nout >= src.size() || out_bit != src[nout]) bad++;
    nout++;
  end

  logic [7:0] pm0_prev;
  always @(posedge clk) begin
    if (rst_n && dut.pm[0] < pm0_prev && (pm0_prev - dut.pm[0]) > 100) n_wraps++;
    pm0_prev <= dut.pm[0];
  end

  task automatic run(int nbits, bit punct, int flips_per_40);
    logic [3:0] st;
    int step_cnt;
    src.delete(); nout = 0; bad = 0; st = 0;
    restart = 1; @(negedge clk); restart = 0;
    for (int k = 0; k < nbits; k++) begin
      bit u, c1, c2, en;
      u  = 1'($urandom);
      src.push_back(u);
      c1 = u ^ st[2] ^ st[0];
      c2 = u ^ st[3] ^ st[2] ^ st[1] ^ st[0];
      st = {u, st[3:1]};
      en = punct ? (k % 4 == 3) : 1'b1;
      if (flips_per_40 >= 1 && k % 40 == 7)  begin c2 = !c2; n_flips++; end
      if (flips_per_40 >= 2 && k % 40 == 27) begin c1 = !c1; n_flips++; end
      in_valid = 1; in_c1 = c1; in_c1_en = en; in_c2 = c2;
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(3) == 0) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (nout != nbits - 40) begin failures++; $display("latency: %0d outputs for %0d steps", nout, nbits); end
    checks++;
    if (bad != 0) begin failures++; $display("run punct=%0d flips=%0d: %0d bit errors", punct, flips_per_40, bad); end
  endtask

  initial begin
    restart = 0; in_valid = 0; in_c1 = 0; in_c1_en = 0; in_c2 = 0; pm0_prev = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    run(6000, 1, 0);
    run(6000, 1, 1);
    run(6000, 0, 2);
    run(20000, 0, 1);
    checks++; if (n_wraps == 0) begin failures++; $display("path metrics never wrapped"); end
    $display("flips=%0d metric_wraps=%0d", n_flips, n_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
