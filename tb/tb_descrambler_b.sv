// tb_descrambler_b: checks the annex B GF(128) de-randomizer against the
// recurrence p[n+3] = p[n+1] + alpha^3 p[n] (all-ones preload), computed with
// the reference field arithmetic of tb_rs_pkg, over three frames of random
// length with random input gaps.
module tb_descrambler_b;
  import tb_rs_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       frame_start, in_valid, out_valid;
  logic [6:0] in_data, out_data;

  descrambler_b dut (.*);

  int checks = 0, failures = 0, n_frames = 0;
  int expq[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (expq.size() == 0 || int'(out_data) != expq[0]) begin
      failures++;
      if (failures < 10) $display("got %h exp %h", out_data, expq.size() ? expq[0] : 0);
    end
    if (expq.size()) void'(expq.pop_front());
  end

  initial begin
    int a3;
    a3 = gpow(3, 7);
    frame_start = 0; in_valid = 0; in_data = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int f = 0; f < 3; f++) begin
      int p0, p1, p2, pn, len;
      p0 = 'h7F; p1 = 'h7F; p2 = 'h7F;
      len = $urandom_range(300, 800);
      n_frames++;
      for (int i = 0; i < len; i++) begin
        int d;
        d = $urandom_range(127);
        pn = p0;
        expq.push_back(d ^ pn);
        in_valid = 1; in_data = 7'(d); frame_start = (i == 0);
        @(negedge clk);
        in_valid = 0; frame_start = 0;
        if ($urandom_range(3) == 0) @(negedge clk);
        begin
          int nx;
          nx = p1 ^ gmul(p0, a3, 7);
          p0 = p1; p1 = p2; p2 = nx;
        end
      end
    end
    repeat (5) @(negedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
