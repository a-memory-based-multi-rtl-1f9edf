// tb_deint_addr_gen: checks the deinterleaver address generator with a
// memory array inside the testbench. For each (I,J) (annexes A/C and D, and
// every annex B setting including (128,8)) a reference interleaver scrambles
// a counting sequence; each step reads the array at raddr (unless direct),
// then writes the symbol at waddr, and the symbol leaving is the read value
// or, on the direct branch, the symbol itself. After the delay I(I-1)J the
// output must equal the input delayed by that amount. mem_bound must be
// J*I*(I-1)/2 + J and every address must stay below it; direct must be set
// on exactly one branch in I. Steps are issued with random gaps.
module tb_deint_addr_gen;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        restart, step, direct;
  logic [7:0]  cfg_i;
  logic [4:0]  cfg_j;
  logic [15:0] waddr, raddr;
  logic [16:0] mem_bound;

  deint_addr_gen #(.AW(16)) dut (.*);

  int checks = 0, failures = 0;
  int mem [65536];

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xval(int k); return (k * 5 + (k >> 7)) & 'hFF; endfunction

  task automatic run_cfg(int I, int J, int nsym);
    int D, bad, oob, ndir, bound;
    int q [][$];
    int il [];
    D = I * (I - 1) * J;
    bound = J * I * (I - 1) / 2 + J;
    q = new[I];
    il = new[nsym];
    for (int k = 0; k < nsym; k++) begin
      int b;
      b = k % I;
      q[b].push_back(xval(k));
      il[k] = (q[b].size() > b * J) ? q[b].pop_front() : 0;
    end
    cfg_i = 8'(I); cfg_j = 5'(J);
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    checks++;
    if (int'(mem_bound) != bound) begin
      failures++; $display("(%0d,%0d): mem_bound %0d, expected %0d", I, J, mem_bound, bound);
    end
    bad = 0; oob = 0; ndir = 0;
    for (int k = 0; k < nsym; k++) begin
      int y;
      while ($urandom_range(5) == 0) begin step = 0; @(negedge clk); end
      step = 1;
      #1;
      if (direct) begin y = il[k]; ndir++; end
      else begin
        if (int'(waddr) >= bound || int'(raddr) >= bound) oob++;
        y = mem[raddr];
        mem[waddr] = il[k];
      end
      if (k >= D && y != xval(k - D)) bad++;
      @(negedge clk);
    end
    step = 0;
    checks += 3;
    if (bad != 0) begin failures++; $display("(%0d,%0d): %0d wrong symbols", I, J, bad); end
    if (oob != 0) begin failures++; $display("(%0d,%0d): %0d addresses out of range", I, J, oob); end
    if (ndir != nsym / I) begin failures++; $display("(%0d,%0d): %0d direct steps", I, J, ndir); end
    $display("(%0d,%0d): delay %0d, %0d symbols checked", I, J, D, nsym - D);
  endtask

  initial begin
    restart = 0; step = 0; cfg_i = 12; cfg_j = 17;
    repeat (3) @(negedge clk); rst_n = 1;
    run_cfg(12, 17, 12 * 400);
    run_cfg(52, 4, 52 * 300);
    run_cfg(8, 16, 8 * 200);
    run_cfg(16, 8, 16 * 250);
    run_cfg(32, 4, 32 * 250);
    run_cfg(64, 2, 64 * 200);
    for (int j = 1; j <= 8; j++) run_cfg(128, j, 128 * (127 * j + 20));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
