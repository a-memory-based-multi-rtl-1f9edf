// tb_conv_deinterleaver: checks the universal convolutional deinterleaver
// against a reference built from the textbook branch structure.
//
// For each (I,J) a reference interleaver (branch b delays by b*J of its own
// symbols, commutator starting at branch 0) scrambles a counting sequence;
// the deinterleaver output must then equal the input sequence delayed by
// I*(I-1)*J symbols. Configurations: annex A/C (12,17), annex D (52,4) and
// annex B (128,1), (64,2), (32,4), (16,8), (8,16) and the largest, (128,8),
// which needs 65032 memory words. Input gaps and output back-pressure are
// applied at random; the reported memory size is checked against
// J*I*(I-1)/2 + J.
module tb_conv_deinterleaver;
  import fec_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fec_mode_e  mode;
  logic [7:0] cfg_i;
  logic [4:0] cfg_j;
  logic       restart, in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data, out_data;
  logic       mem_we, mem_re;
  logic [15:0] mem_waddr, mem_raddr;
  logic [7:0] mem_wdata, mem_rdata;
  logic [16:0] mem_bound;

  conv_deinterleaver dut (.*);
  ext_sram_model u_mem (.clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
                        .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));

  int checks = 0, failures = 0, n_direct = 0, n_bp = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid && !out_ready) n_bp++;
  always @(posedge clk) if (in_valid && in_ready && dut.direct) n_direct++;

  // input value sequence: x[k] = k * 7 + (k >> 8) (8-bit)
  function automatic logic [7:0] xval(int k); return 8'(k * 7 + (k >> 8)); endfunction

  task automatic run_cfg(fec_mode_e md, int I, int J, int nsym);
    int delay, sent, rcvd, bad;
    int q[][$];
    logic [7:0] il [];
    delay = I * (I - 1) * J;
    // reference interleaver output sequence
    q = new[I];
    il = new[nsym];
    for (int k = 0; k < nsym; k++) begin
      int b;
      b = k % I;
      q[b].push_back(int'(xval(k)));
      if (q[b].size() > b * J) il[k] = 8'(q[b].pop_front());
      else il[k] = 8'hEE;
    end
    mode = md; cfg_i = 8'(I); cfg_j = 5'(J);
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    checks++;
    if (mem_bound != 17'(J * I * (I - 1) / 2 + J)) begin
      failures++; $display("(%0d,%0d) mem_bound %0d", I, J, mem_bound);
    end
    sent = 0; rcvd = 0; bad = 0;
    fork
      while (sent < nsym) begin
        in_valid = ($urandom_range(7) != 0);
        in_data  = il[sent];
        @(posedge clk);
        if (in_valid && in_ready) sent++;
        @(negedge clk);
      end
      while (rcvd < nsym) begin
        out_ready = ($urandom_range(7) != 0);
        @(posedge clk);
        if (out_valid && out_ready) begin
          if (rcvd >= delay) begin
            if (out_data != xval(rcvd - delay)) bad++;
          end
          rcvd++;
        end
        @(negedge clk);
      end
    join
    in_valid = 0;
    checks++;
    if (bad != 0) begin failures++; $display("(%0d,%0d): %0d wrong symbols", I, J, bad); end
    else $display("(%0d,%0d): %0d symbols ok, delay %0d", I, J, nsym - delay, delay);
  endtask

  initial begin
    restart = 0; in_valid = 0; in_data = 0; out_ready = 1;
    mode = J83_A; cfg_i = 12; cfg_j = 17;
    repeat (3) @(negedge clk); rst_n = 1;
    run_cfg(J83_A, 12, 17, 12 * 11 * 17 + 3000);
    run_cfg(J83_C, 12, 17, 12 * 11 * 17 + 500);
    run_cfg(J83_D, 52, 4, 52 * 51 * 4 + 3000);
    run_cfg(J83_B, 128, 1, 128 * 127 + 2000);
    run_cfg(J83_B, 64, 2, 64 * 63 * 2 + 2000);
    run_cfg(J83_B, 32, 4, 32 * 31 * 4 + 2000);
    run_cfg(J83_B, 16, 8, 16 * 15 * 8 + 2000);
    run_cfg(J83_B, 8, 16, 8 * 7 * 16 + 2000);
    run_cfg(J83_B, 128, 8, 128 * 127 * 8 + 3000);
    checks++; if (n_direct == 0) begin failures++; $display("bypass branch never used"); end
    checks++; if (n_bp == 0) begin failures++; $display("no back-pressure seen"); end
    $display("bypassed=%0d backpressure_cycles=%0d", n_direct, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
