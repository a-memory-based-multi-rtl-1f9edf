// tb_rs_decoder: self-checking testbench of the multi-mode RS decoder.
//
// For each annex (A, B, C, D) the decoder is reset, then a stream of random
// codewords is encoded by the reference model in tb_rs_pkg, corrupted with
// 0..t random symbol errors (and, for some codewords, more than t), and
// streamed in. Every output message symbol is compared with the original
// message for codewords with at most t errors; codewords with more than t
// errors must not be reported as clean when the decoder output differs from
// the message. A first burst of error-free codewords is sent back to back
// and must pass without a single input stall (one symbol per clock). In
// annex B some codewords also carry an error on the extended parity symbol,
// together with up to t-1 other errors, and must be corrected.
module tb_rs_decoder;
  import fec_pkg::*;
  import tb_rs_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fec_mode_e  mode;
  logic       in_valid, in_ready;
  logic [7:0] in_data;
  logic       out_valid, out_sop, out_eop, out_fail;
  logic [7:0] out_data;

  rs_decoder dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_corr_cw = 0, n_fail_cw = 0, n_clean_cw = 0;
  int n_ext_cw = 0;

  typedef struct { int msg[$]; bit over_t; int nerr; } exp_t;
  exp_t expq[$];

  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (in_valid && !in_ready) n_stall++;

  // monitor
  int got[$];
  bit got_fail;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (out_sop) begin got.delete(); got_fail = 0; end
      got.push_back(int'(out_data));
      if (out_fail) got_fail = 1;
      if (out_eop) begin
        exp_t e;
        bit same;
        if (expq.size() == 0) begin
          failures++; $display("unexpected codeword");
        end else begin
          e = expq.pop_front();
          same = (got.size() == e.msg.size());
          for (int i = 0; i < got.size() && same; i++) if (got[i] != e.msg[i]) same = 0;
          checks++;
          if (!e.over_t) begin
            if (!same || got_fail) begin
              failures++;
              $display("mode %0d: codeword mismatch (fail=%0d) nerr=%0d", mode, got_fail, e.nerr);
            end
          end else begin
            if (!same && !got_fail) $display("note: miscorrected codeword beyond t");
            if (got_fail) n_fail_cw++;
          end
        end
      end
    end
  end

  task automatic send_cw(int md, int nerr, bit gaps, bit ext_err = 0);
    int msg[];
    int cw[];
    int pos[$];
    int n, k, m, p;
    exp_t e;
    n = code_n(md); k = code_k(md); m = (md == 1) ? 7 : 8;
    msg = new[k];
    foreach (msg[i]) msg[i] = $urandom_range((1 << m) - 1);
    encode(md, msg, cw);
    // the annex-B extended parity (last symbol) is left error free
    while (pos.size() < nerr) begin
      p = $urandom_range((md == 1) ? n - 2 : n - 1);
      if (!(p inside {pos})) pos.push_back(p);
    end
    foreach (pos[i]) cw[pos[i]] ^= $urandom_range((1 << m) - 1, 1);
    // annex B: an error on the extended parity symbol as well
    if (ext_err) begin cw[n - 1] ^= $urandom_range((1 << m) - 1, 1); n_ext_cw++; end
    foreach (msg[i]) e.msg.push_back(msg[i]);
    e.over_t = (nerr + int'(ext_err) > code_t(md));
    e.nerr = nerr;
    if (nerr == 0) n_clean_cw++;
    else if (!e.over_t) n_corr_cw++;
    expq.push_back(e);
    // inputs change on the falling edge; a symbol is taken on a rising
    // edge at which in_ready is high
    for (int i = 0; i < n; i++) begin
      bit taken;
      if (gaps) while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      in_data  = 8'(cw[i]);
      do begin
        taken = in_ready;
        @(negedge clk);
      end while (!taken);
    end
    in_valid = 0;
  endtask

  initial begin
    fec_mode_e modes[4] = '{J83_A, J83_B, J83_C, J83_D};
    in_valid = 0; in_data = 0; mode = J83_A;
    foreach (modes[mi]) begin
      int md, t, st0, t0;
      md = int'(modes[mi]);
      t  = code_t(md);
      rst_n <= 0; mode <= modes[mi];
      repeat (3) @(posedge clk);
      rst_n <= 1;
      @(negedge clk);
      // back-to-back error-free codewords: no stall allowed
      st0 = n_stall; t0 = cycle;
      for (int c = 0; c < 6; c++) send_cw(md, 0, 0);
      checks++;
      if (n_stall != st0) begin failures++; $display("mode %0d: stall on clean stream", md); end
      checks++;
      if (cycle - t0 != 6 * code_n(md)) begin
        failures++; $display("mode %0d: clean stream took %0d cycles", md, cycle - t0);
      end
      // correctable patterns, continuous and with gaps
      for (int c = 0; c < 12; c++) send_cw(md, (c < 3) ? c : ((c % 4 == 3) ? t : $urandom_range(t)), c[0]);
      // beyond t
      for (int c = 0; c < 3; c++) send_cw(md, t + 1 + c, 0);
      send_cw(md, t, 0);
      // annex B: extended symbol in error with 0..t-1 other errors
      if (md == 1) for (int c = 0; c < 6; c++) send_cw(md, c % t, c[0], 1'b1);
      wait (expq.size() == 0);
      repeat (10) @(posedge clk);
    end
    $display("extended_symbol_errors=%0d", n_ext_cw);
    $display("stalls=%0d corrected_cw=%0d clean_cw=%0d flagged_fail_cw=%0d",
             n_stall, n_corr_cw, n_clean_cw, n_fail_cw);
    checks++; if (n_stall == 0)    begin failures++; $display("no stall seen"); end
    checks++; if (n_fail_cw == 0)  begin failures++; $display("no failure flagged"); end
    checks++; if (n_ext_cw == 0)   begin failures++; $display("no extended-symbol error sent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
