// tb_trellis_decoder_b: end-to-end check of the annex B trellis decoder core.
//
// Two random bit streams (I and Q rails) are convolutionally encoded
// (G = 25, 37 octal) and punctured to rate 4/5 by a reference model, grouped
// five bits per four steps, and one channel bit error is added to each rail
// every 60 steps. The decoder output symbols must equal the source bits
// interleaved I, Q per step and packed MSB first into 7-bit symbols.
module tb_trellis_decoder_b;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       restart, grp_valid, grp_ready, out_valid;
  logic [4:0] grp_i, grp_q;
  logic [6:0] out_sym;

  trellis_decoder_b dut (.*);

  int checks = 0, failures = 0, n_flips = 0;
  int expq[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (expq.size() == 0 || int'(out_sym) != expq[0]) begin
      failures++;
      if (failures < 10) $display("got %h exp %h", out_sym, expq.size() ? expq[0] : -1);
    end
    if (expq.size()) void'(expq.pop_front());
  end

  initial begin
    logic [3:0] si, sq;
    bit bits[$];
    int ngrp;
    restart = 0; grp_valid = 0; grp_i = 0; grp_q = 0;
    si = 0; sq = 0;
    ngrp = 1500;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    begin
      logic [4:0] gis [$], gqs [$];
      for (int g = 0; g < ngrp; g++) begin
        logic [4:0] gi, gq;
        for (int k = 0; k < 4; k++) begin
          bit ui, uq;
          ui = 1'($urandom); uq = 1'($urandom);
          bits.push_back(ui); bits.push_back(uq);
          gi[k] = ui ^ si[3] ^ si[2] ^ si[1] ^ si[0];
          gq[k] = uq ^ sq[3] ^ sq[2] ^ sq[1] ^ sq[0];
          if (k == 3) begin
            gi[4] = ui ^ si[2] ^ si[0];
            gq[4] = uq ^ sq[2] ^ sq[0];
          end
          si = {ui, si[3:1]};
          sq = {uq, sq[3:1]};
        end
        if (g % 15 == 5)  begin gi[g % 5] ^= 1; n_flips++; end
        if (g % 15 == 11) begin gq[(g + 2) % 5] ^= 1; n_flips++; end
        gis.push_back(gi); gqs.push_back(gq);
      end
      // expected symbols from the first (4*ngrp - 40) decoded steps
      begin
        int nb, sym, cnt;
        nb = 2 * (4 * ngrp - 40);
        cnt = 0; sym = 0;
        for (int i = 0; i < nb; i++) begin
          sym = (sym << 1) | bits[i];
          cnt++;
          if (cnt == 7) begin expq.push_back(sym & 'h7F); sym = 0; cnt = 0; end
        end
      end
      for (int g = 0; g < ngrp; g++) begin
        bit taken;
        grp_valid = 1; grp_i = gis[g]; grp_q = gqs[g];
        do begin taken = grp_ready; @(negedge clk); end while (!taken);
        grp_valid = 0;
        if ($urandom_range(3) == 0) @(negedge clk);
      end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d symbols missing", expq.size()); end
    $display("channel_flips=%0d", n_flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
