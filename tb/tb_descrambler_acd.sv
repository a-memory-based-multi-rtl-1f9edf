// tb_descrambler_acd: checks the annex A/C and annex D de-randomizers.
//
// Annex A/C: a bit-serial reference randomizer (PRBS 1+x^14+x^15, register
// 1..15 preloaded to 100101010000000 at each group of eight packets, first
// sync byte inverted to 0xB8, PRBS gated off but running on the other sync
// bytes) scrambles 24 random 188-byte packets; the descrambler must return
// the original packets with 0x47 sync bytes. Annex D: a reference Galois
// generator of x^16+x^13+x^12+x^11+x^7+x^6+x^3+x+1 preloaded to 0xF180 at
// each field sync, one step per byte, randomizing byte = registers X16..X9,
// scrambles two fields of bytes; the descrambler must invert it.
module tb_descrambler_acd;
  import fec_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fec_mode_e  mode;
  logic       field_sync, in_valid, in_sop, out_valid, out_sop;
  logic [7:0] in_data, out_data;

  descrambler_acd dut (.*);

  int checks = 0, failures = 0, n_reinit = 0, n_gated = 0;
  byte unsigned expq[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (expq.size() == 0 || out_data != expq[0]) begin
      failures++;
      if (failures < 10) $display("mode %0d: got %h exp %h", mode, out_data, expq.size() ? expq[0] : 0);
    end
    if (expq.size()) void'(expq.pop_front());
  end

  task automatic drive(logic [7:0] d, logic sop, logic fs);
    in_valid = 1; in_data = d; in_sop = sop; field_sync = fs;
    @(negedge clk);
    in_valid = 0; in_sop = 0; field_sync = 0;
  endtask

  initial begin
    bit reg15 [1:15];
    bit reg16 [1:16];
    mode = J83_A; field_sync = 0; in_valid = 0; in_sop = 0; in_data = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    // ---- annex A/C
    for (int p = 0; p < 24; p++) begin
      for (int i = 0; i < 188; i++) begin
        byte unsigned d, sd;
        d = (i == 0) ? 8'h47 : 8'($urandom);
        if (i == 0 && p % 8 == 0) begin
          bit init[15] = '{1,0,0,1,0,1,0,1,0,0,0,0,0,0,0};
          for (int k = 1; k <= 15; k++) reg15[k] = init[k-1];
          sd = 8'hB8;
          n_reinit++;
        end else begin
          byte unsigned pn;
          for (int b = 7; b >= 0; b--) begin
            bit fbk;
            fbk = reg15[14] ^ reg15[15];
            for (int k = 15; k >= 2; k--) reg15[k] = reg15[k-1];
            reg15[1] = fbk;
            pn[b] = fbk;
          end
          if (i == 0) begin sd = d; n_gated++; end
          else sd = d ^ pn;
        end
        expq.push_back(d);
        drive(sd, i == 0, 0);
        if ($urandom_range(4) == 0) @(negedge clk);
      end
    end
    repeat (3) @(negedge clk);
    // ---- annex D
    mode = J83_D;
    for (int f = 0; f < 2; f++) begin
      for (int k = 1; k <= 16; k++) reg16[k] = 16'hF180 >> (k - 1);
      for (int i = 0; i < 2000; i++) begin
        byte unsigned d, pn;
        bit msb;
        d = 8'($urandom);
        for (int k = 0; k < 8; k++) pn[7-k] = reg16[16-k];
        expq.push_back(d);
        drive(d ^ pn, 0, i == 0);
        // Galois step: multiply by x modulo the generator
        msb = reg16[16];
        for (int k = 16; k >= 2; k--) reg16[k] = reg16[k-1];
        reg16[1] = 0;
        if (msb) foreach (reg16[k]) if (k inside {1, 2, 4, 7, 8, 12, 13, 14}) reg16[k] ^= 1;
      end
    end
    repeat (5) @(negedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("missing outputs"); end
    checks++; if (n_reinit < 3 || n_gated < 20) begin failures++; $display("sync cases not covered"); end
    $display("group_reinit=%0d gated_sync=%0d", n_reinit, n_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
