// tb_fec_decoder_top: end-to-end test of the multi-standard FEC decoder at
// its default (full) size, MEM_AW = 16, with a behavioural 64K x 8 external
// deinterleaver memory.
//
// For every run a reference transmitter builds the stream the decoder
// expects: random payload, the annex's randomizer (A/C: 15-bit PRBS with
// B8/47 sync bytes; D: 16-bit PRBS restarted by field sync), systematic RS
// encoding, channel symbol errors, and the convolutional interleaver. For
// annex B the order is RS encoding, interleaving, the GF(128) randomizer and
// the punctured rate-4/5 trellis encoder, with a few channel bit errors.
// The interleaver delay D = I(I-1)J is absorbed by sending zero filler
// first, so that the RS decoder's codeword boundaries fall on the real
// packets; the first Q output packets are not checked, and a tail of filler
// pushes the last packets through the deinterleaver.
//
// Interleavers run with data: (12,17), (52,4) and the annex B settings
// (8,16), (16,8), (32,4), (64,2), (128,1) and (128,8), the largest, whose
// 65032 memory words fill almost all of the 64K address space.
//
// Checks: every output byte of every real packet (payload, 0x47 sync byte,
// sop/eop position, failure flag; a packet with more than t errors may
// instead be miscorrected without a flag, which is reported after checking
// that the re-encoded output lies within distance t of the received word),
// mem_bound for each interleaver size, and that each
// mechanism was exercised at least once: input stall, deinterleaver bypass
// branch, RS correction, RS failure flag, B8 PRBS restart, annex D field
// sync, annex B frame start with trellis error correction, annex B
// extended-symbol error, and mode switch.
// The error pattern choices, run lengths and I/J values are this test's own.
module tb_fec_decoder_top;
  import fec_pkg::*;
  import tb_rs_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fec_mode_e   mode;
  logic [7:0]  cfg_i;
  logic [4:0]  cfg_j;
  logic        restart, sym_valid, sym_ready, grp_valid, grp_ready;
  logic [7:0]  sym_data;
  logic [4:0]  grp_i, grp_q;
  logic        b_frame_start, d_field_sync;
  logic        mem_we, mem_re;
  logic [15:0] mem_waddr, mem_raddr;
  logic [7:0]  mem_wdata, mem_rdata;
  logic [16:0] mem_bound;
  logic        out_valid, out_sop, out_eop, out_fail;
  logic [7:0]  out_data;

  fec_decoder_top dut (.*);

  ext_sram_model #(.AW(16), .DW(8)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  // mechanism counters
  int n_stall = 0, n_bypass = 0, n_corrected = 0, n_flagged = 0, n_b8 = 0;
  int n_field_sync = 0, n_frame_start = 0, n_mode_switch = 0, n_chan_flips = 0;
  int n_clean = 0, n_ext = 0, n_miscorr = 0;

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- per-run expectation
  int cur_md, cur_k, cur_q, cur_np;
  int exp_data [];          // expected output per (packet, byte), -1 = any
  bit pkt_err  [];          // packet had correctable errors
  bit pkt_fail [];          // packet had more than t errors
  bit pkt_b8   [];          // packet started with B8
  int pkt_bad  [];          // mismatches per packet
  int pkt_seen [];          // bytes seen per packet
  int pkt_flag [];          // bytes with out_fail per packet
  int rnd_byte [];          // RS message byte XOR payload byte (randomizer)
  int got_data [];          // decoder output per (packet, byte)
  int rx_cw    [];          // received codeword per (packet, symbol)
  int mon_pkt, mon_byte;
  bit d_fs_armed;

  always @(posedge clk) begin
    if (!rst_n) begin
      mon_pkt = -1; mon_byte = 0;
    end else begin
      if (sym_valid && !sym_ready) n_stall++;
      if (sym_valid && sym_ready && !mem_we) n_bypass++;
      if (out_valid) begin
        int rp;
        if (out_sop) begin mon_pkt++; mon_byte = 0; end
        else mon_byte++;
        rp = mon_pkt - cur_q;
        if (cur_md == 3 && d_fs_armed && mon_pkt == cur_q - 1) begin
          d_field_sync <= 1'b1; d_fs_armed = 0; n_field_sync++;
        end
        if (rp >= 0 && rp < cur_np && mon_byte < cur_k) begin
          int e, got;
          e   = exp_data[rp * cur_k + mon_byte];
          got = (cur_md == 1) ? int'(out_data[6:0]) : int'(out_data);
          pkt_seen[rp]++;
          got_data[rp * cur_k + mon_byte] = got;
          if (out_fail) pkt_flag[rp]++;
          if (e >= 0 && got != e) pkt_bad[rp]++;
          if ((mon_byte == cur_k - 1) != out_eop) pkt_bad[rp]++;
        end
      end
    end
  end
  always @(posedge clk) if (d_field_sync) d_field_sync <= 1'b0;

  // ---------------------------------------------------------------- reference models
  // 15-bit PRBS 1 + x^14 + x^15, registers 1..15 loaded 100101010000000.
  bit prbs15 [1:15];
  function automatic void prbs15_init();
    bit iv [15] = '{1,0,0,1,0,1,0,1,0,0,0,0,0,0,0};
    for (int i = 1; i <= 15; i++) prbs15[i] = iv[i-1];
  endfunction
  function automatic int prbs15_byte();
    int b = 0;
    for (int k = 0; k < 8; k++) begin
      bit o;
      o = prbs15[14] ^ prbs15[15];
      for (int i = 15; i >= 2; i--) prbs15[i] = prbs15[i-1];
      prbs15[1] = o;
      b = (b << 1) | int'(o);
    end
    return b;
  endfunction

  // 16-bit randomizer (Galois form, one step per byte, top eight bits used).
  int prbs16;
  function automatic int prbs16_byte();
    int o;
    o = (prbs16 >> 8) & 'hFF;
    prbs16 = (prbs16 << 1);
    if (prbs16 & 'h10000) prbs16 = (prbs16 ^ 'h138CB) & 'hFFFF;
    return o;
  endfunction

  // ---------------------------------------------------------------- drivers
  task automatic do_reset(fec_mode_e md, int I, int J);
    if (md != mode) n_mode_switch++;
    rst_n = 0; mode = md; cfg_i = 8'(I); cfg_j = 5'(J);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  task automatic send_bytes(int s[$]);
    for (int k = 0; k < s.size(); k++) begin
      bit taken;
      if ($urandom_range(9) == 0) begin sym_valid = 0; @(negedge clk); end
      sym_valid = 1; sym_data = 8'(s[k]);
      do begin #1; taken = sym_ready; @(negedge clk); end while (!taken);
      sym_valid = 0;
    end
  endtask

  task automatic send_groups(int gi[$], int gq[$]);
    for (int g = 0; g < gi.size(); g++) begin
      bit taken;
      grp_valid = 1; grp_i = 5'(gi[g]); grp_q = 5'(gq[g]);
      do begin #1; taken = grp_ready; @(negedge clk); end while (!taken);
      grp_valid = 0;
    end
  endtask

  // ---------------------------------------------------------------- one run
  task automatic run(fec_mode_e md, int I, int J, int np, int fail_pkt);
    int n, k, t, m, D, P, Q, mask;
    int xs [$];               // deinterleaver input stream (before the channel)
    int il [$];               // interleaved stream
    int q [][$];
    int bad_pkts, ok_pkts;

    do_reset(md, I, J);
    n = code_n(int'(md)); k = code_k(int'(md)); t = code_t(int'(md));
    mask = (md == J83_B) ? 'h7F : 'hFF;
    D = I * (I - 1) * J;
    P = (n - D % n) % n;
    Q = (D + P) / n;

    checks++;
    if (mem_bound != 17'(J * I * (I - 1) / 2 + J)) begin
      failures++; $display("mode %0d: mem_bound %0d", md, mem_bound);
    end

    cur_md = int'(md); cur_k = k; cur_q = Q; cur_np = np;
    exp_data = new[np * k];
    pkt_err = new[np]; pkt_fail = new[np]; pkt_b8 = new[np];
    pkt_bad = new[np]; pkt_seen = new[np]; pkt_flag = new[np];
    rnd_byte = new[np * k]; got_data = new[np * k]; rx_cw = new[np * n];
    d_fs_armed = 1;
    if (md == J83_D && Q == 0) begin d_field_sync = 1; @(negedge clk); d_field_sync = 0; end

    // source packets and RS encoding
    for (int p = 0; p < P; p++) xs.push_back(0);
    prbs15_init();
    prbs16 = 'hF180;
    for (int p = 0; p < np; p++) begin
      int msg [], cw [];
      int ne;
      bit ext;
      msg = new[k];
      if ((md == J83_A || md == J83_C) && p % 8 == 0) prbs15_init();
      for (int i = 0; i < k; i++) begin
        int pl;
        pl = $urandom_range(mask);
        case (md)
          J83_A, J83_C: begin
            int r;
            // the PRBS rests during the B8 byte and runs during 47 bytes
            r = (i == 0 && p % 8 == 0) ? 0 : prbs15_byte();
            if (i == 0) begin
              msg[i] = (p % 8 == 0) ? 'hB8 : 'h47;
              pl = 'h47;
            end else msg[i] = pl ^ r;
          end
          J83_D:   msg[i] = pl ^ prbs16_byte();
          default: msg[i] = pl;
        endcase
        exp_data[p * k + i] = pl;
        rnd_byte[p * k + i] = msg[i] ^ pl;
      end
      pkt_b8[p] = (md == J83_A || md == J83_C) && (p % 8 == 0);
      encode(int'(md), msg, cw);
      // channel symbol errors (the annex B extended symbol is left clean)
      ne = 0; ext = 0;
      if (p == fail_pkt) ne = t + 3;
      else if (md == J83_B && p % 4 == 2) begin ne = t - 1; ext = 1; end
      else if (p % 4 == 1) ne = t;
      else if (p % 4 == 3) ne = $urandom_range(1, t);
      begin
        int pos [$];
        while (pos.size() < ne) begin
          int x;
          x = $urandom_range(1, n - 2);
          if (!(x inside {pos})) pos.push_back(x);
        end
        foreach (pos[e]) cw[pos[e]] ^= $urandom_range(1, mask);
      end
      // annex B: error on the extended parity symbol too
      if (ext) begin cw[n - 1] ^= $urandom_range(1, mask); n_ext++; end
      pkt_err[p]  = (ne > 0 || ext) && (p != fail_pkt);
      pkt_fail[p] = (p == fail_pkt);
      if (pkt_fail[p]) for (int i = 0; i < k; i++) exp_data[p * k + i] = -1;
      for (int i = 0; i < n; i++) begin xs.push_back(cw[i]); rx_cw[p * n + i] = cw[i]; end
    end
    // tail filler pushes the last packets out of the deinterleaver
    for (int i = 0; i < D + n; i++) xs.push_back(0);

    // reference convolutional interleaver, branch 0 first
    q = new[I];
    for (int i = 0; i < xs.size(); i++) begin
      int b;
      b = i % I;
      q[b].push_back(xs[i]);
      if (q[b].size() > b * J) il.push_back(q[b].pop_front());
      else il.push_back(0);
    end

    if (md != J83_B) send_bytes(il);
    else begin
      int p0, p1, p2, a3;
      bit bits [$];
      int gi [$], gq [$];
      logic [3:0] si, sq;
      a3 = gpow(3, 7);
      p0 = 'h7F; p1 = 'h7F; p2 = 'h7F;
      foreach (il[i]) begin
        int r, nx;
        r = il[i] ^ p0;
        nx = p1 ^ gmul(p0, a3, 7);
        p0 = p1; p1 = p2; p2 = nx;
        for (int b = 6; b >= 0; b--) bits.push_back(r[b]);
      end
      // trailing bits flush the Viterbi decoders (truncation length 40)
      while (bits.size() % 8 != 0 || bits.size() < 8 * ((il.size() * 7 + 7) / 8) + 8 * 24)
        bits.push_back(1'($urandom));
      si = 0; sq = 0;
      for (int g = 0; g < bits.size() / 8; g++) begin
        logic [4:0] vi, vq;
        for (int s = 0; s < 4; s++) begin
          bit ui, uq;
          ui = bits[8 * g + 2 * s];
          uq = bits[8 * g + 2 * s + 1];
          vi[s] = ui ^ si[3] ^ si[2] ^ si[1] ^ si[0];
          vq[s] = uq ^ sq[3] ^ sq[2] ^ sq[1] ^ sq[0];
          if (s == 3) begin
            vi[4] = ui ^ si[2] ^ si[0];
            vq[4] = uq ^ sq[2] ^ sq[0];
          end
          si = {ui, si[3:1]};
          sq = {uq, sq[3:1]};
        end
        if (g % 97 == 50) begin vi[g % 5] ^= 1'b1; n_chan_flips++; end
        gi.push_back(int'(vi)); gq.push_back(int'(vq));
      end
      b_frame_start = 1; @(negedge clk); b_frame_start = 0;
      n_frame_start++;
      send_groups(gi, gq);
    end
    repeat (3000) @(negedge clk);

    // per-packet verdicts
    bad_pkts = 0; ok_pkts = 0;
    for (int p = 0; p < np; p++) begin
      bit ok;
      checks++;
      // beyond t a bounded-distance decoder may land on another codeword
      // (likely for t = 3); such a packet is unflagged and only noted
      ok = (pkt_seen[p] == k) && (pkt_bad[p] == 0) &&
           (pkt_fail[p] ? (pkt_flag[p] inside {0, k}) : (pkt_flag[p] == 0));
      if (!ok) begin
        failures++; bad_pkts++;
        $display("mode %0d packet %0d: seen %0d bad %0d flagged %0d (err %0d fail %0d)",
                 md, p, pkt_seen[p], pkt_bad[p], pkt_flag[p], pkt_err[p], pkt_fail[p]);
      end else begin
        ok_pkts++;
        if (pkt_err[p]) n_corrected++;
        else if (pkt_fail[p] && pkt_flag[p] == 0) begin
          // the decoded codeword must lie within distance t of the received one
          int dm [], dc [], hd;
          dm = new[k];
          for (int i = 0; i < k; i++) dm[i] = got_data[p * k + i] ^ rnd_byte[p * k + i];
          encode(int'(md), dm, dc);
          hd = 0;
          for (int i = 0; i < n; i++) if (dc[i] != rx_cw[p * n + i]) hd++;
          checks++;
          if (hd > t) begin
            failures++;
            $display("mode %0d packet %0d: unflagged output at distance %0d", md, p, hd);
          end else begin
            n_miscorr++;
            $display("mode %0d packet %0d: miscorrected beyond t (distance %0d)", md, p, hd);
          end
        end
        else if (pkt_fail[p]) n_flagged++;
        else n_clean++;
        if (pkt_b8[p]) n_b8++;
      end
    end
    $display("mode %0d (I=%0d, J=%0d): %0d packets ok, %0d bad, delay %0d, filler %0d",
             md, I, J, ok_pkts, bad_pkts, D, P);
  endtask

  initial begin
    mode = J83_A; cfg_i = 8'd128; cfg_j = 5'd1; restart = 0;
    sym_valid = 0; sym_data = 0; grp_valid = 0; grp_i = 0; grp_q = 0;
    b_frame_start = 0; d_field_sync = 0;
    run(J83_A, 12, 17, 24, 13);
    run(J83_B, 8, 16, 10, 6);
    run(J83_C, 12, 17, 16, 10);
    run(J83_D, 52, 4, 12, 5);
    run(J83_B, 128, 1, 5, 3);
    run(J83_B, 16, 8, 4, 2);
    run(J83_B, 32, 4, 4, 1);
    run(J83_B, 64, 2, 4, 2);
    // largest annex B interleaver, 65032 memory words
    run(J83_B, 128, 8, 4, 1);

    $display("stalls=%0d bypass=%0d corrected=%0d flagged=%0d clean=%0d b8_restart=%0d",
             n_stall, n_bypass, n_corrected, n_flagged, n_clean, n_b8);
    $display("field_sync=%0d frame_start=%0d channel_flips=%0d mode_switches=%0d ext_symbol_errors=%0d miscorrected=%0d",
             n_field_sync, n_frame_start, n_chan_flips, n_mode_switch, n_ext, n_miscorr);
    checks += 11;
    if (n_ext == 0)         begin failures++; $display("no extended-symbol error"); end
    if (n_stall == 0)       begin failures++; $display("no input stall seen"); end
    if (n_bypass == 0)      begin failures++; $display("no bypass branch use seen"); end
    if (n_corrected == 0)   begin failures++; $display("no corrected packet"); end
    if (n_flagged == 0)     begin failures++; $display("no flagged packet"); end
    if (n_clean == 0)       begin failures++; $display("no clean packet"); end
    if (n_b8 == 0)          begin failures++; $display("no B8 restart"); end
    if (n_field_sync == 0)  begin failures++; $display("no field sync"); end
    if (n_frame_start == 0) begin failures++; $display("no frame start"); end
    if (n_chan_flips == 0)  begin failures++; $display("no trellis channel errors"); end
    if (n_mode_switch < 4)  begin failures++; $display("too few mode switches"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
