// rs_decoder: multi-mode Reed-Solomon decoder for ITU-T J.83.
//
// Codes: annexes A/C RS(204,188) t=8 over GF(2^8), roots alpha^0..alpha^15;
// annex D RS(207,187) t=10 over GF(2^8), roots alpha^0..alpha^19; annex B
// extended RS(128,122) t=3 over GF(2^7), roots alpha^1..alpha^6 with the last
// symbol being the extended parity. One datapath serves all three: the
// syndrome calculator, key equation solver, Chien search and error value
// evaluator are built from multi-mode GF(2^8)/GF(2^7) multipliers.
//
// Dataflow. A received codeword streams into the syndrome calculator while
// its K message symbols are written into one of four codeword slots of the
// RS buffer (two interleaved dual-port banks). When the codeword is complete
// its syndromes go to the key equation solver, then the Chien search and the
// error value evaluator build a list of (location, value) pairs, and the
// reader streams the K message symbols of that slot out, adding the error
// value where the location matches. The four stages work on different
// codewords at the same time; each passes its result to the next through
// holding registers, in codeword order. If S_1..S_t are zero the codeword is
// error free and the solver and search are skipped. In annex B an error on
// the extended parity symbol, with up to t-1 other errors, is recognised in
// the solver's last iteration and the other errors are still corrected.
//
// Interface: in_valid/in_ready/in_data carry the N received symbols of each
// codeword back to back in transmission order (first symbol = highest power
// of x); codeword boundaries are counted from reset. in_ready drops when all
// four slots are taken or the syndrome registers cannot be handed on. Output:
// out_valid with out_data, one message symbol per cycle, K symbols per
// codeword, out_sop on the first, out_eop on the last; out_fail is set for
// all symbols of a codeword found uncorrectable (symbols then pass
// unchanged). The output cannot be stalled. mode must only change while the
// decoder is empty (after reset). The handshake, the stage hand-off and the
// failure flag are this design's own choices.
//
// Latency: a codeword's first output symbol follows its last input symbol by
// the solver time 2t(t+1)+t(t+1)/2+1, the search time (N+1) and t+2 cycles
// per error, plus a few hand-off cycles. Throughput: one symbol per cycle
// whenever each stage is no slower than N cycles; in annex D the solver takes
// 276 cycles, so a continuous stream stalls the input.
module rs_decoder
  import fec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  fec_mode_e  mode,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_sop,
  output logic       out_eop,
  output logic       out_fail
);

  logic       gf7;
  logic [7:0] n_last, k_last, l_last;
  assign gf7    = (mode == J83_B);
  assign n_last = 8'(rs_n(mode) - 1);
  assign k_last = 8'(rs_k(mode) - 1);
  assign l_last = gf7 ? 8'd126 : 8'(rs_n(mode) - 1);

  // ---------------------------------------------------------------- writer
  logic [7:0] w_idx;
  logic [1:0] w_slot;
  logic [2:0] occ;          // slots allocated and not yet read out
  logic       syn_hold;     // syndrome registers hold an unclaimed result
  logic       acc_in;
  logic       slot_alloc, slot_free;

  assign in_ready   = ((w_idx != 8'd0) || (occ < 3'd4)) &&
                      !((w_idx == n_last) && syn_hold);
  assign acc_in     = in_valid && in_ready;
  assign slot_alloc = acc_in && (w_idx == 8'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_idx  <= '0;
      w_slot <= '0;
    end else if (acc_in) begin
      if (w_idx == n_last) begin
        w_idx  <= '0;
        w_slot <= w_slot + 2'd1;
      end else begin
        w_idx <= w_idx + 8'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) occ <= '0;
    else occ <= occ + (slot_alloc ? 3'd1 : 3'd0) - (slot_free ? 3'd1 : 3'd0);
  end

  // ---------------------------------------------------------------- syndromes
  logic       syn_valid, syn_low_zero;
  logic [7:0] syn [NSYN];

  rs_syndrome u_syn (
    .clk, .rst_n, .mode,
    .in_valid(acc_in), .in_first(w_idx == 8'd0), .in_last(w_idx == n_last),
    .in_data, .syn_valid, .syn, .syn_low_zero);

  // ---------------------------------------------------------------- key equation
  logic       kes_busy, kes_done, kes_start, kes_hold, kes_zero_in, kes_zero;
  logic [7:0] sigma [TMAX+1];
  logic [7:0] omega [TMAX];
  logic [4:0] deg;

  assign kes_start   = syn_hold && !kes_busy && !kes_done && !kes_hold;
  assign kes_zero_in = syn_low_zero;

  rs_kes u_kes (
    .clk, .rst_n, .mode, .start(kes_start), .syn, .zero_in(kes_zero_in),
    .busy(kes_busy), .done(kes_done), .sigma, .omega, .deg);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          syn_hold <= 1'b0;
    else if (syn_valid)  syn_hold <= 1'b1;
    else if (kes_start)  syn_hold <= 1'b0;
  end

  // ---------------------------------------------------------------- error search
  logic       err_start, err_busy, ch_busy, ch_done, ch_fail, fy_busy, fy_done, fy_fail;
  logic       ef_hold;
  logic [3:0] nroots;
  logic [7:0] loc  [TMAX];
  logic [7:0] beta [TMAX];
  logic [7:0] err_val [TMAX];
  logic [7:0] sig_q [TMAX+1];
  logic [7:0] om_q  [TMAX];
  logic       zero_done, zero_pending;
  logic       err_pending;   // between Chien done and Forney done
  logic       syn_low_zero_q;

  assign err_busy  = ch_busy || ch_done || fy_busy || zero_pending || err_pending;
  assign err_start = kes_hold && !err_busy && !ef_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kes_hold <= 1'b0;
      kes_zero <= 1'b0;
    end else if (kes_done) begin
      kes_hold <= 1'b1;
      kes_zero <= syn_low_zero_q;
    end else if (err_start) begin
      kes_hold <= 1'b0;
    end
  end

  // zero flag travels with the syndromes into the solver
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) syn_low_zero_q <= 1'b0;
    else if (kes_start) syn_low_zero_q <= syn_low_zero;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zero_pending <= 1'b0;
      for (int k = 0; k <= TMAX; k++) sig_q[k] <= '0;
      for (int k = 0; k < TMAX; k++) om_q[k] <= '0;
    end else begin
      zero_pending <= 1'b0;
      if (err_start) begin
        for (int k = 0; k <= TMAX; k++) sig_q[k] <= sigma[k];
        for (int k = 0; k < TMAX; k++) om_q[k] <= omega[k];
        zero_pending <= kes_zero;
      end
    end
  end
  assign zero_done = zero_pending;

  rs_chien u_chien (
    .clk, .rst_n, .mode, .start(err_start && !kes_zero), .sigma, .deg,
    .busy(ch_busy), .done(ch_done), .nroots, .fail(ch_fail), .loc, .beta);

  rs_forney u_forney (
    .clk, .rst_n, .mode, .start(ch_done), .nroots, .beta, .sigma(sig_q), .omega(om_q),
    .busy(fy_busy), .done(fy_done), .fail(fy_fail), .err_val);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        err_pending <= 1'b0;
    else if (ch_done)  err_pending <= 1'b1;
    else if (fy_done)  err_pending <= 1'b0;
  end

  // ---------------------------------------------------------------- correction list
  logic       rd_start, rd_busy;
  logic [3:0] c_n;
  logic       c_fail;
  logic [7:0] c_loc [TMAX];
  logic [7:0] c_val [TMAX];
  logic [3:0] e_n;
  logic       e_fail;
  logic [7:0] e_loc [TMAX];
  logic [7:0] e_val [TMAX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ef_hold <= 1'b0; e_n <= '0; e_fail <= 1'b0;
      for (int k = 0; k < TMAX; k++) begin e_loc[k] <= '0; e_val[k] <= '0; end
    end else if (fy_done || zero_done) begin
      ef_hold <= 1'b1;
      e_n     <= zero_done ? 4'd0 : nroots;
      e_fail  <= zero_done ? 1'b0 : (ch_fail || fy_fail);
      for (int k = 0; k < TMAX; k++) begin e_loc[k] <= loc[k]; e_val[k] <= err_val[k]; end
    end else if (rd_start) begin
      ef_hold <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- reader
  logic [7:0] r_idx;
  logic [1:0] r_slot;
  logic       rd_en;
  logic       v_q, sop_q, eop_q;
  logic [7:0] l_q;
  logic [7:0] rd_data;

  assign rd_start  = ef_hold && !rd_busy;
  assign rd_en     = rd_busy;
  assign slot_free = rd_busy && (r_idx == k_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy <= 1'b0; r_idx <= '0; r_slot <= '0;
      c_n <= '0; c_fail <= 1'b0;
      v_q <= 1'b0; sop_q <= 1'b0; eop_q <= 1'b0; l_q <= '0;
      for (int k = 0; k < TMAX; k++) begin c_loc[k] <= '0; c_val[k] <= '0; end
    end else begin
      v_q   <= rd_busy;
      sop_q <= rd_busy && (r_idx == 8'd0);
      eop_q <= rd_busy && (r_idx == k_last);
      l_q   <= l_last - r_idx;
      if (rd_start) begin
        rd_busy <= 1'b1;
        r_idx   <= '0;
        c_n     <= e_n;
        c_fail  <= e_fail;
        for (int k = 0; k < TMAX; k++) begin c_loc[k] <= e_loc[k]; c_val[k] <= e_val[k]; end
      end else if (rd_busy) begin
        if (r_idx == k_last) begin
          rd_busy <= 1'b0;
          r_slot  <= r_slot + 2'd1;
        end
        r_idx <= r_idx + 8'd1;
      end
    end
  end

  rs_buffer u_buf (
    .clk, .wr_en(acc_in && (w_idx <= k_last)), .wr_slot(w_slot), .wr_idx(w_idx),
    .wr_data(in_data), .rd_en, .rd_slot(r_slot), .rd_idx(r_idx), .rd_data);

  logic [7:0] corr;
  always_comb begin
    corr = '0;
    if (!c_fail)
      for (int k = 0; k < TMAX; k++)
        if (4'(k) < c_n && c_loc[k] == l_q) corr = c_val[k];
  end

  assign out_valid = v_q;
  assign out_data  = rd_data ^ corr;
  assign out_sop   = sop_q;
  assign out_eop   = eop_q;
  assign out_fail  = v_q && c_fail;

endmodule
