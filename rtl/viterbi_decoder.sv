// viterbi_decoder: 16-state hard-decision Viterbi decoder for the J.83B
// rate-1/2 code G = (25, 37) octal, with erasure input for punctured bits.
//
// Encoder convention: state {d1,d2,d3,d4} holds the last four input bits,
// d1 the newest; for input u, c1 (G1 = 25 = 10101) = u^d2^d4 and
// c2 (G2 = 37 = 11111) = u^d1^d2^d3^d4; the next state is {u,d1,d2,d3}.
//
// Per trellis step: the transition metric unit forms the Hamming distance
// of the received pair to each branch label (an erased c1 contributes 0);
// sixteen add-compare-select units add it to the two predecessor path
// metrics and keep the smaller. Path metrics are kept modulo 2^PMW
// ("modulo normalization"): two metrics are compared through the sign of
// their difference, which is correct while their true spread is below
// 2^(PMW-1), so no rescaling step is needed. Survivors are stored by
// register exchange: every state owns a TL-bit register that is replaced by
// its chosen predecessor's register shifted by one and extended with the
// decided bit. The decoded bit is the oldest bit of the register of the
// state with the smallest path metric. Register exchange, modulo
// normalization, 16 states and TL = 40 follow the design description;
// PMW and the start-up metrics are this design's own choices.
//
// Interface: one step per in_valid (c1, c1_en, c2). From the TL-th step on,
// each step also produces out_valid with out_bit one cycle later, the
// decision for the step TL steps earlier. restart returns to state 0.
module viterbi_decoder #(
  parameter int unsigned TL  = 40,
  parameter int unsigned PMW = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  input  logic in_valid,
  input  logic in_c1,
  input  logic in_c1_en,
  input  logic in_c2,
  output logic out_valid,
  output logic out_bit
);

  localparam int unsigned NS = 16;

  logic [PMW-1:0] pm     [NS];
  logic [PMW-1:0] pm_nxt [NS];
  logic [TL-1:0]  sr     [NS];
  logic [TL-1:0]  sr_nxt [NS];
  logic [$clog2(TL+1)-1:0] fill;
  logic [3:0]     best;

  // Branch label of the transition from predecessor p with input u.
  function automatic logic [1:0] label(logic [3:0] p, logic u);
    return {u ^ p[2] ^ p[0], u ^ p[3] ^ p[2] ^ p[1] ^ p[0]};
  endfunction

  function automatic logic [1:0] tmetric(logic [1:0] lab, logic c1, logic c1_en, logic c2);
    return 2'((c1_en && (lab[1] != c1)) ? 1 : 0) + 2'((lab[0] != c2) ? 1 : 0);
  endfunction

  // a "less than" b under modulo arithmetic.
  function automatic logic mod_lt(logic [PMW-1:0] a, logic [PMW-1:0] b);
    logic [PMW-1:0] d;
    d = a - b;
    return d[PMW-1];
  endfunction

  // ACS array
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      logic [3:0]     p0, p1;
      logic           u;
      logic [PMW-1:0] m0, m1;
      u  = s[3];
      p0 = {s[2:0], 1'b0};
      p1 = {s[2:0], 1'b1};
      m0 = pm[p0] + PMW'(tmetric(label(p0, u), in_c1, in_c1_en, in_c2));
      m1 = pm[p1] + PMW'(tmetric(label(p1, u), in_c1, in_c1_en, in_c2));
      if (mod_lt(m1, m0)) begin
        pm_nxt[s] = m1;
        sr_nxt[s] = {sr[p1][TL-2:0], u};
      end else begin
        pm_nxt[s] = m0;
        sr_nxt[s] = {sr[p0][TL-2:0], u};
      end
    end
  end

  // Minimum path metric search (present metrics).
  always_comb begin
    best = '0;
    for (int s = 1; s < NS; s++)
      if (mod_lt(pm[s], pm[best])) best = 4'(s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) begin
        pm[s] <= (s == 0) ? '0 : PMW'(16);
        sr[s] <= '0;
      end
      fill <= '0;
      out_valid <= 1'b0;
      out_bit <= 1'b0;
    end else if (restart) begin
      for (int s = 0; s < NS; s++) begin
        pm[s] <= (s == 0) ? '0 : PMW'(16);
        sr[s] <= '0;
      end
      fill <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int s = 0; s < NS; s++) begin
          pm[s] <= pm_nxt[s];
          sr[s] <= sr_nxt[s];
        end
        if (fill == $bits(fill)'(TL)) begin
          out_valid <= 1'b1;
          out_bit   <= sr[best][TL-1];
        end else begin
          fill <= fill + 1'b1;
        end
      end
    end
  end

endmodule
