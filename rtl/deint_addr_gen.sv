// deint_addr_gen: address generator of the memory-based universal
// convolutional deinterleaver.
//
// The I branch FIFOs of an (I,J) deinterleaver (branch b holds (I-1-b)*J
// symbols) are laid end to end in one memory of J*I*(I-1)/2 + J words.
// Within a group of I symbols the write address advances by the branch
// address, which starts at (I-1)*J and shrinks by J per symbol; the read
// address runs one branch ahead of the write address, so it starts at
// (I-1)*J and advances by the already shrunk branch address. The I-th symbol
// of a group (last branch, no delay) bypasses the memory, and both
// intra-initial addresses then step back by one, modulo the memory size.
// All additions are taken modulo the memory size by one conditional
// subtraction. This is the algorithm of the design description; the
// register-level schedule is this design's own.
//
// Interface: restart (re)loads the generator for the present cfg_i/cfg_j
// (I in 2..255, J in 1..31, with J*I*(I-1)/2 + J at most 2^AW; every J.83
// setting qualifies for AW = 16) and aligns the next symbol with branch 0. For each
// step pulse the present outputs belong to that symbol: waddr/raddr are
// the write and read addresses and direct marks the bypass branch; they
// move to the next symbol's values on the clock edge. mem_bound is
// J*I*(I-1)/2 + J.
module deint_addr_gen #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          restart,
  input  logic [7:0]    cfg_i,
  input  logic [4:0]    cfg_j,
  input  logic          step,
  output logic [AW-1:0] waddr,
  output logic [AW-1:0] raddr,
  output logic          direct,
  output logic [AW:0]   mem_bound
);

  logic [AW:0]  bound_c, bound_q;
  logic [AW:0]  br_init_c, br_init_q;   // (I-1)*J
  logic [AW:0]  branch;
  logic [AW:0]  w_ini, r_ini, w_a, r_a;
  logic [7:0]   counter;
  logic [7:0]   i_q;
  logic [4:0]   j_q;
  logic [AW:0]  w_sum, r_sum, br_nxt, w_ini_dec, r_ini_dec;

  // Configuration arithmetic (evaluated when restart is applied).
  always_comb begin
    logic [2*AW+1:0] tri_n;
    tri_n     = ((2*AW+2)'(cfg_i) * (2*AW+2)'(cfg_i - 8'd1)) >> 1;
    bound_c   = (AW+1)'(tri_n * (2*AW+2)'(cfg_j)) + (AW+1)'(cfg_j);
    br_init_c = (AW+1)'(cfg_i - 8'd1) * (AW+1)'(cfg_j);
  end

  function automatic logic [AW:0] mod_add(logic [AW:0] a, logic [AW:0] b, logic [AW:0] m);
    logic [AW+1:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s >= {1'b0, m}) ? (AW+1)'(s - {1'b0, m}) : s[AW:0];
  endfunction

  assign br_nxt    = branch - (AW+1)'(j_q);
  assign w_sum     = mod_add(w_a, branch, bound_q);
  assign r_sum     = mod_add(r_a, br_nxt, bound_q);
  assign w_ini_dec = (w_ini == '0) ? bound_q - 1'b1 : w_ini - 1'b1;
  assign r_ini_dec = (r_ini == '0) ? bound_q - 1'b1 : r_ini - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bound_q <= '0; br_init_q <= '0; branch <= '0;
      w_ini <= '0; r_ini <= '0; w_a <= '0; r_a <= '0;
      counter <= 8'd1; i_q <= 8'd2; j_q <= 5'd1;
    end else if (restart) begin
      bound_q   <= bound_c;
      br_init_q <= br_init_c;
      branch    <= br_init_c;
      i_q       <= cfg_i;
      j_q       <= cfg_j;
      w_ini     <= '0;
      w_a       <= '0;
      r_ini     <= br_init_c;
      r_a       <= br_init_c;
      counter   <= 8'd1;
    end else if (step) begin
      if (counter == i_q) begin
        branch  <= br_init_q;
        counter <= 8'd1;
        w_ini   <= w_ini_dec;
        r_ini   <= r_ini_dec;
        w_a     <= w_ini_dec;
        r_a     <= r_ini_dec;
      end else begin
        w_a     <= w_sum;
        r_a     <= r_sum;
        branch  <= br_nxt;
        counter <= counter + 8'd1;
      end
    end
  end

  assign waddr     = w_a[AW-1:0];
  assign raddr     = r_a[AW-1:0];
  assign direct    = (counter == i_q);
  assign mem_bound = bound_q;

endmodule
