// tb_rs_ffm: checks the multi-mode finite-field multiplier against the
// reference shift-and-add multiplication, exhaustively for GF(2^7) and for
// 20000 random operand pairs plus all pairs with one operand 0, 1 or 0x80 in
// GF(2^8). The multiplier is combinational; each vector is applied and
// checked one time step later. Watchdog: the run is bounded by a timeout.
module tb_rs_ffm;
  import tb_rs_pkg::*;

  logic [7:0] a, b, c;
  logic       gf7;
  int checks = 0, failures = 0;

  rs_ffm dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int x, int y, bit f7);
    int e;
    a = 8'(x); b = 8'(y); gf7 = f7;
    #1;
    e = gmul(x, y, f7 ? 7 : 8);
    checks++;
    if (int'(c) != e) begin
      failures++;
      if (failures < 10) $display("%s %h * %h = %h, expected %h", f7 ? "GF128" : "GF256", x, y, c, e);
    end
  endtask

  initial begin
    for (int x = 0; x < 128; x++)
      for (int y = 0; y < 128; y++) check(x, y, 1'b1);
    for (int x = 0; x < 256; x++) begin
      check(x, 0, 1'b0); check(x, 1, 1'b0); check(x, 'h80, 1'b0); check('h80, x, 1'b0);
    end
    repeat (20000) check($urandom_range(255), $urandom_range(255), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
