// tb_rs_buffer: checks the four-slot RS codeword buffer (two dual-port banks).
// Random data is written to all 4 slots at random indices below K_MAX, and
// read back with the one-cycle read latency while writes to another slot go
// on in the same cycles, as the decoder does. Every read must return the
// last value written to that slot and index. A watchdog bounds the run.
module tb_rs_buffer;
  import fec_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       wr_en, rd_en;
  logic [1:0] wr_slot, rd_slot;
  logic [7:0] wr_idx, rd_idx, wr_data, rd_data;

  rs_buffer dut (.*);

  int checks = 0, failures = 0;
  int model [4][KMAX];
  int pend_exp = -1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_slot = 0; rd_slot = 0; wr_idx = 0; rd_idx = 0; wr_data = 0;
    // fill every slot
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < KMAX; i++) begin
        @(negedge clk);
        wr_en = 1; wr_slot = 2'(s); wr_idx = 8'(i); wr_data = 8'($urandom);
        model[s][i] = int'(wr_data);
      end
    @(negedge clk); wr_en = 0;
    // mixed traffic: read one slot while writing another
    for (int c = 0; c < 20000; c++) begin
      int rs, ws, ri, wi;
      @(negedge clk);
      if (pend_exp >= 0) begin
        checks++;
        if (int'(rd_data) != pend_exp) begin
          failures++;
          if (failures < 10) $display("read %h expected %h", rd_data, pend_exp);
        end
      end
      rs = $urandom_range(3); ws = (rs + $urandom_range(1, 3)) % 4;
      ri = $urandom_range(KMAX - 1); wi = $urandom_range(KMAX - 1);
      rd_en = ($urandom_range(3) != 0); rd_slot = 2'(rs); rd_idx = 8'(ri);
      pend_exp = rd_en ? model[rs][ri] : -1;
      wr_en = ($urandom_range(1) != 0); wr_slot = 2'(ws); wr_idx = 8'(wi);
      wr_data = 8'($urandom);
      if (wr_en) model[ws][wi] = int'(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
