// tb_downscaler: random trigger bits with a different factor per bit
// (including 0, 1, 2, 7 and 65 535). For each bit the testbench counts the
// occurrences since the last clear and expects an output exactly on
// occurrences 1, F+1, 2F+1, ..., one cycle after the input. A clear in the
// middle restarts the count.
module tb_downscaler;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  cfg_wr_t cfg;
  logic [15:0] din, dout;
  int unsigned factor [16];
  int unsigned occ [16];
  int checks = 0, failures = 0, passed = 0, suppressed = 0;

  downscaler #(.N(16), .DW(16)) dut (.clk, .rst_n, .clear, .cfg, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned fl [16] = '{0, 1, 2, 3, 4, 5, 7, 10, 16, 33, 100, 255, 256, 1000, 65535, 2};
    cfg = '0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      factor[i] = fl[i];
      occ[i] = 0;
      @(negedge clk);
      cfg = '{we: 1'b1, addr: 16'(i), data: 32'(factor[i])};
      @(negedge clk);
      cfg = '0;
    end
    for (int n = 0; n < 30000; n++) begin
      logic [15:0] v, exp;
      if (n == 15000) begin
        clear = 1;
        for (int i = 0; i < 16; i++) occ[i] = 0;
        v = '0;
      end else begin
        clear = 0;
        for (int i = 0; i < 16; i++) v[i] = ($urandom_range(0, 1) == 0);
      end
      din = v;
      for (int i = 0; i < 16; i++) begin
        int unsigned f;
        f = (factor[i] <= 1) ? 1 : factor[i];
        exp[i] = v[i] && (occ[i] % f == 0);
        if (v[i]) occ[i]++;
      end
      @(negedge clk);
      if (n != 15000) begin
        checks++;
        if (dout !== exp) begin
          failures++;
          $display("FAIL n=%0d dout=%h exp=%h", n, dout, exp);
        end
        passed += $countones(exp);
        suppressed += $countones(v & ~exp);
      end
    end
    checks++;
    if (passed == 0 || suppressed == 0) failures++;
    $display("passed=%0d suppressed=%0d", passed, suppressed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
