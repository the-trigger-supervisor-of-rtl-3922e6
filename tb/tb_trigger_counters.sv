// tb_trigger_counters: random trigger words for a few thousand cycles; every
// counter is then read back and compared with the testbench's own count.
// A clear is checked to zero all counters, and a counter preloaded near the
// top is not needed: saturation is checked on a narrow instance (CW = 4).
module tb_trigger_counters;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [15:0] din;
  logic [3:0] rd_idx;
  logic [23:0] rd_data;
  logic [3:0] rd_small;
  int unsigned model [16];
  int checks = 0, failures = 0;

  trigger_counters #(.N(16), .CW(24)) dut (.clk, .rst_n, .clear, .din, .rd_idx, .rd_data);
  trigger_counters #(.N(16), .CW(4))  dut_small (.clk, .rst_n, .clear, .din, .rd_idx, .rd_data(rd_small));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input int n);
    for (int c = 0; c < n; c++) begin
      logic [15:0] v;
      @(negedge clk);
      for (int i = 0; i < 16; i++) v[i] = ($urandom_range(0, i + 1) == 0);
      din = v;
      for (int i = 0; i < 16; i++) model[i] += v[i];
    end
    @(negedge clk);
    din = '0;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      rd_idx = 4'(i);
      #1;
      chk(rd_data == 24'(model[i]), $sformatf("counter %0d = %0d exp %0d", i, rd_data, model[i]));
      chk(rd_small == ((model[i] > 15) ? 4'hF : 4'(model[i])), "saturating counter");
    end
  endtask

  initial begin
    din = '0; rd_idx = '0;
    for (int i = 0; i < 16; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(3000);
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int i = 0; i < 16; i++) model[i] = 0;
    run(10);
    run(500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
