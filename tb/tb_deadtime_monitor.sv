// tb_deadtime_monitor: random XOFF levels, drops, queue-full levels and losses;
// the four counters are read back and compared with the testbench's counts,
// before and after a clear.
module tb_deadtime_monitor;
  logic clk = 0, rst_n = 0, clear = 0;
  logic xoff, xoff_drop, full, full_lost;
  logic [1:0] rd_idx;
  logic [23:0] rd_data;
  int unsigned model [4];
  int checks = 0, failures = 0;

  deadtime_monitor #(.CW(24)) dut (.clk, .rst_n, .clear, .xoff, .xoff_drop, .full, .full_lost, .rd_idx, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      if (c % 50 == 0) xoff = ($urandom_range(0, 3) == 0);
      if (c % 30 == 0) full = ($urandom_range(0, 4) == 0);
      xoff_drop = xoff && ($urandom_range(0, 9) == 0);
      full_lost = full && ($urandom_range(0, 6) == 0);
      model[0] += xoff; model[1] += xoff_drop; model[2] += full; model[3] += full_lost;
    end
    @(negedge clk);
    {xoff, xoff_drop, full, full_lost} = '0;
    for (int i = 0; i < 4; i++) begin
      rd_idx = 2'(i);
      #1;
      checks++;
      if (rd_data != 24'(model[i])) begin
        failures++;
        $display("FAIL counter %0d: %0d exp %0d", i, rd_data, model[i]);
      end
    end
  endtask

  initial begin
    {xoff, xoff_drop, full, full_lost} = '0; rd_idx = '0;
    for (int i = 0; i < 4; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(10000);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int i = 0; i < 4; i++) model[i] = 0;
    run(5000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
