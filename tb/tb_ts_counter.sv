// tb_ts_counter: checks the timestamp counter. After reset it counts from 0;
// a load pulse sets it to the preset, after which it advances by exactly one
// per clock, including across the 30-bit wrap.
module tb_ts_counter;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [TS_W-1:0] preset, count;
  int checks = 0, failures = 0;

  ts_counter #(.W(TS_W)) dut (.clk, .rst_n, .load, .preset, .count);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    preset = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(count == 1, "count after reset");
    for (int i = 2; i < 50; i++) begin
      @(negedge clk);
      chk(count == TS_W'(i), "counting from zero");
    end
    foreach (preset_list[k]) begin
      preset = preset_list[k];
      load = 1;
      @(negedge clk);
      load = 0;
      chk(count == preset, "preset loaded");
      for (int i = 1; i < 40; i++) begin
        @(negedge clk);
        chk(count == TS_W'(preset + TS_W'(i)), "counting after preset");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [TS_W-1:0] preset_list [4] = '{30'd12345, 30'h3FFF_FFF0, 30'd0, 30'h1555_5555};
endmodule
