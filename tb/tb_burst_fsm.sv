// tb_burst_fsm: random start- and end-of-burst pulses; checks that a single
// start pulse and the burst state follow a start in the interburst one cycle
// later, that a repeated start inside the burst is ignored, that end of burst
// returns to the interburst, and that configuration is enabled only there.
module tb_burst_fsm;
  logic clk = 0, rst_n = 0, sob = 0, eob = 0;
  logic start, in_burst, cfg_en;
  bit st = 0;        // model: 1 = in burst
  int checks = 0, failures = 0, bursts = 0, ignored = 0;

  burst_fsm dut (.clk, .rst_n, .sob, .eob, .start, .in_burst, .cfg_en);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 10000; n++) begin
      bit e_start;
      @(negedge clk);
      sob = ($urandom_range(0, 30) == 0);
      eob = !sob && ($urandom_range(0, 30) == 0);
      // model of the coming edge
      e_start = !st && sob;
      if (st && sob) ignored++;
      if (e_start) begin st = 1; bursts++; end
      else if (st && eob) st = 0;
      @(negedge clk);
      checks++;
      if (start !== e_start || in_burst !== st || cfg_en !== !st) begin
        failures++;
        $display("FAIL n=%0d start=%b in_burst=%b exp %b %b", n, start, in_burst, e_start, st);
      end
      sob = 0; eob = 0;
    end
    checks++;
    if (bursts == 0 || ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
