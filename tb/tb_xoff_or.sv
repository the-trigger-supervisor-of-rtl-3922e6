// tb_xoff_or: random XOFF lines and enable masks; xoff_any must equal the OR
// of the enabled lines as they were two cycles earlier.
module tb_xoff_or;
  logic clk = 0, rst_n = 0;
  logic [9:0] enable, xoff;
  logic xoff_any;
  logic [9:0] hx [$];
  logic [9:0] he [$];
  int checks = 0, failures = 0, highs = 0;

  xoff_or #(.N(10)) dut (.clk, .rst_n, .enable, .xoff, .xoff_any);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = '1; xoff = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (n >= 3) begin
        checks++;
        // lines driven two edges ago, mask as it is now
        if (xoff_any !== |(hx[$-1] & enable)) begin
          failures++;
          $display("FAIL n=%0d", n);
        end
        highs += xoff_any;
      end
      if (n % 500 == 0) enable = 10'($urandom);
      for (int i = 0; i < 10; i++) xoff[i] = ($urandom_range(0, 19) == 0);
      hx.push_back(xoff);
    end
    checks++;
    if (highs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
