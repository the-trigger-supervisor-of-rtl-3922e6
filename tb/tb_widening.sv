// tb_widening: drives random sparse bit patterns into the widening circuit
// with a mixed reference mask and compares each output slot with the OR of
// the neighbouring input slots (non-reference bits) or the slot itself
// (reference bits), two cycles later.
module tb_widening;
  localparam int W = 24;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] ref_mask, din, dout;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0, widened = 0;

  widening #(.W(W)) dut (.clk, .rst_n, .ref_mask, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] sparse();
    logic [W-1:0] v;
    for (int b = 0; b < W; b++) v[b] = ($urandom_range(0, 9) == 0);
    return v;
  endfunction

  initial begin
    ref_mask = 24'h0F0F0F;
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // din for slot n is applied now; dout now shows slot n-2.
      if (n >= 3) begin
        logic [W-1:0] exp;
        // hist[$] = slot n-1, hist[$-1] = n-2, hist[$-2] = n-3
        exp = (ref_mask & hist[$-1]) | (~ref_mask & (hist[$-2] | hist[$-1] | hist[$]));
        if ((exp & ~ref_mask) != (hist[$-1] & ~ref_mask)) widened++;
        checks++;
        if (dout !== exp) begin
          failures++;
          $display("FAIL slot %0d: dout=%h exp=%h", n - 2, dout, exp);
        end
      end
      if (n == 1000) ref_mask = 24'hF0000F;
      din = sparse();
      hist.push_back(din);
    end
    checks++;
    if (widened == 0) begin failures++; $display("FAIL: no widening exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
