// tb_routing_fpga: checks the reset routing (output k = input k), then loads
// random select values for all 72 outputs and compares every output with the
// selected input bit one cycle after random input vectors.
module tb_routing_fpga;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg;
  logic [95:0] din;
  logic [71:0] dout;
  int sel [72];
  int checks = 0, failures = 0;

  routing_fpga #(.N_IN(96), .N_OUT(72)) dut (.clk, .rst_n, .cfg, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_vectors(input int n);
    logic [95:0] v;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      v = {$urandom, $urandom, $urandom};
      din = v;
      @(negedge clk);
      for (int k = 0; k < 72; k++) begin
        checks++;
        if (dout[k] !== v[sel[k]]) begin
          failures++;
          $display("FAIL out %0d sel %0d", k, sel[k]);
        end
      end
    end
  endtask

  initial begin
    cfg = '0; din = '0;
    for (int k = 0; k < 72; k++) sel[k] = k;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_vectors(20);
    for (int k = 0; k < 72; k++) begin
      sel[k] = $urandom_range(0, 95);
      @(negedge clk);
      cfg = '{we: 1'b1, addr: 16'(k), data: 32'(sel[k])};
      @(negedge clk);
      cfg = '0;
    end
    run_vectors(50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
