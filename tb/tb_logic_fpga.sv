// tb_logic_fpga: checks the default 3-input OR, then loads a random truth
// table per output and compares each output with the table entry picked by
// its three input bits, one cycle after random inputs.
module tb_logic_fpga;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg;
  logic [71:0] din;
  logic [23:0] dout;
  logic [7:0] tab [24];
  int checks = 0, failures = 0;

  logic_fpga #(.N_OUT(24)) dut (.clk, .rst_n, .cfg, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_vectors(input int n);
    logic [71:0] v;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      v = {$urandom, $urandom, $urandom};
      din = v;
      @(negedge clk);
      for (int k = 0; k < 24; k++) begin
        logic [2:0] a;
        a = {v[3*k+2], v[3*k+1], v[3*k]};
        checks++;
        if (dout[k] !== tab[k][a]) begin
          failures++;
          $display("FAIL out %0d in %b", k, a);
        end
      end
    end
  endtask

  initial begin
    cfg = '0; din = '0;
    for (int k = 0; k < 24; k++) tab[k] = 8'hFE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_vectors(30);
    for (int k = 0; k < 24; k++) begin
      tab[k] = 8'($urandom);
      @(negedge clk);
      cfg = '{we: 1'b1, addr: 16'(k), data: 32'(tab[k])};
      @(negedge clk);
      cfg = '0;
    end
    run_vectors(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
