// tb_trigger_ram: writes random 4-bit values at random addresses (12 logic
// bits plus 2 timing lines), then reads them back through the lookup path and
// checks the registered output one cycle later. Unwritten entries must read 0.
module tb_trigger_ram;
  import ts_pkg::*;
  logic clk = 0;
  cfg_wr_t cfg;
  logic [1:0] ctrl;
  logic [11:0] din;
  logic [3:0] dout;
  logic [3:0] model [1 << 14];
  int written [$];
  int checks = 0, failures = 0;

  trigger_ram #(.IN_W(12), .CW(2), .OUT_W(4)) dut (.clk, .cfg, .ctrl, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    cfg = '0; ctrl = '0; din = '0;
    for (int i = 0; i < (1 << 14); i++) model[i] = 4'h0;
    for (int i = 0; i < 500; i++) begin
      a = $urandom_range(0, (1 << 14) - 1);
      model[a] = 4'($urandom_range(1, 15));
      written.push_back(a);
      @(negedge clk);
      cfg = '{we: 1'b1, addr: 16'(a), data: 32'(model[a])};
    end
    @(negedge clk);
    cfg = '0;
    for (int i = 0; i < 2000; i++) begin
      logic [3:0] exp;
      if (i % 2 == 0) a = written[$urandom_range(0, written.size() - 1)];
      else            a = $urandom_range(0, (1 << 14) - 1);
      {ctrl, din} = 14'(a);
      exp = model[a];
      @(negedge clk);
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL addr %h: %h exp %h", a, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
