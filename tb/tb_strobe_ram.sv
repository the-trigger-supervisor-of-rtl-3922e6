// tb_strobe_ram: enables a random set of trigger-word combinations, then
// drives random words (half from the enabled set) and checks strobe and the
// delayed word one cycle later. Disabling an entry again is checked too.
module tb_strobe_ram;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg;
  logic [15:0] tw_in, tw_out;
  logic strobe;
  logic model [1 << 16];
  logic [15:0] en_list [$];
  int checks = 0, failures = 0, ones = 0;

  strobe_ram #(.AW(16)) dut (.clk, .rst_n, .cfg, .tw_in, .strobe, .tw_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [15:0] a, input logic v);
    @(negedge clk);
    cfg = '{we: 1'b1, addr: a, data: 32'(v)};
    model[a] = v;
    @(negedge clk);
    cfg = '0;
  endtask

  task automatic probe(input int n);
    for (int i = 0; i < n; i++) begin
      logic [15:0] w;
      w = (i % 2 == 0) ? en_list[$urandom_range(0, en_list.size() - 1)] : 16'($urandom);
      tw_in = w;
      @(negedge clk);
      checks++;
      if (strobe !== model[w] || tw_out !== w) begin
        failures++;
        $display("FAIL word %h strobe %b exp %b", w, strobe, model[w]);
      end
      ones += strobe;
    end
  endtask

  initial begin
    cfg = '0; tw_in = '0;
    for (int i = 0; i < (1 << 16); i++) model[i] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      logic [15:0] a;
      a = 16'($urandom);
      en_list.push_back(a);
      wr(a, 1'b1);
    end
    probe(2000);
    for (int i = 0; i < 100; i++) wr(en_list[i], 1'b0);
    probe(2000);
    checks++;
    if (ones == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
