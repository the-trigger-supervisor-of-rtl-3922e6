// tb_lut_tree: loads random routing selects, random logic tables and random
// contents for the trigger RAM entries of the current timing lines, then drives
// random 96-bit inputs. The expected trigger word is computed from the loaded
// tables in the testbench and compared three cycles after each input.
module tb_lut_tree;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg_route [2], cfg_logic [2], cfg_tram [4];
  logic [1:0] ctrl;
  logic [95:0] din;
  logic [15:0] tw;
  int sel [2][72];
  logic [7:0] tab [2][24];
  logic [3:0] ram [4][1 << 14];
  logic [15:0] exp_q [$];
  int checks = 0, failures = 0, nonzero = 0;

  lut_tree dut (.clk, .rst_n, .cfg_route, .cfg_logic, .cfg_tram, .ctrl, .din, .tw);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] model(input logic [95:0] v, input logic [1:0] c);
    logic [71:0] r;
    logic [23:0] l;
    logic [15:0] w;
    for (int g = 0; g < 2; g++) begin
      for (int k = 0; k < 72; k++) r[k] = v[sel[g][k]];
      for (int k = 0; k < 24; k++) l[k] = tab[g][k][{r[3*k+2], r[3*k+1], r[3*k]}];
      for (int j = 0; j < 2; j++) w[4*(2*g+j) +: 4] = ram[2*g+j][{c, l[12*j +: 12]}];
    end
    return w;
  endfunction

  task automatic clear_cfg();
    for (int i = 0; i < 2; i++) begin cfg_route[i] = '0; cfg_logic[i] = '0; end
    for (int i = 0; i < 4; i++) cfg_tram[i] = '0;
  endtask

  initial begin
    clear_cfg();
    ctrl = 2'b01; din = '0;
    for (int r = 0; r < 4; r++) for (int a = 0; a < (1 << 14); a++) ram[r][a] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 2; g++) begin
      for (int k = 0; k < 72; k++) begin
        sel[g][k] = $urandom_range(0, 95);
        @(negedge clk); clear_cfg();
        cfg_route[g] = '{we: 1'b1, addr: 16'(k), data: 32'(sel[g][k])};
      end
      for (int k = 0; k < 24; k++) begin
        tab[g][k] = 8'($urandom);
        @(negedge clk); clear_cfg();
        cfg_logic[g] = '{we: 1'b1, addr: 16'(k), data: 32'(tab[g][k])};
      end
    end
    for (int a = 0; a < (1 << 12); a++) begin
      @(negedge clk); clear_cfg();
      for (int r = 0; r < 4; r++) begin
        ram[r][{ctrl, 12'(a)}] = 4'($urandom);
        cfg_tram[r] = '{we: 1'b1, addr: 16'({ctrl, 12'(a)}), data: 32'(ram[r][{ctrl, 12'(a)}])};
      end
    end
    @(negedge clk); clear_cfg();
    for (int n = 0; n < 3000; n++) begin
      logic [95:0] v;
      if (n == 2000) ctrl = 2'b00;     // other timing lines: entries still empty
      v = {$urandom, $urandom, $urandom};
      din = v;
      exp_q.push_back(model(v, ctrl));
      @(negedge clk);
      if (exp_q.size() > 2) begin
        automatic logic [15:0] e = exp_q.pop_front();
        checks++;
        if (n >= 3 && (n < 2000 || n >= 2003)) begin
          if (tw !== e) begin
            failures++;
            $display("FAIL n=%0d tw=%h exp=%h", n, tw, e);
          end
          if (tw != 0) nonzero++;
        end
      end
    end
    checks++;
    if (nonzero < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
