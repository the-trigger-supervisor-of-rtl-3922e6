// tb_transmitter: offers random trigger entries whenever the stage is ready,
// collects the eight frames of each packet at the frame strobes and rebuilds
// the 64-bit packet. Checks the fields (event number, trigger word, zero spare
// bits, timestamp), sequential event numbers restarting at 0 after a clear,
// a frame every 5 cycles and a packet time of 40 cycles (1 us at 40 MHz).
module tb_transmitter;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid, ready, tx_strobe;
  tqb_entry_t in_entry;
  logic [7:0] tx_byte;
  logic [15:0] evnum;
  int checks = 0, failures = 0;

  transmitter #(.FRAME_CYCLES(5)) dut (
    .clk, .rst_n, .clear, .in_valid, .in_entry, .ready, .tx_byte, .tx_strobe, .evnum);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input tqb_entry_t e, input int exp_ev);
    packet_t p;
    int t0, tl;
    @(negedge clk);
    while (!ready) @(negedge clk);
    in_valid = 1; in_entry = e;
    @(negedge clk);
    in_valid = 0; in_entry = '0;
    chk(!ready, "busy after accept");
    for (int b = 0; b < 8; b++) begin
      int waitc = 0;
      while (!tx_strobe) begin @(negedge clk); waitc++; end
      if (b == 0) t0 = $time; else chk(waitc == 4, $sformatf("frame spacing %0d", waitc + 1));
      p[63 - 8*b -: 8] = tx_byte;
      tl = $time;
      @(negedge clk);
    end
    while (!ready) @(negedge clk);
    chk(($time - t0) / 10 == 40, $sformatf("packet takes %0d cycles", ($time - t0) / 10));
    chk(p.evnum == 16'(exp_ev), $sformatf("event number %0d exp %0d", p.evnum, exp_ev));
    chk(p.tw == e.tw, "trigger word");
    chk(p.spare == 2'b00, "spare bits");
    chk(p.ts == e.ts, "timestamp");
  endtask

  initial begin
    in_valid = 0; in_entry = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) send('{tw: 16'($urandom), ts: 30'($urandom)}, i);
    chk(evnum == 16'd200, "event number counter");
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int i = 0; i < 20; i++) send('{tw: 16'($urandom), ts: 30'($urandom)}, i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
