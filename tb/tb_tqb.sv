// tb_tqb: the trigger queue buffer against a cycle-level reference model of
// the queue (list of entries, minimum-interval timer, XOFF handling).
// Random bursts of valid triggers overfill the queue (lost triggers), XOFF
// periods make extracted triggers be dropped, tx_ready is sometimes low, and
// the depth N and interval dt are changed between phases. Besides exact
// agreement with the model, it checks that extractions are at least dt apart
// and the occupancy never exceeds N, and that each mechanism happened.
module tb_tqb;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  cfg_wr_t cfg;
  logic in_valid, xoff, tx_ready, out_valid, dropped, lost, full;
  tqb_entry_t in_entry, out_entry;
  logic [7:0] occupancy;

  tqb #(.AW(7), .DTW(16)) dut (
    .clk, .rst_n, .clear, .cfg, .in_valid, .in_entry, .xoff, .tx_ready,
    .out_valid, .out_entry, .dropped, .lost, .full, .occupancy);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_lost = 0, n_drop = 0, n_out = 0, n_wr = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Reference model state.
  tqb_entry_t q [$];
  tqb_entry_t last;
  int depth = 3, dt = 800, dtc = 0, since_rd = 1 << 20;
  bit rdq = 0, xq = 0;

  // Runs the model and the queue side by side; on the first two cycles the
  // new depth and interval are written (the model takes them at the same edge).
  task automatic run(input int cycles, input int rate_pct, input int xoff_pct,
                     input int new_depth, input int new_dt);
    for (int c = 0; c < cycles; c++) begin
      bit e_full, e_lost, do_rd, do_wr;
      @(negedge clk);
      cfg = '0;
      if (c == 0) cfg = '{we: 1'b1, addr: OUT_DEPTH, data: 32'(new_depth)};
      if (c == 1) cfg = '{we: 1'b1, addr: OUT_DT, data: 32'(new_dt)};
      in_valid = ($urandom_range(0, 99) < rate_pct);
      in_entry = '{tw: 16'($urandom), ts: 30'($urandom)};
      if (c % 97 == 0) xoff = ($urandom_range(0, 99) < xoff_pct);
      tx_ready = ($urandom_range(0, 9) != 0);
      #1;
      e_full = (q.size() >= depth);
      e_lost = in_valid && e_full;
      do_wr  = in_valid && !e_full;
      do_rd  = (q.size() > 0) && (dtc == 0) && tx_ready && !rdq;
      chk(full == e_full, "full");
      chk(lost == e_lost, "lost");
      chk(occupancy == 8'(q.size()), "occupancy");
      chk(q.size() <= depth, "occupancy within depth");
      chk(out_valid == (rdq && !xq), "out_valid");
      chk(dropped == (rdq && xq), "dropped");
      if (rdq) chk(out_entry == last, "extracted entry in order");
      n_lost += e_lost; n_drop += dropped; n_out += out_valid; n_wr += do_wr;
      // state update at the coming edge
      if (do_rd) begin
        chk(since_rd >= dt, "minimum interval between extractions");
        since_rd = 0;
        last = q.pop_front();
      end
      since_rd++;
      if (do_wr) q.push_back(in_entry);
      dtc = do_rd ? dt - 1 : (dtc > 0 ? dtc - 1 : 0);
      rdq = do_rd;
      xq  = xoff;
      if (c == 0) depth = new_depth;
      if (c == 1) dt = new_dt;
    end
  endtask

  initial begin
    cfg = '0; in_valid = 0; in_entry = '0; xoff = 0; tx_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Working point: N = 3, dt = 800 slots (20 us).
    run(20000, 1, 30, 3, 800);
    // Fast phase: N = 5, dt = 7.
    run(20000, 15, 30, 5, 7);
    // Deep queue, dt = 1, no XOFF.
    run(10000, 45, 0, 100, 1);
    // Clear empties the queue.
    @(negedge clk);
    in_valid = 0; clear = 1;
    @(negedge clk);
    clear = 0;
    #1;
    chk(occupancy == 0, "clear empties queue");
    $display("written=%0d out=%0d dropped=%0d lost=%0d", n_wr, n_out, n_drop, n_lost);
    chk(n_lost > 0, "queue-full loss happened");
    chk(n_drop > 0, "XOFF drop happened");
    chk(n_out > 0, "dispatch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
