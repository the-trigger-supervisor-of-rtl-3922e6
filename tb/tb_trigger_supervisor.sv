// tb_trigger_supervisor: end-to-end test of the trigger supervisor at its
// default parameters (8K-slot input RAMs, ~100 us read delay, queue depth 3,
// 20 us minimum interval, 10 links).
//
// Trigger setup loaded over the configuration bus in the interburst:
//   bit 0 "neutral":   L1TS bit 0 AND NT bit 0 (NT widened to +-1 slot)
//   bit 1 "charged":   L1TS bit 0 AND L2C bit 0 (L2C asynchronous, own timestamp)
//   bit 2 "control":   L1TS bit 0 alone, downscaled by 10
//   bit 3 "calib":     MISC bit 0, enabled only outside the burst
// Bits 0-2 are enabled only inside the burst (trigger RAM timing line). Any
// non-zero word is a valid trigger. NT reports 3 slots after L1TS, which its
// card's counter preset compensates. L2C reports up to 2000 slots late, out of
// order; some reports carry a timestamp one RAM turn old and must be ignored.
// The NT card's read delay is shortened by the same 3 slots, so that all cards
// read a given slot in the same cycle.
//
// The testbench works out every event's trigger word itself, receives the
// packets on the links and checks: timestamps and words of all packets,
// sequential event numbers, >= dt between packets, identical links,
// received + dropped (XOFF) + lost (queue full) = expected triggers, exact
// XOFF time-slice count, trigger bit counters, monitor output counts. Each
// mechanism (widening, stale rejection, out-of-order L2C, downscaling,
// outside-burst trigger, in-burst blocking, queue full, XOFF drop, XOFF mask)
// is counted and must have happened at least once.
module tb_trigger_supervisor;
  import ts_pkg::*;

  localparam int DELAY = 4000;
  localparam int DT    = 800;
  localparam logic [TS_W-1:0] P = 30'd1_000_000;

  logic clk = 0, rst_n = 0, sob = 0, eob = 0, ext_timing = 0;
  logic [N_SRC-1:0][SRC_W-1:0] src_data;
  logic [N_SRC-1:0] src_strobe;
  logic [TS_W-1:0] l2c_ts;
  logic [9:0] xoff;
  logic [9:0][7:0] tx_byte;
  logic [9:0] tx_strobe;
  logic [N_SRC-1:0][SRC_W-1:0] mon_data;
  logic [N_SRC-1:0] mon_valid;
  logic in_burst, cfg_we;
  logic [23:0] cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;

  trigger_supervisor dut (
    .clk, .rst_n, .sob, .eob, .ext_timing, .src_data, .src_strobe, .l2c_ts, .xoff,
    .tx_byte, .tx_strobe, .mon_data, .mon_valid, .in_burst,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- events
  typedef struct {
    int  e;          // event time (L1TS card counter value)
    bit  nt;
    int  jit;        // NT slot displacement
    bit  l2c;        // genuine L2C report
    int  l2c_lat;    // L2C report delay in slots
    bit  stale;      // report with a timestamp one RAM turn old
    bit  misc;
    bit  burst;      // inside the burst
  } ev_t;
  ev_t evs [$];

  // Stimulus tables keyed by card-0 counter value.
  bit l1_at [int], nt_at [int], misc_at [int];
  int l2c_at [int];                      // value = reported timestamp
  int exp_tw [int];                      // expected word by event time
  int n_l1_burst = 0;

  function automatic int nt_slot(input int e, input int jit); return e + jit + 3; endfunction

  task automatic add_event(input ev_t v);
    int t;
    evs.push_back(v);
    l1_at[v.e] = 1;
    if (v.nt) nt_at[nt_slot(v.e, v.jit)] = 1;
    if (v.misc) misc_at[v.e] = 1;
    if (v.l2c || v.stale) begin
      t = v.e + v.l2c_lat;
      while (l2c_at.exists(t)) t++;
      l2c_at[t] = v.stale ? v.e - 8192 : v.e;
    end
  endtask

  // ---------------------------------------------------------------- config
  task automatic wr(input logic [7:0] region, input int a, input int d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = {region, 16'(a)}; cfg_wdata = 32'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic rd(input logic [7:0] region, input int a, output int d);
    @(negedge clk);
    cfg_addr = {region, 16'(a)};
    #1 d = int'(cfg_rdata);
  endtask

  // ---------------------------------------------------------------- drive
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    int t;
    t = int'(dut.g_card[0].u_card.local_ts);
    src_data = '0; src_strobe = '0; l2c_ts = '0;
    if (rst_n) begin
      if (l1_at.exists(t))   begin src_data[SRC_L1TS][0] = 1'b1; src_strobe[SRC_L1TS] = 1'b1; end
      if (nt_at.exists(t))   begin src_data[SRC_NT][0]   = 1'b1; src_strobe[SRC_NT]   = 1'b1; end
      if (misc_at.exists(t)) begin src_data[SRC_MISC][0] = 1'b1; src_strobe[SRC_MISC] = 1'b1; end
      if (l2c_at.exists(t))  begin
        src_data[SRC_L2C][0] = 1'b1; src_strobe[SRC_L2C] = 1'b1; l2c_ts = TS_W'(l2c_at[t]);
      end
    end
  end

  // ---------------------------------------------------------------- receive
  packet_t pkts [$];
  int      pkt_cyc [$];
  int      link_mismatch = 0, mon_l1 = 0;
  packet_t cur;
  int      nbyte = 0, first_cyc = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 1; i < 10; i++)
        if (tx_strobe[i] != tx_strobe[0] || tx_byte[i] != tx_byte[0]) link_mismatch++;
      if (mon_valid[SRC_L1TS]) mon_l1++;
      if (tx_strobe[0]) begin
        if (nbyte == 0) first_cyc = cyc;
        cur[63 - 8*nbyte -: 8] = tx_byte[0];
        nbyte++;
        if (nbyte == 8) begin
          pkts.push_back(cur);
          pkt_cyc.push_back(first_cyc);
          nbyte = 0;
        end
      end
    end
  end

  // ---------------------------------------------------------------- xoff
  int xoff_cycles = 0;

  // ---------------------------------------------------------------- main
  initial begin
    int d, e, n_exp, n_pre, ds_k;
    int cnt_exp [4];
    int widened = 0, stale_ok = 0, ooo = 0, ds_supp = 0, misc_blocked = 0, pre_pkts = 0;
    int last_rep;
    ev_t v;

    cfg_we = 0; cfg_addr = '0; cfg_wdata = '0; xoff = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Interburst: load the configuration.
    wr(REG_CARD0 + 8'(SRC_L1TS), CARD_PRESET, P);
    wr(REG_CARD0 + 8'(SRC_L2C),  CARD_PRESET, P);
    wr(REG_CARD0 + 8'(SRC_NT),   CARD_PRESET, P - 3);
    wr(REG_CARD0 + 8'(SRC_MISC), CARD_PRESET, P);
    wr(REG_CARD0 + 8'(SRC_NT),   CARD_DELAY, DELAY - 3); // NT card reads the same slot as the others
    wr(REG_CARD0 + 8'(SRC_NT),   CARD_REF, 0);          // NT widened
    wr(REG_OUT, OUT_PRESET, P - DELAY - 9);
    wr(REG_OUT, OUT_XMASK, 10'h37F);                    // ROC 7 masked off
    for (int k = 0; k < 72; k++) begin
      int s;
      case (k)
        0: s = 0;  1: s = 48;           // L1TS0, NT0
        3: s = 0;  4: s = 24;           // L1TS0, L2C0
        6: s = 0;                       // L1TS0
        9: s = 72;                      // MISC0
        default: s = 95;                // never driven
      endcase
      wr(REG_ROUTE0, k, s);
      wr(REG_ROUTE1, k, 95);
    end
    for (int k = 0; k < 24; k++) begin
      wr(REG_LOGIC0, k, (k < 2) ? 8'h88 : (k < 4) ? 8'hAA : 8'h00);  // a0&a1, a0&a1, a0, a0
      wr(REG_LOGIC1, k, 0);
    end
    for (int c = 0; c < 4; c++)
      for (int l = 0; l < 16; l++)
        wr(REG_TRAM0, {c[1:0], 12'(l)}, c[0] ? (l & 7) : (l & 8));
    for (int w = 1; w < 16; w++) wr(REG_STROBE, w, 1);
    wr(REG_DSCALE, 2, 10);

    // Interburst triggers: counters run from reset, MISC calibration and
    // L1TS (which must not trigger outside the burst).
    e = int'(dut.g_card[0].u_card.local_ts) + 200;
    for (int i = 0; i < 3; i++) begin
      v = '{e: e + 1000 * i, nt: 1, jit: 0, l2c: 0, l2c_lat: 0, stale: 0, misc: 1, burst: 0};
      add_event(v);
    end
    repeat (DELAY + 3 * 1000 + 3000) @(posedge clk);
    pre_pkts = pkts.size();
    chk(pre_pkts == 3, $sformatf("outside-burst triggers: %0d packets", pre_pkts));
    foreach (pkts[i]) chk(pkts[i].tw == 16'h0008, "outside-burst word is bit 3 only");

    // Burst.
    @(negedge clk); sob = 1;
    @(negedge clk); sob = 0;
    @(negedge clk);
    chk(in_burst, "in burst");
    wr(REG_CARD0, CARD_DELAY, 100);                     // ignored inside the burst
    e = int'(P) + 300;
    for (int i = 0; i < 45; i++) begin
      v.e = e; v.burst = 1;
      v.nt = ($urandom_range(0, 9) < 7);
      v.jit = $urandom_range(0, 4) - 2;
      v.l2c = ($urandom_range(0, 1) == 0);
      v.l2c_lat = $urandom_range(50, 2000);
      v.stale = !v.l2c && ($urandom_range(0, 2) == 0);
      v.misc = ($urandom_range(0, 4) == 0);
      if (i == 0) begin v.nt = 1; v.jit = 1; v.stale = 1; v.l2c = 0; v.misc = 1; end
      if (i == 1) begin v.nt = 1; v.jit = -1; end
      add_event(v);
      if (i == 20) begin                               // a fast cluster: queue full
        for (int j = 1; j <= 6; j++) begin
          v = '{e: e + 30 * j, nt: 1, jit: 0, l2c: 0, l2c_lat: 0, stale: 0, misc: 0, burst: 1};
          add_event(v);
        end
      end
      e += $urandom_range(900, 2600);
    end
    // Run the burst with XOFF periods: ROC 3 (enabled), ROC 7 (masked).
    fork
      begin
        repeat (DELAY + 20000) @(posedge clk);
        @(negedge clk); xoff[7] = 1;
        repeat (5000) @(posedge clk);
        @(negedge clk); xoff[7] = 0;
        repeat (10000) @(posedge clk);
        @(negedge clk); xoff[3] = 1;
        repeat (6000) @(posedge clk);
        @(negedge clk); xoff[3] = 0;
      end
      begin
        while (int'(dut.g_card[0].u_card.local_ts) < e + DELAY + 200) @(posedge clk);
      end
    join
    repeat (4 * DT + 200) @(posedge clk);
    @(negedge clk); eob = 1;
    @(negedge clk); eob = 0;
    repeat (10) @(posedge clk);
    chk(!in_burst, "back in interburst");

    // ------------------------------------------------------------ evaluate
    foreach (cnt_exp[i]) cnt_exp[i] = 0;
    n_exp = 0; ds_k = 0; last_rep = -1;
    foreach (evs[i]) begin
      int tw;
      if (!evs[i].burst) continue;
      tw = 0;
      if (evs[i].nt && evs[i].jit >= -1 && evs[i].jit <= 1) tw |= 1;
      if (evs[i].l2c) tw |= 2;
      if (ds_k % 10 == 0) tw |= 4; else ds_supp++;
      ds_k++;
      if (evs[i].nt && (evs[i].jit == 1 || evs[i].jit == -1)) widened++;
      if (evs[i].misc) misc_blocked++;
      for (int b = 0; b < 4; b++) cnt_exp[b] += (tw >> b) & 1;
      exp_tw[evs[i].e] = tw;
      if (tw != 0) n_exp++;
    end
    // L2C reports arriving out of time order.
    foreach (l2c_at[t]) begin
      if (l2c_at[t] < last_rep) ooo++;
      last_rep = l2c_at[t];
    end

    begin
      int ok_pkts = 0, ev_expect = 0, lost, dropped, xs, evn;
      for (int i = pre_pkts; i < pkts.size(); i++) begin
        int ts;
        ts = int'(pkts[i].ts);
        chk(pkts[i].evnum == 16'(ev_expect), $sformatf("event number %0d exp %0d", pkts[i].evnum, ev_expect));
        ev_expect++;
        chk(pkts[i].spare == 2'b00, "spare bits");
        if (exp_tw.exists(ts)) begin
          chk(pkts[i].tw == 16'(exp_tw[ts]), $sformatf("ts %0d word %h exp %h", ts, pkts[i].tw, exp_tw[ts]));
          ok_pkts++;
          foreach (evs[j]) if (evs[j].e == ts && evs[j].stale && !pkts[i].tw[1]) stale_ok++;
        end else chk(0, $sformatf("packet with unknown timestamp %0d", ts));
        if (i > pre_pkts) chk(pkt_cyc[i] - pkt_cyc[i-1] >= DT, "minimum interval between packets");
      end
      rd(REG_DEAD, 0, xs);
      rd(REG_DEAD, 1, dropped);
      rd(REG_DEAD, 3, lost);
      rd(REG_DEAD, 4, evn);
      $display("expected triggers=%0d received=%0d dropped=%0d lost=%0d", n_exp, ok_pkts, dropped, lost);
      chk(ok_pkts + dropped + lost == n_exp, "received + dropped + lost = expected");
      chk(xs == 6000, $sformatf("XOFF time slices %0d", xs));
      chk(evn == pkts.size() - pre_pkts, "event number register");
      chk(lost > 0, "queue-full loss happened");
      chk(dropped > 0, "XOFF drop happened");
      rd(REG_DEAD, 2, d);
      chk(d > 0, "queue-full time slices counted");
      rd(REG_DEAD, 5, d);
      chk(d == 0, "queue empty at the end");
    end
    for (int b = 0; b < 4; b++) begin
      rd(REG_CNT, b, d);
      chk(d == cnt_exp[b], $sformatf("trigger counter %0d = %0d exp %0d", b, d, cnt_exp[b]));
    end
    chk(link_mismatch == 0, "all links carry the same frames");
    chk(mon_l1 == evs.size(), $sformatf("monitor saw %0d L1TS slots exp %0d", mon_l1, evs.size()));
    $display("mechanisms: widened=%0d stale_rejected=%0d l2c_out_of_order=%0d downscale_suppressed=%0d outside_burst=%0d misc_blocked_in_burst=%0d",
             widened, stale_ok, ooo, ds_supp, pre_pkts, misc_blocked);
    chk(widened > 0, "widening used");
    chk(stale_ok > 0, "stale L2C report rejected");
    chk(ooo > 0, "out-of-order L2C reports");
    chk(ds_supp > 0, "downscaling suppressed triggers");
    chk(misc_blocked > 0, "calibration bit blocked inside burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
