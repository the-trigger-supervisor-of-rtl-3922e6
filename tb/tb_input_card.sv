// tb_input_card: checks both kinds of input card.
//
// Synchronous card: each slot's data and strobe are a hash of the slot's
// timestamp, so the expected extracted value of any slot is known. Slots
// written before the burst (at low timestamps) share RAM addresses with the
// slots read just after the burst starts, but carry other high timestamp bits
// and must read as empty.
// Asynchronous (L2C-like) card: entries arrive with their own timestamp, out of
// order, within the read delay; some are deliberately written with a
// timestamp one RAM turn (8192 slots) old and must be rejected. A reference
// memory in the testbench tracks what each address last received.
// Both cards: monitor data is checked two cycles after the read, widened data
// four cycles after, with the reference mask applied.
module tb_input_card;
  import ts_pkg::*;
  localparam int D = 24;                 // read delay used in the test
  localparam logic [TS_W-1:0] P = 30'd100_000;
  localparam logic [SRC_W-1:0] REFM = 24'h00FFFF;

  logic clk = 0, rst_n = 0, sob = 0;
  cfg_wr_t cfg;
  logic [SRC_W-1:0] sd_data, as_data, mon_s, mon_a, out_s, out_a;
  logic sd_strobe, as_strobe, monv_s, monv_a;
  logic [TS_W-1:0] as_ts, lts_s, lts_a;
  int checks = 0, failures = 0, stale_rejected = 0, async_hits = 0, sync_hits = 0;

  input_card #(.ASYNC(1'b0)) dut_s (
    .clk, .rst_n, .sob, .cfg, .src_data(sd_data), .src_strobe(sd_strobe), .src_ts('0),
    .local_ts(lts_s), .mon_data(mon_s), .mon_valid(monv_s), .out_data(out_s));
  input_card #(.ASYNC(1'b1)) dut_a (
    .clk, .rst_n, .sob, .cfg, .src_data(as_data), .src_strobe(as_strobe), .src_ts(as_ts),
    .local_ts(lts_a), .mon_data(mon_a), .mon_valid(monv_a), .out_data(out_a));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [SRC_W-1:0] hash_d(input logic [TS_W-1:0] t);
    return SRC_W'((t * 32'd2654435761) >> 5);
  endfunction
  function automatic logic hash_s(input logic [TS_W-1:0] t);
    return (((t * 32'd40503) >> 7) % 3) != 0;
  endfunction

  // Reference memory of the asynchronous card, by low address.
  logic [TS_W-1:0]  ref_ts   [1 << 13];
  logic [SRC_W-1:0] ref_data [1 << 13];
  logic             ref_v    [1 << 13];

  function automatic logic [SRC_W-1:0] exp_sync(input logic [TS_W-1:0] r);
    if (r < P) return '0;   // before the burst: written with other high bits
    return hash_s(r) ? hash_d(r) : '0;
  endfunction
  function automatic logic [SRC_W-1:0] exp_async(input logic [TS_W-1:0] r);
    return (ref_v[r[12:0]] && ref_ts[r[12:0]] == r) ? ref_data[r[12:0]] : '0;
  endfunction
  function automatic logic [SRC_W-1:0] widen(input logic [SRC_W-1:0] a, b, c);
    return (REFM & b) | (~REFM & (a | b | c));
  endfunction

  task automatic write_cfg(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg = '{we: 1'b1, addr: a, data: d};
    @(negedge clk);
    cfg = '0;
  endtask

  logic [TS_W-1:0]  rhist [$];
  logic [SRC_W-1:0] es_hist [$], ea_hist [$];

  initial begin
    for (int i = 0; i < (1 << 13); i++) ref_v[i] = 1'b0;
    cfg = '0; sd_data = '0; sd_strobe = 0; as_data = '0; as_strobe = 0; as_ts = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    write_cfg(CARD_PRESET, 32'(P));
    write_cfg(CARD_DELAY, D);
    write_cfg(CARD_REF, 32'(REFM));
    // Before the burst: synchronous card writes its low timestamps.
    repeat (50) begin
      @(negedge clk);
      sd_data = hash_d(lts_s); sd_strobe = 1'b1;
    end
    @(negedge clk);
    sob = 1;
    @(negedge clk);
    sob = 0;
    chk(lts_s == P && lts_a == P, "presets loaded at start of burst");
    for (int n = 0; n < 3000; n++) begin
      logic [TS_W-1:0] r;
      // Sources for the slot now on the counter.
      sd_data   = hash_d(lts_s);
      sd_strobe = hash_s(lts_s);
      as_strobe = ($urandom_range(0, 3) == 0);
      as_ts     = lts_a - TS_W'($urandom_range(0, D / 2));
      if ($urandom_range(0, 5) == 0) as_ts = as_ts - TS_W'(8192);   // old event
      as_data   = SRC_W'($urandom);
      if (as_strobe) begin
        ref_ts[as_ts[12:0]]   = as_ts;
        ref_data[as_ts[12:0]] = as_data;
        ref_v[as_ts[12:0]]    = 1'b1;
      end
      // Read side: the address presented now is read at this edge.
      r = lts_s - TS_W'(D);
      rhist.push_back(r);
      es_hist.push_back(exp_sync(r));
      ea_hist.push_back(exp_async(r));
      @(negedge clk);
      if (rhist.size() >= 3) begin
        automatic int k = rhist.size() - 2;    // slot whose read was two edges ago
        chk(mon_s == es_hist[k], $sformatf("sync mon slot %0d", rhist[k]));
        chk(mon_a == ea_hist[k], $sformatf("async mon slot %0d got %h exp %h", rhist[k], mon_a, ea_hist[k]));
        chk(monv_a == (ea_hist[k] != '0 || (ref_v[rhist[k][12:0]] && ref_ts[rhist[k][12:0]] == rhist[k])),
            "async valid flag");
        if (es_hist[k] != '0) sync_hits++;
        if (ea_hist[k] != '0) async_hits++;
        if (ref_v[rhist[k][12:0]] && ref_ts[rhist[k][12:0]] != rhist[k] &&
            ref_ts[rhist[k][12:0]][12:0] == rhist[k][12:0] && mon_a == '0) stale_rejected++;
      end
      if (rhist.size() >= 6) begin
        automatic int k = rhist.size() - 4;    // slot whose read was four edges ago
        chk(out_s == widen(es_hist[k-1], es_hist[k], es_hist[k+1]), "sync widened");
        chk(out_a == widen(ea_hist[k-1], ea_hist[k], ea_hist[k+1]), "async widened");
      end
    end
    chk(sync_hits > 100, "sync data seen");
    chk(async_hits > 100, "async data seen");
    chk(stale_rejected > 10, "stale entries rejected");
    $display("sync_hits=%0d async_hits=%0d stale_rejected=%0d", sync_hits, async_hits, stale_rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
