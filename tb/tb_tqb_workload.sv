// tb_tqb_workload: the derandomizer at its working point, dt = 20 us (800
// slots) and depth 3, with random (Poisson-like, one Bernoulli trial per 25 ns
// slot) triggers at 5, 7 and 10 kHz, 4000 triggers per rate.
//
// The queue is an M/D/1 system: a trigger occupies it while waiting and then
// for the dt it takes to be served. The testbench measures the fraction of
// time with n = 0, 1, 2, 3, 4 triggers in the system (waiting entries plus
// the one inside its dt interval) and compares it with the M/D/1 distribution,
// computed here from rho = rate x dt with the standard recursion over the
// Poisson arrival probabilities a_k = e^-rho rho^k / k!:
//   pi_0 = 1 - rho,
//   pi_(j+1) = (pi_j - pi_0 a_j - sum_(k=1..j) pi_k a_(j-k+1)) / a_0.
// At 7 kHz this gives about 0.86 / 0.13 / 0.01 for n = 0 / 1 / 2, the
// occupancy the original design reported and matched with measurements.
// Checks per rate: every trigger is either dispatched or lost; the loss
// fraction stays below 1e-3 (the prediction is 2.4e-5 at 7 kHz); n = 0 and
// n = 1 within 10 % of the prediction, n = 2 within 40 %; dispatches are
// >= 800 slots apart. Across rates, the n >= 1 fraction grows with the rate.
module tb_tqb_workload;
  import ts_pkg::*;
  localparam int N_TRIG = 4000;
  localparam int DT     = 800;
  localparam int NB     = 5;        // occupancy hist n = 0 .. 4 (4 = 4 or more)
  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg = '0;
  logic in_valid = 0, out_valid, dropped, lost, full;
  tqb_entry_t in_entry = '0, out_entry;
  logic [7:0] occupancy;
  int checks = 0, failures = 0;
  real prev_busy = 0.0;

  tqb dut (.clk, .rst_n, .clear(1'b0), .cfg, .in_valid, .in_entry, .xoff(1'b0), .tx_ready(1'b1),
           .out_valid, .out_entry, .dropped, .lost, .full, .occupancy);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // M/D/1 time-average distribution of the number in the system.
  function automatic void mdl(input real rho, output real pi [NB]);
    real a [NB + 1];
    real fact = 1.0;
    for (int k = 0; k <= NB; k++) begin
      if (k > 0) fact = fact * k;
      a[k] = $exp(-rho) * (rho ** k) / fact;
    end
    pi[0] = 1.0 - rho;
    for (int j = 0; j < NB - 1; j++) begin
      real s = pi[j] - pi[0] * a[j];
      for (int k = 1; k <= j; k++) s = s - pi[k] * a[j - k + 1];
      pi[j + 1] = s / a[0];
    end
  endfunction

  // One run at a trigger probability of p_num per million slots.
  task automatic run_rate(input int p_num, input int khz);
    longint cyc = 0, last_out = -100000;
    longint hist [NB];
    int arrivals = 0, n_out = 0, n_lost = 0;
    real pi [NB];
    real lf, meas [NB];
    foreach (hist[i]) hist[i] = 0;
    while (arrivals < N_TRIG || in_valid || occupancy != 0 || cyc < last_out + 2000) begin
      int n;
      @(negedge clk);
      cyc++;
      if (out_valid) begin
        if (n_out > 0 && cyc - last_out < DT) chk(0, "dispatch interval");
        last_out = cyc;
        n_out++;
      end
      n = int'(occupancy) + ((cyc - last_out < DT) ? 1 : 0);
      hist[(n >= NB) ? NB - 1 : n]++;
      in_valid = (arrivals < N_TRIG) && ($urandom_range(0, 999_999) < p_num);
      if (in_valid) begin
        arrivals++;
        in_entry = '{tw: 16'(arrivals), ts: 30'(cyc)};
      end
      #1;
      n_lost += lost;
    end
    mdl(real'(p_num) * 1.0e-6 * DT, pi);
    lf = real'(n_lost) / arrivals;
    $display("%0d kHz: arrivals=%0d dispatched=%0d lost=%0d loss_fraction=%g measured rate=%g kHz",
             khz, arrivals, n_out, n_lost, lf, arrivals / (cyc * 25.0e-9) / 1000.0);
    foreach (hist[i]) begin
      meas[i] = real'(hist[i]) / cyc;
      $display("  n=%0d measured=%g M/D/1=%g", i, meas[i], pi[i]);
    end
    chk(n_out + n_lost == arrivals, "every trigger dispatched or lost");
    chk(lf < 1.0e-3, "loss fraction");
    chk(meas[0] > 0.9 * pi[0] && meas[0] < 1.1 * pi[0], "occupancy n=0");
    chk(meas[1] > 0.9 * pi[1] && meas[1] < 1.1 * pi[1], "occupancy n=1");
    chk(meas[2] > 0.6 * pi[2] && meas[2] < 1.4 * pi[2], "occupancy n=2");
    chk(1.0 - meas[0] > prev_busy, "n>=1 fraction grows with rate");
    prev_busy = 1.0 - meas[0];
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_rate(125, 5);     // 125 / 1e6 per 25 ns slot = 5 kHz
    run_rate(175, 7);
    run_rate(250, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
