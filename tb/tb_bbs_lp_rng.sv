// tb_bbs_lp_rng - end-to-end test of the low-power BBS generator.
//
// Runs the top at its default 32-bit width. It first seeds the worked
// example (s = 3, p = 11, q = 19, m = 209) and checks X1..X5 = 81, 82, 36,
// 42, 92 with their parity and LSB bits, then re-seeds several times with
// random 16-bit primes congruent to 3 mod 4 and random seeds and checks
// every generated X against a software model X(n+1) = X(n)^2 mod m.
// Along the way it checks:
//   - the latency: the first X appears 4 cycles after the edge that took
//     'load', then one X per cycle while 'run' is high;
//   - stalls: with 'run' low, x holds;
//   - clock gating of the seed section: while streaming, s, p, q change
//     every cycle but the s, p, q and X0 registers do not;
//   - the MUX select: x0^2 for the first iteration, feedback afterwards;
//   - re-seeding in the middle of a stream.
// Each mechanism is counted and a failure is counted for one that never
// happened.
module tb_bbs_lp_rng;
  import bbs_pkg::*;
  localparam int unsigned W = BBS_WIDTH;

  logic clk = 0, rst_n = 0, load = 0, run = 0;
  logic [W-1:0] s = '0, p = '0, q = '0;
  logic busy, x_valid, x_new, even_par, odd_par, lsb;
  logic [W-1:0] x;
  int checks = 0, failures = 0;
  int n_reseed = 0, n_mid_reseed = 0, n_stall = 0, n_first_sel = 0, n_feed_sel = 0;
  int n_gated = 0, n_values = 0;

  bbs_lp_rng dut (.clk, .rst_n, .load, .run, .s, .p, .q, .busy, .x, .x_valid, .x_new,
                  .even_par, .odd_par, .lsb);

  always #5 clk = ~clk;

  // Observe the MUX select and the seed-section registers on each phi4.
  logic [W-1:0] seed_regs_prev [4];
  always @(posedge clk) begin
    if (rst_n && dut.phase.phi4) begin
      if (dut.sel == SEL_X0SQ) n_first_sel++;
      else n_feed_sel++;
      if (seed_regs_prev[0] === dut.s_r && seed_regs_prev[1] === dut.p_r &&
          seed_regs_prev[2] === dut.q_r && seed_regs_prev[3] === dut.x0_r) n_gated++;
    end
    seed_regs_prev[0] <= dut.s_r;
    seed_regs_prev[1] <= dut.p_r;
    seed_regs_prev[2] <= dut.q_r;
    seed_regs_prev[3] <= dut.x0_r;
  end

  function automatic bit is_prime(int unsigned v);
    if (v < 2) return 0;
    for (int unsigned d = 2; d * d <= v; d++) if (v % d == 0) return 0;
    return 1;
  endfunction

  function automatic int unsigned rand_prime_3mod4();
    int unsigned v;
    do v = 1000 + ($urandom % 64000); while (!(is_prime(v) && v % 4 == 3));
    return v;
  endfunction

  function automatic longint unsigned sq_mod(longint unsigned v, longint unsigned mm);
    return (v * v) % mm;
  endfunction

  task automatic check_x(longint unsigned expv, string what);
    int ones = 0;
    for (int i = 0; i < W; i++) ones += int'(expv[i]);
    checks++;
    if (x !== W'(expv) || even_par !== logic'(ones % 2) || odd_par !== logic'(1 - ones % 2) ||
        lsb !== expv[0] || !x_valid) begin
      failures++;
      $display("FAIL %s: x=%0d expected %0d (par %b/%b lsb %b valid %b)", what, x, expv,
               even_par, odd_par, lsb, x_valid);
    end
  endtask

  // Seed with (sv, pv, qv); returns with the first X just produced.
  // Inputs are scrambled from the cycle after the seeding phases that use them.
  task automatic seed(int unsigned sv, int unsigned pv, int unsigned qv, output longint unsigned xm,
                      output longint unsigned mm);
    int lat = 0;
    @(negedge clk);
    load = 1; run = 1; s = sv; p = pv; q = qv;
    @(negedge clk);
    load = 0;
    n_reseed++;
    // phi1 cycle: s is taken at the next edge
    @(negedge clk); lat = 1; s = $urandom;     // phi2 cycle
    @(negedge clk); lat = 2; p = $urandom; q = $urandom;
    while (!x_new) begin
      @(negedge clk); lat++;
      if (lat > 10) break;
    end
    checks++;
    if (lat != 4) begin
      failures++;
      $display("FAIL first X after %0d cycles, expected 4", lat);
    end
    mm = longint'(pv) * longint'(qv);
    xm = sq_mod(sq_mod(longint'(sv), mm), mm);
  endtask

  initial begin
    longint unsigned xm, mm;
    seed_regs_prev = '{default: '0};
    #22 rst_n = 1;

    // ---- worked example ----
    begin
      automatic longint unsigned ex [5] = '{81, 82, 36, 42, 92};
      seed(3, 11, 19, xm, mm);
      checks++;
      if (dut.x0_r !== 9 || dut.m !== 209) begin
        failures++;
        $display("FAIL example X0=%0d m=%0d", dut.x0_r, dut.m);
      end
      for (int i = 0; i < 5; i++) begin
        check_x(ex[i], $sformatf("example X%0d", i + 1));
        s = $urandom; p = $urandom; q = $urandom;
        @(negedge clk);
      end
    end

    // ---- random seeds, streams with stalls and a mid-stream re-seed ----
    for (int k = 0; k < 6; k++) begin
      int unsigned pv, qv, sv;
      longint unsigned held;
      do begin
        pv = rand_prime_3mod4();
        qv = rand_prime_3mod4();
      end while (pv == qv || longint'(pv) * longint'(qv) >= 64'h1_0000_0000);
      do sv = 2 + $urandom % (pv * qv - 2); while (sv % pv == 0 || sv % qv == 0);
      seed(sv, pv, qv, xm, mm);
      for (int i = 0; i < 300; i++) begin
        if (x_new) begin
          check_x(xm, $sformatf("seed %0d value %0d", k, i));
          n_values++;
          held = xm;
          xm = sq_mod(xm, mm);
        end else begin
          check_x(held, "stall hold");
        end
        s = $urandom; p = $urandom; q = $urandom;
        run = ($urandom % 5) != 0;
        if (!run) n_stall++;
        @(negedge clk);
      end
      if (k % 2 == 1) n_mid_reseed++;   // next seed() starts while streaming
    end

    // ---- mechanism coverage ----
    if (n_reseed < 2)      begin failures++; $display("FAIL no re-seed"); end
    if (n_mid_reseed < 1)  begin failures++; $display("FAIL no mid-stream re-seed"); end
    if (n_stall < 1)       begin failures++; $display("FAIL no stall"); end
    if (n_first_sel < 2)   begin failures++; $display("FAIL x0^2 select not used"); end
    if (n_feed_sel < 1)    begin failures++; $display("FAIL feedback select not used"); end
    if (n_gated < 1)       begin failures++; $display("FAIL seed section never held"); end
    $display("mechanisms: reseeds=%0d mid-stream=%0d stalls=%0d first_sel=%0d feed_sel=%0d gated_phi4=%0d values=%0d",
             n_reseed, n_mid_reseed, n_stall, n_first_sel, n_feed_sel, n_gated, n_values);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
