// tb_bbs_controller - self-checking test of the phase sequencer.
//
// A directed part checks the seeding latency (phi1, phi2, phi3 in the three
// cycles after 'load', the first phi4 with the x0^2 select in the fourth),
// the feedback select afterwards, stalling with 'run' low and re-seeding.
// A random part drives 'load' and 'run' and compares every cycle with a
// cycle-count model: after a load the next three cycles are seeding phases,
// then each cycle with run high and no load is one phi4.
module tb_bbs_controller;
  import bbs_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, run = 0;
  bbs_phase_t phase;
  bbs_sel_e   sel;
  logic busy, x_valid, x_new;
  int checks = 0, failures = 0;

  bbs_controller dut (.clk, .rst_n, .load, .run, .phase, .sel, .busy, .x_valid, .x_new);

  always #5 clk = ~clk;

  task automatic expect_cycle(string what, bbs_phase_t ph, logic first_sel, logic check_sel);
    checks++;
    if (phase !== ph || (check_sel && (sel == SEL_X0SQ) !== first_sel)) begin
      failures++;
      $display("FAIL %s: phase=%b sel=%0d", what, phase, sel);
    end
  endtask

  // Model state for the random part.
  int  seed_left;     // seeding phases still to come (3, 2, 1) or 0
  bit  seeded;        // X0 is loaded
  bit  first_pending; // next phi4 is the first after seeding
  bit  mvalid, mnew;

  initial begin
    #12 rst_n = 1;
    // ---- directed ----
    @(negedge clk);
    expect_cycle("idle", 4'b0000, 0, 0);
    load = 1; run = 1;
    @(negedge clk); load = 0;
    expect_cycle("phi1", 4'b1000, 0, 0);
    checks++; if (!busy) begin failures++; $display("FAIL busy low in phi1"); end
    @(negedge clk); expect_cycle("phi2", 4'b0100, 0, 0);
    @(negedge clk); expect_cycle("phi3", 4'b0010, 0, 0);
    @(negedge clk); expect_cycle("first phi4", 4'b0001, 1, 1);
    checks++; if (busy || x_valid) begin failures++; $display("FAIL busy/x_valid before X1"); end
    @(negedge clk); expect_cycle("stream phi4", 4'b0001, 0, 1);
    checks++; if (!x_valid || !x_new) begin failures++; $display("FAIL x_valid/x_new after X1"); end
    run = 0;
    @(negedge clk); expect_cycle("stall", 4'b0000, 0, 0);
    @(negedge clk);
    checks++; if (x_new || !x_valid) begin failures++; $display("FAIL x_new during stall"); end
    run = 1; load = 1;
    @(negedge clk); load = 0;
    expect_cycle("reseed phi1", 4'b1000, 0, 0);
    checks++; if (x_valid) begin failures++; $display("FAIL x_valid kept over reseed"); end

    // ---- random, against the model ----
    repeat (3) @(negedge clk);
    seed_left = 0; seeded = 1; first_pending = 1; mvalid = 0; mnew = 0;
    for (int i = 0; i < 2000; i++) begin
      bbs_phase_t exp_ph;
      logic exp_first;
      load = ($urandom % 23) == 0;
      run  = ($urandom % 4) != 0;
      #1;
      exp_ph = '0; exp_first = 0;
      if (seed_left == 3) exp_ph.phi1 = 1;
      else if (seed_left == 2) exp_ph.phi2 = 1;
      else if (seed_left == 1) exp_ph.phi3 = 1;
      else if (seeded && !load && run) begin exp_ph.phi4 = 1; exp_first = first_pending; end
      expect_cycle("random", exp_ph, exp_first, exp_ph.phi4);
      checks++;
      if (x_valid !== mvalid || x_new !== mnew || busy !== (seed_left != 0)) begin
        failures++;
        $display("FAIL flags at %0d: valid=%b new=%b busy=%b", i, x_valid, x_new, busy);
      end
      // advance the model by one edge
      mnew = exp_ph.phi4;
      if (exp_ph.phi4) begin mvalid = 1; first_pending = 0; end
      if (seed_left != 0) begin
        seed_left--;
        if (seed_left == 0) begin seeded = 1; first_pending = 1; end
      end else if (load) begin
        seed_left = 3; seeded = 0; mvalid = 0;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
