// bbs_width_run - drives one generator instance of a given width.
//
// Test helper: seeds a bbs_lp_rng of width W with (S, P, Q), streams N
// values with 'run' held high, and checks each against the model
// X(n+1) = X(n)^2 mod P*Q and the one-value-per-cycle rate. It also
// histograms the values into four quarter of m/4 and fails if a bin stays
// empty (a coarse look at the spread of the sequence). Reports its counts
// on its ports when 'done' rises.
module bbs_width_run #(
  parameter int unsigned W = 8,
  parameter longint unsigned S = 3,
  parameter longint unsigned P = 11,
  parameter longint unsigned Q = 19,
  parameter int unsigned N = 512
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  logic load = 0, run = 0;
  logic [W-1:0] s = W'(S), p = W'(P), q = W'(Q), x;
  logic busy, x_valid, x_new, even_par, odd_par, lsb;
  int quarter [4];

  bbs_lp_rng #(.W(W)) dut (.clk, .rst_n, .load, .run, .s, .p, .q, .busy, .x, .x_valid, .x_new,
                           .even_par, .odd_par, .lsb);

  initial begin
    longint unsigned xm, mm;
    automatic int got = 0, cycles = 0;
    done = 0; checks = 0; failures = 0;
    quarter = '{default: 0};
    mm = P * Q;
    xm = ((S * S) % mm) ** 2 % mm;
    @(posedge rst_n);
    @(negedge clk); load = 1; run = 1;
    @(negedge clk); load = 0;
    while (got < N && cycles < 4 * N + 20) begin
      @(negedge clk);
      cycles++;
      if (x_new) begin
        checks++;
        if (longint'(x) != xm || even_par != ^x || lsb != x[0]) begin
          failures++;
          $display("FAIL W=%0d value %0d: x=%0d expected %0d", W, got, x, xm);
        end
        quarter[int'(xm * 4 / mm)]++;
        xm = (xm * xm) % mm;
        got++;
      end
    end
    // first value in the 4th cycle after load, then one per cycle
    checks++;
    if (got != N || cycles != N + 3) begin
      failures++;
      $display("FAIL W=%0d: %0d values in %0d cycles", W, got, cycles);
    end
    checks++;
    if (quarter[0] == 0 || quarter[1] == 0 || quarter[2] == 0 || quarter[3] == 0) begin
      failures++;
      $display("FAIL W=%0d: empty quarter in %0d %0d %0d %0d", W, quarter[0], quarter[1], quarter[2], quarter[3]);
    end
    $display("W=%0d m=%0d: %0d values, quarters %0d %0d %0d %0d", W, mm, got,
             quarter[0], quarter[1], quarter[2], quarter[3]);
    done = 1;
  end
endmodule
