// bbs_lp_rng - low-power Blum Blum Shub pseudo random number generator.
//
// Computes the BBS sequence X0 = s^2 mod m, X(n+1) = X(n)^2 mod m with
// m = p*q. The datapath is split in two sections that are clocked
// separately:
//   seed section   - input registers s (phi1) and p, q (phi2), multipliers
//                    s*s and p*q, the divider giving X0 = s^2 mod m, and the
//                    X0 register (phi3);
//   stream section - the x0*x0 multiplier, a MUX choosing x0^2 or the
//                    squared feedback, the divider giving x^2 mod m and the
//                    output register (phi4), plus the output bit extraction.
// After the three seeding phases only phi4 is clocked, so s, p, q, m and X0
// stay constant and the seed-section arithmetic does not toggle; only the
// feedback squarer, the MUX output, the stream divider and the output
// register change. This partitioning, the register placement and the phase
// order follow the described architecture. The squarer on the feedback
// path is this design's addition: without it the loop would compute
// X mod m instead of X^2 mod m.
//
// Interface: pulse 'load' with s, p, q on the inputs (held while 'busy');
// hold 'run' high to get one new X per clock cycle on 'x' ('x_new' marks
// each one). The first X after seeding is X1 = X0^2 mod m and appears four
// cycles after the edge that took 'load' (three seeding phases plus one
// phi4). p*q must fit in W bits and be non-zero, and s should share no
// factor with m; p and q should be primes congruent to 3 mod 4. These are
// conditions on the caller and are not checked in hardware (a simulation
// assertion flags an m that does not fit).
module bbs_lp_rng
  import bbs_pkg::*;
#(
  parameter int unsigned W = BBS_WIDTH  // word width of s, p, q, m and X
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,      // (re)seed from s, p, q
  input  logic         run,       // generate one X per cycle while high
  input  logic [W-1:0] s,         // seed (from a true random source)
  input  logic [W-1:0] p,         // prime p
  input  logic [W-1:0] q,         // prime q
  output logic         busy,      // seeding in progress
  output logic [W-1:0] x,         // current X(n)
  output logic         x_valid,   // x holds a value of the current seed
  output logic         x_new,     // x was updated at the last edge
  output logic         even_par,  // even parity bit of x
  output logic         odd_par,   // odd parity bit of x
  output logic         lsb        // least significant bit of x
);

  bbs_phase_t phase;
  bbs_sel_e   sel;

  // ---------------- seed section ----------------
  logic [W-1:0]   s_r, p_r, q_r, m, x0_r, x0_d;
  logic [2*W-1:0] s_sq, m_full, seed_q;

  bbs_phase_reg #(.W(W)) u_reg_s (.clk, .rst_n, .ld(phase.phi1), .d(s), .q(s_r));
  bbs_phase_reg #(.W(W)) u_reg_p (.clk, .rst_n, .ld(phase.phi2), .d(p), .q(p_r));
  bbs_phase_reg #(.W(W)) u_reg_q (.clk, .rst_n, .ld(phase.phi2), .d(q), .q(q_r));

  bbs_multiplier #(.W(W)) u_mul_ss (.a(s_r), .b(s_r), .m(s_sq));
  bbs_multiplier #(.W(W)) u_mul_pq (.a(p_r), .b(q_r), .m(m_full));
  assign m = m_full[W-1:0];

  bbs_divider #(.W(W)) u_div_seed (.a(s_sq), .b(m), .q(seed_q), .r(x0_d));
  bbs_phase_reg #(.W(W)) u_reg_x0 (.clk, .rst_n, .ld(phase.phi3), .d(x0_d), .q(x0_r));

  // ---------------- stream section ----------------
  logic [2*W-1:0] x0_sq, fb_sq, dividend, stream_q;
  logic [W-1:0]   x_d;

  bbs_multiplier #(.W(W)) u_mul_x0 (.a(x0_r), .b(x0_r), .m(x0_sq));
  bbs_multiplier #(.W(W)) u_mul_fb (.a(x), .b(x), .m(fb_sq));
  bbs_mux        #(.W(W)) u_mux    (.sel, .x0_sq, .fb_sq, .y(dividend));
  bbs_divider    #(.W(W)) u_div_st (.a(dividend), .b(m), .q(stream_q), .r(x_d));
  bbs_phase_reg  #(.W(W)) u_reg_x  (.clk, .rst_n, .ld(phase.phi4), .d(x_d), .q(x));

  bbs_bit_gen #(.W(W)) u_bits (.x, .even_par, .odd_par, .lsb);

  // ---------------- control ----------------
  bbs_controller u_ctrl (.clk, .rst_n, .load, .run, .phase, .sel, .busy, .x_valid, .x_new);

  // The modulus must fit the word width and be non-zero.
  a_m_fits: assert property (@(posedge clk) disable iff (!rst_n)
                             phase.phi3 |-> (m_full[2*W-1:W] == '0 && m != '0))
    else $error("bbs_lp_rng: p*q does not fit in %0d bits or is zero", W);

endmodule
