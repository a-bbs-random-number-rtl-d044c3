// bbs_controller - phase sequencer of the low-power BBS generator.
//
// A small FSM that decides which register group is clocked in each cycle.
// A 'load' request runs the three seeding phases in turn - phi1 loads s,
// phi2 loads p and q, phi3 loads X0 = s^2 mod m - after which the whole
// seed section stays unclocked until the next 'load'. From then on only
// phi4, the output register, is clocked, once per cycle while 'run' is
// high; the first phi4 after seeding selects x0^2 at the MUX, every later
// one the squared feedback. With 'run' low no phase is active and the
// whole datapath holds.
//
// Timing: 'load' sampled high at a rising edge starts phi1 in the next
// cycle; phi1, phi2, phi3 then occupy one cycle each, so the first phi4
// can come in the fourth cycle after the edge that took 'load'. s must be
// held on the inputs through the phi1 cycle and p, q through the phi2
// cycle ('busy' covers all three). 'load' takes priority over 'run'.
//
// The phase order and the exclusive use of phi4 in streaming follow the
// described operation; the one-cycle-per-phase timing, the run/load
// handshake and the x_valid/x_new flags are this design's own choices.
module bbs_controller
  import bbs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,     // (re)seed from the s, p, q inputs
  input  logic       run,      // produce one X per cycle while high
  output bbs_phase_t phase,    // phase strobes phi1..phi4
  output bbs_sel_e   sel,      // MUX select for the stream divider
  output logic       busy,     // seeding phases in progress
  output logic       x_valid,  // output register holds a value of the current seed
  output logic       x_new     // output register was loaded at the last edge
);

  bbs_state_e state, state_nx;

  always_comb begin
    state_nx = state;
    phase    = '0;
    sel      = SEL_FEED;
    unique case (state)
      ST_IDLE: begin
        if (load) state_nx = ST_SEED_S;
      end
      ST_SEED_S: begin
        phase.phi1 = 1'b1;
        state_nx   = ST_SEED_PQ;
      end
      ST_SEED_PQ: begin
        phase.phi2 = 1'b1;
        state_nx   = ST_SEED_X0;
      end
      ST_SEED_X0: begin
        phase.phi3 = 1'b1;
        state_nx   = ST_FIRST;
      end
      ST_FIRST: begin
        sel = SEL_X0SQ;
        if (load) begin
          state_nx = ST_SEED_S;
        end else if (run) begin
          phase.phi4 = 1'b1;
          state_nx   = ST_STREAM;
        end
      end
      ST_STREAM: begin
        if (load) begin
          state_nx = ST_SEED_S;
        end else if (run) begin
          phase.phi4 = 1'b1;
        end
      end
      default: state_nx = ST_IDLE;
    endcase
  end

  assign busy = (state == ST_SEED_S) || (state == ST_SEED_PQ) || (state == ST_SEED_X0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      x_valid <= 1'b0;
      x_new   <= 1'b0;
    end else begin
      state <= state_nx;
      x_new <= phase.phi4;
      if (phase.phi4)           x_valid <= 1'b1;
      else if (state_nx == ST_SEED_S) x_valid <= 1'b0;
    end
  end

  // At most one phase is clocked in any cycle.
  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(phase))
    else $error("bbs_controller: more than one phase active");

endmodule
