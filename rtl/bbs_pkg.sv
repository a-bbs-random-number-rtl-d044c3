// bbs_pkg - shared definitions of the low-power Blum Blum Shub generator.
//
// Holds the default word width and the state encoding of the phase
// controller. The 32-bit default is the word width of the generator whose
// power was measured; 8 and 16 bits are the other evaluated widths.
package bbs_pkg;

  // Word width of s, p, q, m and every X value.
  parameter int unsigned BBS_WIDTH = 32;

  // Phase controller states. SEED_S, SEED_PQ and SEED_X0 are the three
  // seeding phases (phi1, phi2, phi3); FIRST and STREAM both fire phi4,
  // with the MUX taking x0^2 in FIRST and the squared feedback in STREAM.
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,
    ST_SEED_S  = 3'd1,
    ST_SEED_PQ = 3'd2,
    ST_SEED_X0 = 3'd3,
    ST_FIRST   = 3'd4,
    ST_STREAM  = 3'd5
  } bbs_state_e;

  // MUX select encoding.
  typedef enum logic {
    SEL_X0SQ = 1'b0,  // first iteration: x0^2
    SEL_FEED = 1'b1   // later iterations: x_n^2 from the output register
  } bbs_sel_e;

  // Phase strobes. Each one enables the registers of one phase for one
  // clock cycle; a register whose phase is idle receives no load.
  typedef struct packed {
    logic phi1;  // load s
    logic phi2;  // load p and q
    logic phi3;  // load X0 = s^2 mod m
    logic phi4;  // load the output register X(n+1)
  } bbs_phase_t;

endpackage
