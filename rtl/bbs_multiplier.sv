// bbs_multiplier - unsigned W x W multiplier of the BBS datapath.
//
// Used four times in the generator: s*s and p*q in the seed section, x0*x0
// ahead of the MUX, and x_n*x_n on the feedback path. Purely
// combinational: the product follows the operands, so it only toggles when
// the phase register feeding it is loaded. The full 2W-bit product is
// returned. The block is drawn with pins A, B and M; its internal structure
// is not given, so the plain '*' operator is used and left to synthesis.
module bbs_multiplier #(
  parameter int unsigned W = bbs_pkg::BBS_WIDTH
) (
  input  logic [W-1:0]   a,  // operand A
  input  logic [W-1:0]   b,  // operand B
  output logic [2*W-1:0] m   // product A*B
);

  always_comb begin
    m = {{W{1'b0}}, a} * {{W{1'b0}}, b};
  end

endmodule
