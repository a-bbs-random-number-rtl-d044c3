// bbs_bit_gen - output bit extraction of the BBS generator.
//
// From each generated value X it derives the three output bits the
// generator can deliver: the even parity bit (the XOR of all bits of X,
// which makes the count of ones including it even), the odd parity bit (its
// complement) and the least significant bit of X. The full X is also
// available to the user at the top level. Combinational.
module bbs_bit_gen #(
  parameter int unsigned W = bbs_pkg::BBS_WIDTH
) (
  input  logic [W-1:0] x,
  output logic         even_par,
  output logic         odd_par,
  output logic         lsb
);

  always_comb begin
    even_par = ^x;
    odd_par  = ~even_par;
    lsb      = x[0];
  end

endmodule
