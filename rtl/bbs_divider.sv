// bbs_divider - unsigned 2W / W divider giving quotient and residue.
//
// Computes A mod B (pin R) for the two modular reductions of the
// generator: s^2 mod m in the seed section and x^2 mod m in the stream
// section. The quotient (pin Q) is produced as drawn but not needed by the
// generator. Combinational; the internal structure is not given, so the
// '/' and '%' operators are used. A zero divisor is this design's own
// choice to define: Q is all ones and R equals the low W bits of A.
module bbs_divider #(
  parameter int unsigned W = bbs_pkg::BBS_WIDTH
) (
  input  logic [2*W-1:0] a,  // dividend A
  input  logic [W-1:0]   b,  // divisor B (the modulus m)
  output logic [2*W-1:0] q,  // quotient A / B
  output logic [W-1:0]   r   // residue A mod B
);

  logic [2*W-1:0] b_ext;

  always_comb begin
    b_ext = {{W{1'b0}}, b};
    if (b == '0) begin
      q = '1;
      r = a[W-1:0];
    end else begin
      q = a / b_ext;
      r = W'(a % b_ext);
    end
  end

endmodule
