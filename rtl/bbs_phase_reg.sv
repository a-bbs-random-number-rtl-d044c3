// bbs_phase_reg - word register loaded in one phase of the generator.
//
// Every register of the generator (s on phi1, p and q on phi2, X0 on phi3,
// the output X on phi4) is one of these. It loads D only in the clock
// cycle whose phase strobe 'ld' is high and otherwise holds its value, so
// the multipliers and dividers it feeds see a constant operand and do not
// toggle; it also stops glitches on the primary inputs from reaching the
// arithmetic. The phase clocks are realised as clock enables of one clock
// (the form an FPGA implements gated clocks in) - this design's choice.
// Asynchronous active-low reset to zero, also this design's choice.
module bbs_phase_reg #(
  parameter int unsigned W = bbs_pkg::BBS_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,   // phase strobe: load d at this rising edge
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end

endmodule
