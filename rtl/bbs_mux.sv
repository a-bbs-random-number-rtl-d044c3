// bbs_mux - selects the dividend of the stream divider.
//
// With sel = SEL_X0SQ the stream divider reduces x0^2 (from the seed
// section), producing X1; with sel = SEL_FEED it reduces x_n^2, the square
// of the value held in the output register, producing X(n+1). Combinational,
// 2W bits wide.
module bbs_mux #(
  parameter int unsigned W = bbs_pkg::BBS_WIDTH
) (
  input  bbs_pkg::bbs_sel_e sel,
  input  logic [2*W-1:0]    x0_sq,  // x0^2 from the seed section
  input  logic [2*W-1:0]    fb_sq,  // x_n^2 from the feedback path
  output logic [2*W-1:0]    y
);

  always_comb begin
    unique case (sel)
      bbs_pkg::SEL_X0SQ: y = x0_sq;
      bbs_pkg::SEL_FEED: y = fb_sq;
      default:           y = fb_sq;
    endcase
  end

endmodule
