// tb_bbs_mux - self-checking test of the stream-divider input MUX.
//
// Applies random operand pairs with both select values and checks that the
// output follows x0^2 for SEL_X0SQ and the feedback square for SEL_FEED.
module tb_bbs_mux;
  import bbs_pkg::*;
  localparam int unsigned W = 32;

  bbs_sel_e       sel;
  logic [2*W-1:0] x0_sq, fb_sq, y;
  int checks = 0, failures = 0;

  bbs_mux #(.W(W)) dut (.sel, .x0_sq, .fb_sq, .y);

  initial begin
    for (int i = 0; i < 200; i++) begin
      x0_sq = {$urandom, $urandom};
      fb_sq = {$urandom, $urandom};
      sel = (i % 2 == 0) ? SEL_X0SQ : SEL_FEED;
      #1;
      checks++;
      if (y !== ((i % 2 == 0) ? x0_sq : fb_sq)) begin
        failures++;
        $display("FAIL sel=%0d y=%h", sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
