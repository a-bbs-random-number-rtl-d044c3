// tb_bbs_widths - the generator at the three evaluated word widths.
//
// Runs bbs_lp_rng at 8, 16 and 32 bits side by side. The 8-bit instance
// uses the worked example (s = 3, p = 11, q = 19) and draws 512 samples;
// the 16- and 32-bit instances use primes congruent to 3 mod 4 whose
// product fills most of the word (163 * 251 and 65519 * 65479) and draw
// 512 samples each. Every value is checked against a software model.
module tb_bbs_widths;
  logic clk = 0, rst_n = 0;
  logic done8, done16, done32;
  int c8, c16, c32, f8, f16, f32;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bbs_width_run #(.W(8),  .S(3),     .P(11),    .Q(19),    .N(512)) u8
    (.clk, .rst_n, .done(done8),  .checks(c8),  .failures(f8));
  bbs_width_run #(.W(16), .S(12345), .P(163),   .Q(251),   .N(512)) u16
    (.clk, .rst_n, .done(done16), .checks(c16), .failures(f16));
  bbs_width_run #(.W(32), .S(987654321), .P(65519), .Q(65479), .N(512)) u32
    (.clk, .rst_n, .done(done32), .checks(c32), .failures(f32));

  initial begin
    #22 rst_n = 1;
    wait (done8 && done16 && done32);
    checks = c8 + c16 + c32;
    failures = f8 + f16 + f32;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c32, f8 + f16 + f32 + 1);
    $finish;
  end
endmodule
