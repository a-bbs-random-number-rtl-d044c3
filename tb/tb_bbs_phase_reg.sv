// tb_bbs_phase_reg - self-checking test of the phase-loaded register.
//
// Checks reset to zero, loading only at edges where the phase strobe is
// high, and holding (while the input keeps changing) when it is low.
module tb_bbs_phase_reg;
  localparam int unsigned W = 32;

  logic clk = 0, rst_n = 0, ld = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  bbs_phase_reg #(.W(W)) dut (.clk, .rst_n, .ld, .d, .q);

  always #5 clk = ~clk;

  initial begin
    d = $urandom;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value %h", q); end
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ld = ($urandom % 3) == 0;
      d  = $urandom;
      if (ld) model = d;
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d ld=%b q=%h expected %h", i, ld, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
