// tb_bbs_multiplier - self-checking test of the W x W multiplier.
//
// Drives corner operands (zero, one, all ones) and random operands at the
// default 32-bit width and compares the product with a shift-and-add
// reference computed in the testbench.
module tb_bbs_multiplier;
  localparam int unsigned W = 32;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] m;
  int checks = 0, failures = 0;

  bbs_multiplier #(.W(W)) dut (.a, .b, .m);

  function automatic logic [2*W-1:0] ref_mul(logic [W-1:0] x, logic [W-1:0] y);
    logic [2*W-1:0] acc = '0;
    for (int i = 0; i < W; i++)
      if (y[i]) acc += {{W{1'b0}}, x} << i;
    return acc;
  endfunction

  task automatic try(logic [W-1:0] x, logic [W-1:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (m !== ref_mul(x, y)) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", x, y, m, ref_mul(x, y));
    end
  endtask

  initial begin
    try(0, 0); try(1, 1); try('1, '1); try('1, 1); try(3, 3); try(11, 19); try(81, 81);
    for (int i = 0; i < 500; i++) try($urandom, $urandom);
    for (int i = 0; i < 100; i++) try($urandom & 32'hffff, $urandom & 32'hffff);
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
