// tb_bbs_divider - self-checking test of the 2W / W divider.
//
// For random and corner dividends and divisors it checks the division
// identity a = q*b + r with r < b, and the defined zero-divisor result.
// Includes the reductions of the worked example (m = 209).
module tb_bbs_divider;
  localparam int unsigned W = 32;

  logic [2*W-1:0] a, q;
  logic [W-1:0]   b, r;
  int checks = 0, failures = 0;

  bbs_divider #(.W(W)) dut (.a, .b, .q, .r);

  task automatic try(logic [2*W-1:0] x, logic [W-1:0] y);
    logic [3*W-1:0] recon;
    a = x; b = y;
    #1;
    checks++;
    if (y == 0) begin
      if (q !== '1 || r !== x[W-1:0]) begin
        failures++;
        $display("FAIL divide by zero: q=%h r=%h", q, r);
      end
    end else begin
      recon = {{W{1'b0}}, q} * {{2*W{1'b0}}, y} + {{2*W{1'b0}}, r};
      if (recon !== {{W{1'b0}}, x} || r >= y) begin
        failures++;
        $display("FAIL %0d / %0d gives q=%0d r=%0d", x, y, q, r);
      end
    end
  endtask

  task automatic try_exact(logic [2*W-1:0] x, logic [W-1:0] y, logic [W-1:0] rr);
    a = x; b = y;
    #1;
    checks++;
    if (r !== rr) begin
      failures++;
      $display("FAIL %0d mod %0d = %0d, expected %0d", x, y, r, rr);
    end
  endtask

  initial begin
    // Worked example: 3^2, 9^2, 81^2, 82^2, 36^2, 42^2 mod 209.
    try_exact(9, 209, 9);     try_exact(81, 209, 81);  try_exact(6561, 209, 82);
    try_exact(6724, 209, 36); try_exact(1296, 209, 42); try_exact(1764, 209, 92);
    try(0, 1); try('1, 1); try('1, '1); try(5, 7); try(7, 7); try(123, 0);
    for (int i = 0; i < 500; i++) try({$urandom, $urandom}, $urandom);
    for (int i = 0; i < 200; i++) try({$urandom, $urandom}, $urandom & 32'h3ff);
    for (int i = 0; i < 100; i++) try({32'h0, $urandom}, $urandom);
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
