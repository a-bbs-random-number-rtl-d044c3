// tb_bbs_bit_gen - self-checking test of the output bit extraction.
//
// Checks the values of the worked BBS example (9, 81, 82, 36, 42, 92 with
// even parity 0,1,1,0,1,0) and random words, counting ones bit by bit for
// the reference parity.
module tb_bbs_bit_gen;
  localparam int unsigned W = 32;

  logic [W-1:0] x;
  logic even_par, odd_par, lsb;
  int checks = 0, failures = 0;

  bbs_bit_gen #(.W(W)) dut (.x, .even_par, .odd_par, .lsb);

  task automatic try(logic [W-1:0] v);
    int ones = 0;
    for (int i = 0; i < W; i++) ones += int'(v[i]);
    x = v;
    #1;
    checks++;
    if (even_par !== logic'(ones % 2) || odd_par !== logic'(1 - ones % 2) || lsb !== v[0]) begin
      failures++;
      $display("FAIL x=%0d even=%b odd=%b lsb=%b", v, even_par, odd_par, lsb);
    end
  endtask

  localparam logic [W-1:0] EX_X [6]   = '{9, 81, 82, 36, 42, 92};
  localparam logic         EX_EVEN [6] = '{0, 1, 1, 0, 1, 0};

  initial begin
    for (int i = 0; i < 6; i++) begin
      try(EX_X[i]);
      checks++;
      if (even_par !== EX_EVEN[i] || odd_par !== !EX_EVEN[i]) begin
        failures++;
        $display("FAIL example X%0d=%0d parity %b/%b", i, EX_X[i], even_par, odd_par);
      end
    end
    try(0); try('1);
    for (int i = 0; i < 300; i++) try($urandom);
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
