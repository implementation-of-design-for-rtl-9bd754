// tb_dft_test_point: checks the feedback test point: with tc = 0 the
// acknowledge passes unchanged, with tc = 1 it is inverted, so the tester can
// set the register's ki to either value whatever the detector says.
module tb_dft_test_point;

  int checks = 0, failures = 0;
  logic fb, tc, y;

  dft_test_point dut (.fb(fb), .tc(tc), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      logic exp;
      {tc, fb} = 2'(i);
      exp = tc ? !fb : fb;
      #1 checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL fb=%b tc=%b y=%b", fb, tc, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
