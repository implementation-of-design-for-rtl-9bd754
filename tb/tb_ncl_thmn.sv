// tb_ncl_thmn: self-checking test of the TH_mn threshold gate.
//
// Four gate sizes (TH12, TH22, TH23, TH34) are driven with random input
// words; a reference model keeps the expected output: 1 once at least M
// inputs are high, 0 once all are low, otherwise the previous value. rst is
// exercised on the TH22 instance. A time-based watchdog ends a hung run.
module tb_ncl_thmn;

  int checks = 0, failures = 0;

  logic [1:0] a12, a22;
  logic [2:0] a23;
  logic [3:0] a34;
  logic       rst22;
  logic       z12, z22, z23, z34;
  logic       e12, e22, e23, e34;

  ncl_thmn #(.M(1), .N(2)) u12 (.a(a12), .rst(1'b0), .z(z12));
  ncl_thmn #(.M(2), .N(2)) u22 (.a(a22), .rst(rst22), .z(z22));
  ncl_thmn #(.M(2), .N(3)) u23 (.a(a23), .rst(1'b0), .z(z23));
  ncl_thmn #(.M(3), .N(4)) u34 (.a(a34), .rst(1'b0), .z(z34));

  function automatic logic model(input int ones, input int m, input logic prev);
    if (ones >= m) return 1'b1;
    if (ones == 0) return 1'b0;
    return prev;
  endfunction

  task automatic check(input string name, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", name, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a12 = '0; a22 = '0; a23 = '0; a34 = '0; rst22 = 1'b0;
    e12 = 0; e22 = 0; e23 = 0; e34 = 0;
    #1;
    check("th12 init", z12, 0); check("th22 init", z22, 0);
    check("th23 init", z23, 0); check("th34 init", z34, 0);
    // Directed hysteresis on TH23: 1 input -> 0, 2 -> 1, back to 1 -> still 1.
    a23 = 3'b001; #1 check("th23 one", z23, 0);
    a23 = 3'b011; #1 check("th23 two", z23, 1);
    a23 = 3'b010; #1 check("th23 hold", z23, 1);
    a23 = 3'b000; #1 check("th23 clear", z23, 0);
    a23 = 3'b100; #1 check("th23 hold0", z23, 0);
    a23 = 3'b000; #1;
    // Reset forces TH22 low even with both inputs high.
    a22 = 2'b11; #1 check("th22 set", z22, 1);
    rst22 = 1; #1 check("th22 rst", z22, 0);
    rst22 = 0; #1 check("th22 after rst", z22, 1);
    a22 = 2'b00; #1 check("th22 clr", z22, 0);
    e22 = 0; e23 = 0;
    for (int i = 0; i < 2000; i++) begin
      a12 = 2'($urandom); a22 = 2'($urandom); a23 = 3'($urandom); a34 = 4'($urandom);
      // Bias towards the all-zero word so the reset condition happens often.
      if ($urandom_range(0, 3) == 0) a34 = '0;
      if ($urandom_range(0, 3) == 0) a23 = '0;
      #1;
      e12 = model($countones(a12), 1, e12);
      e22 = model($countones(a22), 2, e22);
      e23 = model($countones(a23), 2, e23);
      e34 = model($countones(a34), 3, e34);
      check("th12", z12, e12); check("th22", z22, e22);
      check("th23", z23, e23); check("th34", z34, e34);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
