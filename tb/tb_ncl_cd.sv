// tb_ncl_cd: self-checking test of the completion detector.
//
// Three sizes: N = 2 and 3 (single gate, as in the adder) and N = 9 (two-level
// tree). Inputs are raised one by one in a random order, then lowered one by
// one; the output must change only when the last input has changed.
module tb_ncl_cd;

  int checks = 0, failures = 0;

  logic [1:0] k2;
  logic [2:0] k3;
  logic [8:0] k9;
  logic       z2, z3, z9;

  ncl_cd #(.N(2)) u2 (.ko_in(k2), .z(z2));
  ncl_cd #(.N(3)) u3 (.ko_in(k3), .z(z3));
  ncl_cd #(.N(9)) u9 (.ko_in(k9), .z(z9));

  task automatic check(input string name, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", name, got, exp);
    end
  endtask

  // Walk all N inputs of one detector to level v in a random order.
  task automatic walk(input int n, input logic v);
    int order [9];
    for (int i = 0; i < n; i++) order[i] = i;
    for (int i = n - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(0, i);
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
    for (int i = 0; i < n; i++) begin
      case (n)
        2: k2[order[i]] = v;
        3: k3[order[i]] = v;
        default: k9[order[i]] = v;
      endcase
      #1;
      case (n)
        2: check("n2", z2, (i == n - 1) ? v : ~v);
        3: check("n3", z3, (i == n - 1) ? v : ~v);
        default: check("n9", z9, (i == n - 1) ? v : ~v);
      endcase
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
    k2 = '0; k3 = '0; k9 = '0;
    #1 check("n2 init", z2, 0); check("n3 init", z3, 0); check("n9 init", z9, 0);
    for (int t = 0; t < 200; t++) begin
      walk(2, 1'b1); walk(2, 1'b0);
      walk(3, 1'b1); walk(3, 1'b0);
      walk(9, 1'b1); walk(9, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
