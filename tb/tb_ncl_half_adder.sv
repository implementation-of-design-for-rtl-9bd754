// tb_ncl_half_adder: self-checking test of the dual-rail half adder.
//
// All four combinations, both arrival orders: outputs stay NULL with one
// input DATA, show a^b and a&b with both, hold while one input is NULL, and
// are NULL with both inputs NULL.
module tb_ncl_half_adder;
  import ncl_pkg::*;

  int checks = 0, failures = 0;

  dr_t a, b, s, co;

  ncl_half_adder dut (.a(a), .b(b), .s(s), .co(co));

  task automatic check(input string name, input dr_t es, input dr_t eco);
    checks++;
    if (s !== es || co !== eco) begin
      failures++;
      $display("FAIL %s: s=%b co=%b expected s=%b co=%b", name, s, co, es, eco);
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
    a = DR_NULL; b = DR_NULL;
    #1 check("null", DR_NULL, DR_NULL);
    for (int t = 0; t < 8; t++) begin
      logic va, vb;
      dr_t es, eco;
      va = t[0]; vb = t[1];
      es = dr_data(va != vb); eco = dr_data(va && vb);
      if (t[2]) a = dr_data(va); else b = dr_data(vb);
      #1 check("one input", DR_NULL, DR_NULL);
      if (t[2]) b = dr_data(vb); else a = dr_data(va);
      #1 check("DATA", es, eco);
      if (t[2]) b = DR_NULL; else a = DR_NULL;
      #1 check("hold", es, eco);
      a = DR_NULL; b = DR_NULL;
      #1 check("NULL", DR_NULL, DR_NULL);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
