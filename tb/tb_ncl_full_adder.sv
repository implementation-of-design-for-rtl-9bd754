// tb_ncl_full_adder: self-checking test of the dual-rail full adder.
//
// For each of the eight input combinations, in a random arrival order: the
// outputs must stay NULL until the last input is DATA (input-completeness),
// must then show sum and carry of the three bits, must hold while the inputs
// return to NULL one by one, and must be NULL once all inputs are NULL.
module tb_ncl_full_adder;
  import ncl_pkg::*;

  int checks = 0, failures = 0;

  dr_t in [3];
  dr_t s, co;

  ncl_full_adder dut (.a(in[0]), .b(in[1]), .ci(in[2]), .s(s), .co(co));

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
    for (int i = 0; i < 3; i++) in[i] = DR_NULL;
    #1 check("null", DR_NULL, DR_NULL);
    for (int t = 0; t < 400; t++) begin
      logic [2:0] v;
      int first, ones, i;
      dr_t es, eco;
      v = (t < 8) ? 3'(t) : 3'($urandom);
      first = $urandom_range(0, 2);
      ones = int'(v[0]) + int'(v[1]) + int'(v[2]);
      es  = dr_data(ones[0]);
      eco = dr_data(ones >= 2);
      for (int k = 0; k < 3; k++) begin
        i = (first + k) % 3;
        in[i] = dr_data(v[i]);
        #1;
        if (k < 2) check("incomplete DATA", DR_NULL, DR_NULL);
        else       check("DATA", es, eco);
      end
      for (int k = 0; k < 3; k++) begin
        i = (first + k) % 3;
        in[i] = DR_NULL;
        #1;
        if (k < 2) check("incomplete NULL", es, eco);
        else       check("NULL", DR_NULL, DR_NULL);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
