// tb_ncl_reg: self-checking test of the W-bit NCL register (W = 3 and 2).
//
// Four-phase sequences: a random DATA word is applied, ki is raised, the bits'
// ko lines must go rfn; then NULL with ki low clears every bit. Bits are
// changed one at a time to check that each bit's ko follows its own bit. The
// reference is a per-rail C-element model.
module tb_ncl_reg;
  import ncl_pkg::*;

  int checks = 0, failures = 0;

  dr_t        x3 [3], z3 [3], e3 [3];
  dr_t        x2 [2], z2 [2], e2 [2];
  logic [2:0] ko3;
  logic [1:0] ko2;
  logic       ki, rst;

  ncl_reg #(.W(3)) u3 (.x(x3), .ki(ki), .rst(rst), .z(z3), .ko(ko3));
  ncl_reg #(.W(2)) u2 (.x(x2), .ki(ki), .rst(rst), .z(z2), .ko(ko2));

  function automatic dr_t step(input dr_t xin, input logic k, input dr_t prev);
    dr_t n;
    n.r0 = (xin.r0 && k) ? 1'b1 : (!xin.r0 && !k) ? 1'b0 : prev.r0;
    n.r1 = (xin.r1 && k) ? 1'b1 : (!xin.r1 && !k) ? 1'b0 : prev.r1;
    return n;
  endfunction

  task automatic check_all(input string name);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (z3[i] !== e3[i] || ko3[i] !== dr_is_null(e3[i])) begin
        failures++;
        $display("FAIL %s w3 bit %0d: z=%b ko=%b exp=%b", name, i, z3[i], ko3[i], e3[i]);
      end
    end
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (z2[i] !== e2[i] || ko2[i] !== dr_is_null(e2[i])) begin
        failures++;
        $display("FAIL %s w2 bit %0d: z=%b ko=%b exp=%b", name, i, z2[i], ko2[i], e2[i]);
      end
    end
  endtask

  task automatic settle();
    #1;
    for (int i = 0; i < 3; i++) e3[i] = step(x3[i], ki, e3[i]);
    for (int i = 0; i < 2; i++) e2[i] = step(x2[i], ki, e2[i]);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ki = RFN;
    for (int i = 0; i < 3; i++) begin x3[i] = DR_NULL; e3[i] = DR_NULL; end
    for (int i = 0; i < 2; i++) begin x2[i] = DR_NULL; e2[i] = DR_NULL; end
    #1 check_all("reset");
    rst = 0;
    for (int t = 0; t < 300; t++) begin
      // DATA phase: bits arrive one at a time while ki = rfd.
      ki = RFD; settle(); check_all("rfd");
      for (int i = 0; i < 3; i++) begin
        x3[i] = dr_data(1'($urandom)); settle(); check_all("data bit w3");
      end
      for (int i = 0; i < 2; i++) begin
        x2[i] = dr_data(1'($urandom)); settle(); check_all("data bit w2");
      end
      // Output must hold while inputs go NULL before the acknowledge.
      for (int i = 0; i < 3; i++) x3[i] = DR_NULL;
      for (int i = 0; i < 2; i++) x2[i] = DR_NULL;
      settle(); check_all("hold");
      ki = RFN; settle(); check_all("null");
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (ko3[i] !== RFD) begin failures++; $display("FAIL ko3[%0d] not rfd", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
