// tb_ncl_reg_bit: self-checking test of the one-bit NCL register.
//
// Drives legal dual-rail values (DATA0, DATA1, NULL) and random ki levels.
// The reference keeps each output rail as a C-element of its input rail and
// ki, and expects ko to be rfd exactly when the output is NULL. Also checks
// reset to NULL and a directed capture/hold/release sequence.
module tb_ncl_reg_bit;
  import ncl_pkg::*;

  int checks = 0, failures = 0;

  dr_t  x, z, e;
  logic ki, rst, ko;

  ncl_reg_bit dut (.x(x), .ki(ki), .rst(rst), .z(z), .ko(ko));

  task automatic check(input string name);
    checks++;
    if (z !== e || ko !== dr_is_null(e)) begin
      failures++;
      $display("FAIL %s: z=%b ko=%b expected z=%b", name, z, ko, e);
    end
  endtask

  function automatic dr_t step(input dr_t xin, input logic k, input dr_t prev);
    dr_t n;
    n.r0 = (xin.r0 && k) ? 1'b1 : (!xin.r0 && !k) ? 1'b0 : prev.r0;
    n.r1 = (xin.r1 && k) ? 1'b1 : (!xin.r1 && !k) ? 1'b0 : prev.r1;
    return n;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = DR_NULL; ki = RFD; rst = 1; e = DR_NULL;
    #1 check("reset");
    x = dr_data(1'b1); #1 check("reset holds");
    rst = 0; #1 e = dr_data(1'b1); check("capture DATA1");
    ki = RFN; #1 check("hold DATA with rfn");
    x = DR_NULL; #1 e = DR_NULL; check("capture NULL");
    x = dr_data(1'b0); #1 check("no capture while rfn");
    ki = RFD; #1 e = dr_data(1'b0); check("capture DATA0");
    x = DR_NULL; #1 check("hold DATA while rfd");
    ki = RFN; #1 e = DR_NULL; check("release");
    for (int i = 0; i < 2000; i++) begin
      // Only move the input between NULL and DATA, never DATA to other DATA.
      if ($urandom_range(0, 1) == 0)
        x = dr_is_null(x) ? dr_data(1'($urandom)) : DR_NULL;
      else
        ki = ~ki;
      if (dr_is_data(x) && dr_is_data(e) && x != e) x = DR_NULL;
      #1 e = step(x, ki, e);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
