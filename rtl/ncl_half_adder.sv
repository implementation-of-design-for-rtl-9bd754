// ncl_half_adder: dual-rail NCL half adder (s = a xor b, co = a and b).
//
// Same two-level structure as the full adder: four TH22 gates recognise the
// input combinations 00, 01, 10 and 11, and TH12/TH13 gates OR them into the
// output rails (co.r1 is the 11 minterm itself). All outputs are
// input-complete. The minterm structure is this design's choice.
//
// Interface: a, b dual-rail inputs; s, co dual-rail outputs. Asynchronous.
module ncl_half_adder
  import ncl_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t s,
  output dr_t co
);

  logic m00, m01, m10, m11;

  ncl_thmn #(.M(2), .N(2)) u_m00 (.a({a.r0, b.r0}), .rst(1'b0), .z(m00));
  ncl_thmn #(.M(2), .N(2)) u_m01 (.a({a.r0, b.r1}), .rst(1'b0), .z(m01));
  ncl_thmn #(.M(2), .N(2)) u_m10 (.a({a.r1, b.r0}), .rst(1'b0), .z(m10));
  ncl_thmn #(.M(2), .N(2)) u_m11 (.a({a.r1, b.r1}), .rst(1'b0), .z(m11));

  ncl_thmn #(.M(1), .N(2)) u_s0  (.a({m00, m11}),      .rst(1'b0), .z(s.r0));
  ncl_thmn #(.M(1), .N(2)) u_s1  (.a({m01, m10}),      .rst(1'b0), .z(s.r1));
  ncl_thmn #(.M(1), .N(3)) u_co0 (.a({m00, m01, m10}), .rst(1'b0), .z(co.r0));
  assign co.r1 = m11;

endmodule
