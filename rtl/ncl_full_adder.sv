// ncl_full_adder: dual-rail NCL full adder (sum and carry of a, b, ci).
//
// Built only from TH_mn gates in two levels. The first level has one TH33 gate
// per input combination: it fires when the three rails that spell that
// combination (for example a.r1, b.r0, ci.r1) are all high. Exactly one of
// the eight fires for a DATA input set and none for NULL. The second level
// ORs the minterms with TH14 gates into the four output rails. Every output
// rail therefore waits for all three inputs (input-complete) and returns to
// NULL only after all inputs are NULL, as NCL requires. The adder's function
// is the design's; this minterm structure is this design's own choice.
//
// Interface: a, b, ci dual-rail inputs; s, co dual-rail outputs.
// Asynchronous, no clock, no state beyond the gates' hysteresis.
module ncl_full_adder
  import ncl_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  input  dr_t ci,
  output dr_t s,
  output dr_t co
);

  // m[k] fires for the input combination {a,b,ci} == k.
  logic [7:0] m;

  for (genvar k = 0; k < 8; k++) begin : g_min
    localparam logic [2:0] K = 3'(k);
    ncl_thmn #(.M(3), .N(3)) u_th33 (
      .a  ({K[2] ? a.r1 : a.r0, K[1] ? b.r1 : b.r0, K[0] ? ci.r1 : ci.r0}),
      .rst(1'b0),
      .z  (m[k]));
  end

  ncl_thmn #(.M(1), .N(4)) u_s1  (.a({m[1], m[2], m[4], m[7]}), .rst(1'b0), .z(s.r1));
  ncl_thmn #(.M(1), .N(4)) u_s0  (.a({m[0], m[3], m[5], m[6]}), .rst(1'b0), .z(s.r0));
  ncl_thmn #(.M(1), .N(4)) u_co1 (.a({m[3], m[5], m[6], m[7]}), .rst(1'b0), .z(co.r1));
  ncl_thmn #(.M(1), .N(4)) u_co0 (.a({m[0], m[1], m[2], m[4]}), .rst(1'b0), .z(co.r0));

endmodule
