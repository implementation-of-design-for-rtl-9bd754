// ncl_reg_bit: one-bit dual-rail NCL register.
//
// Each rail passes through a TH22 gate (a Muller C-element) whose other input
// is the handshake input ki. With ki = rfd (1) a DATA value on x is captured
// and held; with ki = rfn (0) a NULL on x is captured. While x and ki disagree
// the register holds, which is what keeps successive DATA wavefronts apart.
// ko is the NOR of the two output rails (an inverted TH12 gate): rfd when the
// register holds NULL, rfn when it holds DATA.
//
// The ports x, z, ki, ko and rst follow the NCL 1-bit register symbol. rst
// forces both output rails low (reset to NULL, so ko = rfd after reset); the
// reset-to-NULL choice is this design's. Asynchronous: no clock.
module ncl_reg_bit
  import ncl_pkg::*;
(
  input  dr_t  x,
  input  logic ki,
  input  logic rst,
  output dr_t  z,
  output logic ko
);

  ncl_thmn #(.M(2), .N(2)) u_th22_r0 (.a({x.r0, ki}), .rst(rst), .z(z.r0));
  ncl_thmn #(.M(2), .N(2)) u_th22_r1 (.a({x.r1, ki}), .rst(rst), .z(z.r1));

  assign ko = ~(z.r0 | z.r1);

endmodule
