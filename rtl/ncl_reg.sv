// ncl_reg: W-bit NCL registration unit.
//
// A row of W one-bit dual-rail registers sharing one ki input. Each bit keeps
// its own ko output, so the completion detector that follows can wait for all
// of them; the n-bit register symbol shows one Ko line per bit going to the
// detector. The adder uses a 3-bit instance at its input and two 2-bit
// instances after the full adder and after the half adder.
//
// Interface: x[W] dual-rail inputs, ki, rst, z[W] dual-rail outputs,
// ko[W] per-bit handshake outputs. Asynchronous: no clock.
module ncl_reg
  import ncl_pkg::*;
#(
  parameter int unsigned W = 3
) (
  input  dr_t         x  [W],
  input  logic        ki,
  input  logic        rst,
  output dr_t         z  [W],
  output logic [W-1:0] ko
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    ncl_reg_bit u_bit (.x(x[i]), .ki(ki), .rst(rst), .z(z[i]), .ko(ko[i]));
  end

endmodule
