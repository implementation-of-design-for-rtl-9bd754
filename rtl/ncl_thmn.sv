// ncl_thmn: TH_mn threshold gate with hysteresis, the building block of every
// NCL block in this design (combinational logic, registers and completion
// detection).
//
// The output is set when at least M of the N inputs are asserted, is cleared
// when all N inputs are de-asserted, and otherwise keeps its value. This
// set/reset-with-hold behaviour is the one NCL defines for TH_mn gates. It is
// written as a level-sensitive latch whose enable is "set or reset condition"
// and whose data is the set condition, so synthesis maps the hysteresis to a
// latch. The latch is intentional: it is the state-holding element of the
// gate.
//
// rst is this design's addition for the gates inside registers: when high it
// forces the output to 0 (a reset-to-NULL gate). Gates in combinational logic
// tie it low.
//
// Interface: a[N-1:0] inputs, rst, z output. Purely asynchronous, no clock;
// the output reacts to its inputs with zero delay in simulation.
module ncl_thmn #(
  parameter int unsigned M = 2,  // threshold
  parameter int unsigned N = 2   // number of inputs
) (
  input  logic [N-1:0] a,
  input  logic         rst,
  output logic         z
);

  logic set_c, reset_c;

  always_comb begin
    set_c   = ($countones(a) >= M);
    reset_c = (a == '0);
  end

  always_latch begin
    if (rst)
      z <= 1'b0;
    else if (set_c || reset_c)
      z <= set_c;
  end

  initial begin
    assert (M >= 1 && M <= N) else $error("ncl_thmn: need 1 <= M <= N");
  end

endmodule
