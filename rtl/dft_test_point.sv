// dft_test_point: controllability test point for an NCL handshake loop.
//
// An XOR gate placed in the feedback path from a completion detector to the
// ki input of the register before it. The test control pin tc is held at 0 in
// functional mode, so the acknowledge passes unchanged; in test mode the
// tester drives tc and can thereby force the register's ki to either value,
// which opens the loop for a combinational-style stuck-at test.
//
// Interface: fb (acknowledge from the completion detector), tc, y (to ki).
// Plain Boolean logic, zero delay.
module dft_test_point (
  input  logic fb,
  input  logic tc,
  output logic y
);

  assign y = fb ^ tc;

endmodule
