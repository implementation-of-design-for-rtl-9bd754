// ncl_adder_dft: two-stage pipelined NCL adder with design-for-test
// structures for stuck-at testing without a clock.
//
// Datapath: a 3-bit NCL register takes the dual-rail inputs a, b and cin; an
// NCL full adder adds them; a 2-bit register passes its sum and carry to an
// NCL half adder; a last 2-bit register drives the outputs s and cout. So
// s = fa_sum ^ fa_carry and cout = fa_sum & fa_carry, i.e. s = 1 when one or
// two of the inputs are 1 and cout = 1 when all three are 1.
//
// Handshake: each register's per-bit ko lines are merged by a completion
// detector. The detector after the first register drives the ko output to the
// producer. The detectors after the second and third registers acknowledge
// the register in front of them; these two acknowledge paths are the
// feedback loops of the pipeline. ki from the consumer drives the last
// register directly.
//
// DFT: each of the two internal feedback loops passes through an XOR test
// point controlled by the primary input tc (0 in functional mode; set by the
// tester in test mode), which makes the loop controllable. For observability,
// the six output rails of the first register and the outputs of the two
// internal completion detectors (eight observation points) are compacted by a
// balanced XOR tree into the single output obs. The rails of one signal are
// paired at the first tree level and the two detector outputs are paired with
// each other. The datapath, the XOR test points on the two feedback paths
// and the single balanced-tree output follow the published structure; which
// eight nets are observed, the pairing order and the per-bit ko wiring are
// this design's choices.
//
// Interface: a, b, cin (dual-rail in), ko (to producer), s, cout (dual-rail
// out), ki (from consumer), tc (test control), obs (test observation),
// rst (resets all registers to NULL). No clock: the timing is set by the
// four-phase DATA/NULL handshake alone, and the circuit contains latches and
// combinational loops by nature (gate hysteresis and handshake feedback).
module ncl_adder_dft
  import ncl_pkg::*;
#(
  parameter int unsigned OBS_N = 8  // observation points folded into obs
) (
  input  logic rst,
  input  logic tc,
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  cin,
  output logic ko,
  output dr_t  s,
  output dr_t  cout,
  input  logic ki,
  output logic obs
);

  dr_t        r1_x [3], r1_z [3];
  dr_t        r2_x [2], r2_z [2];
  dr_t        r3_x [2], r3_z [2];
  logic [2:0] r1_ko;
  logic [1:0] r2_ko, r3_ko;
  logic       r1_ki, r2_ki;
  logic       cd2, cd3;

  // Stage 1: input register and full adder.
  assign r1_x[0] = a;
  assign r1_x[1] = b;
  assign r1_x[2] = cin;

  ncl_reg #(.W(3)) u_reg1 (.x(r1_x), .ki(r1_ki), .rst(rst), .z(r1_z), .ko(r1_ko));
  ncl_cd  #(.N(3)) u_cd1  (.ko_in(r1_ko), .z(ko));

  ncl_full_adder u_fa (
    .a(r1_z[0]), .b(r1_z[1]), .ci(r1_z[2]), .s(r2_x[0]), .co(r2_x[1]));

  // Stage 2: register and half adder.
  ncl_reg #(.W(2)) u_reg2 (.x(r2_x), .ki(r2_ki), .rst(rst), .z(r2_z), .ko(r2_ko));
  ncl_cd  #(.N(2)) u_cd2  (.ko_in(r2_ko), .z(cd2));
  dft_test_point   u_tp1  (.fb(cd2), .tc(tc), .y(r1_ki));

  ncl_half_adder u_ha (.a(r2_z[0]), .b(r2_z[1]), .s(r3_x[0]), .co(r3_x[1]));

  // Output register.
  ncl_reg #(.W(2)) u_reg3 (.x(r3_x), .ki(ki), .rst(rst), .z(r3_z), .ko(r3_ko));
  ncl_cd  #(.N(2)) u_cd3  (.ko_in(r3_ko), .z(cd3));
  dft_test_point   u_tp2  (.fb(cd3), .tc(tc), .y(r2_ki));

  assign s    = r3_z[0];
  assign cout = r3_z[1];

  // Observation points, rails of one signal adjacent.
  logic [7:0] obs_pts;
  assign obs_pts = {cd3, cd2,
                    r1_z[2].r1, r1_z[2].r0,
                    r1_z[1].r1, r1_z[1].r0,
                    r1_z[0].r1, r1_z[0].r0};

  dft_xor_tree #(.N(OBS_N)) u_obs_tree (.d(obs_pts[OBS_N-1:0]), .y(obs));

  initial begin
    assert (OBS_N >= 1 && OBS_N <= 8)
      else $error("ncl_adder_dft: OBS_N must be 1..8");
  end

endmodule
