// tb_ncl_adder_dft_stuck_at: stuck-at fault simulation of the NCL adder, the
// simulation counterpart of a fault-coverage run on the DFT version.
//
// Two copies of the adder run side by side: a fault-free reference and a
// copy in which one gate output or handshake net is forced to 0 or 1. Both get
// the same stimulus, chosen from the reference's outputs like a tester that
// knows the expected responses:
//   phase A - functional mode (tc = 0): the eight input combinations and a
//             run of pseudo-random four-phase traffic with back-pressure;
//   phase B - test mode: tc is raised while a DATA input is waiting, while the
//             pipeline is full, and while a wave is stalled before register 2,
//             followed by a reset.
// After every step the primary outputs of the two copies are compared. A
// fault counts as "seen without DFT" if s, cout or ko differ during phase A,
// and as "seen with DFT" if s, cout, ko or obs differ in either phase.
//
// The fault list is every threshold-gate output (36), every register ko (7)
// and both test-point outputs, each stuck at 0 and at 1: 90 faults. The test
// fails if a fault on one of the eight observation points never shows on obs
// by itself, if the reference's results are wrong, or if DFT detects fewer
// faults than the functional test alone. Coverage numbers are printed.
module tb_ncl_adder_dft_stuck_at;
  import ncl_pkg::*;

  localparam int NFAULT_NETS = 45;

  int checks = 0, failures = 0;

  logic rst, tc, ki;
  dr_t  a, b, cin;
  logic ko_g, obs_g, ko_f, obs_f;
  dr_t  s_g, cout_g, s_f, cout_f;
  logic sv;

  ncl_adder_dft dut_g (
    .rst(rst), .tc(tc), .a(a), .b(b), .cin(cin), .ko(ko_g),
    .s(s_g), .cout(cout_g), .ki(ki), .obs(obs_g));
  ncl_adder_dft dut_f (
    .rst(rst), .tc(tc), .a(a), .b(b), .cin(cin), .ko(ko_f),
    .s(s_f), .cout(cout_f), .ki(ki), .obs(obs_f));

  task automatic inject(input int id, input bit on);
    case (id)
       0: if (on) force dut_f.u_reg1.g_bit[0].u_bit.u_th22_r0.z = sv; else release dut_f.u_reg1.g_bit[0].u_bit.u_th22_r0.z;
       1: if (on) force dut_f.u_reg1.g_bit[0].u_bit.u_th22_r1.z = sv; else release dut_f.u_reg1.g_bit[0].u_bit.u_th22_r1.z;
       2: if (on) force dut_f.u_reg1.g_bit[0].u_bit.ko = sv; else release dut_f.u_reg1.g_bit[0].u_bit.ko;
       3: if (on) force dut_f.u_reg1.g_bit[1].u_bit.u_th22_r0.z = sv; else release dut_f.u_reg1.g_bit[1].u_bit.u_th22_r0.z;
       4: if (on) force dut_f.u_reg1.g_bit[1].u_bit.u_th22_r1.z = sv; else release dut_f.u_reg1.g_bit[1].u_bit.u_th22_r1.z;
       5: if (on) force dut_f.u_reg1.g_bit[1].u_bit.ko = sv; else release dut_f.u_reg1.g_bit[1].u_bit.ko;
       6: if (on) force dut_f.u_reg1.g_bit[2].u_bit.u_th22_r0.z = sv; else release dut_f.u_reg1.g_bit[2].u_bit.u_th22_r0.z;
       7: if (on) force dut_f.u_reg1.g_bit[2].u_bit.u_th22_r1.z = sv; else release dut_f.u_reg1.g_bit[2].u_bit.u_th22_r1.z;
       8: if (on) force dut_f.u_reg1.g_bit[2].u_bit.ko = sv; else release dut_f.u_reg1.g_bit[2].u_bit.ko;
       9: if (on) force dut_f.u_reg2.g_bit[0].u_bit.u_th22_r0.z = sv; else release dut_f.u_reg2.g_bit[0].u_bit.u_th22_r0.z;
      10: if (on) force dut_f.u_reg2.g_bit[0].u_bit.u_th22_r1.z = sv; else release dut_f.u_reg2.g_bit[0].u_bit.u_th22_r1.z;
      11: if (on) force dut_f.u_reg2.g_bit[0].u_bit.ko = sv; else release dut_f.u_reg2.g_bit[0].u_bit.ko;
      12: if (on) force dut_f.u_reg2.g_bit[1].u_bit.u_th22_r0.z = sv; else release dut_f.u_reg2.g_bit[1].u_bit.u_th22_r0.z;
      13: if (on) force dut_f.u_reg2.g_bit[1].u_bit.u_th22_r1.z = sv; else release dut_f.u_reg2.g_bit[1].u_bit.u_th22_r1.z;
      14: if (on) force dut_f.u_reg2.g_bit[1].u_bit.ko = sv; else release dut_f.u_reg2.g_bit[1].u_bit.ko;
      15: if (on) force dut_f.u_reg3.g_bit[0].u_bit.u_th22_r0.z = sv; else release dut_f.u_reg3.g_bit[0].u_bit.u_th22_r0.z;
      16: if (on) force dut_f.u_reg3.g_bit[0].u_bit.u_th22_r1.z = sv; else release dut_f.u_reg3.g_bit[0].u_bit.u_th22_r1.z;
      17: if (on) force dut_f.u_reg3.g_bit[0].u_bit.ko = sv; else release dut_f.u_reg3.g_bit[0].u_bit.ko;
      18: if (on) force dut_f.u_reg3.g_bit[1].u_bit.u_th22_r0.z = sv; else release dut_f.u_reg3.g_bit[1].u_bit.u_th22_r0.z;
      19: if (on) force dut_f.u_reg3.g_bit[1].u_bit.u_th22_r1.z = sv; else release dut_f.u_reg3.g_bit[1].u_bit.u_th22_r1.z;
      20: if (on) force dut_f.u_reg3.g_bit[1].u_bit.ko = sv; else release dut_f.u_reg3.g_bit[1].u_bit.ko;
      21: if (on) force dut_f.u_fa.g_min[0].u_th33.z = sv; else release dut_f.u_fa.g_min[0].u_th33.z;
      22: if (on) force dut_f.u_fa.g_min[1].u_th33.z = sv; else release dut_f.u_fa.g_min[1].u_th33.z;
      23: if (on) force dut_f.u_fa.g_min[2].u_th33.z = sv; else release dut_f.u_fa.g_min[2].u_th33.z;
      24: if (on) force dut_f.u_fa.g_min[3].u_th33.z = sv; else release dut_f.u_fa.g_min[3].u_th33.z;
      25: if (on) force dut_f.u_fa.g_min[4].u_th33.z = sv; else release dut_f.u_fa.g_min[4].u_th33.z;
      26: if (on) force dut_f.u_fa.g_min[5].u_th33.z = sv; else release dut_f.u_fa.g_min[5].u_th33.z;
      27: if (on) force dut_f.u_fa.g_min[6].u_th33.z = sv; else release dut_f.u_fa.g_min[6].u_th33.z;
      28: if (on) force dut_f.u_fa.g_min[7].u_th33.z = sv; else release dut_f.u_fa.g_min[7].u_th33.z;
      29: if (on) force dut_f.u_fa.u_s1.z = sv; else release dut_f.u_fa.u_s1.z;
      30: if (on) force dut_f.u_fa.u_s0.z = sv; else release dut_f.u_fa.u_s0.z;
      31: if (on) force dut_f.u_fa.u_co1.z = sv; else release dut_f.u_fa.u_co1.z;
      32: if (on) force dut_f.u_fa.u_co0.z = sv; else release dut_f.u_fa.u_co0.z;
      33: if (on) force dut_f.u_ha.u_m00.z = sv; else release dut_f.u_ha.u_m00.z;
      34: if (on) force dut_f.u_ha.u_m01.z = sv; else release dut_f.u_ha.u_m01.z;
      35: if (on) force dut_f.u_ha.u_m10.z = sv; else release dut_f.u_ha.u_m10.z;
      36: if (on) force dut_f.u_ha.u_m11.z = sv; else release dut_f.u_ha.u_m11.z;
      37: if (on) force dut_f.u_ha.u_s0.z = sv; else release dut_f.u_ha.u_s0.z;
      38: if (on) force dut_f.u_ha.u_s1.z = sv; else release dut_f.u_ha.u_s1.z;
      39: if (on) force dut_f.u_ha.u_co0.z = sv; else release dut_f.u_ha.u_co0.z;
      40: if (on) force dut_f.u_cd1.g_leaf.u_th.z = sv; else release dut_f.u_cd1.g_leaf.u_th.z;
      41: if (on) force dut_f.u_cd2.g_leaf.u_th.z = sv; else release dut_f.u_cd2.g_leaf.u_th.z;
      42: if (on) force dut_f.u_cd3.g_leaf.u_th.z = sv; else release dut_f.u_cd3.g_leaf.u_th.z;
      43: if (on) force dut_f.u_tp1.y = sv; else release dut_f.u_tp1.y;
      44: if (on) force dut_f.u_tp2.y = sv; else release dut_f.u_tp2.y;
      default: ;
    endcase
  endtask

  function automatic string net_name(input int id);
    case (id)
       0: return "u_reg1.g_bit[0].u_bit.u_th22_r0.z";
       1: return "u_reg1.g_bit[0].u_bit.u_th22_r1.z";
       2: return "u_reg1.g_bit[0].u_bit.ko";
       3: return "u_reg1.g_bit[1].u_bit.u_th22_r0.z";
       4: return "u_reg1.g_bit[1].u_bit.u_th22_r1.z";
       5: return "u_reg1.g_bit[1].u_bit.ko";
       6: return "u_reg1.g_bit[2].u_bit.u_th22_r0.z";
       7: return "u_reg1.g_bit[2].u_bit.u_th22_r1.z";
       8: return "u_reg1.g_bit[2].u_bit.ko";
       9: return "u_reg2.g_bit[0].u_bit.u_th22_r0.z";
      10: return "u_reg2.g_bit[0].u_bit.u_th22_r1.z";
      11: return "u_reg2.g_bit[0].u_bit.ko";
      12: return "u_reg2.g_bit[1].u_bit.u_th22_r0.z";
      13: return "u_reg2.g_bit[1].u_bit.u_th22_r1.z";
      14: return "u_reg2.g_bit[1].u_bit.ko";
      15: return "u_reg3.g_bit[0].u_bit.u_th22_r0.z";
      16: return "u_reg3.g_bit[0].u_bit.u_th22_r1.z";
      17: return "u_reg3.g_bit[0].u_bit.ko";
      18: return "u_reg3.g_bit[1].u_bit.u_th22_r0.z";
      19: return "u_reg3.g_bit[1].u_bit.u_th22_r1.z";
      20: return "u_reg3.g_bit[1].u_bit.ko";
      21: return "u_fa.g_min[0].u_th33.z";
      22: return "u_fa.g_min[1].u_th33.z";
      23: return "u_fa.g_min[2].u_th33.z";
      24: return "u_fa.g_min[3].u_th33.z";
      25: return "u_fa.g_min[4].u_th33.z";
      26: return "u_fa.g_min[5].u_th33.z";
      27: return "u_fa.g_min[6].u_th33.z";
      28: return "u_fa.g_min[7].u_th33.z";
      29: return "u_fa.u_s1.z";
      30: return "u_fa.u_s0.z";
      31: return "u_fa.u_co1.z";
      32: return "u_fa.u_co0.z";
      33: return "u_ha.u_m00.z";
      34: return "u_ha.u_m01.z";
      35: return "u_ha.u_m10.z";
      36: return "u_ha.u_m11.z";
      37: return "u_ha.u_s0.z";
      38: return "u_ha.u_s1.z";
      39: return "u_ha.u_co0.z";
      40: return "u_cd1.g_leaf.u_th.z";
      41: return "u_cd2.g_leaf.u_th.z";
      42: return "u_cd3.g_leaf.u_th.z";
      43: return "u_tp1.y";
      44: return "u_tp2.y";
      default: return "?";
    endcase
  endfunction

  // Observation points of the tree: register-1 rails and detectors 2 and 3.
  function automatic bit is_obs_point(input int id);
    return id inside {0, 1, 3, 4, 6, 7, 41, 42};
  endfunction

  // ---------------- per-run detection state ----------------
  bit   in_test_phase;
  bit   det_func, det_dft, det_obs;
  int   n_wrong_ref;

  task automatic step();
    #1;
    if (s_f !== s_g || cout_f !== cout_g || ko_f !== ko_g) begin
      det_dft = 1;
      if (!in_test_phase) det_func = 1;
    end
    if (obs_f !== obs_g) begin det_dft = 1; det_obs = 1; end
  endtask

  task automatic drive(input logic data, input logic [2:0] v);
    a   = data ? dr_data(v[0]) : DR_NULL;
    b   = data ? dr_data(v[1]) : DR_NULL;
    cin = data ? dr_data(v[2]) : DR_NULL;
  endtask

  function automatic bit result_ok(input logic [2:0] v);
    int n = int'(v[0]) + int'(v[1]) + int'(v[2]);
    return s_g == dr_data(n == 1 || n == 2) && cout_g == dr_data(n == 3);
  endfunction

  task automatic do_reset();
    rst = 1; tc = 0; ki = RFD; drive(1'b0, 3'b000);
    #1 rst = 0;
    step();
  endtask

  // One full pattern set; the same every run (own LFSR, no global RNG).
  task automatic apply_patterns();
    logic [15:0] lfsr = 16'hACE1;
    logic [2:0]  q [$];
    logic        in_data = 0;
    logic [2:0]  pv;
    in_test_phase = 0;
    do_reset();
    // A1: each input combination as a complete four-phase cycle.
    for (int v = 0; v < 8; v++) begin
      drive(1'b1, 3'(v)); step();
      if (!result_ok(3'(v))) n_wrong_ref++;
      ki = RFN; step();
      drive(1'b0, 3'b000); step();
      ki = RFD; step();
    end
    // A2: pseudo-random producer/consumer traffic, decided on the reference.
    for (int i = 0; i < 200; i++) begin
      lfsr = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (lfsr[0]) begin
        if (!in_data && ko_g == RFD) begin
          q.push_back(lfsr[3:1]); drive(1'b1, lfsr[3:1]); in_data = 1;
        end else if (in_data && ko_g == RFN) begin
          drive(1'b0, 3'b000); in_data = 0;
        end
      end else begin
        if (ki == RFD && dr_is_data(s_g)) begin
          if (q.size() == 0) n_wrong_ref++;
          else begin
            pv = q.pop_front();
            if (!result_ok(pv)) n_wrong_ref++;
          end
          ki = RFN;
        end else if (ki == RFN && dr_is_null(s_g)) ki = RFD;
      end
      step();
    end
    // B: test mode.
    in_test_phase = 1;
    do_reset();
    tc = 1; step();
    drive(1'b1, 3'b101); step();          // capture blocked
    tc = 0; step();                       // wave runs to the output
    tc = 1; step();
    drive(1'b0, 3'b000); step();          // NULL held back
    tc = 0; step();
    ki = RFN; step();
    ki = RFD; step();
    drive(1'b1, 3'b011); step();
    drive(1'b0, 3'b000); step();
    drive(1'b1, 3'b110); step();          // stalled before register 2
    tc = 1; step();                       // forced into register 2
    ki = RFN; step();
    tc = 0; step();
    do_reset();
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_faults = 0, n_func = 0, n_dft = 0, n_obs = 0, n_obs_pts = 0, n_obs_pts_seen = 0;
    // Fault-free run: the reference must compute correctly and match itself.
    det_func = 0; det_dft = 0; det_obs = 0; n_wrong_ref = 0;
    apply_patterns();
    checks++;
    if (det_dft) begin failures++; $display("FAIL copies differ without a fault"); end
    checks++;
    if (n_wrong_ref != 0) begin failures++; $display("FAIL reference gave %0d wrong results", n_wrong_ref); end

    for (int id = 0; id < NFAULT_NETS; id++) begin
      for (int v = 0; v < 2; v++) begin
        sv = 1'(v);
        det_func = 0; det_dft = 0; det_obs = 0;
        inject(id, 1'b1);
        apply_patterns();
        inject(id, 1'b0);
        n_faults++;
        if (det_func) n_func++;
        if (det_dft)  n_dft++;
        if (det_obs)  n_obs++;
        if (!det_dft) $display("  undetected: %s stuck-at-%0d", net_name(id), v);
        if (is_obs_point(id)) begin
          n_obs_pts++;
          if (det_obs) n_obs_pts_seen++;
          checks++;
          if (!det_obs) begin
            failures++;
            $display("FAIL observation point %s stuck-at-%0d not seen on obs", net_name(id), v);
          end
        end
      end
    end
    $display("faults %0d: seen by functional test %0d (%0d.%01d%%), with tc and obs %0d (%0d.%01d%%), on obs alone %0d, observation-point faults on obs %0d of %0d",
             n_faults, n_func, n_func * 100 / n_faults, (n_func * 1000 / n_faults) % 10,
             n_dft, n_dft * 100 / n_faults, (n_dft * 1000 / n_faults) % 10, n_obs, n_obs_pts_seen, n_obs_pts);
    checks++;
    if (n_dft < n_func) begin failures++; $display("FAIL DFT detects fewer faults"); end
    checks++;
    if (n_faults != 2 * NFAULT_NETS) begin failures++; $display("FAIL fault count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
