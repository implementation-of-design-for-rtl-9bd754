// tb_ncl_adder_dft: end-to-end test of the two-stage NCL adder with its DFT
// structures, at the default parameters.
//
// A four-phase producer drives dual-rail a, b, cin and obeys ko; a consumer
// reads s and cout and answers on ki. Both act in a random order, so the
// pipeline fills, stalls on back-pressure and drains. An abstract reference
// model keeps, for each of the three registers, whether it holds DATA or NULL
// and which value, with each register behaving as a C-element of "previous
// stage is DATA" and its ki; the internal ki values are the completion of the
// next register XOR tc. After every step the test compares ko, s, cout and
// the observation output obs (parity of the first register's rails and of the
// two internal detectors) with the model, and a scoreboard checks every
// result against s = (1 or 2 inputs set), cout = (all three set).
//
// A directed test-mode section raises tc to show that the test points
// override the handshake: a DATA input is not captured while tc = 1 forces
// ki low, a held DATA word is not released while tc = 1 forces ki high, and a
// wave stalled in front of register 2 is let in by tc = 1 (followed by a
// reset, since that merges two wavefronts).
// Counters record how often each mechanism occurred; one that never occurs
// counts as a failure.
module tb_ncl_adder_dft;
  import ncl_pkg::*;

  int checks = 0, failures = 0;

  logic rst, tc, ki, ko, obs;
  dr_t  a, b, cin, s, cout;

  ncl_adder_dft dut (
    .rst(rst), .tc(tc), .a(a), .b(b), .cin(cin), .ko(ko),
    .s(s), .cout(cout), .ki(ki), .obs(obs));

  // ---------------- reference model ----------------
  logic       m_d1, m_d2, m_d3;       // register holds DATA
  logic [2:0] m_v1;                   // {cin, b, a}
  logic [1:0] m_v2;                   // {fa carry, fa sum}
  logic [1:0] m_v3;                   // {cout, s}
  logic       in_data;
  logic [2:0] in_val;

  function automatic logic [1:0] fa(input logic [2:0] v);
    int n = int'(v[0]) + int'(v[1]) + int'(v[2]);
    return {n >= 2, n[0]};
  endfunction

  function automatic logic [1:0] ha(input logic [1:0] v);
    return {v[0] & v[1], v[0] ^ v[1]};
  endfunction

  task automatic model_settle();
    logic ki1, ki2, n1, n2, n3;
    for (int it = 0; it < 10; it++) begin
      ki1 = (!m_d2) ^ tc;
      ki2 = (!m_d3) ^ tc;
      n1 = (in_data && ki1) ? 1'b1 : (!in_data && !ki1) ? 1'b0 : m_d1;
      n2 = (m_d1 && ki2)    ? 1'b1 : (!m_d1 && !ki2)    ? 1'b0 : m_d2;
      n3 = (m_d2 && ki)     ? 1'b1 : (!m_d2 && !ki)     ? 1'b0 : m_d3;
      if (n1 && !m_d1) m_v1 = in_val;
      if (n2 && !m_d2) m_v2 = fa(m_v1);
      if (n3 && !m_d3) m_v3 = ha(m_v2);
      m_d1 = n1; m_d2 = n2; m_d3 = n3;
    end
  endtask

  task automatic compare(input string where);
    dr_t es, ec;
    logic eobs;
    es   = m_d3 ? dr_data(m_v3[0]) : DR_NULL;
    ec   = m_d3 ? dr_data(m_v3[1]) : DR_NULL;
    eobs = m_d1 ^ (!m_d2) ^ (!m_d3);
    checks++;
    if (ko !== !m_d1 || s !== es || cout !== ec || obs !== eobs) begin
      failures++;
      $display("FAIL %s: ko=%b s=%b cout=%b obs=%b | expected ko=%b s=%b cout=%b obs=%b (stages %b%b%b)",
               where, ko, s, cout, obs, !m_d1, es, ec, eobs, m_d1, m_d2, m_d3);
    end
    checks++;
    if (dr_is_illegal(s) || dr_is_illegal(cout)) begin
      failures++;
      $display("FAIL %s: illegal dual-rail output", where);
    end
    // Mutual exclusion of the rails inside the pipeline as well.
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (dr_is_illegal(dut.r1_z[i])) begin
        failures++;
        $display("FAIL %s: register 1 bit %0d illegal", where, i);
      end
    end
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (dr_is_illegal(dut.r2_z[i])) begin
        failures++;
        $display("FAIL %s: register 2 bit %0d illegal", where, i);
      end
    end
  endtask

  task automatic step(input string where);
    #1;
    model_settle();
    compare(where);
  endtask

  task automatic drive_inputs(input logic data, input logic [2:0] v);
    in_data = data;
    in_val  = v;
    a   = data ? dr_data(v[0]) : DR_NULL;
    b   = data ? dr_data(v[1]) : DR_NULL;
    cin = data ? dr_data(v[2]) : DR_NULL;
  endtask

  // ---------------- scoreboard and mechanism counters ----------------
  logic [2:0] sent [$];
  int n_data_in = 0, n_null_in = 0, n_results = 0;
  int n_backpressure = 0;   // producer ready for DATA but ko = rfn
  int n_full = 0;           // all three registers held DATA at once
  int n_tc_block = 0;       // tc = 1 kept a DATA input out of register 1
  int n_tc_hold = 0;        // tc = 1 kept register 1 from taking NULL
  int n_tc_release = 0;     // tc = 1 let register 2 take a stalled wave
  int n_obs_toggle = 0;
  logic obs_prev;

  task automatic consume();
    logic [2:0] v;
    int n;
    if (sent.size() == 0) begin
      failures++;
      $display("FAIL result with nothing sent");
      return;
    end
    v = sent.pop_front();
    n = int'(v[0]) + int'(v[1]) + int'(v[2]);
    checks++;
    if (s !== dr_data(n == 1 || n == 2) || cout !== dr_data(n == 3)) begin
      failures++;
      $display("FAIL result for a=%b b=%b cin=%b: s=%b cout=%b", v[0], v[1], v[2], s, cout);
    end
    n_results++;
  endtask

  task automatic count_mech();
    if (obs !== obs_prev) n_obs_toggle++;
    obs_prev = obs;
    if (m_d1 && m_d2 && m_d3) n_full++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] v;
    // Reset: every register NULL, producer sees rfd.
    rst = 1; tc = 0; ki = RFD;
    drive_inputs(1'b0, 3'b000);
    m_d1 = 0; m_d2 = 0; m_d3 = 0; m_v1 = '0; m_v2 = '0; m_v3 = '0;
    #1 rst = 0;
    step("after reset");
    obs_prev = obs;

    // ---- directed test mode: tc forces ki of register 1 low ----
    tc = 1; step("tc=1 idle");
    v = 3'b101;
    drive_inputs(1'b1, v);
    step("tc=1 DATA offered");
    checks++;
    if (ko !== RFD) begin failures++; $display("FAIL DATA captured while tc=1"); end
    else n_tc_block++;
    tc = 0; step("tc=0 DATA captured");
    sent.push_back(v);
    n_data_in++;
    // Wavefront is now at the output; register 1 and 2 still hold DATA.
    // tc = 1 forces ki of register 1 high, so NULL is not taken.
    tc = 1; step("tc=1 with full pipeline");
    drive_inputs(1'b0, 3'b000);
    step("tc=1 NULL offered");
    checks++;
    if (ko !== RFN) begin failures++; $display("FAIL NULL captured while tc=1"); end
    else n_tc_hold++;
    tc = 0; step("tc=0 NULL captured");
    n_null_in++;
    consume(); ki = RFN; step("consume 1");
    ki = RFD; step("ack null 1");

    // ---- directed test mode: tc forces ki of register 2 high ----
    // Stall a second wave behind an unconsumed result (stages D, N, D), then
    // raise tc: register 2 takes the wave although register 3 has not
    // acknowledged. This merges two wavefronts, so the pipeline is reset
    // afterwards, as a tester would.
    drive_inputs(1'b1, 3'b011); step("wave a");
    drive_inputs(1'b0, 3'b000); step("null a");
    drive_inputs(1'b1, 3'b110); step("wave b stalled");
    checks++;
    if (!(m_d1 && !m_d2 && m_d3)) begin failures++; $display("FAIL stall not reached"); end
    tc = 1; step("tc=1 releases register 2");
    checks++;
    if (!m_d2) begin failures++; $display("FAIL model did not release"); end
    else n_tc_release++;
    rst = 1; tc = 0; drive_inputs(1'b0, 3'b000);
    #1 rst = 0;
    m_d1 = 0; m_d2 = 0; m_d3 = 0;
    step("reset after test mode");

    // ---- functional mode, random producer and consumer ----
    for (int i = 0; i < 4000; i++) begin
      if ($urandom_range(0, 1) == 0) begin
        // producer
        if (!in_data) begin
          if (ko == RFD) begin
            v = 3'($urandom);
            drive_inputs(1'b1, v);
            sent.push_back(v);
            n_data_in++;
          end else n_backpressure++;
        end else if (ko == RFN) begin
          drive_inputs(1'b0, 3'b000);
          n_null_in++;
        end
      end else begin
        // consumer
        if (ki == RFD && dr_is_data(s) && dr_is_data(cout)) begin
          consume();
          ki = RFN;
        end else if (ki == RFN && dr_is_null(s) && dr_is_null(cout)) begin
          ki = RFD;
        end
      end
      step("random");
      count_mech();
    end

    $display("data in %0d, null in %0d, results %0d, back-pressure %0d, full %0d, tc block %0d, tc hold %0d, tc release %0d, obs toggles %0d",
             n_data_in, n_null_in, n_results, n_backpressure, n_full, n_tc_block, n_tc_hold,
             n_tc_release, n_obs_toggle);
    if (n_results < 100)    begin failures++; $display("FAIL too few results"); end
    if (n_backpressure == 0) begin failures++; $display("FAIL no back-pressure stall"); end
    if (n_full == 0)        begin failures++; $display("FAIL pipeline never full"); end
    if (n_tc_block == 0)    begin failures++; $display("FAIL tc never blocked a capture"); end
    if (n_tc_hold == 0)     begin failures++; $display("FAIL tc never held a register"); end
    if (n_tc_release == 0)  begin failures++; $display("FAIL tc never released register 2"); end
    if (n_obs_toggle == 0)  begin failures++; $display("FAIL obs never toggled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
