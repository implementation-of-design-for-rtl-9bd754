// dft_xor_tree: balanced XOR tree that compacts N observation points into a
// single test output.
//
// Any single change on one input flips the output, so a fault effect that
// reaches one of the observed nets becomes visible on one pin instead of N.
// The tree is built level by level: at each level neighbouring values are
// XORed in pairs and an odd last value passes up unchanged, so adjacent inputs
// meet first and the depth is ceil(log2 N). Callers place nets that
// switch together (the two rails of one dual-rail signal) next to each other,
// which balances the tree both in depth and in switching probability. For
// N = 6 this gives ((d0^d1)^(d2^d3))^(d4^d5).
//
// Interface: d[N-1:0] observation points, y compacted output. Plain Boolean
// logic, zero delay.
module dft_xor_tree #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] d,
  output logic         y
);

  localparam int unsigned LEVELS = $clog2(N);

  // lvl[l][i] is node i of level l; level 0 holds the inputs.
  logic [N-1:0] lvl [LEVELS+1];

  assign lvl[0] = d;

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned CNT = (N + (1 << l) - 1) >> l;  // nodes at level l
    localparam int unsigned NXT = (CNT + 1) / 2;            // nodes at level l+1
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i < NXT && 2 * i + 1 < CNT) begin : g_xor
        assign lvl[l+1][i] = lvl[l][2*i] ^ lvl[l][2*i+1];
      end else if (i < NXT) begin : g_pass
        assign lvl[l+1][i] = lvl[l][2*i];
      end else begin : g_none
        assign lvl[l+1][i] = 1'b0;
      end
    end
  end

  assign y = lvl[LEVELS][0];

endmodule
