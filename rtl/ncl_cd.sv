// ncl_cd: NCL completion detector.
//
// Folds N handshake (ko) lines into one. The output goes to rfd (1) only when
// every input is rfd and to rfn (0) only when every input is rfn; in between
// it holds. For N up to MAX_IN a single TH_NN gate does this. Wider inputs are
// split into groups of at most MAX_IN, each group gets a TH gate, and the
// group outputs are folded again by a smaller detector, giving a tree of
// C-element-like gates. The gate size limit MAX_IN = 4 is this design's
// choice, the usual largest threshold gate of an NCL gate library.
//
// Interface: ko_in[N] inputs, z output. Asynchronous: no clock.
module ncl_cd #(
  parameter int unsigned N      = 3,
  parameter int unsigned MAX_IN = 4
) (
  input  logic [N-1:0] ko_in,
  output logic         z
);

  if (N <= MAX_IN) begin : g_leaf
    ncl_thmn #(.M(N), .N(N)) u_th (.a(ko_in), .rst(1'b0), .z(z));
  end else begin : g_tree
    localparam int unsigned G = (N + MAX_IN - 1) / MAX_IN;  // number of groups
    logic [G-1:0] grp;
    for (genvar g = 0; g < G; g++) begin : g_grp
      localparam int unsigned LO = g * MAX_IN;
      localparam int unsigned HI = ((LO + MAX_IN) < N) ? (LO + MAX_IN) : N;
      ncl_thmn #(.M(HI - LO), .N(HI - LO)) u_th (
        .a(ko_in[HI-1:LO]), .rst(1'b0), .z(grp[g]));
    end
    ncl_cd #(.N(G), .MAX_IN(MAX_IN)) u_next (.ko_in(grp), .z(z));
  end

endmodule
