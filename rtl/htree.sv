// htree: H-tree network from the global controller to every PE of the array.
//
// Three levels of htree_node: the root splits into N_PEG PE groups, each group
// node into four quads of 2x2 PEs, each quad node into its four PEs.  A packet
// put on 'root' appears at every addressed leaf exactly three cycles later.
// Leaf leaf[g][p] is PE p (p = row*4 + col) of group g.  The hierarchical
// tree, the group of 16 PEs and the equal delivery time follow the source
// design; the quad level mirrors the 2x2 clusters of its array drawing.
module htree
  import dprap_pkg::*;
#(
  parameter int N_PEG = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  hpkt_t root,
  output hpkt_t leaf [N_PEG][PE_N]
);

  hpkt_t l1 [N_PEG];

  htree_node #(.FANOUT(N_PEG), .LEVEL(0)) u_root (
    .clk(clk), .rst_n(rst_n), .pin(root), .pout(l1)
  );

  for (genvar g = 0; g < N_PEG; g++) begin : g_peg
    hpkt_t l2 [4];
    htree_node #(.FANOUT(4), .LEVEL(1)) u_grp (
      .clk(clk), .rst_n(rst_n), .pin(l1[g]), .pout(l2)
    );
    for (genvar q = 0; q < 4; q++) begin : g_quad
      hpkt_t l3 [4];
      htree_node #(.FANOUT(4), .LEVEL(2)) u_quad (
        .clk(clk), .rst_n(rst_n), .pin(l2[q]), .pout(l3)
      );
      for (genvar i = 0; i < 4; i++) begin : g_pe
        // row = {q[1], i[1]}, col = {q[0], i[0]}
        localparam int ROW = (q / 2) * 2 + (i / 2);
        localparam int COL = (q % 2) * 2 + (i % 2);
        assign leaf[g][ROW * PEG_SIDE + COL] = l3[i];
      end
    end
  end

endmodule
