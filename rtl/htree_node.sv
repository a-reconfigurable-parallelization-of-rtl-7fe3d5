// htree_node: one branching point of the H-tree configuration network.
//
// Registers the packet coming from its parent and hands it, one cycle later,
// to each child whose address digit it carries (or to all children when the
// packet is a broadcast at this level).  Children not addressed see HC_NOP.
// LEVEL selects the digit: 0 = PE group (peg field, broadcast all_peg),
// 1 = quad of 2x2 PEs inside a group ({row[1], col[1]}), 2 = PE inside a quad
// ({row[0], col[0]}); levels 1 and 2 broadcast on all_pe.  Because every path
// from the root to a PE crosses the same number of nodes, a packet reaches all
// addressed PEs in the same cycle, as the source design requires of its
// H-tree; the address filtering and the register per node are this
// implementation's choice.
module htree_node
  import dprap_pkg::*;
#(
  parameter int FANOUT = 4,
  parameter int LEVEL  = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  hpkt_t pin,
  output hpkt_t pout [FANOUT]
);

  hpkt_t q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= pin;
  end

  function automatic logic hit(input hpkt_t p, input int c);
    case (LEVEL)
      0:       return p.all_peg || int'(p.peg) == c;
      1:       return p.all_pe  || int'({p.pe[3], p.pe[1]}) == c;
      default: return p.all_pe  || int'({p.pe[2], p.pe[0]}) == c;
    endcase
  endfunction

  always_comb begin
    for (int c = 0; c < FANOUT; c++)
      pout[c] = (q.cmd != HC_NOP && hit(q, c)) ? q : '0;
  end

endmodule
