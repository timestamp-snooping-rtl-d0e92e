// ts_torus_route: broadcast routing and Delta-D table of one 4x4 torus switch.
//
// Every switch forwards a transaction along a fixed minimum-distance spanning
// tree rooted at the transaction's source, so the lookup key is the source ID
// alone. For each source the table gives the set of output ports the switch
// forwards on (the local port delivers to this switch's own node) and, per
// port, Delta-D: how much shorter the deepest path below that branch is than
// the deepest path below this switch. Delta-D is zero on the branch that
// continues the longest path and is added to the slack when the transaction
// leaves on a shorter branch, which keeps its ordering time unchanged.
//
// The tree (this design's choice of a minimum-distance tree): with (rx, ry) the
// position of this switch relative to the source, modulo 4, the transaction
// first travels along the source's row (rx = 1 and 2 reached eastward, rx = 3
// westward), and every switch of that row then sends it along its column
// (ry = 1 and 2 northward, ry = 3 southward). Every node is reached by a
// shortest path; the worst case is 4 switch-to-switch hops as in the published
// torus. Depths count links, including the final switch-to-node link.
//
// The table is a read-only array computed at elaboration time from that rule;
// NLOOK independent read ports let a switch look up all its inputs at once.
// Purely combinational.
module ts_torus_route
  import ts_pkg::*;
#(
  parameter int unsigned MY_ID = 0,
  parameter int unsigned NLOOK = NPORTS
) (
  input  node_id_t                        src  [NLOOK],
  output logic     [NPORTS-1:0]           mask [NLOOK],
  output logic     [NPORTS-1:0][DD_W-1:0] dd   [NLOOK]
);

  typedef struct packed {
    logic [NPORTS-1:0]           mask;
    logic [NPORTS-1:0][DD_W-1:0] dd;
  } route_t;

  // Depth in links of the broadcast subtree below a switch at relative
  // position (rx, ry), counting the delivery link to its own node.
  function automatic int unsigned subtree_depth(int unsigned rx, int unsigned ry);
    if (ry == 2 || ry == 3) return 1;               // column leaves
    if (ry == 1)            return 2;               // north to ry = 2
    // ry == 0: row of the source
    case (rx)
      0:       return 5;                            // east chain rx=1,2 then column
      1:       return 4;                            // east to rx = 2, then column
      default: return 3;                            // column only
    endcase
  endfunction

  function automatic route_t route_entry(int unsigned me, int unsigned s);
    route_t      r;
    int unsigned rx, ry, d;
    rx = ((me % TORUS_K) + TORUS_K - (s % TORUS_K)) % TORUS_K;
    ry = ((me / TORUS_K) + TORUS_K - (s / TORUS_K)) % TORUS_K;
    d  = subtree_depth(rx, ry);
    r  = '0;
    r.mask[P_LOCAL] = 1'b1;
    r.dd[P_LOCAL]   = DD_W'(d - 1);
    if (ry == 0) begin
      if (rx == 0) begin
        r.mask[P_EAST] = 1'b1;  r.dd[P_EAST] = DD_W'(d - 1 - subtree_depth(1, 0));
        r.mask[P_WEST] = 1'b1;  r.dd[P_WEST] = DD_W'(d - 1 - subtree_depth(3, 0));
      end else if (rx == 1) begin
        r.mask[P_EAST] = 1'b1;  r.dd[P_EAST] = DD_W'(d - 1 - subtree_depth(2, 0));
      end
      r.mask[P_NORTH] = 1'b1;   r.dd[P_NORTH] = DD_W'(d - 1 - subtree_depth(rx, 1));
      r.mask[P_SOUTH] = 1'b1;   r.dd[P_SOUTH] = DD_W'(d - 1 - subtree_depth(rx, 3));
    end else if (ry == 1) begin
      r.mask[P_NORTH] = 1'b1;   r.dd[P_NORTH] = DD_W'(d - 1 - subtree_depth(rx, 2));
    end
    return r;
  endfunction

  function automatic route_t [NODES-1:0] build_table(int unsigned me);
    route_t [NODES-1:0] t;
    for (int unsigned s = 0; s < NODES; s++) t[s] = route_entry(me, s);
    return t;
  endfunction

  localparam route_t [NODES-1:0] TABLE = build_table(MY_ID);

  always_comb begin
    for (int unsigned i = 0; i < NLOOK; i++) begin
      mask[i] = TABLE[src[i]].mask;
      dd[i]   = TABLE[src[i]].dd;
    end
  end

endmodule
