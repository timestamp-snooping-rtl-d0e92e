// tb_ts_torus_route: checks the broadcast routing / Delta-D tables of all 16
// switches of the 4x4 torus against the rules they must satisfy.
//
// For every source the testbench follows the tables from the source's switch
// through the torus links and checks that
//   * every node receives the transaction exactly once (a spanning tree);
//   * every node is reached over a shortest path (torus distance);
//   * the logical time is the same for every destination: the links on the
//     path (node-to-switch, switch hops, switch-to-node) plus the Delta-D
//     added along the path equal the deepest path, 6 links, for all nodes;
//   * Delta-D is zero on at least one branch of every switch that forwards.
module tb_ts_torus_route;
  import ts_pkg::*;

  localparam int unsigned DMAX = 6;

  node_id_t                    srcs [NODES];
  logic [NPORTS-1:0]           mask [NODES][NODES];   // [switch][source]
  logic [NPORTS-1:0][DD_W-1:0] dd   [NODES][NODES];

  for (genvar s = 0; s < NODES; s++) begin : g_src
    assign srcs[s] = node_id_t'(s);
  end

  for (genvar n = 0; n < NODES; n++) begin : g_sw
    ts_torus_route #(.MY_ID(n), .NLOOK(NODES)) u_route (
      .src (srcs),
      .mask(mask[n]),
      .dd  (dd[n])
    );
  end

  int unsigned checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int unsigned nbr(int unsigned n, int unsigned p);
    int unsigned x = n % TORUS_K, y = n / TORUS_K;
    case (p)
      P_EAST:  return y * TORUS_K + (x + 1) % TORUS_K;
      P_WEST:  return y * TORUS_K + (x + TORUS_K - 1) % TORUS_K;
      P_NORTH: return ((y + 1) % TORUS_K) * TORUS_K + x;
      default: return ((y + TORUS_K - 1) % TORUS_K) * TORUS_K + x;
    endcase
  endfunction

  function automatic int unsigned ring_dist(int unsigned a, int unsigned b);
    int unsigned d = (a + TORUS_K - b) % TORUS_K;
    return (d > TORUS_K / 2) ? TORUS_K - d : d;
  endfunction

  initial begin
    #1;
    for (int unsigned s = 0; s < NODES; s++) begin
      int unsigned delivered [NODES];
      int unsigned hops [NODES];
      int unsigned tsum [NODES];     // links so far + Delta-D so far
      bit          visited [NODES];
      int unsigned queue [$];
      for (int unsigned n = 0; n < NODES; n++) begin
        delivered[n] = 0; visited[n] = 0; hops[n] = 0; tsum[n] = 0;
      end
      // node -> its own switch is the first link
      queue.push_back(s);
      visited[s] = 1;
      hops[s]    = 0;
      tsum[s]    = 1;
      while (queue.size() > 0) begin
        int unsigned n;
        logic has_zero;
        n = queue.pop_front();
        has_zero = 1'b0;
        for (int unsigned p = 0; p < NPORTS; p++) begin
          if (mask[n][s][p]) begin
            if (dd[n][s][p] == '0) has_zero = 1'b1;
            if (p == P_LOCAL) begin
              delivered[n]++;
              check(tsum[n] + 1 + dd[n][s][p] == DMAX,
                    $sformatf("src %0d -> node %0d: logical time %0d, expected %0d",
                              s, n, tsum[n] + 1 + dd[n][s][p], DMAX));
            end else begin
              int unsigned m;
              m = nbr(n, p);
              check(!visited[m], $sformatf("src %0d: switch %0d reached twice", s, m));
              if (!visited[m]) begin
                visited[m] = 1;
                hops[m]    = hops[n] + 1;
                tsum[m]    = tsum[n] + 1 + dd[n][s][p];
                queue.push_back(m);
              end
            end
          end
        end
        check(has_zero, $sformatf("src %0d, switch %0d: no zero Delta-D branch", s, n));
      end
      for (int unsigned n = 0; n < NODES; n++) begin
        check(delivered[n] == 1, $sformatf("src %0d: node %0d delivered %0d times", s, n, delivered[n]));
        check(hops[n] == ring_dist(n % TORUS_K, s % TORUS_K) + ring_dist(n / TORUS_K, s / TORUS_K),
              $sformatf("src %0d: node %0d reached in %0d hops", s, n, hops[n]));
      end
    end
    // the example from the source switch itself: E, W, N, S and local branches
    check(mask[0][0] == 5'b11111, "source switch does not fan out on all ports");
    check(dd[0][0][P_EAST] == 0 && dd[0][0][P_WEST] == 1 && dd[0][0][P_NORTH] == 2 &&
          dd[0][0][P_SOUTH] == 3 && dd[0][0][P_LOCAL] == 4, "source switch Delta-D values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
