// ts_torus_system: 16-node timestamp snooping address network on a 4x4 torus.
//
// Each node n = 4*y + x holds a network interface (ts_node_if: source side and
// the ordering endpoint), a memory controller for its share of memory
// (ts_mem_ctrl) and a 5-port switch (ts_switch) integrated on the node, wired
// to its four torus neighbours with wrap-around links in both dimensions.
// Every address transaction a node injects is broadcast along a spanning tree
// to all 16 nodes, itself included; every node then emits all transactions in
// the same logical total order on ord_*, which the memory controllers consume
// together with the nodes' cache controllers.
//
// The processor cores and caches, the DRAM and the separate data network are
// not part of this module. Their connection points are ports: req_* (requests
// from each node's cache controller), ord_* with cache_ready (the ordered
// stream as seen by each cache controller; a node's stream advances only when
// both its cache controller and its memory controller take a transaction),
// send_* (memory asks the data network to send a block) and take_* (memory
// takes a written block). stall_* and the counts are status for monitoring.
//
// Port numbering of a switch: 0 local, 1 east (+x), 2 west (-x), 3 north (+y),
// 4 south (-y). The east output of node (x, y) feeds the west input of node
// (x+1 mod 4, y), and so on. The topology follows the published 4x4
// bidirectional torus; the naming is this design's.
module ts_torus_system
  import ts_pkg::*;
#(
  parameter int unsigned NBUF       = 64,
  parameter int unsigned DEPTH      = 128,
  parameter int unsigned SLACK_INIT = 2,
  parameter int unsigned MAX_OUT    = 8,
  parameter int unsigned BLOCKS     = 1048576
) (
  input  logic     clk,
  input  logic     rst_n,
  output logic     init_done   [NODES],
  // requests from the cache controllers
  input  logic     req_valid   [NODES],
  output logic     req_ready   [NODES],
  input  req_e     req_kind    [NODES],
  input  blk_t     req_blk     [NODES],
  // ordered transactions to the cache controllers
  output logic     ord_valid   [NODES],
  input  logic     cache_ready [NODES],
  output ord_txn_t ord_txn     [NODES],
  output logic     ord_fire    [NODES],
  // memory controllers to the data network / DRAM
  output logic     send_valid  [NODES],
  input  logic     send_ready  [NODES],
  output node_id_t send_dest   [NODES],
  output blk_t     send_blk    [NODES],
  output logic     take_valid  [NODES],
  output node_id_t take_src    [NODES],
  output blk_t     take_blk    [NODES],
  // status
  output logic     stall_token [NODES],
  output logic     stall_slack [NODES],
  output logic [$clog2(MAX_OUT+1)-1:0] outstanding [NODES],
  output logic [$clog2(DEPTH+1)-1:0]   queued      [NODES]
);

  // switch-side link signals, indexed [node][port]
  logic      sw_in_valid  [NODES][NPORTS];
  logic      sw_in_ready  [NODES][NPORTS];
  addr_txn_t sw_in_txn    [NODES][NPORTS];
  logic      sw_in_token  [NODES][NPORTS];
  logic      sw_out_valid [NODES][NPORTS];
  logic      sw_out_ready [NODES][NPORTS];
  addr_txn_t sw_out_txn   [NODES][NPORTS];
  logic      sw_out_token [NODES][NPORTS];

  // where the output of (node, port) goes: neighbour node and its input port
  function automatic int unsigned nbr(int unsigned n, int unsigned p);
    int unsigned x, y;
    x = n % TORUS_K;
    y = n / TORUS_K;
    case (p)
      P_EAST:  return y * TORUS_K + (x + 1) % TORUS_K;
      P_WEST:  return y * TORUS_K + (x + TORUS_K - 1) % TORUS_K;
      P_NORTH: return ((y + 1) % TORUS_K) * TORUS_K + x;
      P_SOUTH: return ((y + TORUS_K - 1) % TORUS_K) * TORUS_K + x;
      default: return n;
    endcase
  endfunction

  function automatic int unsigned opposite(int unsigned p);
    case (p)
      P_EAST:  return P_WEST;
      P_WEST:  return P_EAST;
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      default: return P_LOCAL;
    endcase
  endfunction

  for (genvar n = 0; n < NODES; n++) begin : g_node
    logic     mem_ready;
    logic     ord_rdy;

    // torus links: output (n, p) drives input (nbr(n, p), opposite(p))
    for (genvar p = 1; p < NPORTS; p++) begin : g_link
      localparam int unsigned DN = nbr(n, p);
      localparam int unsigned DP = opposite(p);
      assign sw_in_valid[DN][DP] = sw_out_valid[n][p];
      assign sw_in_txn[DN][DP]   = sw_out_txn[n][p];
      assign sw_in_token[DN][DP] = sw_out_token[n][p];
      assign sw_out_ready[n][p]  = sw_in_ready[DN][DP];
    end

    ts_switch #(.MY_ID(n), .NBUF(NBUF)) u_switch (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (sw_in_valid[n]),
      .in_ready   (sw_in_ready[n]),
      .in_txn     (sw_in_txn[n]),
      .in_token   (sw_in_token[n]),
      .out_valid  (sw_out_valid[n]),
      .out_ready  (sw_out_ready[n]),
      .out_txn    (sw_out_txn[n]),
      .out_token  (sw_out_token[n]),
      .stall_token(stall_token[n]),
      .stall_slack(stall_slack[n])
    );

    ts_node_if #(
      .MY_ID(n), .SLACK_INIT(SLACK_INIT), .MAX_OUT(MAX_OUT), .DEPTH(DEPTH)
    ) u_nif (
      .clk         (clk),
      .rst_n       (rst_n),
      .req_valid   (req_valid[n]),
      .req_ready   (req_ready[n]),
      .req_kind    (req_kind[n]),
      .req_blk     (req_blk[n]),
      .sw_out_valid(sw_in_valid[n][P_LOCAL]),
      .sw_out_ready(sw_in_ready[n][P_LOCAL]),
      .sw_out_txn  (sw_in_txn[n][P_LOCAL]),
      .sw_out_token(sw_in_token[n][P_LOCAL]),
      .sw_in_valid (sw_out_valid[n][P_LOCAL]),
      .sw_in_ready (sw_out_ready[n][P_LOCAL]),
      .sw_in_txn   (sw_out_txn[n][P_LOCAL]),
      .sw_in_token (sw_out_token[n][P_LOCAL]),
      .ord_valid   (ord_valid[n]),
      .ord_ready   (ord_rdy),
      .ord_txn     (ord_txn[n]),
      .outstanding (outstanding[n]),
      .queued      (queued[n])
    );

    // the ordered stream advances when cache and memory controller both take it
    assign ord_rdy     = mem_ready && cache_ready[n];
    assign ord_fire[n] = ord_valid[n] && ord_rdy;

    ts_mem_ctrl #(.MY_ID(n), .BLOCKS(BLOCKS)) u_mem (
      .clk       (clk),
      .rst_n     (rst_n),
      .init_done (init_done[n]),
      .ord_valid (ord_valid[n] && cache_ready[n]),
      .ord_ready (mem_ready),
      .ord_txn   (ord_txn[n]),
      .send_valid(send_valid[n]),
      .send_ready(send_ready[n]),
      .send_dest (send_dest[n]),
      .send_blk  (send_blk[n]),
      .take_valid(take_valid[n]),
      .take_src  (take_src[n]),
      .take_blk  (take_blk[n])
    );
  end

endmodule
