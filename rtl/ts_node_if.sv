// ts_node_if: network interface of one processor/memory node.
//
// Source side: a coherence request from the node's cache controller is sent to
// the adjacent switch with a non-negative initial slack S = SLACK_INIT. This
// implicitly sets its ordering time to OT = GT(node) + Dmax + S, where Dmax is
// the logical time to the furthest node; no time field is carried. A small
// positive S lets the GTs advance under moderate contention without delaying
// the destinations much. The node's GT is that of its endpoint: the count of
// tokens it has sent to the switch.
//
// Two limits make the published buffer sizing hold. At most MAX_OUT = 8
// transactions of the node may be outstanding, so that with 16 nodes no
// endpoint ever holds more than its 128 entries. A transaction counts as
// outstanding until every node is certain to have processed it: GTs of
// neighbouring nodes differ by at most one per link, so once the node's own GT
// has passed OT + DMAX, where DMAX is the longest path in links (6 in the
// 4x4 torus), no endpoint can still hold it. And at most one transaction is
// injected per GT step, so that (OT, source) is unique and the tie-break by
// source ID gives a total order. Both rules are this design's choices.
//
// Destination side: ts_endpoint, whose ordered output is this module's
// ord_* port and whose tokens go to the switch on sw_out_token.
//
// Timing: req_ready and sw_out_valid are combinational (req_valid, state and
// the switch's registered in_ready); a request is accepted in the cycle it is
// sent to the switch. The request is not registered on its way out:
// sw_out_txn.kind and .blk are the req_kind and req_blk inputs, and .slack and
// .src are the constants SLACK_INIT and MY_ID, so synthesis sees those 50
// output bits as wires and constants. That is intended: the switch buffers the
// transaction anyway, and a register here would only add a cycle of latency.
module ts_node_if
  import ts_pkg::*;
#(
  parameter int unsigned MY_ID      = 0,
  parameter int unsigned SLACK_INIT = 2,
  parameter int unsigned MAX_OUT    = 8,
  parameter int unsigned DEPTH      = 128,
  parameter int unsigned DMAX       = 6
) (
  input  logic      clk,
  input  logic      rst_n,
  // requests from the cache controller
  input  logic      req_valid,
  output logic      req_ready,
  input  req_e      req_kind,
  input  blk_t      req_blk,
  // to the switch's local input
  output logic      sw_out_valid,
  input  logic      sw_out_ready,
  output addr_txn_t sw_out_txn,
  output logic      sw_out_token,
  // from the switch's local output
  input  logic      sw_in_valid,
  output logic      sw_in_ready,
  input  addr_txn_t sw_in_txn,
  input  logic      sw_in_token,
  // ordered transactions to the coherence controllers
  output logic      ord_valid,
  input  logic      ord_ready,
  output ord_txn_t  ord_txn,
  // status
  output logic [$clog2(MAX_OUT+1)-1:0] outstanding,
  output logic [$clog2(DEPTH+1)-1:0]   queued
);

  localparam int unsigned GT_W   = 16;
  // GT steps from injection until no endpoint can still hold the transaction
  localparam int unsigned RETIRE = 2 * DMAX + SLACK_INIT + 1;
  localparam int unsigned PTR_W  = (MAX_OUT > 1) ? $clog2(MAX_OUT) : 1;

  logic            ep_token;
  logic            sent_this_gt;
  logic            inj_ok, fire, retire;
  logic [GT_W-1:0] gt;                     // tokens sent by this node
  logic [GT_W-1:0] inj_gt [MAX_OUT];       // GT at injection, oldest first
  logic [PTR_W-1:0] head, tail;

  assign inj_ok       = !sent_this_gt && (outstanding < ($clog2(MAX_OUT+1))'(MAX_OUT));
  assign sw_out_valid = req_valid && inj_ok;
  assign req_ready    = inj_ok && sw_out_ready;
  assign fire         = req_valid && req_ready;
  assign sw_out_txn   = '{slack: slack_t'(SLACK_INIT), src: node_id_t'(MY_ID),
                          kind: req_kind, blk: req_blk};
  assign sw_out_token = ep_token;
  assign retire       = (outstanding != '0) && ((gt - inj_gt[head]) >= GT_W'(RETIRE));

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(MAX_OUT - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sent_this_gt <= 1'b0;
      outstanding  <= '0;
      gt           <= '0;
      head         <= '0;
      tail         <= '0;
      for (int unsigned i = 0; i < MAX_OUT; i++) inj_gt[i] <= '0;
    end else begin
      // a transaction sent in the cycle of a token precedes that token
      sent_this_gt <= ep_token ? 1'b0 : (sent_this_gt || fire);
      gt           <= gt + GT_W'(ep_token);
      outstanding  <= outstanding + fire - retire;
      if (fire) begin
        inj_gt[tail] <= gt;
        tail         <= inc(tail);
      end
      if (retire) head <= inc(head);
    end
  end

  ts_endpoint #(.DEPTH(DEPTH)) u_ep (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (sw_in_valid),
    .in_ready (sw_in_ready),
    .in_txn   (sw_in_txn),
    .in_token (sw_in_token),
    .out_valid(ord_valid),
    .out_ready(ord_ready),
    .out_txn  (ord_txn),
    .out_token(ep_token),
    .occupancy(queued)
  );

endmodule
