// ts_switch: timestamp snooping network switch with token-passing logical time.
//
// The switch forwards address transactions as soon as it can, in any order,
// and maintains its guarantee time (GT) implicitly as the number of tokens it
// has propagated. It holds one token counter per input port and one shared
// (logically centralised) buffer of NBUF transactions, each with its slack.
//
//   * A transaction entering on input i moves past the tokens counted on that
//     input: its slack grows by the counter value (Delta-GT = counter).
//   * A token is propagated when every input counter is non-zero and no
//     buffered transaction has zero slack. Propagating sends one token on
//     every output, decrements every input counter and decrements the slack of
//     every buffered transaction (Delta-GT = -1).
//   * A transaction leaving on output o carries slack + Delta-D(o), with
//     Delta-D read from the routing table in the same lookup (done once, on
//     entry, and stored with the buffer entry).
//   * Output arbitration gives precedence to zero-slack transactions (this
//     speeds token passing); among equals the lowest buffer index wins.
// A broadcast entry stays in the buffer until it has left on every output of
// its spanning tree. All of the above follows the published switch; the
// shared-buffer arbitration order and the flow control are this design's.
//
// Links: each direction carries a transaction with valid/ready and a one-bit
// token strobe without flow control. Within one cycle the transaction on a
// link is ordered before the token: a sender that both sends a transaction and
// propagates a token in a cycle removes the transaction first, and a receiver
// adds the counter value left after that cycle's propagation, before the
// incoming token is counted. out_token and out_valid are combinational from
// state and out_ready; in_ready is registered state only (free entries >=
// NPORTS), so every accepted transaction has a buffer entry. Transactions
// spend at least one cycle in the buffer. Counters start at INIT_TOKENS,
// which sets the logical time of one hop.
//
// Status outputs: stall_token (no token on some input) and stall_slack (a
// zero-slack transaction holds the GT back) report why a token was not
// propagated in this cycle.
module ts_switch
  import ts_pkg::*;
#(
  parameter int unsigned MY_ID = 0,
  parameter int unsigned NBUF  = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  // inputs (from neighbours and the local node)
  input  logic      in_valid [NPORTS],
  output logic      in_ready [NPORTS],
  input  addr_txn_t in_txn   [NPORTS],
  input  logic      in_token [NPORTS],
  // outputs
  output logic      out_valid [NPORTS],
  input  logic      out_ready [NPORTS],
  output addr_txn_t out_txn   [NPORTS],
  output logic      out_token [NPORTS],
  // status
  output logic      stall_token,
  output logic      stall_slack
);

  localparam int unsigned IDX_W = $clog2(NBUF);

  // ---- state ---------------------------------------------------------------
  logic [TOK_W-1:0]            tok_cnt  [NPORTS];
  logic                        b_valid  [NBUF];
  slack_t                      b_slack  [NBUF];
  ord_txn_t                    b_txn    [NBUF];
  logic [NPORTS-1:0]           b_pend   [NBUF];
  logic [NPORTS-1:0][DD_W-1:0] b_dd     [NBUF];

  // ---- routing lookup for arrivals -----------------------------------------
  node_id_t                    lk_src  [NPORTS];
  logic [NPORTS-1:0]           lk_mask [NPORTS];
  logic [NPORTS-1:0][DD_W-1:0] lk_dd   [NPORTS];

  always_comb
    for (int unsigned p = 0; p < NPORTS; p++) lk_src[p] = in_txn[p].src;

  ts_torus_route #(.MY_ID(MY_ID), .NLOOK(NPORTS)) u_route (
    .src (lk_src),
    .mask(lk_mask),
    .dd  (lk_dd)
  );

  // ---- output arbitration --------------------------------------------------
  logic [IDX_W-1:0] sel_idx [NPORTS];
  logic             sent    [NPORTS];

  always_comb begin
    for (int unsigned o = 0; o < NPORTS; o++) begin
      logic found_zero, found_any;
      logic [IDX_W-1:0] idx_zero, idx_any;
      found_zero = 1'b0; found_any = 1'b0;
      idx_zero = '0; idx_any = '0;
      for (int unsigned i = 0; i < NBUF; i++) begin
        if (b_valid[i] && b_pend[i][o]) begin
          if (!found_any) begin
            found_any = 1'b1;
            idx_any   = IDX_W'(i);
          end
          if (!found_zero && b_slack[i] == '0) begin
            found_zero = 1'b1;
            idx_zero   = IDX_W'(i);
          end
        end
      end
      sel_idx[o]          = found_zero ? idx_zero : idx_any;
      out_valid[o]        = found_any;
      out_txn[o].slack    = b_slack[sel_idx[o]] + slack_t'(b_dd[sel_idx[o]][o]);
      out_txn[o].src      = b_txn[sel_idx[o]].src;
      out_txn[o].kind     = b_txn[sel_idx[o]].kind;
      out_txn[o].blk      = b_txn[sel_idx[o]].blk;
      sent[o]             = found_any && out_ready[o];
    end
  end

  // ---- departures and token propagation ------------------------------------
  logic [NPORTS-1:0] pend_next  [NBUF];
  logic              keep       [NBUF];
  logic              prop;

  always_comb begin
    logic zero_left, tokens_ok;
    zero_left = 1'b0;
    for (int unsigned i = 0; i < NBUF; i++) begin
      pend_next[i] = b_pend[i];
      for (int unsigned o = 0; o < NPORTS; o++)
        if (sent[o] && sel_idx[o] == IDX_W'(i)) pend_next[i][o] = 1'b0;
      keep[i] = b_valid[i] && (pend_next[i] != '0);
      if (keep[i] && b_slack[i] == '0) zero_left = 1'b1;
    end
    tokens_ok = 1'b1;
    for (int unsigned p = 0; p < NPORTS; p++)
      if (tok_cnt[p] == '0) tokens_ok = 1'b0;
    prop        = tokens_ok && !zero_left;
    stall_token = !tokens_ok;
    stall_slack = tokens_ok && zero_left;
    for (int unsigned o = 0; o < NPORTS; o++) out_token[o] = prop;
  end

  // ---- arrivals: flow control and slot allocation ---------------------------
  int unsigned free_cnt;
  logic [IDX_W-1:0] slot [NPORTS];

  always_comb begin
    int unsigned k;
    free_cnt = 0;
    for (int unsigned i = 0; i < NBUF; i++)
      if (!b_valid[i]) free_cnt++;
    for (int unsigned p = 0; p < NPORTS; p++) in_ready[p] = (free_cnt >= NPORTS);
    // the p-th input gets the p-th free entry (at most NPORTS are needed)
    k = 0;
    for (int unsigned p = 0; p < NPORTS; p++) slot[p] = '0;
    for (int unsigned i = 0; i < NBUF; i++) begin
      if (!b_valid[i] && k < NPORTS) begin
        slot[k] = IDX_W'(i);
        k++;
      end
    end
  end

  // ---- state update --------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < NPORTS; p++) tok_cnt[p] <= TOK_W'(INIT_TOKENS);
      for (int unsigned i = 0; i < NBUF; i++) begin
        b_valid[i] <= 1'b0;
        b_slack[i] <= '0;
        b_txn[i]   <= '0;
        b_pend[i]  <= '0;
        b_dd[i]    <= '0;
      end
    end else begin
      // buffered transactions: departures, then the propagated token
      for (int unsigned i = 0; i < NBUF; i++) begin
        b_valid[i] <= keep[i];
        b_pend[i]  <= pend_next[i];
        if (keep[i] && prop) b_slack[i] <= b_slack[i] - 1'b1;
      end
      // arrivals pass the tokens still counted after this cycle's propagation
      for (int unsigned p = 0; p < NPORTS; p++) begin
        if (in_valid[p] && in_ready[p]) begin
          b_valid[slot[p]]     <= 1'b1;
          b_slack[slot[p]]     <= in_txn[p].slack + slack_t'(tok_cnt[p]) - slack_t'(prop);
          b_txn[slot[p]].src   <= in_txn[p].src;
          b_txn[slot[p]].kind  <= in_txn[p].kind;
          b_txn[slot[p]].blk   <= in_txn[p].blk;
          b_pend[slot[p]]      <= lk_mask[p];
          b_dd[slot[p]]        <= lk_dd[p];
        end
      end
      // token counters
      for (int unsigned p = 0; p < NPORTS; p++)
        tok_cnt[p] <= tok_cnt[p] - TOK_W'(prop) + TOK_W'(in_token[p]);
    end
  end

  // ---- rules ---------------------------------------------------------------
  for (genvar i = 0; i < NBUF; i++) begin : g_rule_buf
    // A propagated token never moves past a zero-slack transaction (S_new >= 0).
    a_slack_nonneg: assert property (@(posedge clk) disable iff (!rst_n)
      !(keep[i] && prop && b_slack[i] == '0));
  end
  for (genvar p = 0; p < NPORTS; p++) begin : g_rule_port
    a_tok_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      !(tok_cnt[p] == '1 && in_token[p] && !prop));
    a_slack_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      (in_valid[p] && in_ready[p]) |->
        (int'(in_txn[p].slack) + int'(tok_cnt[p]) < (1 << SLACK_W)));
  end

endmodule
