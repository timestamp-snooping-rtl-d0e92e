// ts_endpoint: destination side of a node, restoring the logical total order.
//
// Address transactions arrive from the adjacent switch early and out of order.
// Each is inserted into an augmented priority queue of DEPTH entries with its
// slack; at the endpoint the slack equals OT - GT, the logical time left until
// the transaction may be processed. Tokens from the switch are counted like a
// switch input. While a token is held, the endpoint
//   1. processes (emits on out_*) every queued zero-slack transaction, one per
//      cycle, in tie-break order, then
//   2. decrements the slack of every queued transaction, consumes the token
//      and sends one token back to its switch (its GT advances by one).
// A transaction that arrives while tokens are held moves past them, so its
// slack grows by the counter value, exactly as in a switch. Zero-slack
// transactions therefore wait for the token that guarantees that no earlier
// transaction can still arrive.
//
// Ties (equal OT, i.e. all zero-slack entries of one round) are broken by
// source ID with a priority that rotates with the endpoint's GT: the source
// (GT mod NODES) goes first. Every endpoint holds the same GT when it
// processes a given OT, so all endpoints produce the same order, and no source
// is always last. The published design only asks for some function of source
// IDs; the rotation is this design's choice. DEPTH = 128 is the published
// worst-case buffering (8 outstanding transactions from each of 16 nodes), so
// in_ready is only a safeguard and an assertion flags any overflow.
//
// Timing: out_valid/out_txn and out_token are combinational from state (and
// out_ready for the token); the token goes out in the cycle after the last
// zero-slack transaction of the round has been taken. in_ready depends only
// on state. The link ordering rule (transaction before token within a cycle)
// is the same as in ts_switch.
module ts_endpoint
  import ts_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic      clk,
  input  logic      rst_n,
  // from the switch
  input  logic      in_valid,
  output logic      in_ready,
  input  addr_txn_t in_txn,
  input  logic      in_token,
  // ordered transactions to the coherence controllers
  output logic      out_valid,
  input  logic      out_ready,
  output ord_txn_t  out_txn,
  // token back to the switch
  output logic      out_token,
  // status: queued transactions
  output logic [$clog2(DEPTH+1)-1:0] occupancy
);

  localparam int unsigned IDX_W = $clog2(DEPTH);

  logic [TOK_W-1:0] tok_cnt;
  node_id_t         gt_rot;            // GT modulo NODES, for tie-breaking
  logic             q_valid [DEPTH];
  slack_t           q_slack [DEPTH];
  ord_txn_t         q_txn   [DEPTH];

  // ---- pick the zero-slack entry with the highest rotating priority --------
  logic             have_zero;
  logic [IDX_W-1:0] zero_idx;
  logic             have_free;
  logic [IDX_W-1:0] free_idx;

  always_comb begin
    node_id_t best_rank, rank;
    have_zero = 1'b0;
    zero_idx  = '0;
    best_rank = '1;
    have_free = 1'b0;
    free_idx  = '0;
    occupancy = '0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      rank = q_txn[i].src - gt_rot;
      if (q_valid[i]) begin
        occupancy = occupancy + 1'b1;
        if (q_slack[i] == '0 && (!have_zero || rank < best_rank)) begin
          have_zero = 1'b1;
          zero_idx  = IDX_W'(i);
          best_rank = rank;
        end
      end else if (!have_free) begin
        have_free = 1'b1;
        free_idx  = IDX_W'(i);
      end
    end
  end

  logic holding, pop, prop;
  assign holding   = (tok_cnt != '0);
  assign out_valid = holding && have_zero;
  assign out_txn   = q_txn[zero_idx];
  assign pop       = out_valid && out_ready;
  assign prop      = holding && !have_zero;
  assign out_token = prop;
  assign in_ready  = have_free;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tok_cnt <= TOK_W'(INIT_TOKENS);
      gt_rot  <= '0;
      for (int unsigned i = 0; i < DEPTH; i++) begin
        q_valid[i] <= 1'b0;
        q_slack[i] <= '0;
        q_txn[i]   <= '0;
      end
    end else begin
      if (pop) q_valid[zero_idx] <= 1'b0;
      if (prop) begin
        gt_rot <= gt_rot + 1'b1;
        for (int unsigned i = 0; i < DEPTH; i++)
          if (q_valid[i]) q_slack[i] <= q_slack[i] - 1'b1;
      end
      if (in_valid && in_ready) begin
        q_valid[free_idx] <= 1'b1;
        q_slack[free_idx] <= in_txn.slack + slack_t'(tok_cnt) - slack_t'(prop);
        q_txn[free_idx]   <= '{src: in_txn.src, kind: in_txn.kind, blk: in_txn.blk};
      end
      tok_cnt <= tok_cnt - TOK_W'(prop) + TOK_W'(in_token);
    end
  end

  // ---- rules ---------------------------------------------------------------
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> in_ready);
  a_tok_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(tok_cnt == '1 && in_token && !prop));

endmodule
