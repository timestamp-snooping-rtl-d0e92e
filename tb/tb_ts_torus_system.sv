// tb_ts_torus_system: end-to-end test of the 16-node torus at its default sizes.
//
// Every node issues N_REQ random GETS/GETM/PUTM requests to a small set of
// blocks spread over all homes, while the cache-side ready and the data
// network's send_ready stall at random. The testbench checks, independently
// of the RTL:
//   * total order: every node emits exactly the same sequence of transactions;
//   * logical time: a transaction injected by node s when s had sent g tokens
//     has OT = g + DMAX + SLACK_INIT, and every node processes it exactly when
//     its own token count equals that OT (never early, never late);
//   * every request is delivered once, per-source order is kept;
//   * the memory controllers' data sends and block takes match a reference
//     owner-bit model applied in the total order.
// It also counts the mechanisms of the design (GT held by a zero-slack
// transaction, token waits, the per-node outstanding limit, the one-per-GT
// injection rule, ties broken by source ID, cache-side hold-off of the
// ordered stream, memory sends and takes) and fails if any never happened.
module tb_ts_torus_system;
  import ts_pkg::*;

  localparam int unsigned N_REQ      = 24;
  localparam int unsigned DMAX       = 6;   // node->switch, 4 switch hops, switch->node
  localparam int unsigned SLACK_INIT = 2;   // default of ts_torus_system
  localparam int unsigned NBLK       = 48;  // blocks used: 3 per home node
  localparam int unsigned TOTAL      = NODES * N_REQ;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     init_done   [NODES];
  logic     req_valid   [NODES];
  logic     req_ready   [NODES];
  req_e     req_kind    [NODES];
  blk_t     req_blk     [NODES];
  logic     ord_valid   [NODES];
  logic     cache_ready [NODES];
  ord_txn_t ord_txn     [NODES];
  logic     ord_fire    [NODES];
  logic     send_valid  [NODES];
  logic     send_ready  [NODES];
  node_id_t send_dest   [NODES];
  blk_t     send_blk    [NODES];
  logic     take_valid  [NODES];
  node_id_t take_src    [NODES];
  blk_t     take_blk    [NODES];
  logic     stall_token [NODES];
  logic     stall_slack [NODES];
  logic [3:0] outstanding [NODES];
  logic [7:0] queued      [NODES];

  ts_torus_system dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---- logical time of every node: tokens its endpoint has sent -----------
  int unsigned gt [NODES];
  logic        ep_tok [NODES];
  for (genvar n = 0; n < NODES; n++) begin : g_gt
    assign ep_tok[n] = dut.g_node[n].u_nif.ep_token;
    always @(posedge clk)
      if (!rst_n) gt[n] <= 0;
      else if (ep_tok[n]) gt[n] <= gt[n] + 1;
  end

  // ---- injected transactions, per source ------------------------------------
  typedef struct { req_e kind; blk_t blk; int unsigned ot; } inj_t;
  inj_t inj [NODES][$];
  int unsigned n_sent [NODES];

  // ---- the reference total order ---------------------------------------------
  ord_txn_t    ref_seq [TOTAL];
  int unsigned ref_ot  [TOTAL];
  int unsigned ref_len = 0;
  int unsigned n_ord  [NODES];               // transactions ordered at node n
  int unsigned seen   [NODES][NODES];        // node n has seen k txns of src s

  // ---- reference memory model ------------------------------------------------
  bit cache_owns [NBLK];
  typedef struct { bit is_send; node_id_t node; blk_t blk; } mev_t;
  mev_t exp_mem [NODES][$];

  // ---- mechanism counters ----------------------------------------------------
  int unsigned c_stall_slack = 0, c_stall_token = 0, c_out_limit = 0, c_one_per_gt = 0;
  int unsigned c_tie = 0, c_cache_hold = 0, c_send = 0, c_take = 0;
  bit          fired_since_token [NODES];

  // ---- request generators ------------------------------------------------------
  for (genvar n = 0; n < NODES; n++) begin : g_src
    always @(posedge clk) begin
      if (!rst_n) begin
        req_valid[n] <= 1'b0;
        req_kind[n]  <= REQ_GETS;
        req_blk[n]   <= '0;
        n_sent[n]    = 0;
      end else begin
        if (req_valid[n] && req_ready[n]) begin
          inj[n].push_back('{kind: req_kind[n], blk: req_blk[n],
                             ot: gt[n] + DMAX + SLACK_INIT});
          n_sent[n]++;
        end
        if (!req_valid[n] || req_ready[n]) begin
          if (n_sent[n] < N_REQ && init_done[n] && ($urandom % 4 != 0)) begin
            req_valid[n] <= 1'b1;
            req_kind[n]  <= req_e'($urandom % 3);
            req_blk[n]   <= blk_t'($urandom % NBLK);
          end else begin
            req_valid[n] <= 1'b0;
          end
        end
      end
    end
  end

  // ---- ordered streams: total order, logical time, memory reference -----------
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < NODES; n++) begin
        n_ord[n] = 0;
        fired_since_token[n] = 1'b0;
        for (int s = 0; s < NODES; s++) seen[n][s] = 0;
        cache_ready[n] <= 1'b1;
        send_ready[n]  <= 1'b1;
      end
      for (int b = 0; b < NBLK; b++) cache_owns[b] = 1'b0;
    end else begin
      for (int n = 0; n < NODES; n++) begin
        cache_ready[n] <= ($urandom % 8 != 0);
        send_ready[n]  <= ($urandom % 3 != 0);
        if (stall_slack[n]) c_stall_slack++;
        if (stall_token[n]) c_stall_token++;
        if (req_valid[n] && !req_ready[n]) begin
          if (outstanding[n] == 4'd8) c_out_limit++;
          else c_one_per_gt++;
        end
        if (ord_valid[n] && !cache_ready[n]) c_cache_hold++;
        if (ep_tok[n]) fired_since_token[n] = 1'b0;
      end
      for (int n = 0; n < NODES; n++) begin
        if (ord_fire[n]) begin
          ord_txn_t t;
          int unsigned k, s;
          t = ord_txn[n];
          s = t.src;
          k = n_ord[n];
          // tie: a second transaction processed in the same logical round
          if (n == 0 && fired_since_token[0]) c_tie++;
          fired_since_token[n] = 1'b1;
          // delivered once, in per-source order, with the injected contents
          check(seen[n][s] < inj[s].size(), $sformatf("node %0d: unknown txn from %0d", n, s));
          if (seen[n][s] < inj[s].size()) begin
            check(inj[s][seen[n][s]].kind == t.kind && inj[s][seen[n][s]].blk == t.blk,
                  $sformatf("node %0d: txn %0d of src %0d altered", n, seen[n][s], s));
            check(inj[s][seen[n][s]].ot == gt[n],
                  $sformatf("node %0d: src %0d txn processed at GT %0d, OT %0d",
                            n, s, gt[n], inj[s][seen[n][s]].ot));
          end
          seen[n][s]++;
          // total order
          if (k == ref_len) begin
            ref_seq[k] = t;
            ref_ot[k]  = gt[n];
            ref_len++;
            // memory reference model, applied once per position of the order
            if (t.blk < NBLK) begin
              int unsigned b, h;
              b = t.blk;
              h = b % NODES;
              case (t.kind)
                REQ_GETS: begin
                  if (cache_owns[b]) exp_mem[h].push_back('{is_send: 0, node: t.src, blk: t.blk});
                  else               exp_mem[h].push_back('{is_send: 1, node: t.src, blk: t.blk});
                  cache_owns[b] = 1'b0;
                end
                REQ_GETM: begin
                  if (!cache_owns[b]) exp_mem[h].push_back('{is_send: 1, node: t.src, blk: t.blk});
                  cache_owns[b] = 1'b1;
                end
                default: begin
                  exp_mem[h].push_back('{is_send: 0, node: t.src, blk: t.blk});
                  cache_owns[b] = 1'b0;
                end
              endcase
            end
          end else begin
            check(k < ref_len && ref_seq[k] == t && ref_ot[k] == gt[n],
                  $sformatf("node %0d: position %0d differs from the total order", n, k));
          end
          n_ord[n]++;
        end
        // memory controller events
        if (send_valid[n] && send_ready[n]) begin
          c_send++;
          check(exp_mem[n].size() > 0 && exp_mem[n][0].is_send &&
                exp_mem[n][0].node == send_dest[n] && exp_mem[n][0].blk == send_blk[n],
                $sformatf("mem %0d: unexpected send of blk %0d to %0d", n, send_blk[n], send_dest[n]));
          if (exp_mem[n].size() > 0) void'(exp_mem[n].pop_front());
        end
        if (take_valid[n]) begin
          c_take++;
          check(exp_mem[n].size() > 0 && !exp_mem[n][0].is_send &&
                exp_mem[n][0].node == take_src[n] && exp_mem[n][0].blk == take_blk[n],
                $sformatf("mem %0d: unexpected take of blk %0d from %0d", n, take_blk[n], take_src[n]));
          if (exp_mem[n].size() > 0) void'(exp_mem[n].pop_front());
        end
      end
    end
  end

  function automatic bit all_done();
    for (int n = 0; n < NODES; n++) begin
      if (n_ord[n] != TOTAL) return 1'b0;
      if (exp_mem[n].size() != 0) return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic finish_report();
    for (int n = 0; n < NODES; n++) begin
      check(n_ord[n] == TOTAL, $sformatf("node %0d ordered %0d of %0d", n, n_ord[n], TOTAL));
      check(exp_mem[n].size() == 0, $sformatf("mem %0d: %0d expected events missing", n, exp_mem[n].size()));
    end
    $display("mechanisms: gt_held_by_zero_slack=%0d token_wait=%0d outstanding_limit=%0d one_per_gt=%0d tie_break=%0d cache_hold=%0d mem_send=%0d mem_take=%0d",
             c_stall_slack, c_stall_token, c_out_limit, c_one_per_gt, c_tie, c_cache_hold, c_send, c_take);
    check(c_stall_slack > 0, "mechanism never seen: GT held by zero-slack transaction");
    check(c_stall_token > 0, "mechanism never seen: token wait");
    check(c_out_limit   > 0, "mechanism never seen: outstanding limit");
    check(c_one_per_gt  > 0, "mechanism never seen: one injection per GT");
    check(c_tie         > 0, "mechanism never seen: tie broken by source ID");
    check(c_cache_hold  > 0, "mechanism never seen: ordered stream held by cache side");
    check(c_send        > 0, "mechanism never seen: memory sends data");
    check(c_take        > 0, "mechanism never seen: memory takes data");
    $display("ordered %0d transactions at every node, final GT %0d, %0d cycles", ref_len, gt[0], cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!init_done[0]) @(posedge clk);
    while (!all_done()) @(posedge clk);
    repeat (20) @(posedge clk);
    finish_report();
  end

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish_report();
  end

endmodule
