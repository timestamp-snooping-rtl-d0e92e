// tb_ts_switch: self-checking test of one torus switch (position 0).
//
// The testbench keeps its own account of logical time. For a transaction that
// enters input p with slack s after T tokens have been sent on that input, its
// ordering time seen from this switch is A = s + INIT_TOKENS + T; the switch's
// GT is the number of tokens it has propagated. It checks that
//   * a transaction leaving on output o carries slack A - GT + DeltaD(o)
//     (ordering time unchanged, slack never negative), on exactly the outputs
//     of its spanning tree, once each;
//   * a token is propagated exactly when every input has a token and no
//     buffered transaction has A = GT (zero slack), on all outputs at once;
//   * an output that has a zero-slack transaction waiting sends one of those.
// A directed part replays the token-passing example: a slack-1 message
// passes a token (slack 2), a propagated token passes it (slack 1), and it
// leaves with slack 1 on a Delta-D = 0 branch and 2 on a Delta-D = 1 branch.
// A random part then mixes sources, slacks, tokens and output stalls.
// The routing table (tested on its own) provides the expected tree.
module tb_ts_switch;
  import ts_pkg::*;

  localparam int unsigned NBUF = 16;
  localparam int unsigned NTXN = 400;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      in_valid [NPORTS];
  logic      in_ready [NPORTS];
  addr_txn_t in_txn   [NPORTS];
  logic      in_token [NPORTS];
  logic      out_valid [NPORTS];
  logic      out_ready [NPORTS];
  addr_txn_t out_txn   [NPORTS];
  logic      out_token [NPORTS];
  logic      stall_token, stall_slack;

  ts_switch #(.MY_ID(0), .NBUF(NBUF)) dut (.*);

  // reference routing table of switch 0
  node_id_t                    all_src [NODES];
  logic [NPORTS-1:0]           rmask   [NODES];
  logic [NPORTS-1:0][DD_W-1:0] rdd     [NODES];
  for (genvar s = 0; s < NODES; s++) begin : g_s
    assign all_src[s] = node_id_t'(s);
  end
  ts_torus_route #(.MY_ID(0), .NLOOK(NODES)) u_ref (.src(all_src), .mask(rmask), .dd(rdd));

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---- model ---------------------------------------------------------------
  int          gt = 0;
  int          tin [NPORTS];
  int          a_ot [NTXN + 8];
  node_id_t    t_src [NTXN + 8];
  logic [NPORTS-1:0] pend [NTXN + 8];
  int unsigned n_in = 0, n_props = 0, n_prec = 0;

  initial for (int p = 0; p < NPORTS; p++) tin[p] = 0;

  function automatic int cnt(int p);
    return INIT_TOKENS + tin[p] - gt;
  endfunction

  always @(posedge clk) if (rst_n) begin
    bit exp_prop, zero_left;
    // departures
    for (int o = 0; o < NPORTS; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        int tag;
        tag = int'(out_txn[o].blk);
        check(tag < int'(n_in) && pend[tag][o], $sformatf("unexpected departure tag %0d port %0d", tag, o));
        if (tag < int'(n_in)) begin
          check(int'(out_txn[o].slack) == a_ot[tag] - gt + int'(rdd[t_src[tag]][o]),
                $sformatf("tag %0d port %0d: slack %0d, expected %0d", tag, o, out_txn[o].slack,
                          a_ot[tag] - gt + int'(rdd[t_src[tag]][o])));
          // zero-slack precedence
          if (a_ot[tag] != gt) begin
            bit waiting_zero = 0;
            for (int k = 0; k < int'(n_in); k++) if (pend[k][o] && a_ot[k] == gt) waiting_zero = 1;
            check(!waiting_zero, $sformatf("port %0d sent tag %0d ahead of a zero-slack one", o, tag));
          end else n_prec++;
          pend[tag][o] = 1'b0;
        end
      end
    end
    // token propagation rule
    exp_prop = 1;
    for (int p = 0; p < NPORTS; p++) if (cnt(p) <= 0) exp_prop = 0;
    zero_left = 0;
    for (int k = 0; k < int'(n_in); k++) if (pend[k] != '0 && a_ot[k] == gt) zero_left = 1;
    if (zero_left) exp_prop = 0;
    for (int o = 0; o < NPORTS; o++)
      check(out_token[o] == exp_prop, $sformatf("out_token[%0d]=%0d expected %0d", o, out_token[o], exp_prop));
    if (exp_prop) begin gt++; n_props++; end
    // arrivals (after the propagation), then incoming tokens
    for (int p = 0; p < NPORTS; p++) begin
      if (in_valid[p] && in_ready[p]) begin
        a_ot[n_in]  = int'(in_txn[p].slack) + INIT_TOKENS + tin[p];
        t_src[n_in] = in_txn[p].src;
        pend[n_in]  = rmask[in_txn[p].src];
        check(int'(in_txn[p].blk) == int'(n_in), "tag numbering");
        n_in++;
      end
      if (in_token[p]) tin[p]++;
    end
  end

  // ---- stimulus --------------------------------------------------------------
  int unsigned next_tag = 0;

  task automatic idle_inputs();
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = 1'b0;
      in_token[p] = 1'b0;
      in_txn[p]   = '0;
    end
  endtask

  task automatic send(int p, int src, int slack);
    in_valid[p]     = 1'b1;
    in_txn[p].slack = slack_t'(slack);
    in_txn[p].src   = node_id_t'(src);
    in_txn[p].kind  = REQ_GETS;
    in_txn[p].blk   = blk_t'(next_tag);
    next_tag++;
  endtask

  int unsigned pending_total;
  function automatic int unsigned count_pending();
    int unsigned c = 0;
    for (int k = 0; k < int'(n_in); k++) if (pend[k] != '0) c++;
    return c;
  endfunction

  initial begin
    idle_inputs();
    for (int o = 0; o < NPORTS; o++) out_ready[o] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ---- directed: the token-passing example --------------------------------
    // cycle 1: every input holds its initial token, the switch propagates
    @(negedge clk);
    check(gt == 1, "initial token not propagated");
    // a token arrives on input 0 only: counter 1 there, 0 elsewhere
    in_token[0] = 1'b1;
    @(negedge clk);
    in_token[0] = 1'b0;
    // msg with slack 1 passes the token: buffered with slack 2 (no propagation)
    send(P_LOCAL, 0, 1);
    @(negedge clk);
    idle_inputs();
    check(dut.b_valid[0] && dut.b_slack[0] == 2, "message did not pass the token (slack 2)");
    // tokens on every input: the switch propagates and the message's slack drops to 1
    for (int p = 0; p < NPORTS; p++) in_token[p] = 1'b1;
    @(negedge clk);
    idle_inputs();
    @(negedge clk);
    check(dut.b_slack[0] == 1, "propagated token did not pass the message (slack 1)");
    // contention removed: leaves with slack 1 on Delta-D 0 (east), 2 on Delta-D 1 (west)
    check(out_valid[P_EAST] && out_txn[P_EAST].slack == 1, "east branch slack");
    check(out_valid[P_WEST] && out_txn[P_WEST].slack == 2, "west branch slack");
    for (int o = 0; o < NPORTS; o++) out_ready[o] = 1'b1;
    repeat (3) @(negedge clk);
    check(count_pending() == 0, "directed message not fully sent");

    // ---- random traffic ------------------------------------------------------
    while (next_tag < NTXN) begin
      idle_inputs();
      for (int p = 0; p < NPORTS; p++) begin
        if (in_ready[p] && next_tag < NTXN && ($urandom % 3 == 0))
          send(p, $urandom % NODES, $urandom % 4);
        if (cnt(p) < 4 && ($urandom % 2 == 0)) in_token[p] = 1'b1;
      end
      for (int o = 0; o < NPORTS; o++) out_ready[o] = ($urandom % 4 != 0);
      @(negedge clk);
    end
    // drain
    idle_inputs();
    for (int o = 0; o < NPORTS; o++) out_ready[o] = 1'b1;
    for (int i = 0; i < 200; i++) begin
      for (int p = 0; p < NPORTS; p++) in_token[p] = (cnt(p) < 3);
      @(negedge clk);
    end
    idle_inputs();
    check(count_pending() == 0, $sformatf("%0d transactions never fully sent", count_pending()));
    check(n_in == NTXN, "not all transactions accepted");
    check(n_prec > 0, "zero-slack precedence never exercised");
    $display("accepted %0d, tokens propagated %0d, zero-slack departures %0d", n_in, n_props, n_prec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
