// tb_ts_endpoint: self-checking test of the ordering endpoint.
//
// Transactions with random sources and slacks, and tokens, are sent to the
// endpoint as a switch would send them. The testbench computes each one's
// ordering time A = slack + INIT_TOKENS + (tokens sent before it) and the
// endpoint's GT (tokens it has sent back). Every cycle it predicts exactly:
//   * out_valid / out_txn: while a token is held, the queued transaction with
//     A = GT whose source comes first in the rotation starting at GT mod 16;
//   * out_token: a token is held and no transaction with A = GT is queued.
// So a transaction is processed never before and never after its ordering
// time, equal times are ordered by the rotating source priority, and the
// processed stream can be held off by out_ready. It also checks that
// everything sent is processed once.
module tb_ts_endpoint;
  import ts_pkg::*;

  localparam int unsigned DEPTH = 32;
  localparam int unsigned NTXN  = 600;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      in_valid, in_ready, in_token;
  addr_txn_t in_txn;
  logic      out_valid, out_ready, out_token;
  ord_txn_t  out_txn;
  logic [$clog2(DEPTH+1)-1:0] occupancy;

  ts_endpoint #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---- model ----------------------------------------------------------------
  int          gt = 0, tin = 0;
  int          a_ot  [NTXN];
  node_id_t    t_src [NTXN];
  bit          queued [NTXN];
  bit          used [int];                 // (A * NODES + src) already taken
  int unsigned n_in = 0, n_out = 0, n_ties = 0, n_hold = 0;
  bit          fired_this_round = 0;

  function automatic int cnt();
    return INIT_TOKENS + tin - gt;
  endfunction

  always @(posedge clk) if (rst_n) begin
    int best, best_rank;
    bit exp_valid, exp_token;
    best = -1; best_rank = NODES;
    for (int k = 0; k < int'(n_in); k++)
      if (queued[k] && a_ot[k] == gt) begin
        int rank;
        rank = (int'(t_src[k]) - gt) & (NODES - 1);
        if (rank < best_rank) begin best = k; best_rank = rank; end
      end
    exp_valid = (cnt() > 0) && (best >= 0);
    exp_token = (cnt() > 0) && (best < 0);
    check(out_valid == exp_valid, $sformatf("out_valid %0d expected %0d (GT %0d)", out_valid, exp_valid, gt));
    check(out_token == exp_token, $sformatf("out_token %0d expected %0d (GT %0d)", out_token, exp_token, gt));
    if (out_valid && exp_valid) begin
      check(int'(out_txn.blk) == best && out_txn.src == t_src[best],
            $sformatf("processed tag %0d, expected tag %0d", out_txn.blk, best));
      if (!out_ready) n_hold++;
    end
    if (out_valid && out_ready && best >= 0) begin
      queued[best] = 0;
      n_out++;
      if (fired_this_round) n_ties++;
      fired_this_round = 1;
    end
    if (out_token) begin
      gt++;
      fired_this_round = 0;
    end
    if (in_valid && in_ready) begin
      a_ot[n_in]   = int'(in_txn.slack) + INIT_TOKENS + tin;
      t_src[n_in]  = in_txn.src;
      queued[n_in] = 1;
      check(int'(in_txn.blk) == int'(n_in), "tag numbering");
      n_in++;
    end
    if (in_token) tin++;
  end

  // ---- stimulus ---------------------------------------------------------------
  initial begin
    in_valid = 0; in_token = 0; in_txn = '0; out_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (n_in < NTXN) begin
      in_valid = 0;
      in_token = 0;
      if (in_ready && occupancy < DEPTH - 2 && ($urandom % 2 == 0)) begin
        // the A this transaction will get: tokens still held after this cycle
        int s, src, a, tries;
        tries = 0;
        do begin
          s   = $urandom % 5;
          src = $urandom % 4;              // few sources: many equal-OT ties
          a   = s + INIT_TOKENS + tin;
          tries++;
        end while (used.exists(a * NODES + src) && tries < 20);
        if (!used.exists(a * NODES + src)) begin
          used[a * NODES + src] = 1;
          in_valid     = 1;
          in_txn.slack = slack_t'(s);
          in_txn.src   = node_id_t'(src);
          in_txn.kind  = req_e'($urandom % 3);
          in_txn.blk   = blk_t'(n_in);
        end
      end
      if (cnt() < 3 && ($urandom % 3 == 0)) in_token = 1;
      out_ready = ($urandom % 4 != 0);
      @(negedge clk);
    end
    in_valid = 0;
    out_ready = 1;
    for (int i = 0; i < 100; i++) begin
      in_token = (cnt() < 2);
      @(negedge clk);
    end
    in_token = 0;
    check(n_out == NTXN, $sformatf("processed %0d of %0d", n_out, NTXN));
    check(n_ties > 0, "no equal-OT tie exercised");
    check(n_hold > 0, "out_ready hold never exercised");
    $display("processed %0d, ties %0d, holds %0d, GT %0d", n_out, n_ties, n_hold, gt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
