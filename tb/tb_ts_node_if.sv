// tb_ts_node_if: self-checking test of the node network interface.
//
// The testbench plays the adjacent switch of a one-node loop: it returns each
// token of the node two cycles later, and sends every injected transaction
// back to the node with the slack that keeps its ordering time, after a random
// delay. It checks that
//   * an injected transaction carries slack SLACK_INIT, the node's ID and the
//     request's kind and block;
//   * at most one transaction is injected per GT step (between two tokens);
//   * the outstanding count equals the testbench's own count: a transaction
//     stays outstanding until the node's GT has moved RETIRE = 2*DMAX +
//     SLACK_INIT + 1 steps past its injection, and no request is taken while
//     MAX_OUT are outstanding;
//   * every transaction comes out of the ordered port once, when the node's
//     GT equals its ordering time GT(injection) + DMAX + SLACK_INIT.
module tb_ts_node_if;
  import ts_pkg::*;

  localparam int unsigned MY_ID      = 5;
  localparam int unsigned SLACK_INIT = 2;
  localparam int unsigned MAX_OUT    = 8;
  localparam int unsigned DMAX       = 6;
  localparam int unsigned RETIRE     = 2 * DMAX + SLACK_INIT + 1;
  localparam int unsigned NREQ       = 300;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      req_valid, req_ready;
  req_e      req_kind;
  blk_t      req_blk;
  logic      sw_out_valid, sw_out_ready, sw_out_token;
  addr_txn_t sw_out_txn;
  logic      sw_in_valid, sw_in_ready, sw_in_token;
  addr_txn_t sw_in_txn;
  logic      ord_valid, ord_ready;
  ord_txn_t  ord_txn;
  logic [3:0] outstanding;
  logic [7:0] queued;

  ts_node_if #(.MY_ID(MY_ID), .SLACK_INIT(SLACK_INIT), .MAX_OUT(MAX_OUT), .DMAX(DMAX)) dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---- model -----------------------------------------------------------------
  int gt = 0;            // tokens the node has sent
  int gt_last = 0;       // gt in the previous cycle
  int tin = 0;           // tokens sent to the node
  int n_inj = 0, n_ord = 0, n_full = 0, n_gt_hold = 0;
  int inj_gt [NREQ];
  int inj_ot [NREQ];
  blk_t inj_blk [NREQ];
  req_e inj_kind [NREQ];
  int deliver_at [NREQ];
  int n_back = 0;
  int exp_out = 0;
  bit sent_this_gt = 0;
  int cyc = 0;
  logic [1:0] tok_pipe;
  bit drain = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // outstanding (a registered count): injected before this cycle and not
    // yet RETIRE steps old at the GT of the previous cycle
    exp_out = 0;
    for (int k = 0; k < n_inj; k++) if (gt_last - inj_gt[k] < int'(RETIRE)) exp_out++;
    gt_last = gt;
    check(int'(outstanding) == exp_out, $sformatf("outstanding %0d expected %0d", outstanding, exp_out));
    if (req_valid && !req_ready) begin
      if (exp_out == MAX_OUT) n_full++;
      else if (sent_this_gt) n_gt_hold++;
    end
    // injection
    if (sw_out_valid && sw_out_ready) begin
      check(sw_out_txn.slack == SLACK_INIT && sw_out_txn.src == MY_ID &&
            sw_out_txn.kind == req_kind && sw_out_txn.blk == req_blk, "injected transaction fields");
      check(!sent_this_gt, "two injections in one GT step");
      check(exp_out < MAX_OUT, "injection beyond MAX_OUT outstanding");
      check(req_ready && req_valid, "request not taken while injecting");
      inj_gt[n_inj]     = gt;
      inj_ot[n_inj]     = gt + DMAX + SLACK_INIT;
      inj_blk[n_inj]    = sw_out_txn.blk;
      inj_kind[n_inj]   = sw_out_txn.kind;
      deliver_at[n_inj] = cyc + 1 + $urandom % 6;
      n_inj++;
      sent_this_gt = 1;
    end
    // ordered output
    if (ord_valid && ord_ready) begin
      check(n_ord < n_inj && ord_txn.blk == inj_blk[n_ord] && ord_txn.kind == inj_kind[n_ord]
            && ord_txn.src == MY_ID, $sformatf("ordered transaction %0d wrong", n_ord));
      check(n_ord < n_inj && inj_ot[n_ord] == gt,
            $sformatf("transaction %0d processed at GT %0d, OT %0d", n_ord, gt, inj_ot[n_ord]));
      n_ord++;
    end
    if (sw_out_token) begin
      gt++;
      sent_this_gt = 0;
    end
    if (sw_in_valid && sw_in_ready) n_back++;
    if (sw_in_token) tin++;
  end

  // ---- switch side: tokens back after two cycles, transactions back delayed ----
  always @(posedge clk) begin
    if (!rst_n) tok_pipe <= '0;
    else        tok_pipe <= {tok_pipe[0], sw_out_token};
  end

  always @(negedge clk) begin
    int s;
    sw_in_token = rst_n && tok_pipe[1];
    ord_ready   = drain || ($urandom % 4 != 0);
    sw_in_valid = 0;
    sw_in_txn   = '0;
    // deliver the oldest injected transaction that is due, with slack OT - A
    if (rst_n && n_back < n_inj && cyc >= deliver_at[n_back]) begin
      s = inj_ot[n_back] - INIT_TOKENS - tin;
      if (s >= 0) begin
        sw_in_valid     = 1;
        sw_in_txn.slack = slack_t'(s);
        sw_in_txn.src   = node_id_t'(MY_ID);
        sw_in_txn.kind  = inj_kind[n_back];
        sw_in_txn.blk   = inj_blk[n_back];
      end
    end
  end

  assign sw_out_ready = 1'b1;

  initial begin
    req_valid = 0; req_kind = REQ_GETS; req_blk = '0; ord_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NREQ; i++) begin
      req_valid = 1;
      req_kind  = req_e'($urandom % 3);
      req_blk   = blk_t'($urandom);
      // hold until taken
      while (!(n_inj > i)) @(negedge clk);
      req_valid = ($urandom % 8 != 0);
      if (!req_valid) @(negedge clk);
    end
    req_valid = 0;
    drain = 1;
    repeat (300) @(negedge clk);
    check(n_ord == NREQ, $sformatf("ordered %0d of %0d", n_ord, NREQ));
    check(n_full > 0, "MAX_OUT limit never reached");
    check(n_gt_hold > 0, "one-per-GT hold never exercised");
    $display("injected %0d, ordered %0d, full %0d, gt holds %0d", n_inj, n_ord, n_full, n_gt_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
