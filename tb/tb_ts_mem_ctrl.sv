// tb_ts_mem_ctrl: self-checking test of the owner-bit memory controller.
//
// A random ordered stream of GETS/GETM/PUTM to blocks homed at this node and
// elsewhere is applied, with random stalls of the data network. A reference
// model keeps one "a cache owns it" bit per block, starting with memory as
// owner of everything, and predicts for every home transaction whether memory
// sends the block to the requester or takes a block; the controller's
// send_* handshakes and take_* strobes must match in order and content.
// Cycle counts are checked too: the initialisation sweep takes BLOCKS/WORD_W
// cycles, and ord_ready is checked every cycle: a home transaction occupies the
// controller for 3 cycles plus any wait for send_ready, a foreign one for one.
module tb_ts_mem_ctrl;
  import ts_pkg::*;

  localparam int unsigned MY_ID  = 3;
  localparam int unsigned BLOCKS = 1024;
  localparam int unsigned WORD_W = 64;
  localparam int unsigned NTXN   = 2000;
  localparam int unsigned NB     = 200;      // distinct block numbers used

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     init_done;
  logic     ord_valid, ord_ready;
  ord_txn_t ord_txn;
  logic     send_valid, send_ready;
  node_id_t send_dest;
  blk_t     send_blk;
  logic     take_valid;
  node_id_t take_src;
  blk_t     take_blk;

  ts_mem_ctrl #(.MY_ID(MY_ID), .BLOCKS(BLOCKS), .WORD_W(WORD_W)) dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  typedef struct { bit is_send; node_id_t node; blk_t blk; } ev_t;
  ev_t exp_q [$];
  bit  owns [int];                  // reference: a cache owns the block
  int  cyc = 0, n_home = 0, n_send = 0, n_take = 0, n_busy = 0;
  int  last_accept = -1;
  bit  last_home = 0, last_send = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // occupancy: busy for the two cycles after a home transaction is taken,
    // then for as long as its data send waits
    if (init_done)
      check(ord_ready == !((last_home && (cyc - last_accept == 1 || cyc - last_accept == 2)) || send_valid),
            $sformatf("ord_ready %0d, %0d cycles after a home=%0d transaction", ord_ready, cyc - last_accept, last_home));
    if (ord_valid && ord_ready) begin
      last_accept = cyc;
      last_home   = (ord_txn.blk % NODES == MY_ID);
      if (last_home) begin
        int b;
        b = int'(ord_txn.blk);
        if (!owns.exists(b)) owns[b] = 0;
        n_home++;
        case (ord_txn.kind)
          REQ_GETS: begin
            exp_q.push_back('{is_send: !owns[b], node: ord_txn.src, blk: ord_txn.blk});
            owns[b] = 0;
          end
          REQ_GETM: begin
            if (!owns[b]) exp_q.push_back('{is_send: 1, node: ord_txn.src, blk: ord_txn.blk});
            owns[b] = 1;
          end
          default: begin
            exp_q.push_back('{is_send: 0, node: ord_txn.src, blk: ord_txn.blk});
            owns[b] = 0;
          end
        endcase
      end
    end else if (ord_valid) n_busy++;
    if (send_valid && send_ready) begin
      n_send++;
      check(exp_q.size() > 0 && exp_q[0].is_send && exp_q[0].node == send_dest &&
            exp_q[0].blk == send_blk, $sformatf("unexpected send blk %0d", send_blk));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (take_valid) begin
      n_take++;
      check(exp_q.size() > 0 && !exp_q[0].is_send && exp_q[0].node == take_src &&
            exp_q[0].blk == take_blk, $sformatf("unexpected take blk %0d", take_blk));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    int sent, t0;
    ord_valid = 0; ord_txn = '0; send_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    t0 = 0;
    while (!init_done) begin @(negedge clk); t0++; end
    check(t0 == BLOCKS / WORD_W, $sformatf("initialisation took %0d cycles, expected %0d", t0, BLOCKS / WORD_W));
    sent = 0;
    while (sent < NTXN) begin
      if (!ord_valid || ord_ready) begin
        if (ord_valid && ord_ready) sent++;
        ord_valid = ($urandom % 4 != 0);
        // block numbers: mostly homed here, spread over the whole memory
        ord_txn.blk  = blk_t'(($urandom % 3 != 0) ? (($urandom % NB) * NODES + MY_ID)
                                                  : ($urandom % (BLOCKS * NODES)));
        if ($urandom % 8 == 0) ord_txn.blk = blk_t'((BLOCKS - 1) * NODES + MY_ID);
        ord_txn.src  = node_id_t'($urandom % NODES);
        ord_txn.kind = req_e'($urandom % 3);
      end
      send_ready = ($urandom % 3 != 0);
      @(negedge clk);
    end
    ord_valid = 0;
    send_ready = 1;
    repeat (10) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d expected memory events missing", exp_q.size()));
    check(n_send > 0 && n_take > 0 && n_busy > 0, "send, take or busy never exercised");
    $display("home %0d, sends %0d, takes %0d, busy cycles %0d", n_home, n_send, n_take, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
