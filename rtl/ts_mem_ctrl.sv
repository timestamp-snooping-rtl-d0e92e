// ts_mem_ctrl: memory-side coherence controller of one node (owner bit).
//
// With timestamp snooping, transactions reach the nodes at different physical
// times, so a wired-OR "owned" signal cannot tell memory whether a cache will
// supply the data. Instead memory keeps one bit per block saying whether
// memory is the owner. The controller takes the node's ordered transaction
// stream, ignores blocks homed elsewhere, and for its own blocks applies the
// MSI rules:
//   GETS, memory owner : send the block to the requester.
//   GETS, cache owner  : the M holder sends the block to the requester and to
//                        memory; memory becomes owner and takes the block.
//   GETM, memory owner : send the block; the requester becomes owner.
//   GETM, cache owner  : the current owner supplies it; memory stays non-owner.
//   PUTM               : memory becomes owner and takes the written-back block.
// Each home transaction is a read-modify-write of the owner bits, which is the
// extra memory occupancy the scheme costs.
//
// Organisation (this design's choices): blocks are interleaved over the nodes
// by the low bits of the block address; the owner bits of this node's
// BLOCKS blocks are packed WORD_W to a word of a single-port array that has
// no reset, so after reset the controller spends BLOCKS/WORD_W cycles marking
// every block as memory-owned before it accepts transactions (init_done).
// The stored bit is 1 when a cache owns the block. The DRAM itself and the
// data network are outside this module: send_* asks the data network to send
// the block to a node, and take_* tells the DRAM side to accept a written
// block from the data network.
//
// Timing: one home transaction every 3 cycles (accept, read, modify-write),
// plus the wait for send_ready; foreign transactions are taken one per cycle.
// ord_ready is registered state only.
module ts_mem_ctrl
  import ts_pkg::*;
#(
  parameter int unsigned MY_ID  = 0,
  parameter int unsigned BLOCKS = 1048576,   // 1 GByte / 64 B / 16 nodes
  parameter int unsigned WORD_W = 64
) (
  input  logic     clk,
  input  logic     rst_n,
  output logic     init_done,
  // ordered transactions from the endpoint
  input  logic     ord_valid,
  output logic     ord_ready,
  input  ord_txn_t ord_txn,
  // data-send request to the data network
  output logic     send_valid,
  input  logic     send_ready,
  output node_id_t send_dest,
  output blk_t     send_blk,
  // memory takes a block from the data network (one-cycle strobe)
  output logic     take_valid,
  output node_id_t take_src,
  output blk_t     take_blk
);

  localparam int unsigned WORDS  = BLOCKS / WORD_W;
  localparam int unsigned WADR_W = $clog2(WORDS);
  localparam int unsigned BIT_W  = $clog2(WORD_W);
  localparam int unsigned HOME_W = $clog2(NODES);

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_READ, S_WRITE, S_SEND} state_e;
  state_e state;

  logic [WORD_W-1:0] owner_mem [WORDS];      // 1 = a cache owns the block
  logic [WORD_W-1:0] rdata;
  logic [WADR_W-1:0] init_adr;
  ord_txn_t          cur;

  logic              is_home;
  logic [WADR_W-1:0] cur_wadr;
  logic [BIT_W-1:0]  cur_bit;
  logic              cache_owns;
  logic              new_bit, do_send, do_take;

  assign is_home   = (ord_txn.blk[HOME_W-1:0] == HOME_W'(MY_ID));
  assign cur_wadr  = cur.blk[HOME_W + BIT_W +: WADR_W];
  assign cur_bit   = cur.blk[HOME_W +: BIT_W];
  assign cache_owns = rdata[cur_bit];
  assign init_done = (state != S_INIT);
  assign ord_ready = (state == S_IDLE);

  // MSI decision for the current home transaction
  always_comb begin
    new_bit = cache_owns;
    do_send = 1'b0;
    do_take = 1'b0;
    unique case (cur.kind)
      REQ_GETS: begin
        do_send = !cache_owns;
        do_take = cache_owns;
        new_bit = 1'b0;
      end
      REQ_GETM: begin
        do_send = !cache_owns;
        new_bit = 1'b1;
      end
      REQ_PUTM: begin
        do_take = 1'b1;
        new_bit = 1'b0;
      end
      default: ;
    endcase
  end

  // owner-bit array: synchronous read, read-modify-write, init sweep
  always_ff @(posedge clk) begin
    if (state == S_INIT) begin
      owner_mem[init_adr] <= '0;
    end else if (state == S_WRITE) begin
      logic [WORD_W-1:0] w;
      w = rdata;
      w[cur_bit] = new_bit;
      owner_mem[cur_wadr] <= w;
    end
    rdata <= owner_mem[cur_wadr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_INIT;
      init_adr   <= '0;
      cur        <= '0;
      send_valid <= 1'b0;
      send_dest  <= '0;
      send_blk   <= '0;
      take_valid <= 1'b0;
      take_src   <= '0;
      take_blk   <= '0;
    end else begin
      take_valid <= 1'b0;
      unique case (state)
        S_INIT: begin
          init_adr <= init_adr + 1'b1;
          if (init_adr == WADR_W'(WORDS - 1)) state <= S_IDLE;
        end
        S_IDLE:
          if (ord_valid && is_home) begin
            cur   <= ord_txn;
            state <= S_READ;
          end
        S_READ:  state <= S_WRITE;           // rdata holds the owner word
        S_WRITE: begin
          take_valid <= do_take;
          take_src   <= cur.src;
          take_blk   <= cur.blk;
          send_valid <= do_send;
          send_dest  <= cur.src;
          send_blk   <= cur.blk;
          state      <= do_send ? S_SEND : S_IDLE;
        end
        S_SEND:
          if (send_ready) begin
            send_valid <= 1'b0;
            state      <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_blk_range: assert property (@(posedge clk) disable iff (!rst_n)
    (ord_valid && ord_ready && is_home) |-> ((ord_txn.blk >> HOME_W) < BLK_W'(BLOCKS)));

endmodule
