// maple_produce_pipe: MAPLE's produce pipeline (pointer-produce, steps 1-6).
//
// Stores that push data or pointers into a queue, speculative prefetches,
// and pointers generated by the LIMA unit pass four stages:
//   BUFFER    one slot per queue plus one for LIMA. A pointer (virtual
//             address) is translated here by the MMU, one at a time. A slot
//             whose queue is full stays here until a consume frees an entry,
//             so a full queue never overflows and does not stop other queues.
//   RESERVE   reserves the tail slot of the queue (prefetches reserve none).
//   WDATA / ASYNC LOAD  writes a data produce into the reserved scratchpad
//             entry, or issues the memory request for a pointer using the
//             entry index as transaction id (prefetch: a fill of the LLC).
//   ACK       acknowledges the core's store; LIMA pointers need no ack.
// The stages, translation in the buffer stage, buffering on a full queue and
// the entry index as transaction id follow the design description. One slot
// per queue, lowest-slot-first selection and retrying a translation after a
// page fault has been handled are this design's choices.
//
// Timing: a data produce to a queue with room is acked three cycles after it
// enters BUFFER when nothing stalls; a pointer adds the MMU latency.
//
// Constant outputs: store acks always carry zero data, and a few memory
// request fields (such as the transaction source) are fixed.
module maple_produce_pipe
  import maple_pkg::*;
#(
  parameter int unsigned NQ      = NUM_QUEUES,
  parameter int unsigned ENTRIES = SP_ENTRIES,
  localparam int unsigned AW     = $clog2(ENTRIES),
  localparam int unsigned QW     = $clog2(NQ),
  localparam int unsigned NS     = NQ + 1,          // slots: queues + LIMA
  localparam int unsigned SW     = $clog2(NS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the request decoder
  input  logic              in_valid,
  output logic              in_ready,
  input  op_t               in_op,
  // from LIMA
  input  logic              lima_valid,
  output logic              lima_ready,
  input  prod_op_t          lima_op,
  // MMU translation port
  output logic              tr_req,
  input  logic              tr_ready,
  output logic [VA_W-1:0]   tr_va,
  input  logic              tr_done,
  input  logic              tr_fault,
  input  logic [PA_W-1:0]   tr_pa,
  // queue controller
  input  logic [NQ-1:0]     full,
  output logic              reserve,
  output logic [QW-1:0]     reserve_q,
  input  logic [AW-1:0]     reserve_idx,
  // scratchpad write (granted when memory responses do not write)
  output logic              sp_wr_req,
  input  logic              sp_wr_gnt,
  output logic [AW-1:0]     sp_widx,
  output logic [ENTRY_W-1:0] sp_wdata,
  // memory request
  output logic              mreq_valid,
  input  logic              mreq_ready,
  output mem_req_t          mreq,
  // ack to core
  output logic              ack_valid,
  input  logic              ack_ready,
  output core_resp_t        ack,
  // events
  output logic              produced,     // an operation left the pipeline
  output logic              full_stall    // some buffered produce waits on a full queue
);
  prod_op_t       slot    [NS];
  logic [NS-1:0]  slot_v;
  logic [NS-1:0]  slot_tr;                // translated (or needs none)
  logic [PA_W-1:0] slot_pa [NS];
  logic           tr_busy;
  logic [SW-1:0]  tr_slot;

  logic           res_v, wd_v, ack_v;
  prod_op_t       res_op, wd_op;
  logic [PA_W-1:0] res_pa, wd_pa;
  logic [AW-1:0]  res_idx, wd_idx;

  // ---------------- input ----------------
  prod_op_t in_p;
  always_comb begin
    in_p.kind     = (in_op.opcode == ST_PRODUCE)  ? PK_DATA :
                    (in_op.opcode == ST_PREFETCH) ? PK_PREFETCH : PK_PTR;
    in_p.noncoh   = in_op.opcode == ST_PRODUCE_PTRD;
    in_p.need_ack = 1'b1;
    in_p.qid      = in_op.qid;
    in_p.data     = in_op.data;
    in_p.src      = in_op.src;
    in_p.tag      = in_op.tag;
  end
  assign in_ready   = !slot_v[SW'(in_op.qid[QW-1:0])];
  assign lima_ready = !slot_v[NQ];

  // ---------------- translation ----------------
  logic          need_tr_found;
  logic [SW-1:0] need_tr_sel;
  always_comb begin
    need_tr_found = 1'b0;
    need_tr_sel   = '0;
    for (int unsigned s = 0; s < NS; s++)
      if (!need_tr_found && slot_v[s] && !slot_tr[s]) begin
        need_tr_found = 1'b1;
        need_tr_sel   = SW'(s);
      end
  end
  assign tr_req = !tr_busy && need_tr_found;
  assign tr_va  = VA_W'(slot[need_tr_sel].data);

  // ---------------- ack / wdata / reserve stage control ----------------
  logic ack_adv, wd_act_ok, wd_done, wd_free, res_free, wd_mem, ack_cond;
  assign ack_adv   = !ack_v || ack_ready;
  assign ack_cond  = !wd_op.need_ack || ack_adv;
  assign wd_mem    = wd_op.kind != PK_DATA;
  assign wd_act_ok = wd_mem ? mreq_ready : sp_wr_gnt;
  assign sp_wr_req = wd_v && !wd_mem && ack_cond;
  assign mreq_valid = wd_v && wd_mem && ack_cond;
  assign wd_done   = wd_v && ack_cond && wd_act_ok;
  assign wd_free   = !wd_v || wd_done;
  assign res_free  = !res_v || wd_free;

  assign sp_widx  = wd_idx;
  assign sp_wdata = wd_op.data[ENTRY_W-1:0];
  always_comb begin
    mreq          = '0;
    mreq.addr     = wd_pa;
    mreq.size     = SZ_WORD;
    mreq.prefetch = wd_op.kind == PK_PREFETCH;
    mreq.noncoh   = wd_op.noncoh;
    mreq.txid.src = TX_PRODUCE;
    mreq.txid.idx = IDX_W'(wd_idx);
  end

  // pick a buffered operation that can reserve
  logic          go_found;
  logic [SW-1:0] go_sel;
  logic [NS-1:0] blocked;
  always_comb begin
    go_found = 1'b0;
    go_sel   = '0;
    for (int unsigned s = 0; s < NS; s++) begin
      blocked[s] = slot_v[s] && slot_tr[s] && slot[s].kind != PK_PREFETCH &&
                   full[slot[s].qid[QW-1:0]];
      if (!go_found && slot_v[s] && slot_tr[s] && !blocked[s]) begin
        go_found = 1'b1;
        go_sel   = SW'(s);
      end
    end
  end
  assign full_stall = |blocked;

  assign reserve   = go_found && res_free && slot[go_sel].kind != PK_PREFETCH;
  assign reserve_q = slot[go_sel].qid[QW-1:0];
  assign produced  = wd_done;

  assign ack_valid = ack_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_v  <= '0;
      slot_tr <= '0;
      tr_busy <= 1'b0;
      tr_slot <= '0;
      res_v   <= 1'b0;
      wd_v    <= 1'b0;
      ack_v   <= 1'b0;
      res_op  <= '0;
      wd_op   <= '0;
      res_pa  <= '0;
      wd_pa   <= '0;
      res_idx <= '0;
      wd_idx  <= '0;
      ack     <= '0;
      for (int unsigned s = 0; s < NS; s++) begin
        slot[s]    <= '0;
        slot_pa[s] <= '0;
      end
    end else begin
      // translation bookkeeping
      if (tr_req && tr_ready) begin
        tr_busy <= 1'b1;
        tr_slot <= need_tr_sel;
      end
      if (tr_done) begin
        tr_busy <= 1'b0;
        if (!tr_fault) begin
          slot_tr[tr_slot] <= 1'b1;
          slot_pa[tr_slot] <= tr_pa;
        end
      end
      // buffer -> reserve
      if (go_found && res_free) begin
        slot_v[go_sel] <= 1'b0;
        res_op  <= slot[go_sel];
        res_pa  <= slot_pa[go_sel];
        res_idx <= reserve_idx;
      end
      if (res_free) res_v <= go_found;
      // new entries
      if (in_valid && in_ready) begin
        slot_v[SW'(in_op.qid[QW-1:0])]  <= 1'b1;
        slot_tr[SW'(in_op.qid[QW-1:0])] <= in_p.kind == PK_DATA;
        slot[SW'(in_op.qid[QW-1:0])]    <= in_p;
      end
      if (lima_valid && lima_ready) begin
        slot_v[NQ]  <= 1'b1;
        slot_tr[NQ] <= lima_op.kind == PK_DATA;
        slot[NQ]    <= lima_op;
      end
      // reserve -> wdata
      if (wd_free) begin
        wd_v <= res_v;
        if (res_v) begin
          wd_op  <= res_op;
          wd_pa  <= res_pa;
          wd_idx <= res_idx;
        end
      end
      // wdata -> ack
      if (ack_ready) ack_v <= 1'b0;
      if (wd_done && wd_op.need_ack) begin
        ack_v    <= 1'b1;
        ack.src  <= wd_op.src;
        ack.tag  <= wd_op.tag;
        ack.data <= '0;
      end
    end
  end

  a_ack_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ack_valid && !ack_ready |=> ack_valid && $stable(ack));
endmodule
