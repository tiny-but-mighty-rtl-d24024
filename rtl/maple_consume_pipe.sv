// maple_consume_pipe: MAPLE's consume pipeline (data-consume, steps A-C).
//
// A consume is a core load from a queue. Stage BUFFER holds one pending
// consume per queue: a load to an empty queue waits there (no polling, no
// error) until the queue's head entry has been filled, while consumes to
// other queues pass it. Stage READ QUEUE pops the head of the chosen queue
// and reads the scratchpad; stage DATA REPLY holds the 32-bit entry
// (zero-extended) for the response encoder. A double consume (LD_CONSUME2)
// stays in BUFFER for two pops: the first entry is parked in a per-queue
// low-word register, and the reply carries {second, first} in 64 bits, so a
// core reads two 32-bit entries with one load. Consumes to other queues may
// be served between the two pops.
//
// The three stages, the buffering of loads to an empty queue and reading
// two 32-bit entries per load follow the design description; one buffer
// slot per queue, the lowest-queue-first choice among ready slots and the
// low-word register are this design's choices. A second consume to a queue
// whose slot is taken waits at the input.
//
// Timing: an accepted consume to a ready queue is in DATA REPLY two cycles
// after it enters BUFFER (a double consume whose two entries are ready: three
// cycles). Pops use queue_ctrl's combinational index; the scratchpad read
// data is registered (one-cycle read).
//
// Constant outputs: pop_idx is the queue controller's head index passed
// straight through to the scratchpad read address.
module maple_consume_pipe
  import maple_pkg::*;
#(
  parameter int unsigned NQ      = NUM_QUEUES,
  parameter int unsigned ENTRIES = SP_ENTRIES,
  localparam int unsigned AW     = $clog2(ENTRIES),
  localparam int unsigned QW     = $clog2(NQ)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  op_t               in_op,
  // queue controller
  input  logic [NQ-1:0]     head_ready,
  output logic              pop,
  output logic [QW-1:0]     pop_q,
  input  logic [AW-1:0]     pop_idx,
  // scratchpad read port
  output logic              sp_re,
  output logic [AW-1:0]     sp_raddr,
  input  logic [ENTRY_W-1:0] sp_rdata,
  // reply
  output logic              out_valid,
  input  logic              out_ready,
  output core_resp_t        out_resp,
  output logic              consumed     // one pulse per consume served
);
  logic [NQ-1:0] buf_v;
  op_t           buf_op [NQ];
  logic [NQ-1:0] half;               // first entry of a double consume taken
  logic [ENTRY_W-1:0] lo [NQ];        // parked first entry
  logic          rd_v, rep_v, rd_first;
  op_t           rd_op;
  logic          sel_dbl;
  logic          adv_rep, rd_free, found;
  logic [QW-1:0] sel;

  assign adv_rep = !rep_v || out_ready;
  assign rd_free = !rd_v || adv_rep;
  assign in_ready = !buf_v[in_op.qid[QW-1:0]];

  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int unsigned q = 0; q < NQ; q++)
      if (!found && buf_v[q] && head_ready[q]) begin
        found = 1'b1;
        sel   = QW'(q);
      end
  end

  assign sel_dbl  = buf_op[sel].opcode == LD_CONSUME2;
  assign pop      = found && rd_free;
  assign pop_q    = sel;
  assign sp_re    = pop;
  assign sp_raddr = pop_idx;
  assign consumed = pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_v     <= '0;
      half      <= '0;
      rd_v      <= 1'b0;
      rd_first  <= 1'b0;
      rep_v     <= 1'b0;
      rd_op     <= '0;
      out_resp  <= '0;
      for (int unsigned q = 0; q < NQ; q++) begin
        buf_op[q] <= '0;
        lo[q]     <= '0;
      end
    end else begin
      if (pop) begin
        if (sel_dbl && !half[sel]) half[sel] <= 1'b1;
        else begin
          buf_v[sel] <= 1'b0;
          half[sel]  <= 1'b0;
        end
      end
      if (in_valid && in_ready) begin
        buf_v[in_op.qid[QW-1:0]]  <= 1'b1;
        buf_op[in_op.qid[QW-1:0]] <= in_op;
      end
      if (rd_free) begin
        rd_v <= pop;
        if (pop) begin
          rd_op    <= buf_op[sel];
          rd_first <= sel_dbl && !half[sel];
        end
      end
      if (adv_rep) begin
        rep_v <= rd_v && !rd_first;
        if (rd_v && rd_first) lo[rd_op.qid[QW-1:0]] <= sp_rdata;
        if (rd_v && !rd_first) begin
          out_resp.src  <= rd_op.src;
          out_resp.tag  <= rd_op.tag;
          out_resp.data <= (rd_op.opcode == LD_CONSUME2) ? {sp_rdata, lo[rd_op.qid[QW-1:0]]}
                                                         : DATA_W'(sp_rdata);
        end
      end
    end
  end

  assign out_valid = rep_v;

  a_pop_ready: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_ready[pop_q]);
endmodule
