// maple: one MAPLE unit (Memory Access Parallel-Load Engine).
//
// MAPLE sits on its own NoC tile and lets unmodified cores hide the latency
// of indirect memory accesses. Cores talk to it with ordinary loads and
// stores into its page: a store of a pointer (PRODUCE_PTR) makes MAPLE
// translate it, reserve the next slot of a hardware queue and issue the
// memory request with that slot as transaction id; the store is acked at
// once, so the core runs ahead. Responses arrive in any order and fill their
// slots; a load (CONSUME) pops the queue head in program order, waiting
// inside MAPLE if the data is not there yet. Data can also be produced
// directly (PRODUCE), the LLC can be prefetched (PREFETCH), and a LIMA
// command streams a whole loop of A[B[i]] accesses into a queue or the LLC.
//
// Structure: request decoder -> {consume, configuration, produce} pipelines
// -> response encoder towards the cores; queue controller and a shared
// scratchpad hold the queues; an MMU (TLB + page table walker) translates
// pointers; the LIMA unit feeds pointers into the produce pipeline; a
// request encoder and a response decoder connect to the LLC/DRAM side.
// This partition follows the design description. Memory responses take
// precedence over data produces at the scratchpad write port (this design's
// choice).
//
// Interface: core side valid/ready request and response (core_req_t /
// core_resp_t), memory side valid/ready request (mem_req_t) and a response
// input that is always accepted (mem_resp_t), and a page-fault interrupt.
// Timing: a consume whose data is present is answered 5 cycles after the
// request is accepted.
module maple
  import maple_pkg::*;
#(
  parameter int unsigned NQ      = NUM_QUEUES,
  parameter int unsigned ENTRIES = SP_ENTRIES,
  parameter int unsigned TLB_N   = TLB_ENTRIES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       core_req_valid,
  output logic       core_req_ready,
  input  core_req_t  core_req,
  output logic       core_resp_valid,
  input  logic       core_resp_ready,
  output core_resp_t core_resp,
  output logic       mem_req_valid,
  input  logic       mem_req_ready,
  output mem_req_t   mem_req,
  input  logic       mem_resp_valid,
  input  mem_resp_t  mem_resp,
  output logic       irq
);
  localparam int unsigned AW = $clog2(ENTRIES);
  localparam int unsigned QW = $clog2(NQ);

  // ---------------- request decoder ----------------
  logic cons_v, cons_r, prod_v, prod_r, cfg_v, cfg_r;
  op_t  dec_op;
  maple_req_dec u_req_dec (
    .clk, .rst_n,
    .in_valid(core_req_valid), .in_ready(core_req_ready), .in_req(core_req),
    .cons_valid(cons_v), .cons_ready(cons_r),
    .prod_valid(prod_v), .prod_ready(prod_r),
    .cfg_valid(cfg_v), .cfg_ready(cfg_r),
    .out_op(dec_op)
  );

  // ---------------- queues and scratchpad ----------------
  logic           q_init;
  logic [3:0]     q_init_log2, qsize_log2;
  logic           reserve, pop, fill;
  logic [QW-1:0]  reserve_q, pop_q;
  logic [AW-1:0]  reserve_idx, pop_idx, fill_idx;
  logic [NQ-1:0]  full, head_ready;
  logic           sp_re;
  logic [AW-1:0]  sp_raddr;
  logic [ENTRY_W-1:0] sp_rdata, fill_data;

  maple_queue_ctrl #(.NQ(NQ), .ENTRIES(ENTRIES)) u_qctrl (
    .clk, .rst_n,
    .init(q_init), .init_qsize_log2(q_init_log2), .qsize_log2,
    .reserve, .reserve_q, .reserve_idx, .full,
    .fill, .fill_idx,
    .pop, .pop_q, .pop_idx, .head_ready
  );

  maple_scratchpad #(.ENTRIES(ENTRIES), .WIDTH(ENTRY_W)) u_sp (
    .clk, .we(fill), .waddr(fill_idx), .wdata(fill_data),
    .re(sp_re), .raddr(sp_raddr), .rdata(sp_rdata)
  );

  // ---------------- response encoder ----------------
  logic [2:0] rsp_v, rsp_r;
  core_resp_t rsp [3];
  maple_resp_enc #(.NIN(3)) u_resp_enc (
    .clk, .rst_n,
    .in_valid(rsp_v), .in_ready(rsp_r), .in_resp(rsp),
    .out_valid(core_resp_valid), .out_ready(core_resp_ready), .out_resp(core_resp)
  );

  // ---------------- consume pipeline ----------------
  logic ev_consume;
  maple_consume_pipe #(.NQ(NQ), .ENTRIES(ENTRIES)) u_consume (
    .clk, .rst_n,
    .in_valid(cons_v), .in_ready(cons_r), .in_op(dec_op),
    .head_ready, .pop, .pop_q, .pop_idx,
    .sp_re, .sp_raddr, .sp_rdata,
    .out_valid(rsp_v[0]), .out_ready(rsp_r[0]), .out_resp(rsp[0]),
    .consumed(ev_consume)
  );

  // ---------------- MMU ----------------
  logic              ptbase_we, tlb_flush, fault_clear;
  logic [PPN_W-1:0]  ptbase_ppn;
  logic [VA_W-1:0]   fault_va;
  logic [1:0]        tr_req, tr_ready, tr_done;
  logic [VA_W-1:0]   tr_va [2];
  logic              tr_fault;
  logic [PA_W-1:0]   tr_pa;
  logic [2:0]        mq_v, mq_r;
  mem_req_t          mq [3];
  logic              pte_valid;
  logic [63:0]       pte;
  logic              ev_tlb_miss;

  maple_mmu #(.ENTRIES(TLB_N)) u_mmu (
    .clk, .rst_n,
    .ptbase_we, .ptbase_ppn, .flush(tlb_flush), .fault_clear, .irq, .fault_va,
    .req(tr_req), .req_ready(tr_ready), .req_va(tr_va),
    .done(tr_done), .fault(tr_fault), .pa(tr_pa),
    .ptw_valid(mq_v[1]), .ptw_ready(mq_r[1]), .ptw_req(mq[1]),
    .pte_valid, .pte,
    .tlb_miss(ev_tlb_miss)
  );

  // ---------------- LIMA ----------------
  logic             lima_start, lima_spec, lima_busy;
  logic [VA_W-1:0]  lima_a, lima_b;
  logic [31:0]      lima_begin, lima_end;
  logic [QID_W-1:0] lima_qid;
  logic             line_valid;
  logic [LINE_W-1:0] line;
  logic             lptr_v, lptr_r;
  prod_op_t         lptr;

  maple_lima u_lima (
    .clk, .rst_n,
    .start(lima_start), .a_base(lima_a), .b_base(lima_b),
    .idx_begin(lima_begin), .idx_end(lima_end), .spec(lima_spec), .qid(lima_qid),
    .busy(lima_busy),
    .tr_req(tr_req[1]), .tr_ready(tr_ready[1]), .tr_va(tr_va[1]),
    .tr_done(tr_done[1]), .tr_fault, .tr_pa,
    .mreq_valid(mq_v[2]), .mreq_ready(mq_r[2]), .mreq(mq[2]),
    .line_valid, .line,
    .ptr_valid(lptr_v), .ptr_ready(lptr_r), .ptr_op(lptr)
  );

  // ---------------- produce pipeline ----------------
  logic             sp_wr_req, sp_wr_gnt;
  logic [AW-1:0]    prod_widx;
  logic [ENTRY_W-1:0] prod_wdata;
  logic             ev_produce, ev_full_stall;
  logic             rd_we;
  logic [IDX_W-1:0] rd_widx;
  logic [ENTRY_W-1:0] rd_wdata;

  maple_produce_pipe #(.NQ(NQ), .ENTRIES(ENTRIES)) u_produce (
    .clk, .rst_n,
    .in_valid(prod_v), .in_ready(prod_r), .in_op(dec_op),
    .lima_valid(lptr_v), .lima_ready(lptr_r), .lima_op(lptr),
    .tr_req(tr_req[0]), .tr_ready(tr_ready[0]), .tr_va(tr_va[0]),
    .tr_done(tr_done[0]), .tr_fault, .tr_pa,
    .full, .reserve, .reserve_q, .reserve_idx,
    .sp_wr_req, .sp_wr_gnt, .sp_widx(prod_widx), .sp_wdata(prod_wdata),
    .mreq_valid(mq_v[0]), .mreq_ready(mq_r[0]), .mreq(mq[0]),
    .ack_valid(rsp_v[2]), .ack_ready(rsp_r[2]), .ack(rsp[2]),
    .produced(ev_produce), .full_stall(ev_full_stall)
  );

  // scratchpad write port: memory responses first, then data produces
  assign sp_wr_gnt = !rd_we;
  assign fill      = rd_we || sp_wr_req;
  assign fill_idx  = rd_we ? AW'(rd_widx) : prod_widx;
  assign fill_data = rd_we ? rd_wdata : prod_wdata;

  // ---------------- configuration pipeline ----------------
  maple_config_pipe #(.NQ(NQ)) u_config (
    .clk, .rst_n,
    .in_valid(cfg_v), .in_ready(cfg_r), .in_op(dec_op),
    .q_init, .q_init_log2,
    .ptbase_we, .ptbase_ppn, .tlb_flush, .fault_clear, .irq, .fault_va,
    .lima_start, .lima_a, .lima_b, .lima_begin, .lima_end, .lima_spec, .lima_qid,
    .lima_busy,
    .ev_produce, .ev_consume, .ev_tlb_miss, .ev_full_stall,
    .out_valid(rsp_v[1]), .out_ready(rsp_r[1]), .out_resp(rsp[1])
  );

  // ---------------- memory side ----------------
  maple_mem_req_enc u_mem_req_enc (
    .clk, .rst_n,
    .in_valid(mq_v), .in_ready(mq_r), .in_req(mq),
    .out_valid(mem_req_valid), .out_ready(mem_req_ready), .out_req(mem_req)
  );

  maple_mem_resp_dec u_mem_resp_dec (
    .clk, .rst_n,
    .in_valid(mem_resp_valid), .in_resp(mem_resp),
    .sp_we(rd_we), .sp_widx(rd_widx), .sp_wdata(rd_wdata),
    .ptw_valid(pte_valid), .ptw_pte(pte),
    .lima_valid(line_valid), .lima_line(line)
  );
endmodule
