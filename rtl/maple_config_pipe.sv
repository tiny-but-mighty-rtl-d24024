// maple_config_pipe: MAPLE's configuration pipeline.
//
// Handles every MMIO operation that is neither a consume nor a produce.
// Stores carry a payload: INIT (reset all queues and set the entries per
// queue to 2**data[3:0]), the page table root for the MMU, TLB flush, "page
// fault handled", and the LIMA arguments (A, B, begin, then end, which starts
// the command as a prefetch into the LLC or, with LIMA_END_Q, as a produce
// into the addressed queue). Loads return a value: OPEN binds a queue to the
// caller and returns 1 if it was free (0 otherwise), CLOSE frees it, and
// debug loads return the faulting virtual address, a status word
// {lima_busy, irq} and the performance counters (produces, consumes, TLB
// misses, cycles a produce waited on a full queue). The pipeline never waits
// on another unit: a LIMA start while LIMA is busy is dropped, which
// software sees through the status word. Stages CONFIG (act) and ACK TO CORE
// follow the design description; the operation list beyond INIT, OPEN,
// CLOSE and the LIMA arguments, their encoding and the counters chosen are
// this design's own.
//
// Timing: an accepted operation acts on the next edge and its response is
// offered one cycle later.
module maple_config_pipe
  import maple_pkg::*;
#(
  parameter int unsigned NQ = NUM_QUEUES,
  localparam int unsigned QW = $clog2(NQ)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  op_t               in_op,
  // queue controller
  output logic              q_init,
  output logic [3:0]        q_init_log2,
  // MMU
  output logic              ptbase_we,
  output logic [PPN_W-1:0]  ptbase_ppn,
  output logic              tlb_flush,
  output logic              fault_clear,
  input  logic              irq,
  input  logic [VA_W-1:0]   fault_va,
  // LIMA
  output logic              lima_start,
  output logic [VA_W-1:0]   lima_a,
  output logic [VA_W-1:0]   lima_b,
  output logic [31:0]       lima_begin,
  output logic [31:0]       lima_end,
  output logic              lima_spec,
  output logic [QID_W-1:0]  lima_qid,
  input  logic              lima_busy,
  // events for the counters
  input  logic              ev_produce,
  input  logic              ev_consume,
  input  logic              ev_tlb_miss,
  input  logic              ev_full_stall,
  // reply
  output logic              out_valid,
  input  logic              out_ready,
  output core_resp_t        out_resp
);
  logic        s_v;
  op_t         s_op;
  logic [NQ-1:0] bound;
  logic [31:0] cnt_prod, cnt_cons, cnt_miss, cnt_stall;
  logic [DATA_W-1:0] rdata;

  assign in_ready = !out_valid || out_ready;
  wire act = s_v && in_ready;   // CONFIG stage acts as it hands over to ACK

  wire st_op = s_op.store;
  assign q_init      = act &&  st_op && s_op.opcode == ST_INIT;
  assign q_init_log2 = s_op.data[3:0];
  assign ptbase_we   = act &&  st_op && s_op.opcode == ST_PT_BASE;
  assign ptbase_ppn  = s_op.data[PPN_W-1:0];
  assign tlb_flush   = act &&  st_op && s_op.opcode == ST_TLB_FLUSH;
  assign fault_clear = act &&  st_op && s_op.opcode == ST_FAULT_DONE;
  assign lima_start  = act &&  st_op && !lima_busy &&
                       (s_op.opcode == ST_LIMA_END || s_op.opcode == ST_LIMA_END_Q);
  assign lima_end    = s_op.data[31:0];
  assign lima_spec   = s_op.opcode == ST_LIMA_END;
  assign lima_qid    = s_op.qid;

  always_comb begin
    rdata = '0;
    unique case (s_op.opcode)
      LD_OPEN:        rdata = DATA_W'(!bound[s_op.qid[QW-1:0]]);
      LD_CLOSE:       rdata = 64'd1;
      LD_FAULT_VA:    rdata = DATA_W'(fault_va);
      LD_STATUS:      rdata = DATA_W'({lima_busy, irq});
      LD_CNT_PRODUCE: rdata = DATA_W'(cnt_prod);
      LD_CNT_CONSUME: rdata = DATA_W'(cnt_cons);
      LD_CNT_TLBMISS: rdata = DATA_W'(cnt_miss);
      LD_CNT_FULLSTL: rdata = DATA_W'(cnt_stall);
      default:        rdata = '0;
    endcase
    if (st_op) rdata = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_v        <= 1'b0;
      s_op       <= '0;
      bound      <= '0;
      lima_a     <= '0;
      lima_b     <= '0;
      lima_begin <= '0;
      cnt_prod   <= '0;
      cnt_cons   <= '0;
      cnt_miss   <= '0;
      cnt_stall  <= '0;
      out_valid  <= 1'b0;
      out_resp   <= '0;
    end else begin
      cnt_prod  <= cnt_prod  + 32'(ev_produce);
      cnt_cons  <= cnt_cons  + 32'(ev_consume);
      cnt_miss  <= cnt_miss  + 32'(ev_tlb_miss);
      cnt_stall <= cnt_stall + 32'(ev_full_stall);
      if (in_ready) begin
        s_v <= in_valid;
        if (in_valid) s_op <= in_op;
      end
      if (out_ready) out_valid <= 1'b0;
      if (act) begin
        out_valid     <= 1'b1;
        out_resp.src  <= s_op.src;
        out_resp.tag  <= s_op.tag;
        out_resp.data <= rdata;
        if (st_op) begin
          unique case (s_op.opcode)
            ST_INIT:       bound <= '0;
            ST_LIMA_A:     lima_a <= VA_W'(s_op.data);
            ST_LIMA_B:     lima_b <= VA_W'(s_op.data);
            ST_LIMA_BEGIN: lima_begin <= s_op.data[31:0];
            default: ;
          endcase
        end else begin
          if (s_op.opcode == LD_OPEN)  bound[s_op.qid[QW-1:0]] <= 1'b1;
          if (s_op.opcode == LD_CLOSE) bound[s_op.qid[QW-1:0]] <= 1'b0;
        end
      end
    end
  end
endmodule
