// maple_lima: Loops of Indirect Memory Accesses (LIMA) unit.
//
// One command prefetches A[B[i]] for every i in [begin, end), or B[i] itself
// when A is 0. The unit translates the address of the next 64-byte chunk of
// array B through the MMU, fetches the chunk, and then walks it word by word:
// for each index it forms the pointer &A[B[i]] = A + 4*B[i] (or &B[i]) and
// inserts it into the produce pipeline, as a speculative prefetch into the
// LLC (LIMA) or as a pointer-produce into queue qid (LIMA_PRODUCE). The
// pointer is then translated and loaded like any other pointer-produce.
// Chunked fetching of B, TLB translation, word-by-word indirection and the
// two modes follow the design description. 32-bit indices in B, 4-byte
// elements of A, one chunk in flight at a time and the chunk being held in a
// local register (rather than in the scratchpad) are this design's choices.
// A page fault on a chunk is retried once the MMU accepts requests again.
//
// Interface: start with a, b, begin, end, spec, qid (ignored while busy);
// MMU port, chunk request/response, pointer output (valid/ready).
//
// Constant outputs: generated pointers carry no core id or tag, never ask for
// an ack and are always coherent, and chunk fetches are always line-sized and
// line-aligned, so those fields are fixed.
module maple_lima
  import maple_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [VA_W-1:0]   a_base,
  input  logic [VA_W-1:0]   b_base,
  input  logic [31:0]       idx_begin,
  input  logic [31:0]       idx_end,
  input  logic              spec,          // 1: prefetch to LLC, 0: produce into qid
  input  logic [QID_W-1:0]  qid,
  output logic              busy,
  // MMU
  output logic              tr_req,
  input  logic              tr_ready,
  output logic [VA_W-1:0]   tr_va,
  input  logic              tr_done,
  input  logic              tr_fault,
  input  logic [PA_W-1:0]   tr_pa,
  // chunk fetch
  output logic              mreq_valid,
  input  logic              mreq_ready,
  output mem_req_t          mreq,
  input  logic              line_valid,
  input  logic [LINE_W-1:0] line,
  // pointers into the produce pipeline
  output logic              ptr_valid,
  input  logic              ptr_ready,
  output prod_op_t          ptr_op
);
  typedef enum logic [2:0] {L_IDLE, L_XLATE, L_XWAIT, L_FETCH, L_FWAIT, L_ITER} state_e;

  state_e          st;
  logic [VA_W-1:0] a, b;
  logic [31:0]     i, iend;
  logic            m_spec;
  logic [QID_W-1:0] m_qid;
  logic [PA_W-1:0] chunk_pa;
  logic [LINE_W-1:0] chunk;

  logic [VA_W-1:0] bi_va;       // &B[i]
  logic [3:0]      word;        // word of the chunk holding B[i]
  logic [31:0]     bval;
  assign bi_va = b + VA_W'({i, 2'b00});
  assign word  = bi_va[5:2];
  assign bval  = chunk[32*word +: 32];

  assign busy   = st != L_IDLE;
  assign tr_req = st == L_XLATE;
  assign tr_va  = {bi_va[VA_W-1:6], 6'b0};

  always_comb begin
    mreq          = '0;
    mreq.addr     = chunk_pa;
    mreq.size     = SZ_LINE;
    mreq.txid.src = TX_LIMA;
  end
  assign mreq_valid = st == L_FETCH;

  always_comb begin
    ptr_op          = '0;
    ptr_op.kind     = m_spec ? PK_PREFETCH : PK_PTR;
    ptr_op.need_ack = 1'b0;
    ptr_op.qid      = m_qid;
    ptr_op.data     = DATA_W'((a == '0) ? bi_va : VA_W'(a + VA_W'({bval, 2'b00})));
  end
  assign ptr_valid = st == L_ITER;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= L_IDLE;
      a        <= '0;
      b        <= '0;
      i        <= '0;
      iend     <= '0;
      m_spec   <= 1'b0;
      m_qid    <= '0;
      chunk_pa <= '0;
      chunk    <= '0;
    end else begin
      unique case (st)
        L_IDLE: if (start) begin
          a      <= a_base;
          b      <= b_base;
          i      <= idx_begin;
          iend   <= idx_end;
          m_spec <= spec;
          m_qid  <= qid;
          st     <= (idx_begin < idx_end) ? L_XLATE : L_IDLE;
        end
        L_XLATE: if (tr_ready) st <= L_XWAIT;
        L_XWAIT: if (tr_done) begin
          if (tr_fault) st <= L_XLATE;
          else begin
            chunk_pa <= {tr_pa[PA_W-1:6], 6'b0};
            st       <= L_FETCH;
          end
        end
        L_FETCH: if (mreq_ready) st <= L_FWAIT;
        L_FWAIT: if (line_valid) begin
          chunk <= line;
          st    <= L_ITER;
        end
        L_ITER: if (ptr_ready) begin
          i <= i + 1;
          if (i + 1 >= iend)   st <= L_IDLE;
          else if (word == 4'hf) st <= L_XLATE;
        end
        default: st <= L_IDLE;
      endcase
    end
  end
endmodule
