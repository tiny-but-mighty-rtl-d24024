// maple_mmu: MAPLE's own MMU, a fully associative TLB and a page table walker.
//
// Pointers handed to MAPLE are virtual addresses, so MAPLE translates them
// itself. Two requesters share the MMU (0: produce pipeline, 1: LIMA), one
// translation at a time. A TLB hit answers on the next cycle. On a miss the
// walker reads page table entries through the memory request encoder; this
// design assumes RISC-V Sv39 tables (three levels, 8-byte entries, 4 KB pages
// with 2 MB and 1 GB superpages), as used by the RV64 cores MAPLE serves. An
// invalid entry, a write-only entry, a non-readable leaf, a misaligned
// superpage or a walk that runs out of levels is a page fault: the faulting
// address is kept for the driver, irq is raised, the requester is told
// "fault", and no translation is accepted until the driver reports (fault_clear)
// that it has fixed the mapping; the requester then retries. TLB refill
// replaces entries round-robin; flush invalidates all of them.
// The 16-entry fully associative TLB, the hardware walker and the interrupt on
// a page fault follow the design description; the page table format, the
// replacement policy, the blocking during a fault and the interface are this
// design's choices.
//
// Timing: hit: done two cycles after the accepted request. Miss: one memory
// round trip per level, plus one cycle.
//
// Constant outputs: page-table walker requests are always 8-byte, coherent,
// non-prefetch, 8-byte aligned and carry transaction index 0.
module maple_mmu
  import maple_pkg::*;
#(
  parameter int unsigned ENTRIES = TLB_ENTRIES,
  localparam int unsigned EW     = $clog2(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              ptbase_we,
  input  logic [PPN_W-1:0]  ptbase_ppn,
  input  logic              flush,
  input  logic              fault_clear,
  output logic              irq,
  output logic [VA_W-1:0]   fault_va,
  // translation requests (0 = produce, 1 = LIMA)
  input  logic [1:0]        req,
  output logic [1:0]        req_ready,
  input  logic [VA_W-1:0]   req_va [2],
  output logic [1:0]        done,
  output logic              fault,
  output logic [PA_W-1:0]   pa,
  // page table reads
  output logic              ptw_valid,
  input  logic              ptw_ready,
  output mem_req_t          ptw_req,
  input  logic              pte_valid,
  input  logic [63:0]       pte,
  output logic              tlb_miss      // one pulse per walk started
);
  typedef struct packed {
    logic        v;
    logic [26:0] vpn;
    logic [PPN_W-1:0] ppn;
    logic [1:0]  lvl;     // 0: 4 KB, 1: 2 MB, 2: 1 GB
  } tlb_e_t;

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_WALK_REQ, S_WALK_WAIT, S_DONE} state_e;

  tlb_e_t          tlb [ENTRIES];
  logic [EW-1:0]   repl;
  state_e          st;
  logic            who;
  logic [VA_W-1:0] va;
  logic [PPN_W-1:0] ptbase, walk_ppn;
  logic [1:0]      lvl;
  logic            res_fault;
  logic [PA_W-1:0] res_pa;

  // ---------------- arbitration ----------------
  logic accept, pick;
  assign pick     = !req[0];              // produce first, then LIMA
  assign accept   = st == S_IDLE && !irq && |req;
  assign req_ready[0] = st == S_IDLE && !irq;
  assign req_ready[1] = st == S_IDLE && !irq && !req[0];

  // ---------------- TLB lookup ----------------
  function automatic logic match(input tlb_e_t e, input logic [VA_W-1:0] a);
    logic [26:0] v;
    v = a[38:12];
    unique case (e.lvl)
      2'd2:    return e.v && e.vpn[26:18] == v[26:18];
      2'd1:    return e.v && e.vpn[26:9]  == v[26:9];
      default: return e.v && e.vpn == v;
    endcase
  endfunction

  function automatic logic [PA_W-1:0] make_pa(input logic [PPN_W-1:0] p, input logic [1:0] l,
                                              input logic [VA_W-1:0] a);
    logic [PA_W-1:0] r;
    r = {p, a[11:0]};
    if (l >= 2'd1) r[20:12] = a[20:12];
    if (l == 2'd2) r[29:21] = a[29:21];
    return r;
  endfunction

  logic          hit;
  logic [EW-1:0] hit_i;
  always_comb begin
    hit   = 1'b0;
    hit_i = '0;
    for (int unsigned e = 0; e < ENTRIES; e++)
      if (!hit && match(tlb[e], va)) begin
        hit   = 1'b1;
        hit_i = EW'(e);
      end
  end

  // ---------------- walker ----------------
  logic [8:0] vpn_part;
  always_comb begin
    unique case (lvl)
      2'd2:    vpn_part = va[38:30];
      2'd1:    vpn_part = va[29:21];
      default: vpn_part = va[20:12];
    endcase
  end

  always_comb begin
    ptw_req          = '0;
    ptw_req.addr     = {walk_ppn, vpn_part, 3'b000};
    ptw_req.size     = SZ_DWORD;
    ptw_req.txid.src = TX_PTW;
  end
  assign ptw_valid = st == S_WALK_REQ;

  logic pte_v, pte_r, pte_w, pte_x;
  logic [PPN_W-1:0] pte_ppn;
  logic misaligned;
  assign pte_v   = pte[0];
  assign pte_r   = pte[1];
  assign pte_w   = pte[2];
  assign pte_x   = pte[3];
  assign pte_ppn = pte[10 +: PPN_W];
  assign misaligned = (lvl == 2'd2 && pte_ppn[17:0] != '0) || (lvl == 2'd1 && pte_ppn[8:0] != '0);

  assign done  = (st == S_DONE) ? (who ? 2'b10 : 2'b01) : 2'b00;
  assign fault = res_fault;
  assign pa    = res_pa;
  assign tlb_miss = st == S_LOOKUP && !hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      who       <= 1'b0;
      va        <= '0;
      ptbase    <= '0;
      walk_ppn  <= '0;
      lvl       <= 2'd2;
      res_fault <= 1'b0;
      res_pa    <= '0;
      repl      <= '0;
      irq       <= 1'b0;
      fault_va  <= '0;
      for (int unsigned e = 0; e < ENTRIES; e++) tlb[e] <= '0;
    end else begin
      if (ptbase_we) ptbase <= ptbase_ppn;
      if (fault_clear) irq <= 1'b0;
      if (flush) for (int unsigned e = 0; e < ENTRIES; e++) tlb[e].v <= 1'b0;
      unique case (st)
        S_IDLE: if (accept) begin
          who <= pick;
          va  <= req_va[pick];
          st  <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (hit) begin
            res_fault <= 1'b0;
            res_pa    <= make_pa(tlb[hit_i].ppn, tlb[hit_i].lvl, va);
            st        <= S_DONE;
          end else begin
            walk_ppn <= ptbase;
            lvl      <= 2'd2;
            st       <= S_WALK_REQ;
          end
        end
        S_WALK_REQ: if (ptw_ready) st <= S_WALK_WAIT;
        S_WALK_WAIT: if (pte_valid) begin
          if (!pte_v || (!pte_r && pte_w)) begin
            res_fault <= 1'b1;
          end else if (pte_r || pte_x) begin
            res_fault <= !pte_r || misaligned;
            res_pa    <= make_pa(pte_ppn, lvl, va);
            if (pte_r && !misaligned) begin
              tlb[repl] <= '{v: 1'b1, vpn: va[38:12], ppn: pte_ppn, lvl: lvl};
              repl      <= repl + 1'b1;
            end
          end else if (lvl == 2'd0) begin
            res_fault <= 1'b1;
          end else begin
            walk_ppn <= pte_ppn;
            lvl      <= lvl - 2'd1;
          end
          if (!pte_v || (!pte_r && pte_w) || pte_r || pte_x || lvl == 2'd0) st <= S_DONE;
          else st <= S_WALK_REQ;
        end
        S_DONE: begin
          if (res_fault) begin
            irq      <= 1'b1;
            fault_va <= va;
          end
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
