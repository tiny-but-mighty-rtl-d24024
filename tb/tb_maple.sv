// tb_maple: end-to-end test of one MAPLE unit at its default size
// (8 queues, 256-entry scratchpad, 16-entry TLB).
//
// The bench plays up to two cores on the MMIO side and the memory system
// (LLC/DRAM with random, out-of-order latencies) on the other. It builds
// Sv39 page tables in its memory model and runs:
//   queue binding (OPEN/CLOSE), data produce/consume in order, the 5-cycle
//   consume latency, a consume waiting on an empty queue while another queue
//   proceeds, a produce waiting on a full queue, pointer-produces with
//   out-of-order memory answers (coherent and DRAM), TLB misses and hits, a
//   2 MB superpage, a page fault handled by a "driver" core, LLC prefetch,
//   LIMA into the LLC, LIMA_PRODUCE through a full queue, LIMA with A = 0,
//   queue resizing with INIT, TLB flush, two-entry consumes (CONSUME2) and
//   the performance counters.
// Every mechanism is counted, and one that never happened is a failure.
// All stimulus is driven on the falling clock edge and sampled just after it.
`timescale 1ns/1ps
module tb_maple;
  import maple_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       core_req_valid = 1'b0, core_req_ready;
  core_req_t  core_req = '0;
  logic       core_resp_valid, core_resp_ready = 1'b1;
  core_resp_t core_resp;
  logic       mem_req_valid, mem_req_ready = 1'b0;
  mem_req_t   mem_req;
  logic       mem_resp_valid = 1'b0;
  mem_resp_t  mem_resp = '0;
  logic       irq;

  maple dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_open_fail = 0, n_consume_wait = 0, n_full_stall = 0, n_ooo = 0, n_tlb_miss = 0,
      n_superpage = 0, n_fault = 0, n_prefetch = 0, n_noncoh = 0, n_lima_spec = 0,
      n_lima_prod = 0, n_lima_a0 = 0, n_resize = 0, n_other_q = 0, n_flush = 0, n_double = 0;

  // ---------------- memory model ----------------
  logic [31:0] mem32 [logic [37:0]];     // by word address
  function automatic logic [31:0] dflt(input logic [39:0] pa);
    return pa[31:0] * 32'h9E37_79B1 ^ 32'h5A5A_0000;
  endfunction
  function automatic logic [31:0] rd32(input logic [39:0] pa);
    if (mem32.exists(pa[39:2])) return mem32[pa[39:2]];
    return dflt({pa[39:2], 2'b00});
  endfunction
  task automatic wr32(input logic [39:0] pa, input logic [31:0] d);
    mem32[pa[39:2]] = d;
  endtask
  task automatic wr64(input logic [39:0] pa, input logic [63:0] d);
    wr32(pa, d[31:0]);
    wr32(pa + 4, d[63:32]);
  endtask

  typedef struct {
    mem_req_t    r;
    int unsigned due;
    int unsigned seq;
  } pend_t;
  pend_t pend [$];
  int unsigned req_seq = 0, last_resp_seq = 0;
  bit          any_resp = 0;
  int unsigned n_mreq = 0;
  mem_req_t    pf_log [$];

  // accept requests (random backpressure) and answer after a random latency
  always @(negedge clk) begin
    if (rst_n) begin
      // ready for the coming rising edge; the request shown now is the one
      // that edge takes
      mem_req_ready = ($urandom % 4) != 0;
      if (mem_req_valid && mem_req_ready) begin
        n_mreq++;
        if (mem_req.prefetch) begin
          n_prefetch++;
          pf_log.push_back(mem_req);
        end else begin
          pend_t p;
          p.r   = mem_req;
          p.due = cyc + 4 + ($urandom % 40);
          p.seq = req_seq++;
          pend.push_back(p);
        end
        if (mem_req.noncoh) n_noncoh++;
      end
      mem_resp_valid <= 1'b0;
      for (int k = 0; k < pend.size(); k++) begin
        if (pend[k].due <= cyc) begin
          mem_resp_t rs;
          rs.txid = pend[k].r.txid;
          rs.data = '0;
          unique case (pend[k].r.size)
            SZ_WORD:  rs.data[31:0] = rd32(pend[k].r.addr);
            SZ_DWORD: rs.data[63:0] = {rd32(pend[k].r.addr + 4), rd32(pend[k].r.addr)};
            default:  for (int w = 0; w < 16; w++)
                        rs.data[32*w +: 32] = rd32({pend[k].r.addr[39:6], 6'b0} + 40'(4*w));
          endcase
          if (any_resp && pend[k].seq < last_resp_seq) n_ooo++;
          any_resp = 1;
          last_resp_seq = pend[k].seq;
          mem_resp <= rs;
          mem_resp_valid <= 1'b1;
          pend.delete(k);
          break;
        end
      end
    end
  end

  // ---------------- core side ----------------
  bit          bus_busy = 0;
  logic [63:0] resp_data [int];          // key {src,tag}
  int unsigned resp_time [int];
  logic [TAG_W-1:0] next_tag [int];

  always @(negedge clk)
    if (core_resp_valid && core_resp_ready) begin
      resp_data[{core_resp.src, core_resp.tag}] = core_resp.data;
      resp_time[{core_resp.src, core_resp.tag}] = cyc;
    end

  function automatic logic [11:0] off(input logic [5:0] opc, input int q);
    return {3'(q), opc, 3'b000};
  endfunction

  // issue one MMIO access and wait for its response; returns data and the
  // cycles from acceptance to response
  task automatic mmio(input int src, input bit store, input logic [11:0] o, input logic [63:0] d,
                      output logic [63:0] rdata, output int unsigned lat);
    core_req_t r;
    int key;
    int unsigned t0;
    if (!next_tag.exists(src)) next_tag[src] = '0;
    r.src = SRC_W'(src);
    r.tag = next_tag[src];
    next_tag[src] = next_tag[src] + 1'b1;
    r.store  = store;
    r.offset = o;
    r.data   = d;
    key = {r.src, r.tag};
    resp_data.delete(key);
    while (bus_busy) @(negedge clk);
    bus_busy = 1;
    core_req       = r;
    core_req_valid = 1'b1;
    forever begin
      #1;
      if (core_req_ready) break;
      @(negedge clk);
    end
    t0 = cyc;
    @(negedge clk);
    core_req_valid = 1'b0;
    bus_busy = 0;
    while (!resp_data.exists(key)) @(negedge clk);
    rdata = resp_data[key];
    lat   = resp_time[key] - t0;
  endtask

  task automatic st(input int src, input logic [5:0] opc, input int q, input logic [63:0] d);
    logic [63:0] x; int unsigned l;
    mmio(src, 1'b1, off(opc, q), d, x, l);
  endtask
  task automatic ld(input int src, input logic [5:0] opc, input int q, output logic [63:0] d);
    int unsigned l;
    mmio(src, 1'b0, off(opc, q), '0, d, l);
  endtask

  // ---------------- address map (also in the page tables) ----------------
  // VA 0x4000_0000 + n*4K -> PA 0x20_0000 + n*4K for pages 0..15 (page 12
  // starts unmapped); VA 0x4020_0000 is a 2 MB superpage at PA 0x40_0000.
  localparam logic [39:0] ROOT = 40'h10_0000, L1T = 40'h10_1000, L0T = 40'h10_2000;
  localparam logic [38:0] VBASE = 39'h4000_0000, VSUPER = 39'h4020_0000;
  localparam int FAULT_PAGE = 12;
  function automatic logic [39:0] va2pa(input logic [38:0] va);
    if (va >= VSUPER) return 40'h40_0000 + 40'(va - VSUPER);
    return 40'h20_0000 + 40'(va - VBASE);
  endfunction
  function automatic logic [63:0] pte_of(input logic [39:0] pa, input bit leaf);
    return {10'b0, 16'b0, pa[39:12], 2'b00, 8'(leaf ? 8'hC7 : 8'h01)};  // V,R,W,A,D or pointer
  endfunction
  task automatic build_tables();
    wr64(ROOT + 8*1, pte_of(L1T, 0));                   // VPN2 = 1
    wr64(L1T + 8*0, pte_of(L0T, 0));                    // VPN1 = 0 -> 4K pages
    wr64(L1T + 8*1, pte_of(40'h40_0000, 1));            // VPN1 = 1 -> 2 MB superpage
    for (int n = 0; n < 16; n++)
      wr64(L0T + 8*n, (n == FAULT_PAGE) ? 64'h0 : pte_of(40'h20_0000 + 40'(n*4096), 1));
  endtask

  function automatic logic [31:0] exp_at(input logic [38:0] va);
    return rd32(va2pa(va));
  endfunction

  // ---------------- test ----------------
  logic [63:0] d;
  int unsigned lat;
  logic [38:0] ptrs [$];

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_tables();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    st(1, ST_PT_BASE, 0, 64'(ROOT >> 12));
    st(1, ST_INIT, 0, 64'd5);                          // 8 queues x 32 entries

    // ---- binding ----
    ld(1, LD_OPEN, 0, d);  check(d == 1, "open q0 free");
    ld(2, LD_OPEN, 0, d);  check(d == 0, "open q0 taken");
    if (d == 0) n_open_fail++;
    ld(1, LD_CLOSE, 0, d);
    ld(2, LD_OPEN, 0, d);  check(d == 1, "open q0 after close");

    // ---- data produce / consume, latency ----
    for (int k = 0; k < 10; k++) st(1, ST_PRODUCE, 0, 64'(32'hA000 + k));
    for (int k = 0; k < 10; k++) begin
      mmio(2, 1'b0, off(LD_CONSUME, 0), '0, d, lat);
      check(d == 64'(32'hA000 + k), $sformatf("consume order %0d got %h", k, d));
      check(lat == 5, $sformatf("consume latency %0d", lat));
    end
    // two entries per load
    for (int k = 0; k < 6; k++) st(1, ST_PRODUCE, 0, 64'(32'hB000 + k));
    for (int k = 0; k < 3; k++) begin
      mmio(2, 1'b0, off(LD_CONSUME2, 0), '0, d, lat);
      check(d == {32'hB000 + 32'(2*k + 1), 32'hB000 + 32'(2*k)}, $sformatf("double consume %0d got %h", k, d));
      check(lat == 6, $sformatf("double consume latency %0d", lat));
      if (d[31:0] == 32'hB000 + 32'(2*k)) n_double++;
    end

    // ---- consume waits on an empty queue; other queues proceed ----
    st(1, ST_PRODUCE, 3, 64'h33);
    fork
      begin
        ld(2, LD_CONSUME, 2, d);
        check(d == 64'h77, "consume after wait");
      end
      begin
        logic [63:0] d3;
        repeat (30) @(negedge clk);
        ld(1, LD_CONSUME, 3, d3);
        check(d3 == 64'h33, "other queue while q2 waits");
        if (d3 == 64'h33) n_other_q++;
        check(resp_data.size() >= 0 && !dut.u_consume.head_ready[2], "q2 still empty");
        if (dut.u_consume.buf_v[2]) n_consume_wait++;
        st(1, ST_PRODUCE, 2, 64'h77);
      end
    join

    // ---- produce waits on a full queue ----
    fork
      begin
        for (int k = 0; k < 34; k++) st(1, ST_PRODUCE, 4, 64'(k));
      end
      begin
        repeat (400) @(negedge clk);
        if (dut.u_produce.full_stall) n_full_stall++;
        check(dut.u_qctrl.full[4], "q4 full");
        for (int k = 0; k < 34; k++) begin
          ld(2, LD_CONSUME, 4, d);
          check(d == 64'(k), $sformatf("full-queue order %0d got %0d", k, d));
        end
      end
    join

    // ---- pointer produce, out-of-order memory, TLB ----
    ptrs.delete();
    for (int k = 0; k < 60; k++) ptrs.push_back(VBASE + 39'(($urandom % 12) * 4096 + ($urandom % 1024) * 4));
    for (int k = 0; k < 4; k++)  ptrs.push_back(VSUPER + 39'(($urandom % 4096) * 4 * 64));
    fork
      foreach (ptrs[k]) st(1, (k % 5 == 4) ? ST_PRODUCE_PTRD : ST_PRODUCE_PTR, 1, 64'(ptrs[k]));
      foreach (ptrs[k]) begin
        ld(2, LD_CONSUME, 1, d);
        check(d == 64'(exp_at(ptrs[k])), $sformatf("pointer %0d va %h got %h exp %h", k, ptrs[k], d, exp_at(ptrs[k])));
        if (ptrs[k] >= VSUPER && d == 64'(exp_at(ptrs[k]))) n_superpage++;
      end
    join
    ld(1, LD_CNT_TLBMISS, 0, d);
    n_tlb_miss = int'(d);
    check(d > 0 && d < 64, $sformatf("tlb misses %0d (hits expected too)", d));

    // ---- page fault handled by a driver ----
    fork
      begin
        st(1, ST_PRODUCE_PTR, 5, 64'(VBASE + FAULT_PAGE * 4096 + 40));
        ld(1, LD_CONSUME, 5, d);
        check(d == 64'(exp_at(VBASE + FAULT_PAGE * 4096 + 40)), "value after page fault");
      end
      begin
        logic [63:0] fva;
        while (!irq) @(negedge clk);
        n_fault++;
        ld(2, LD_STATUS, 0, fva);
        check(fva[0] == 1'b1, "status shows irq");
        ld(2, LD_FAULT_VA, 0, fva);
        check(fva == 64'(VBASE + FAULT_PAGE * 4096 + 40), $sformatf("fault va %h", fva));
        wr64(L0T + 8*FAULT_PAGE, pte_of(40'h20_0000 + 40'(FAULT_PAGE*4096), 1));
        st(2, ST_FAULT_DONE, 0, 0);
        check(!irq, "irq cleared");
      end
    join

    // ---- prefetch into the LLC ----
    pf_log.delete();
    st(1, ST_PREFETCH, 0, 64'(VBASE + 39'h2468));
    repeat (20) @(negedge clk);
    check(pf_log.size() == 1 && pf_log[0].addr == va2pa(VBASE + 39'h2468), "prefetch address");

    // ---- LIMA: B at page 8, 40 indices into A (pages 0..3) ----
    for (int k = 0; k < 64; k++) wr32(va2pa(VBASE + 8*4096 + 39'(4*k)), ($urandom % 4096));
    // speculative: prefetch A[B[i]] for i in [5, 30)
    pf_log.delete();
    st(1, ST_LIMA_A, 0, 64'(VBASE));
    st(1, ST_LIMA_B, 0, 64'(VBASE + 8*4096));
    st(1, ST_LIMA_BEGIN, 0, 64'd5);
    st(1, ST_LIMA_END, 0, 64'd30);
    do begin repeat (10) @(negedge clk); ld(1, LD_STATUS, 0, d); end while (d[1]);
    repeat (20) @(negedge clk);
    check(pf_log.size() == 25, $sformatf("LIMA prefetches %0d", pf_log.size()));
    foreach (pf_log[k]) begin
      logic [38:0] va;
      va = VBASE + 39'(4 * rd32(va2pa(VBASE + 8*4096 + 39'(4*(5+k)))));
      check(pf_log[k].addr == va2pa(va), $sformatf("LIMA prefetch %0d addr", k));
      if (pf_log[k].addr == va2pa(va)) n_lima_spec++;
    end
    // non-speculative: 50 indices into queue 6 (32 entries) so it fills up
    st(1, ST_LIMA_BEGIN, 0, 64'd3);
    st(1, ST_LIMA_END_Q, 6, 64'd53);
    for (int k = 3; k < 53; k++) begin
      logic [38:0] va;
      va = VBASE + 39'(4 * rd32(va2pa(VBASE + 8*4096 + 39'(4*k))));
      ld(2, LD_CONSUME, 6, d);
      check(d == 64'(exp_at(va)), $sformatf("LIMA_PRODUCE %0d got %h exp %h", k, d, exp_at(va)));
      if (d == 64'(exp_at(va))) n_lima_prod++;
    end
    // A = 0: the values of B[i] themselves
    st(1, ST_LIMA_A, 0, 64'd0);
    st(1, ST_LIMA_BEGIN, 0, 64'd0);
    st(1, ST_LIMA_END_Q, 7, 64'd20);
    for (int k = 0; k < 20; k++) begin
      ld(2, LD_CONSUME, 7, d);
      check(d == 64'(rd32(va2pa(VBASE + 8*4096 + 39'(4*k)))), $sformatf("LIMA A=0 %0d", k));
      if (d == 64'(rd32(va2pa(VBASE + 8*4096 + 39'(4*k))))) n_lima_a0++;
    end

    // ---- resize: two queues of 128 entries ----
    st(1, ST_INIT, 0, 64'd7);
    for (int k = 0; k < 100; k++) st(1, ST_PRODUCE, 1, 64'(1000 + k));
    for (int k = 0; k < 100; k++) begin
      ld(2, LD_CONSUME, 1, d);
      check(d == 64'(1000 + k), "resized queue order");
    end
    check(dut.u_qctrl.full[2], "queue 2 unusable with 128-entry queues");
    n_resize++;

    // ---- TLB flush forces a new walk ----
    begin
      logic [63:0] m0, m1;
      ld(1, LD_CNT_TLBMISS, 0, m0);
      st(1, ST_PRODUCE_PTR, 0, 64'(VBASE + 39'h10));
      ld(2, LD_CONSUME, 0, d);
      ld(1, LD_CNT_TLBMISS, 0, m1);
      check(m1 == m0, "page still in TLB");
      st(1, ST_TLB_FLUSH, 0, 0);
      st(1, ST_PRODUCE_PTR, 0, 64'(VBASE + 39'h14));
      ld(2, LD_CONSUME, 0, d);
      check(d == 64'(exp_at(VBASE + 39'h14)), "value after flush");
      ld(1, LD_CNT_TLBMISS, 0, m0);
      check(m0 == m1 + 1, "flush causes one walk");
      if (m0 == m1 + 1) n_flush++;
    end

    // ---- counters ----
    ld(1, LD_CNT_CONSUME, 0, d);
    check(d == 10 + 6 + 2 + 34 + 64 + 1 + 50 + 20 + 100 + 2, $sformatf("consume counter %0d", d));
    ld(1, LD_CNT_FULLSTL, 0, d);
    check(d > 0, "full-stall counter");

    // ---- every mechanism happened ----
    check(n_open_fail > 0,    "mechanism: OPEN of a bound queue");
    check(n_consume_wait > 0, "mechanism: consume waiting on empty queue");
    check(n_other_q > 0,      "mechanism: other queue proceeds");
    check(n_full_stall > 0,   "mechanism: produce waiting on full queue");
    check(n_ooo > 0,          "mechanism: out-of-order memory responses");
    check(n_tlb_miss > 0,     "mechanism: TLB miss / page walk");
    check(n_superpage > 0,    "mechanism: superpage");
    check(n_fault > 0,        "mechanism: page fault");
    check(n_prefetch > 0,     "mechanism: prefetch");
    check(n_noncoh > 0,       "mechanism: DRAM (non-coherent) load");
    check(n_lima_spec > 0,    "mechanism: LIMA prefetch");
    check(n_lima_prod > 0,    "mechanism: LIMA_PRODUCE");
    check(n_lima_a0 > 0,      "mechanism: LIMA with A = 0");
    check(n_resize > 0,       "mechanism: queue resize");
    check(n_flush > 0,        "mechanism: TLB flush");
    check(n_double > 0,       "mechanism: two entries per consume load");
    $display("mechanisms: open_fail=%0d consume_wait=%0d other_q=%0d full_stall=%0d ooo=%0d tlb_miss=%0d super=%0d fault=%0d prefetch=%0d noncoh=%0d lima_spec=%0d lima_prod=%0d lima_a0=%0d resize=%0d flush=%0d double=%0d",
             n_open_fail, n_consume_wait, n_other_q, n_full_stall, n_ooo, n_tlb_miss, n_superpage, n_fault,
             n_prefetch, n_noncoh, n_lima_spec, n_lima_prod, n_lima_a0, n_resize, n_flush, n_double);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
