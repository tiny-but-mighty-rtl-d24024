// tb_maple_spmv: sparse matrix-vector multiplication y = M * x run through
// one MAPLE unit at its default size, the way decoupled software uses it.
//
// M is a random CSR matrix (row pointers, column indices, 32-bit values) and
// x a dense vector of 32-bit integers, both placed in virtual memory behind
// Sv39 page tables in the bench's memory model (random, out-of-order memory
// latencies). Three runs are checked against y computed directly:
//   1. decoupled access/execute: an Access core issues one PRODUCE_PTR of
//      &x[col[j]] per non-zero while an Execute core, started later, consumes
//      the gathered x values two per load (CONSUME2) and accumulates y;
//   2. LIMA_PRODUCE: one command gathers x[col[j]] for all non-zeros into a
//      queue and the Execute core consumes them two per load;
//   3. speculative LIMA: every line holding an x[col[j]] must be prefetched
//      into the LLC.
// It also checks that the Execute core needed half as many loads as there
// are gathered values (rounded up per run), that the queue filled up at
// least once (the Access core ran ahead by a whole queue) and that memory
// answered out of order.
`timescale 1ns/1ps
module tb_maple_spmv;
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
  int n_ooo = 0, n_prefetch = 0, n_noncoh = 0;

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

  // ---------------- data layout ----------------
  // VA 0x4000_0000 + n*4K -> PA 0x20_0000 + n*4K for pages 0..15.
  localparam logic [39:0] ROOT = 40'h10_0000, L1T = 40'h10_1000, L0T = 40'h10_2000;
  localparam logic [38:0] VBASE = 39'h4000_0000;
  localparam logic [38:0] X_VA = VBASE, COL_VA = VBASE + 39'h1000;
  localparam int NROWS = 40, NX = 512;
  function automatic logic [39:0] va2pa(input logic [38:0] va);
    return 40'h20_0000 + 40'(va - VBASE);
  endfunction
  function automatic logic [63:0] pte_of(input logic [39:0] pa, input bit leaf);
    return {10'b0, 16'b0, pa[39:12], 2'b00, 8'(leaf ? 8'hC7 : 8'h01)};
  endfunction

  int          rowptr [NROWS+1];
  int          col [$];
  logic [31:0] val [$];
  logic [31:0] xv [NX];
  logic [31:0] y_ref [NROWS];

  task automatic build();
    wr64(ROOT + 8*1, pte_of(L1T, 0));
    wr64(L1T + 8*0, pte_of(L0T, 0));
    for (int n = 0; n < 16; n++) wr64(L0T + 8*n, pte_of(40'h20_0000 + 40'(n*4096), 1));
    for (int i = 0; i < NX; i++) begin
      xv[i] = $urandom;
      wr32(va2pa(X_VA + 39'(4*i)), xv[i]);
    end
    rowptr[0] = 0;
    for (int r = 0; r < NROWS; r++) begin
      int nz;
      nz = $urandom % 9;                       // 0..8 non-zeros per row
      y_ref[r] = 0;
      for (int k = 0; k < nz; k++) begin
        int c; logic [31:0] v;
        c = $urandom % NX;
        v = $urandom % 1000;
        wr32(va2pa(COL_VA + 39'(4*col.size())), 32'(c));
        col.push_back(c);
        val.push_back(v);
        y_ref[r] += v * xv[c];
      end
      rowptr[r+1] = col.size();
    end
  endtask

  // ---------------- Execute core ----------------
  // Consumes n gathered values from queue q, two per load where it can, and
  // accumulates y; returns the number of loads it issued.
  logic [31:0] y [NROWS];
  task automatic execute(input int q, input int n, output int loads);
    int j, r;
    logic [63:0] d;
    j = 0; r = 0; loads = 0;
    for (int i = 0; i < NROWS; i++) y[i] = 0;
    while (j < n) begin
      logic [31:0] g [2];
      int m;
      if (n - j >= 2) begin
        ld(2, LD_CONSUME2, q, d);
        g[0] = d[31:0]; g[1] = d[63:32]; m = 2;
      end else begin
        ld(2, LD_CONSUME, q, d);
        g[0] = d[31:0]; m = 1;
      end
      loads++;
      for (int k = 0; k < m; k++) begin
        while (rowptr[r+1] <= j) r++;
        y[r] += val[j] * g[k];
        j++;
      end
    end
  endtask

  task automatic check_y(input string what);
    int bad;
    bad = 0;
    for (int i = 0; i < NROWS; i++) if (y[i] !== y_ref[i]) bad++;
    check(bad == 0, $sformatf("%s: %0d of %0d rows wrong", what, bad, NROWS));
  endtask

  // full-queue stalls seen by the produce pipeline
  int n_full = 0;
  always @(posedge clk) if (rst_n && dut.u_produce.full_stall) n_full++;

  logic [63:0] d;
  int loads, nnz;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    nnz = col.size();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    st(1, ST_PT_BASE, 0, 64'(ROOT >> 12));
    st(1, ST_INIT, 0, 64'd5);
    ld(1, LD_OPEN, 0, d); check(d == 1, "open queue 0");
    ld(1, LD_OPEN, 1, d); check(d == 1, "open queue 1");

    // 1. decoupled access/execute with pointer produces
    fork
      for (int j = 0; j < nnz; j++)
        st(1, ST_PRODUCE_PTR, 0, 64'(X_VA + 39'(4*col[j])));
      begin
        repeat (600) @(negedge clk);           // let the Access core run ahead
        execute(0, nnz, loads);
      end
    join
    check_y("access/execute");
    check(loads == (nnz + 1) / 2, $sformatf("execute loads %0d for %0d values", loads, nnz));

    // 2. LIMA_PRODUCE gathers x[col[j]] into queue 1
    st(1, ST_LIMA_A, 0, 64'(X_VA));
    st(1, ST_LIMA_B, 0, 64'(COL_VA));
    st(1, ST_LIMA_BEGIN, 0, 64'd0);
    st(1, ST_LIMA_END_Q, 1, 64'(nnz));
    execute(1, nnz, loads);
    check_y("LIMA_PRODUCE");
    check(loads == (nnz + 1) / 2, $sformatf("LIMA execute loads %0d for %0d values", loads, nnz));

    // 3. speculative LIMA: prefetch every x line that the product touches
    pf_log.delete();
    st(1, ST_LIMA_END, 0, 64'(nnz));
    do begin
      repeat (50) @(negedge clk);
      ld(1, LD_STATUS, 0, d);
    end while (d[1]);
    repeat (20) @(negedge clk);
    begin
      bit seen [logic [33:0]];
      int missing;
      foreach (pf_log[k]) seen[pf_log[k].addr[39:6]] = 1;
      missing = 0;
      for (int j = 0; j < nnz; j++)
        if (!seen.exists(va2pa(X_VA + 39'(4*col[j]))[39:6])) missing++;
      check(missing == 0, $sformatf("%0d gathered lines not prefetched", missing));
      check(pf_log.size() == nnz, $sformatf("%0d prefetches for %0d non-zeros", pf_log.size(), nnz));
    end

    // counters agree with the work done: 2*nnz entries produced and consumed,
    // plus nnz prefetches, which the produce counter also counts
    ld(1, LD_CNT_PRODUCE, 0, d); check(d == 64'(3*nnz), $sformatf("produce counter %0d", d));
    ld(1, LD_CNT_CONSUME, 0, d); check(d == 64'(2*nnz), $sformatf("consume counter %0d", d));

    check(n_full > 0, "access core ran a full queue ahead");
    check(n_ooo > 0, "memory answered out of order");
    $display("spmv: %0d rows, %0d non-zeros, %0d full-queue stall cycles, %0d out-of-order answers",
             NROWS, nnz, n_full, n_ooo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
