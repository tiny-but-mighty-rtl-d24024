// tb_maple_lima: checks the LIMA unit with models of the MMU (random
// latency, one page fault) and of memory holding array B. For several
// ranges, including ones that start and end inside a 64-byte chunk, it
// checks that exactly one translation and one line fetch happen per chunk,
// that the pointer stream is &A[B[i]] (or &B[i] when A is 0) for each i in
// order, marked as prefetch or as a produce into the given queue, and never
// asking for an ack; that a start while busy is ignored; and that an empty
// range does nothing.
`timescale 1ns/1ps
module tb_maple_lima;
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, spec = 0, busy;
  logic [VA_W-1:0] a_base = '0, b_base = '0;
  logic [31:0] idx_begin = 0, idx_end = 0;
  logic [QID_W-1:0] qid = '0;
  logic tr_req, tr_ready = 0, tr_done = 0, tr_fault = 0;
  logic [VA_W-1:0] tr_va; logic [PA_W-1:0] tr_pa = '0;
  logic mreq_valid, mreq_ready = 0, line_valid = 0;
  mem_req_t mreq; logic [LINE_W-1:0] line = '0;
  logic ptr_valid, ptr_ready = 0; prod_op_t ptr_op;
  maple_lima dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [PA_W-1:0] xlate(logic [VA_W-1:0] va); return {1'b0, va} + 40'h10_0000; endfunction
  function automatic logic [31:0] bval(logic [PA_W-1:0] pa);      // B contents by physical address
    return (pa[31:0] * 32'd2654435761) >> 12;
  endfunction

  int n_tr = 0, n_fetch = 0, n_fault = 0;
  bit fault_once = 0;
  // MMU model
  initial forever begin
    @(negedge clk);
    tr_done = 0; tr_fault = 0;
    tr_ready = $urandom % 2;
    #1;
    if (tr_req && tr_ready) begin
      logic [VA_W-1:0] va;
      va = tr_va;
      check(va[5:0] == 0, "chunk translation is 64-byte aligned");
      @(negedge clk); tr_ready = 0;
      repeat ($urandom % 4) @(negedge clk);
      tr_done = 1;
      tr_fault = fault_once;
      if (fault_once) begin fault_once = 0; n_fault++; end
      else n_tr++;
      tr_pa = xlate(va);
    end
  end
  // memory model
  initial forever begin
    @(negedge clk);
    line_valid = 0;
    mreq_ready = $urandom % 2;
    #1;
    if (mreq_valid && mreq_ready) begin
      logic [PA_W-1:0] a;
      a = mreq.addr;
      check(mreq.size == SZ_LINE && mreq.txid.src == TX_LIMA && a[5:0] == 0 && !mreq.prefetch, "chunk request");
      n_fetch++;
      @(negedge clk);
      repeat ($urandom % 8) @(negedge clk);
      for (int w = 0; w < 16; w++) line[32*w +: 32] = bval(a + 40'(4*w));
      line_valid = 1;
    end
  end
  // pointer sink
  prod_op_t got [$];
  always @(negedge clk) begin
    ptr_ready = $urandom % 3 != 0;
    #1;
    if (ptr_valid && ptr_ready) got.push_back(ptr_op);
  end

  task automatic run(logic [VA_W-1:0] a, logic [VA_W-1:0] b, int beg, int en, bit sp, int q);
    int chunks;
    got.delete(); n_tr = 0; n_fetch = 0;
    @(negedge clk);
    a_base = a; b_base = b; idx_begin = beg; idx_end = en; spec = sp; qid = 3'(q); start = 1;
    @(negedge clk);
    start = 0;
    // a second start while busy must be ignored
    if (en > beg) begin
      check(busy, "busy after start");
      a_base = 39'h7777_0000; idx_begin = 0; idx_end = 3; start = 1;
      @(negedge clk);
      start = 0;
    end
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    check(got.size() == (en > beg ? en - beg : 0), $sformatf("pointer count %0d for [%0d,%0d)", got.size(), beg, en));
    foreach (got[k]) begin
      logic [VA_W-1:0] bi, e;
      bi = b + VA_W'(4 * (beg + k));
      e = (a == 0) ? bi : a + VA_W'({bval(xlate(bi)), 2'b00});
      check(got[k].data == 64'(e), $sformatf("pointer %0d", k));
      check(got[k].kind == (sp ? PK_PREFETCH : PK_PTR) && got[k].qid == 3'(q) && !got[k].need_ack, "pointer kind");
    end
    chunks = (en > beg) ? int'(((b + VA_W'(4*(en-1))) >> 6) - ((b + VA_W'(4*beg)) >> 6)) + 1 : 0;
    check(n_tr == chunks && n_fetch == chunks, $sformatf("one translation and fetch per chunk (%0d/%0d vs %0d)", n_tr, n_fetch, chunks));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(39'h1000_0000, 39'h2000_0000, 0, 16, 1, 0);     // one whole chunk, prefetch
    run(39'h1000_0000, 39'h2000_0040, 5, 47, 0, 3);     // unaligned start and end, produce
    fault_once = 1;
    run(39'h3000_0000, 39'h2000_1000, 13, 40, 0, 6);    // first translation faults
    check(n_fault == 1, "fault retried");
    run(39'h0, 39'h2000_2010, 0, 30, 0, 2);             // A = 0: &B[i]
    run(39'h1000_0000, 39'h2000_0000, 9, 9, 1, 1);      // empty range
    run(39'h1000_0000, 39'h2000_0008, 2, 200, 1, 5);    // long run
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
