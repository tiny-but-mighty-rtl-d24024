// tb_maple_config_pipe: checks the configuration pipeline. Each store must
// produce its one-cycle command (queue INIT with its size, page-table base,
// TLB flush, fault handled, LIMA start with the stored A, B, begin and the
// end, mode and queue of the starting store) and an ack; a LIMA start while
// LIMA is busy must be dropped; OPEN must succeed once per queue until CLOSE
// or INIT; debug loads must return the fault address, status and the event
// counters. Responses must go to the issuing core/tag, be offered two cycles
// after acceptance when not back-pressured, and survive random back-pressure.
`timescale 1ns/1ps
module tb_maple_config_pipe;
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready; op_t in_op = '0;
  logic q_init, ptbase_we, tlb_flush, fault_clear, lima_start, lima_spec;
  logic [3:0] q_init_log2; logic [PPN_W-1:0] ptbase_ppn;
  logic irq = 0; logic [VA_W-1:0] fault_va = 39'h55_1234_5678;
  logic [VA_W-1:0] lima_a, lima_b; logic [31:0] lima_begin, lima_end; logic [QID_W-1:0] lima_qid;
  logic lima_busy = 0;
  logic ev_produce = 0, ev_consume = 0, ev_tlb_miss = 0, ev_full_stall = 0;
  logic out_valid, out_ready = 1; core_resp_t out_resp;
  maple_config_pipe dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // command monitor (sampled before the edge that acts on them)
  int n_init = 0, n_pt = 0, n_flush = 0, n_fc = 0, n_start = 0;
  logic [3:0] last_log2; logic [PPN_W-1:0] last_ppn;
  logic [VA_W-1:0] s_a, s_b; logic [31:0] s_beg, s_end; bit s_spec; logic [2:0] s_q;
  always @(negedge clk) begin
    #2;
    if (q_init) begin n_init++; last_log2 = q_init_log2; end
    if (ptbase_we) begin n_pt++; last_ppn = ptbase_ppn; end
    if (tlb_flush) n_flush++;
    if (fault_clear) n_fc++;
    if (lima_start) begin
      n_start++; s_a = lima_a; s_b = lima_b; s_beg = lima_begin; s_end = lima_end; s_spec = lima_spec; s_q = lima_qid;
    end
  end

  // responses
  logic [63:0] rdata [int]; int unsigned rtime [int];
  bit bp = 0;
  always @(negedge clk) begin
    out_ready = !bp || ($urandom % 2);
    #1;
    if (out_valid && out_ready) begin
      rdata[{out_resp.src, out_resp.tag}] = out_resp.data;
      rtime[{out_resp.src, out_resp.tag}] = cyc;
    end
  end

  logic [TAG_W-1:0] tagc = 0;
  task automatic op(bit st, logic [5:0] opc, int q, logic [63:0] d, output logic [63:0] r, output int lat);
    op_t o; int key; int unsigned t0;
    o = '0; o.src = 8'(9); o.tag = tagc; tagc++; o.store = st; o.opcode = opc; o.qid = 3'(q); o.data = d;
    key = {o.src, o.tag};
    rdata.delete(key);
    @(negedge clk);
    in_op = o; in_valid = 1;
    #3;
    while (!in_ready) begin @(negedge clk); #3; end
    t0 = cyc;
    @(negedge clk);
    in_valid = 0;
    while (!rdata.exists(key)) @(negedge clk);
    r = rdata[key]; lat = rtime[key] - t0;
  endtask

  logic [63:0] r; int lat;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    op(1, ST_INIT, 0, 64'd4, r, lat);
    check(n_init == 1 && last_log2 == 4 && r == 0, "INIT command and ack");
    check(lat == 2, $sformatf("config latency %0d", lat));
    op(1, ST_PT_BASE, 0, 64'h0ABC_DEF1, r, lat);
    check(n_pt == 1 && last_ppn == 28'hABC_DEF1, "page-table base");
    op(1, ST_TLB_FLUSH, 0, 0, r, lat);   check(n_flush == 1, "flush");
    op(1, ST_FAULT_DONE, 0, 0, r, lat);  check(n_fc == 1, "fault handled");
    // binding
    op(0, LD_OPEN, 3, 0, r, lat);  check(r == 1, "open q3");
    op(0, LD_OPEN, 3, 0, r, lat);  check(r == 0, "q3 already open");
    op(0, LD_OPEN, 4, 0, r, lat);  check(r == 1, "open q4");
    op(0, LD_CLOSE, 3, 0, r, lat); check(r == 1, "close q3");
    op(0, LD_OPEN, 3, 0, r, lat);  check(r == 1, "reopen q3");
    op(1, ST_INIT, 0, 64'd5, r, lat);
    op(0, LD_OPEN, 4, 0, r, lat);  check(r == 1, "INIT frees all queues");
    // LIMA
    op(1, ST_LIMA_A, 0, 64'h11_2233_4450, r, lat);
    op(1, ST_LIMA_B, 0, 64'h22_0000_1000, r, lat);
    op(1, ST_LIMA_BEGIN, 0, 64'd7, r, lat);
    op(1, ST_LIMA_END_Q, 5, 64'd99, r, lat);
    check(n_start == 1 && s_a == 39'h11_2233_4450 && s_b == 39'h22_0000_1000 && s_beg == 7 &&
          s_end == 99 && !s_spec && s_q == 5, "LIMA_PRODUCE start arguments");
    op(1, ST_LIMA_END, 0, 64'd50, r, lat);
    check(n_start == 2 && s_spec && s_end == 50, "LIMA prefetch start");
    lima_busy = 1;
    op(1, ST_LIMA_END, 0, 64'd60, r, lat);
    check(n_start == 2, "start while busy dropped");
    op(0, LD_STATUS, 0, 0, r, lat);   check(r == 64'b10, "status busy");
    lima_busy = 0; irq = 1;
    op(0, LD_STATUS, 0, 0, r, lat);   check(r == 64'b01, "status irq");
    op(0, LD_FAULT_VA, 0, 0, r, lat); check(r == 64'(fault_va), "fault address");
    // counters
    begin
      int np = 0, nc = 0, nm = 0, ns = 0;
      repeat (300) begin
        @(negedge clk);
        ev_produce = $urandom % 2; ev_consume = $urandom % 3 == 0; ev_tlb_miss = $urandom % 5 == 0; ev_full_stall = $urandom % 7 == 0;
        np += ev_produce; nc += ev_consume; nm += ev_tlb_miss; ns += ev_full_stall;
      end
      @(negedge clk);
      ev_produce = 0; ev_consume = 0; ev_tlb_miss = 0; ev_full_stall = 0;
      op(0, LD_CNT_PRODUCE, 0, 0, r, lat); check(r == 64'(np), "produce counter");
      op(0, LD_CNT_CONSUME, 0, 0, r, lat); check(r == 64'(nc), "consume counter");
      op(0, LD_CNT_TLBMISS, 0, 0, r, lat); check(r == 64'(nm), "TLB miss counter");
      op(0, LD_CNT_FULLSTL, 0, 0, r, lat); check(r == 64'(ns), "full-stall counter");
    end
    // back-pressure: back-to-back opens/closes keep their answers
    bp = 1;
    for (int k = 0; k < 40; k++) begin
      op(0, LD_OPEN, k % 8, 0, r, lat);
      check(r == ((k % 16) < 8 ? 64'(k < 16 && k % 8 == 4 ? 0 : 1) : 0), $sformatf("open under back-pressure %0d", k));
      if (k % 16 == 15) for (int q = 0; q < 8; q++) op(0, LD_CLOSE, q, 0, r, lat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
