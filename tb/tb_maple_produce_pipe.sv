// tb_maple_produce_pipe: checks the produce pipeline against models of the
// MMU (random latency, one page fault), the queue controller (4-entry queues
// so they fill up), the scratchpad write port (random grant), the memory
// request port and the ack port (random ready). Checked: each data produce
// is written to the slot reserved for it and each pointer is loaded from its
// translated address with that slot as transaction id, in program order per
// queue; prefetches reserve nothing; the DRAM variant is marked non-coherent;
// every core store is acked exactly once and LIMA pointers never; a full
// queue holds its produce while other queues proceed; a faulting translation
// is retried; and an unobstructed data produce is acked 4 cycles after it is
// accepted (BUFFER, RESERVE, WDATA, ACK).
`timescale 1ns/1ps
module tb_maple_produce_pipe;
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready;  op_t in_op = '0;
  logic lima_valid = 0, lima_ready; prod_op_t lima_op = '0;
  logic tr_req, tr_ready = 0, tr_done = 0, tr_fault = 0;
  logic [VA_W-1:0] tr_va; logic [PA_W-1:0] tr_pa = '0;
  logic [7:0] full; logic reserve; logic [2:0] reserve_q; logic [7:0] reserve_idx;
  logic sp_wr_req, sp_wr_gnt = 0; logic [7:0] sp_widx; logic [31:0] sp_wdata;
  logic mreq_valid, mreq_ready = 0; mem_req_t mreq;
  logic ack_valid, ack_ready = 0; core_resp_t ack;
  logic produced, full_stall;
  maple_produce_pipe dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  bit fast = 0;                          // all ports ready, for the latency check

  function automatic logic [PA_W-1:0] xlate(logic [VA_W-1:0] va);
    return {1'b1, va};
  endfunction
  localparam logic [VA_W-1:0] BAD_VA = 39'h12_3456_7000;

  // ---- MMU model ----
  bit faulted = 0; int n_fault = 0;
  initial begin
    forever begin
      @(negedge clk);
      tr_done = 0;
      tr_ready = fast || ($urandom % 2);
      #1;
      if (tr_req && tr_ready) begin
        logic [VA_W-1:0] va;
        va = tr_va;
        @(negedge clk);
        tr_ready = 0;
        repeat (fast ? 0 : $urandom % 5) @(negedge clk);
        tr_done = 1;
        tr_fault = (va == BAD_VA) && !faulted;
        if (tr_fault) begin faulted = 1; n_fault++; end
        tr_pa = xlate(va);
        if (tr_fault) begin @(negedge clk); tr_done = 0; repeat (10) @(negedge clk); end
      end
    end
  end

  // ---- queue controller model: 4-entry queues ----
  int cnt [8], tail [8];
  logic [7:0] exp_idx [8][$];
  assign reserve_idx = {reserve_q, 3'b000} | 8'(tail[reserve_q]);
  always_comb for (int q = 0; q < 8; q++) full[q] = cnt[q] == 4;
  logic r_seen = 0; logic [2:0] r_q = 0;
  int n_full = 0;
  always @(negedge clk) begin
    #2;
    r_seen = reserve; r_q = reserve_q;
    if (reserve) check(!full[reserve_q], "no reserve into a full queue");
    if (full_stall) n_full++;
  end
  always @(posedge clk) begin
    #1;
    if (r_seen) begin
      exp_idx[r_q].push_back({r_q, 3'b000} | 8'(tail[r_q]));
      tail[r_q] = (tail[r_q] + 1) % 4;
      cnt[r_q]++;
    end
    // the "consumer" frees entries now and then
    if (!fast && $urandom % 3 == 0) begin
      int q;
      q = $urandom % 8;
      if (cnt[q] > 0) cnt[q]--;
    end
    if (fast) for (int q = 0; q < 8; q++) cnt[q] = 0;
  end

  // ---- expected operations per queue ----
  prod_op_t exp_op [8][$];             // data and pointer produces, in order
  prod_op_t exp_pf [$];                // prefetches
  int acks_due [int];
  int n_data = 0, n_ptr = 0, n_pf = 0, n_nc = 0, n_lima = 0;

  function automatic int qof(logic [7:0] idx); return int'(idx[5:3]); endfunction

  always @(negedge clk) if (rst_n) begin
    sp_wr_gnt  = fast || ($urandom % 4 != 0);
    mreq_ready = fast || ($urandom % 2);
    ack_ready  = fast || ($urandom % 3 != 0);
    #1;
    if (sp_wr_req && sp_wr_gnt) begin
      int q; prod_op_t e;
      q = qof(sp_widx);
      check(exp_idx[q].size() > 0 && sp_widx == exp_idx[q][0], "data write slot");
      check(exp_op[q].size() > 0 && exp_op[q][0].kind == PK_DATA && sp_wdata == exp_op[q][0].data[31:0],
            $sformatf("data write q%0d value", q));
      if (exp_idx[q].size() > 0) void'(exp_idx[q].pop_front());
      if (exp_op[q].size() > 0) void'(exp_op[q].pop_front());
      n_data++;
    end
    if (mreq_valid && mreq_ready) begin
      if (mreq.prefetch) begin
        int hit;
        hit = -1;
        foreach (exp_pf[k]) if (hit < 0 && mreq.addr == xlate(VA_W'(exp_pf[k].data))) hit = k;
        check(hit >= 0, "prefetch address");
        if (hit >= 0) exp_pf.delete(hit);
        n_pf++;
      end else begin
        int q;
        q = qof(mreq.txid.idx);
        check(exp_idx[q].size() > 0 && mreq.txid.idx == exp_idx[q][0], "load transaction id = slot");
        check(exp_op[q].size() > 0 && exp_op[q][0].kind == PK_PTR &&
              mreq.addr == xlate(VA_W'(exp_op[q][0].data)) && mreq.noncoh == exp_op[q][0].noncoh,
              $sformatf("load q%0d address", q));
        check(mreq.size == SZ_WORD && mreq.txid.src == TX_PRODUCE, "load size/source");
        if (mreq.noncoh) n_nc++;
        if (exp_idx[q].size() > 0) void'(exp_idx[q].pop_front());
        if (exp_op[q].size() > 0) begin
          if (!exp_op[q][0].need_ack) n_lima++;
          void'(exp_op[q].pop_front());
        end
        n_ptr++;
      end
    end
    if (ack_valid && ack_ready) begin
      int key;
      key = {ack.src, ack.tag};
      check(acks_due.exists(key) && acks_due[key] > 0, "ack for an issued store");
      if (acks_due.exists(key)) acks_due[key]--;
      last_ack = cyc;
    end
  end
  int unsigned last_ack = 0;

  // ---- stimulus ----
  logic [TAG_W-1:0] tagc = 0;
  task automatic send(int q, logic [5:0] opc, logic [63:0] d, output int unsigned t_acc);
    op_t o; prod_op_t e;
    o = '0; o.src = 8'(1 + $urandom % 3); o.tag = tagc; tagc++;
    o.store = 1; o.opcode = opc; o.qid = 3'(q); o.data = d;
    @(negedge clk);
    in_op = o; in_valid = 1;
    #3;
    while (!in_ready) begin @(negedge clk); #3; end
    t_acc = cyc;
    e = '0;
    e.kind = opc == ST_PRODUCE ? PK_DATA : opc == ST_PREFETCH ? PK_PREFETCH : PK_PTR;
    e.noncoh = opc == ST_PRODUCE_PTRD; e.need_ack = 1; e.qid = 3'(q); e.data = d;
    if (e.kind == PK_PREFETCH) exp_pf.push_back(e); else exp_op[q].push_back(e);
    if (!acks_due.exists({o.src, o.tag})) acks_due[{o.src, o.tag}] = 0;
    acks_due[{o.src, o.tag}]++;
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic send_lima(int q, logic [63:0] va);
    prod_op_t e;
    e = '0; e.kind = PK_PTR; e.need_ack = 0; e.qid = 3'(q); e.data = va;
    @(negedge clk);
    lima_op = e; lima_valid = 1;
    #3;
    while (!lima_ready) begin @(negedge clk); #3; end
    exp_op[q].push_back(e);
    @(negedge clk);
    lima_valid = 0;
  endtask

  function automatic logic [5:0] rnd_op();
    case ($urandom % 4)
      0: return ST_PRODUCE;
      1: return ST_PRODUCE_PTR;
      2: return ST_PRODUCE_PTRD;
      default: return ($urandom % 3 == 0) ? ST_PREFETCH : ST_PRODUCE;
    endcase
  endfunction

  initial begin
    int unsigned t;
    for (int q = 0; q < 8; q++) begin cnt[q] = 0; tail[q] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // latency with every port ready
    fast = 1;
    repeat (3) @(negedge clk);
    send(0, ST_PRODUCE, 64'h1234, t);
    repeat (8) @(negedge clk);
    check(last_ack - t == 4, $sformatf("data produce ack latency %0d", last_ack - t));
    fast = 0;
    // random traffic, including one faulting pointer; LIMA feeds queue 7 (a
    // queue fed from two slots has no defined order between them)
    fork
      for (int k = 0; k < 500; k++) begin
        int q; logic [5:0] opc; logic [63:0] d;
        q = $urandom % 7; opc = rnd_op();
        d = (opc == ST_PRODUCE) ? 64'($urandom) : 64'({$urandom, $urandom} & 64'h3F_FFFF_FFFC);
        if (k == 100) begin q = 3; opc = ST_PRODUCE_PTR; d = 64'(BAD_VA); end
        send(q, opc, d, t);
      end
      for (int k = 0; k < 60; k++) begin
        repeat ($urandom % 20) @(negedge clk);
        send_lima(7, 64'({$urandom, $urandom} & 64'h3F_FFFF_FFFC));
      end
    join
    repeat (300) @(negedge clk);
    begin
      int left = 0, unacked = 0;
      for (int q = 0; q < 8; q++) left += exp_op[q].size();
      foreach (acks_due[k]) unacked += acks_due[k];
      check(left == 0 && exp_pf.size() == 0, $sformatf("all operations issued (%0d left)", left));
      check(unacked == 0, $sformatf("all stores acked (%0d missing)", unacked));
    end
    check(n_fault == 1, "page fault retried");
    check(n_full > 0, "full queue stall seen");
    check(n_data > 50 && n_ptr > 50 && n_pf > 10 && n_nc > 10 && n_lima > 10,
          $sformatf("coverage data=%0d ptr=%0d pf=%0d nc=%0d lima=%0d", n_data, n_ptr, n_pf, n_nc, n_lima));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
