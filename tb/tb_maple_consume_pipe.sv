// tb_maple_consume_pipe: checks the consume pipeline with a model of the
// queue controller and the scratchpad. Consumes to empty queues must wait
// (no reply) while consumes to queues with data proceed; every reply must
// carry the value popped for its queue, in program order, to the right
// core/tag; with data present and no back-pressure a reply must be offered
// three cycles after the consume is accepted (BUFFER, READ QUEUE, DATA REPLY).
// Double consumes (LD_CONSUME2) must return the next two entries of their
// queue as {second, first}, four cycles after acceptance when both are there,
// and may not hold up other queues while they wait for the second entry.
`timescale 1ns/1ps
module tb_maple_consume_pipe;
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready;
  op_t in_op = '0;
  logic [7:0] head_ready;
  logic pop, sp_re, out_valid, out_ready = 1, consumed;
  logic [2:0] pop_q;
  logic [7:0] pop_idx, sp_raddr;
  logic [31:0] sp_rdata;
  core_resp_t out_resp;
  maple_consume_pipe dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- queue + scratchpad model ----
  logic [31:0] qv [8][$];            // data available per queue
  int          hcnt [8];
  logic [31:0] sp [256];
  logic [31:0] popped [8][$];        // values popped, awaiting reply
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic upd();
    for (int q = 0; q < 8; q++) head_ready[q] = qv[q].size() > 0;
  endtask
  assign pop_idx = {pop_q, 5'(hcnt[pop_q])};
  always @(posedge clk) if (sp_re) sp_rdata <= sp[sp_raddr];

  task automatic push(int q, logic [31:0] v);
    if (qv[q].size() + popped[q].size() < 30) begin   // stay within the 32-entry region
      sp[{3'(q), 5'(hcnt[q] + qv[q].size())}] = v;
      qv[q].push_back(v);
    end
    upd();
  endtask

  // pop bookkeeping: sampled before the rising edge, applied just after it
  logic       pop_seen = 0;
  logic [2:0] pop_seen_q = 0;
  always @(negedge clk) begin
    #2;
    pop_seen   = pop;
    pop_seen_q = pop_q;
    if (pop) check(head_ready[pop_q], "pop only a ready queue");
  end
  always @(posedge clk) begin
    #1;
    if (pop_seen) begin
      popped[pop_seen_q].push_back(qv[pop_seen_q].pop_front());
      hcnt[pop_seen_q]++;
      upd();
      pop_seen = 0;
    end
  end

  // ---- consumers ----
  int pend_q [int];                  // {src,tag} -> queue
  int pend_t [int];                  // {src,tag} -> acceptance cycle
  bit pend_d [int];                  // {src,tag} -> double consume
  int n_resp = 0, last_lat = -1, n_dbl = 0;
  logic [TAG_W-1:0] tagc = 0;

  always @(negedge clk) if (rst_n) begin
    #1;
    if (out_valid && out_ready) begin
      int key, q;
      key = {out_resp.src, out_resp.tag};
      check(pend_q.exists(key), "reply for a pending consume");
      if (pend_q.exists(key)) begin
        q = pend_q[key];
        if (pend_d[key]) begin
          check(popped[q].size() > 1 && out_resp.data == {popped[q][1], popped[q][0]},
                $sformatf("double reply q%0d data %h", q, out_resp.data));
          if (popped[q].size() > 0) void'(popped[q].pop_front());
          n_dbl++;
        end else
          check(popped[q].size() > 0 && out_resp.data == 64'(popped[q][0]),
                $sformatf("reply q%0d data %h", q, out_resp.data));
        if (popped[q].size() > 0) void'(popped[q].pop_front());
        last_lat = int'(cyc) - pend_t[key];
        pend_q.delete(key);
        n_resp++;
      end
    end
  end

  task automatic consume(int q, int src, bit dbl = 0);
    op_t o;
    o = '0;
    o.src = 8'(src); o.tag = tagc; tagc++;
    o.opcode = dbl ? LD_CONSUME2 : LD_CONSUME; o.qid = 3'(q);
    @(negedge clk);
    in_op = o; in_valid = 1;
    #3;
    while (!in_ready) begin @(negedge clk); #3; end
    pend_q[{o.src, o.tag}] = q;
    pend_t[{o.src, o.tag}] = int'(cyc);
    pend_d[{o.src, o.tag}] = dbl;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    for (int q = 0; q < 8; q++) hcnt[q] = 0;
    upd();
    repeat (2) @(negedge clk);
    rst_n = 1;
    // waits on empty queues, others pass
    consume(2, 1);
    consume(5, 2);
    push(6, 32'h66);
    consume(6, 3);
    repeat (20) @(negedge clk);
    check(n_resp == 1, $sformatf("only the queue with data replied (%0d)", n_resp));
    check(dut.buf_v[2] && dut.buf_v[5], "empty-queue consumes buffered");
    push(5, 32'h55);
    push(2, 32'h22);
    repeat (10) @(negedge clk);
    check(n_resp == 3 && pend_q.size() == 0, "waiting consumes served");
    // latency with data present
    push(1, 32'h11);
    consume(1, 4);
    repeat (6) @(negedge clk);
    check(last_lat == 3, $sformatf("consume latency %0d", last_lat));
    // double consume: both entries present
    push(1, 32'hA1); push(1, 32'hA2);
    consume(1, 4, 1);
    repeat (6) @(negedge clk);
    check(last_lat == 4, $sformatf("double consume latency %0d", last_lat));
    // double consume waiting for its second entry does not block queue 3
    push(0, 32'hB1);
    consume(0, 1, 1);
    push(3, 32'h33);
    consume(3, 2);
    repeat (8) @(negedge clk);
    check(pend_q.size() == 1 && dut.half[0], "half-served double consume waits, other queue served");
    push(0, 32'hB2);
    repeat (8) @(negedge clk);
    check(pend_q.size() == 0, "double consume completed");
    // random traffic with back-pressure
    begin
      bit done = 0;
      fork
        begin
          for (int k = 0; k < 600; k++) consume($urandom % 8, 1 + $urandom % 4, $urandom % 3 == 0);
          done = 1;
        end
        while (!done) begin
          repeat ($urandom % 3) @(negedge clk);
          push($urandom % 8, $urandom);
        end
        while (!done) begin @(negedge clk); out_ready = $urandom % 3 != 0; end
      join
    end
    out_ready = 1;
    // serve what is still waiting
    repeat (10) begin
      for (int q = 0; q < 8; q++) push(q, $urandom);
      repeat (20) @(negedge clk);
    end
    repeat (3000) @(negedge clk);
    check(pend_q.size() == 0, $sformatf("all consumes answered (%0d left)", pend_q.size()));
    check(n_resp > 600 && n_dbl > 150, $sformatf("traffic volume %0d, double %0d", n_resp, n_dbl));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
