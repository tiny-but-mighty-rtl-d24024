// tb_maple_queue_ctrl: checks the queue controller against a reference
// model of 8 circular queues in a 256-entry scratchpad. Random reserves,
// fills (in random order, as memory answers) and pops are applied; reserve
// and pop indices, full and head-ready flags are compared each cycle. INIT
// then switches to 2 queues of 128 entries and later 8 of 8, checking that
// regions follow the size and that queues beyond the scratchpad are unusable.
`timescale 1ns/1ps
module tb_maple_queue_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, reserve = 0, fill = 0, pop = 0;
  logic [3:0] init_qsize_log2 = 0, qsize_log2;
  logic [2:0] reserve_q = 0, pop_q = 0;
  logic [7:0] reserve_idx, fill_idx = 0, pop_idx;
  logic [7:0] full, head_ready;
  maple_queue_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference
  int l2 = 5;
  int m_head [8], m_tail [8], m_cnt [8];
  bit m_filled [256];
  int unfilled [$];        // reserved, not yet filled
  int n_full = 0, n_wait = 0, n_pop = 0;

  function automatic int size();  return 1 << l2; endfunction
  function automatic bit usable(int q); return (q + 1) * size() <= 256; endfunction
  function automatic bit m_full(int q); return !usable(q) || m_cnt[q] == size(); endfunction
  function automatic bit m_ready(int q);
    return usable(q) && m_cnt[q] != 0 && m_filled[q * size() + m_head[q]];
  endfunction
  task automatic m_reset(int new_l2);
    l2 = new_l2;
    for (int q = 0; q < 8; q++) begin m_head[q] = 0; m_tail[q] = 0; m_cnt[q] = 0; end
    for (int e = 0; e < 256; e++) m_filled[e] = 0;
    unfilled.delete();
  endtask

  task automatic run(int cycles);
    for (int k = 0; k < cycles; k++) begin
      int rq, pq, fi;
      bit r, p, f;
      @(negedge clk);
      for (int q = 0; q < 8; q++) begin
        check(full[q] == m_full(q), $sformatf("full[%0d]", q));
        check(head_ready[q] == m_ready(q), $sformatf("head_ready[%0d]", q));
        if (m_full(q) && usable(q)) n_full++;
        if (usable(q) && m_cnt[q] != 0 && !m_ready(q)) n_wait++;
      end
      rq = $urandom % 8; pq = $urandom % 8;
      r = ($urandom % 3 != 0) && !m_full(rq);
      p = ($urandom % 2 == 0) && m_ready(pq);
      f = unfilled.size() > 0 && $urandom % 2 == 0;
      reserve = r; reserve_q = 3'(rq);
      pop = p; pop_q = 3'(pq);
      fill = f;
      if (f) begin
        int j;
        j = $urandom % unfilled.size();
        fi = unfilled[j];
        unfilled.delete(j);
        fill_idx = 8'(fi);
      end
      #1;
      if (r) begin
        check(reserve_idx == 8'(rq * size() + m_tail[rq]), "reserve index");
        unfilled.push_back(rq * size() + m_tail[rq]);
        m_tail[rq] = (m_tail[rq] + 1) % size();
        m_cnt[rq]++;
      end
      if (p) begin
        check(pop_idx == 8'(pq * size() + m_head[pq]), "pop index");
        m_filled[pq * size() + m_head[pq]] = 0;
        m_head[pq] = (m_head[pq] + 1) % size();
        m_cnt[pq]--;
        n_pop++;
      end
      if (f) m_filled[fi] = 1;
    end
    @(negedge clk);
    reserve = 0; pop = 0; fill = 0;
  endtask

  task automatic do_init(int new_l2);
    @(negedge clk);
    init = 1; init_qsize_log2 = 4'(new_l2);
    @(negedge clk);
    init = 0;
    m_reset(new_l2);
    check(qsize_log2 == 4'(new_l2), "qsize after init");
  endtask

  initial begin
    m_reset(5);
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(qsize_log2 == 4'd5, "default 32 entries per queue");
    run(4000);
    do_init(7);
    run(3000);
    do_init(3);
    run(2000);
    check(n_full > 0 && n_wait > 0 && n_pop > 500, $sformatf("coverage full=%0d wait=%0d pops=%0d", n_full, n_wait, n_pop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
