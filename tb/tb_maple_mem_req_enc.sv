// tb_maple_mem_req_enc: checks the memory request encoder. The produce
// pipeline, the page table walker and LIMA offer numbered requests at random
// with random back-pressure on the output. Every request must leave exactly
// once and in order per source, with the transaction id naming its source
// (and keeping the scratchpad index for produce loads), and the grants must
// rotate when all three keep offering.
`timescale 1ns/1ps
module tb_maple_mem_req_enc;
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] in_valid = '0, in_ready;
  mem_req_t in_req [3];
  logic out_valid, out_ready = 0;
  mem_req_t out_req;
  maple_mem_req_enc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int next_send [3] = '{0, 0, 0};
  int next_recv [3] = '{0, 0, 0};
  int last_grant = -1, rotations = 0;
  bit mode_all = 0, stop = 0;
  logic [2:0] taken = '0;
  const tx_src_e SRCS [3] = '{TX_PRODUCE, TX_PTW, TX_LIMA};

  always @(negedge clk) if (rst_n) begin
    out_ready = mode_all ? 1'b1 : ($urandom % 3 != 0);
    if (out_valid && out_ready) begin
      int s;
      s = int'(out_req.addr[39:32]);
      check(s < 3 && out_req.addr[31:0] == 32'(next_recv[s]), $sformatf("source %0d order", s));
      check(s < 3 && out_req.txid.src == SRCS[s], $sformatf("txid source %0d", s));
      check(s != 0 || out_req.txid.idx == 8'(next_recv[s]), "txid index kept for produce");
      check(s == 0 || out_req.txid.idx == 0, "txid index zero for PTW/LIMA");
      if (s < 3) next_recv[s]++;
    end
    for (int s = 0; s < 3; s++) begin
      if (taken[s]) begin
        next_send[s]++;
        in_valid[s] = 0;
      end
      if (!in_valid[s] && next_send[s] < 200 && !stop && (mode_all || $urandom % 3 == 0)) in_valid[s] = 1;
      in_req[s] = '0;
      in_req[s].addr = {8'(s), 32'(next_send[s])};
      in_req[s].size = SZ_WORD;
      in_req[s].txid.src = TX_LIMA;        // must be overwritten
      in_req[s].txid.idx = 8'(next_send[s]);
    end
    #1;
    taken = in_valid & in_ready;
    if (mode_all && &in_valid && |in_ready) begin
      int g;
      g = in_ready[0] ? 0 : in_ready[1] ? 1 : 2;
      if (last_grant >= 0) begin
        check(g == (last_grant + 1) % 3, "round-robin order");
        rotations++;
      end
      last_grant = g;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (1500) @(negedge clk);
    stop = 1;   // stop offering, drain
    repeat (20) @(negedge clk);
    check(!out_valid && in_valid == 0, "drained");
    mode_all = 1;
    stop = 0;
    for (int s = 0; s < 3; s++) begin next_send[s] = 0; next_recv[s] = 0; end
    repeat (900) @(negedge clk);
    for (int s = 0; s < 3; s++) check(next_recv[s] == 200, $sformatf("source %0d delivered %0d", s, next_recv[s]));
    check(rotations > 100, "arbitration exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
