// tb_maple_req_dec: checks the MMIO request decoder. Random loads and stores
// with random opcodes and queue ids are sent with random back-pressure on the
// three outputs; each must come out once, in order, on the pipeline its
// opcode selects, with queue id and opcode taken from offset bits 11..9 and
// 8..3, one cycle after acceptance when the output is free.
`timescale 1ns/1ps
module tb_maple_req_dec;
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, cons_valid, cons_ready = 0, prod_valid, prod_ready = 0, cfg_valid, cfg_ready = 0;
  core_req_t in_req = '0;
  op_t out_op;
  maple_req_dec dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  core_req_t sent [$];
  int unsigned accept_cyc [$];
  int unsigned cyc = 0;
  int n_route [3] = '{0, 0, 0};
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int route_of(core_req_t r);
    logic [5:0] o;
    o = r.offset[8:3];
    if (!r.store && (o == LD_CONSUME || o == LD_CONSUME2)) return 0;
    if (r.store && (o == ST_PRODUCE || o == ST_PRODUCE_PTR || o == ST_PRODUCE_PTRD || o == ST_PREFETCH)) return 1;
    return 2;
  endfunction

  // output side: random ready, check what is taken at the next edge
  always @(negedge clk) if (rst_n) begin
    cons_ready = $urandom % 2; prod_ready = $urandom % 2; cfg_ready = $urandom % 3 != 0;
    #1;
    if ((cons_valid && cons_ready) || (prod_valid && prod_ready) || (cfg_valid && cfg_ready)) begin
      core_req_t e;
      int r;
      e = sent.pop_front();
      r = route_of(e);
      check((r == 0 && cons_valid) || (r == 1 && prod_valid) || (r == 2 && cfg_valid), $sformatf("route %0d", r));
      check(out_op.src == e.src && out_op.tag == e.tag && out_op.store == e.store && out_op.data == e.data, "fields");
      check(out_op.opcode == e.offset[8:3] && out_op.qid == e.offset[11:9], "opcode/qid bits");
      n_route[r]++;
    end
    check($onehot0({cons_valid, prod_valid, cfg_valid}), "one output at a time");
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      core_req_t r;
      @(negedge clk);
      r.src = 8'($urandom); r.tag = 4'($urandom); r.store = $urandom % 2;
      r.offset = {3'($urandom), 6'($urandom % 4 == 0 ? 0 : $urandom % 24), 3'b000};
      r.data = {$urandom, $urandom};
      in_req = r; in_valid = 1;
      #2;
      while (!in_ready) begin @(negedge clk); #2; end
      sent.push_back(r);
      @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    repeat (50) @(negedge clk);
    check(sent.size() == 0, "all delivered");
    check(n_route[0] > 0 && n_route[1] > 0 && n_route[2] > 0, "all three routes used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
