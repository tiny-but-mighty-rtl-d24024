// tb_maple_resp_enc: checks the response encoder. Three sources offer
// numbered responses at random; the output is back-pressured at random.
// Every response must come out exactly once, each source's in order; a
// response must appear one cycle after it is taken; when all three sources
// keep offering, the grants must rotate (round-robin).
`timescale 1ns/1ps
module tb_maple_resp_enc;
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] in_valid = '0, in_ready;
  core_resp_t in_resp [3];
  logic out_valid, out_ready = 0;
  core_resp_t out_resp;
  maple_resp_enc #(.NIN(3)) dut (.*);

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
  int last_grant = -1, rotations = 0, all_busy_cycles = 0;
  bit mode_all = 0, stop = 0;
  logic [2:0] taken = '0;

  always @(negedge clk) if (rst_n) begin
    out_ready = mode_all ? 1'b1 : ($urandom % 3 != 0);
    if (out_valid && out_ready) begin
      int s;
      s = out_resp.src;
      check(s < 3 && out_resp.data == 64'(next_recv[s]) && out_resp.tag == 4'(next_recv[s]),
            $sformatf("src %0d got %0d exp %0d", s, out_resp.data, next_recv[s]));
      if (s < 3) next_recv[s]++;
    end
    // inputs: taken ones advance, new offers made
    for (int s = 0; s < 3; s++) begin
      if (taken[s]) begin
        next_send[s]++;
        in_valid[s] = 0;
      end
      if (!in_valid[s] && next_send[s] < 200 && !stop && (mode_all || $urandom % 3 == 0)) in_valid[s] = 1;
      in_resp[s].src  = 8'(s);
      in_resp[s].tag  = 4'(next_send[s]);
      in_resp[s].data = 64'(next_send[s]);
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
    for (int s = 0; s < 3; s++) in_resp[s] = '0;
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
    for (int s = 0; s < 3; s++) check(next_recv[s] == 200, $sformatf("src %0d delivered %0d", s, next_recv[s]));
    check(rotations > 100, "arbitration exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
