// tb_maple_mem_resp_dec: checks the memory response decoder. Random
// responses for the three transaction sources are fed in; one cycle later
// exactly the matching output must strobe, carrying the scratchpad index and
// low 32-bit word (produce), the 64-bit PTE (walker) or the whole 64-byte
// line (LIMA).
`timescale 1ns/1ps
module tb_maple_mem_resp_dec;
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  mem_resp_t in_resp = '0;
  logic sp_we, ptw_valid, lima_valid;
  logic [IDX_W-1:0] sp_widx;
  logic [ENTRY_W-1:0] sp_wdata;
  logic [63:0] ptw_pte;
  logic [LINE_W-1:0] lima_line;
  maple_mem_resp_dec dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n [3] = '{0, 0, 0};
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      mem_resp_t r;
      bit v;
      @(negedge clk);
      v = $urandom % 4 != 0;
      r.txid.src = tx_src_e'($urandom % 3);
      r.txid.idx = 8'($urandom);
      for (int w = 0; w < 16; w++) r.data[32*w +: 32] = $urandom;
      in_valid = v;
      in_resp  = r;
      @(negedge clk);
      in_valid = 0;
      check(sp_we == (v && r.txid.src == TX_PRODUCE), "sp_we strobe");
      check(ptw_valid == (v && r.txid.src == TX_PTW), "ptw strobe");
      check(lima_valid == (v && r.txid.src == TX_LIMA), "lima strobe");
      if (v) begin
        n[r.txid.src]++;
        if (r.txid.src == TX_PRODUCE) check(sp_widx == r.txid.idx && sp_wdata == r.data[31:0], "sp index/data");
        if (r.txid.src == TX_PTW)     check(ptw_pte == r.data[63:0], "pte");
        if (r.txid.src == TX_LIMA)    check(lima_line == r.data, "line");
      end
      @(negedge clk);
      check(!sp_we && !ptw_valid && !lima_valid, "single-cycle strobes");
    end
    check(n[0] > 0 && n[1] > 0 && n[2] > 0, "all sources seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
