// tb_maple_mmu: checks the MMU with Sv39 page tables held in a memory model.
// Checked: a miss walks three levels at the right PTE addresses and returns
// the right physical address; a repeat is a TLB hit with no memory traffic,
// done two cycles after acceptance; 2 MB and 1 GB superpages; invalid,
// execute-only and misaligned-superpage leaves fault, raise irq, record the
// address and block further requests until fault_clear; flush forces a new
// walk; the 17th page evicts the oldest of the 16 entries; with both
// requesters asking, the produce pipeline (0) goes first.
`timescale 1ns/1ps
module tb_maple_mmu;
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ptbase_we = 0, flush = 0, fault_clear = 0, irq;
  logic [PPN_W-1:0] ptbase_ppn = '0;
  logic [VA_W-1:0] fault_va;
  logic [1:0] req = '0, req_ready, done;
  logic [VA_W-1:0] req_va [2];
  logic fault; logic [PA_W-1:0] pa;
  logic ptw_valid, ptw_ready = 0, pte_valid = 0, tlb_miss;
  mem_req_t ptw_req; logic [63:0] pte = '0;
  maple_mmu dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- page table memory ----
  logic [63:0] ptm [logic [39:0]];
  logic [39:0] reads [$];
  int n_miss = 0;
  always @(posedge clk) if (tlb_miss) n_miss++;
  initial forever begin
    @(negedge clk);
    pte_valid = 0;
    ptw_ready = $urandom % 2;
    #1;
    if (ptw_valid && ptw_ready) begin
      logic [39:0] a;
      a = ptw_req.addr;
      check(ptw_req.size == SZ_DWORD && ptw_req.txid.src == TX_PTW, "PTE read format");
      reads.push_back(a);
      @(negedge clk);
      ptw_ready = 0;
      repeat ($urandom % 6) @(negedge clk);
      pte_valid = 1;
      pte = ptm.exists(a) ? ptm[a] : 64'h0;
    end
  end

  localparam logic [39:0] ROOT = 40'h80_0000;
  function automatic logic [63:0] mk(logic [39:0] a, logic [7:0] fl);
    return {26'b0, a[39:12], 2'b00, fl};
  endfunction
  localparam logic [7:0] PTR = 8'h01, RW = 8'hC7, XO = 8'hC9;

  task automatic xl(int who, logic [VA_W-1:0] va, output logic [PA_W-1:0] p, output bit f,
                    output int nrd, output int lat);
    int unsigned t0;
    reads.delete();
    @(negedge clk);
    req[who] = 1; req_va[who] = va;
    #2;
    while (!req_ready[who]) begin @(negedge clk); #2; end
    t0 = cyc;
    @(negedge clk);
    req[who] = 0;
    while (!done[who]) @(negedge clk);
    p = pa; f = fault; nrd = reads.size(); lat = cyc - t0;
  endtask

  logic [PA_W-1:0] p; bit f; int nrd, lat;
  initial begin
    req_va[0] = '0; req_va[1] = '0;
    // tables: VA 0x40000000 + n*4K -> PA 0x300000 + n*4K (n < 40);
    // VA 0x40200000 -> 2 MB superpage at PA 0x600000; VA 0x80000000 -> 1 GB at PA 0x4000_0000
    ptm[ROOT + 8*1] = mk(40'h81_0000, PTR);
    ptm[40'h81_0000 + 8*0] = mk(40'h82_0000, PTR);
    ptm[40'h81_0000 + 8*1] = mk(40'h60_0000, RW);
    ptm[40'h81_0000 + 8*2] = mk(40'h61_0000, RW);        // misaligned 2 MB
    ptm[ROOT + 8*2] = mk(40'h4000_0000, RW);
    for (int n = 0; n < 40; n++) ptm[40'h82_0000 + 8*n] = mk(40'h30_0000 + 40'(n*4096), RW);
    ptm[40'h82_0000 + 8*30] = 64'h0;                    // invalid
    ptm[40'h82_0000 + 8*31] = mk(40'h31_F000, XO);      // execute-only
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); ptbase_we = 1; ptbase_ppn = PPN_W'(ROOT >> 12);
    @(negedge clk); ptbase_we = 0;

    xl(0, 39'h4000_3ABC, p, f, nrd, lat);
    check(!f && p == 40'h30_3ABC, $sformatf("4K walk pa %h", p));
    check(nrd == 3 && reads[0] == ROOT + 8 && reads[1] == 40'h81_0000 && reads[2] == 40'h82_0000 + 8*3, "walk addresses");
    check(n_miss == 1, "miss counted");
    xl(1, 39'h4000_3004, p, f, nrd, lat);
    check(!f && p == 40'h30_3004 && nrd == 0 && lat == 2, $sformatf("TLB hit pa %h reads %0d lat %0d", p, nrd, lat));
    xl(0, 39'h4021_2345, p, f, nrd, lat);
    check(!f && p == 40'h61_2345 && nrd == 2, $sformatf("2 MB superpage pa %h", p));
    xl(0, 39'h4030_0008, p, f, nrd, lat);
    check(!f && p == 40'h70_0008 && nrd == 0, "2 MB superpage hit");
    xl(0, 39'h8765_4321, p, f, nrd, lat);
    check(!f && p == 40'h4765_4321 && nrd == 1, $sformatf("1 GB superpage pa %h", p));
    // faults
    xl(0, 39'h4001_E010, p, f, nrd, lat);
    check(f, "invalid PTE faults");
    @(negedge clk);
    check(irq && fault_va == 39'h4001_E010, "irq and fault address");
    req[1] = 1; req_va[1] = 39'h4000_3000;
    repeat (5) begin @(negedge clk); #2; check(!req_ready[1], "blocked while fault pending"); end
    req[1] = 0;
    while (!irq) @(negedge clk);
    fault_clear = 1; @(negedge clk); fault_clear = 0;
    check(!irq, "irq cleared");
    xl(0, 39'h4001_F000, p, f, nrd, lat);
    check(f, "execute-only leaf faults");
    while (!irq) @(negedge clk);
    fault_clear = 1; @(negedge clk); fault_clear = 0;
    xl(0, 39'h4040_0000, p, f, nrd, lat);
    check(f, "misaligned superpage faults");
    while (!irq) @(negedge clk);
    fault_clear = 1; @(negedge clk); fault_clear = 0;
    // flush
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    xl(0, 39'h4000_3000, p, f, nrd, lat);
    check(!f && nrd == 3, "walk after flush");
    // replacement: fill the TLB with 16 more pages, first one must be gone
    for (int n = 4; n < 20; n++) begin
      xl(n % 2, 39'h4000_0000 + 39'(n * 4096), p, f, nrd, lat);
      check(!f && p == 40'h30_0000 + 40'(n*4096), "fill page");
    end
    for (int n = 4; n < 20; n++) begin
      xl(0, 39'h4000_0000 + 39'(n * 4096) + 39'h10, p, f, nrd, lat);
      check(nrd == 0, $sformatf("page %0d still cached", n));
    end
    xl(0, 39'h4000_3000, p, f, nrd, lat);
    check(nrd == 3, "oldest entry evicted");
    // arbitration
    @(negedge clk);
    req = 2'b11; req_va[0] = 39'h4000_4000; req_va[1] = 39'h4000_5000;
    #2;
    check(req_ready == 2'b01, "produce pipeline first");
    @(negedge clk); req = 2'b10;
    while (!done[0]) @(negedge clk);
    check(pa == 40'h30_4000, "first grant result");
    #2;
    while (!req_ready[1]) begin @(negedge clk); #2; end
    @(negedge clk); req = 2'b00;
    while (!done[1]) @(negedge clk);
    check(pa == 40'h30_5000, "second grant result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
