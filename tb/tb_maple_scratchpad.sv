// tb_maple_scratchpad: checks the scratchpad at its full 256 x 32-bit size.
// Random writes and reads are compared with a reference array; read data
// must appear the cycle after the read and hold while no read is issued.
`timescale 1ns/1ps
module tb_maple_scratchpad;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  maple_scratchpad dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] ref_mem [256];
  initial begin
    // fill everything first
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = $urandom; ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 3000; k++) begin
      logic [31:0] expd;
      bit did_read;
      @(negedge clk);
      we = $urandom % 2; waddr = 8'($urandom); wdata = $urandom;
      re = $urandom % 2; raddr = 8'($urandom);
      did_read = re;
      expd = ref_mem[raddr];          // read sees the old contents
      if (we) ref_mem[waddr] = wdata;
      @(negedge clk);
      if (did_read) check(rdata == expd, $sformatf("read %0d", raddr));
      else begin
        logic [31:0] held;
        held = rdata;
        we = 0; re = 0;
        @(negedge clk);
        check(rdata == held, "hold without read");
      end
      we = 0; re = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
