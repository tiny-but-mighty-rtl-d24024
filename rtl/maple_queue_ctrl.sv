// maple_queue_ctrl: circular FIFO queues carved out of the scratchpad.
//
// All queues have the same size, 2**qsize_log2 entries, set at run time
// (fewer large queues or many small ones); queue q occupies scratchpad
// entries [q*size, (q+1)*size). A queue id whose region would lie beyond the
// scratchpad is unusable: it always reads as full and empty. Each queue keeps
// a tail (next slot to reserve), a head (next slot to pop) and a count of
// reserved slots. Every scratchpad entry has a "filled" bit: a produce
// reserves the tail slot first and fills it later (immediately for data,
// when memory answers for a pointer), and the head is only handed out once
// filled, so data leaves each queue in program order even though memory
// answers out of order. The queues-as-circular-FIFOs scheme, the shared
// scratchpad and the reservation by slot index follow the design
// description; the equal-size partitioning and the filled bits are this
// design's choice.
//
// Interface: init (resets all queues, sets size), reserve (combinational
// index, takes effect on the clock edge), fill, pop. full/head_ready are per
// queue and combinational from registers.
module maple_queue_ctrl
  import maple_pkg::*;
#(
  parameter int unsigned NQ      = NUM_QUEUES,
  parameter int unsigned ENTRIES = SP_ENTRIES,
  localparam int unsigned AW     = $clog2(ENTRIES),
  localparam int unsigned QW     = $clog2(NQ)
) (
  input  logic           clk,
  input  logic           rst_n,
  // configuration
  input  logic           init,
  input  logic [3:0]     init_qsize_log2,
  output logic [3:0]     qsize_log2,
  // reservation (produce pipeline)
  input  logic           reserve,
  input  logic [QW-1:0]  reserve_q,
  output logic [AW-1:0]  reserve_idx,
  output logic [NQ-1:0]  full,
  // fill (scratchpad write)
  input  logic           fill,
  input  logic [AW-1:0]  fill_idx,
  // pop (consume pipeline)
  input  logic           pop,
  input  logic [QW-1:0]  pop_q,
  output logic [AW-1:0]  pop_idx,
  output logic [NQ-1:0]  head_ready
);
  localparam logic [3:0] DEF_LOG2 = 4'($clog2(ENTRIES / NQ));

  logic [AW-1:0] head [NQ];
  logic [AW-1:0] tail [NQ];
  logic [AW:0]   cnt  [NQ];
  logic [ENTRIES-1:0] filled;

  logic [AW:0]   qsize;
  logic [AW-1:0] qmask;
  logic [NQ-1:0] usable;

  assign qsize = (AW+1)'(1) << qsize_log2;
  assign qmask = AW'(qsize - 1);

  function automatic logic [AW-1:0] base_of(input int unsigned q, input logic [3:0] l2);
    return AW'(q << l2);
  endfunction

  always_comb begin
    for (int unsigned q = 0; q < NQ; q++) begin
      usable[q]     = ((q + 1) << qsize_log2) <= ENTRIES;
      full[q]       = !usable[q] || cnt[q] == qsize;
      head_ready[q] = usable[q] && cnt[q] != 0 && filled[base_of(q, qsize_log2) | head[q]];
    end
  end

  assign reserve_idx = base_of(32'(reserve_q), qsize_log2) | tail[reserve_q];
  assign pop_idx     = base_of(32'(pop_q), qsize_log2) | head[pop_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qsize_log2 <= DEF_LOG2;
      filled     <= '0;
      for (int unsigned q = 0; q < NQ; q++) begin
        head[q] <= '0;
        tail[q] <= '0;
        cnt[q]  <= '0;
      end
    end else if (init) begin
      qsize_log2 <= init_qsize_log2;
      filled     <= '0;
      for (int unsigned q = 0; q < NQ; q++) begin
        head[q] <= '0;
        tail[q] <= '0;
        cnt[q]  <= '0;
      end
    end else begin
      for (int unsigned q = 0; q < NQ; q++) begin
        logic r, p;
        r = reserve && reserve_q == QW'(q) && !full[q];
        p = pop && pop_q == QW'(q) && head_ready[q];
        if (r) tail[q] <= (tail[q] + 1'b1) & qmask;
        if (p) head[q] <= (head[q] + 1'b1) & qmask;
        cnt[q] <= cnt[q] + (AW+1)'(r) - (AW+1)'(p);
      end
      if (fill) filled[fill_idx] <= 1'b1;
      if (pop && head_ready[pop_q]) filled[pop_idx] <= 1'b0;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    reserve |-> !full[reserve_q]);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> head_ready[pop_q]);
endmodule
