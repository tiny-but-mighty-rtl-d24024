// maple_mem_resp_dec: memory response decoder.
//
// Memory responses return in any order. The decoder reads the transaction
// id of each response and steers it: a produce load writes its 32-bit word
// into the scratchpad entry named by the id (which also marks the queue
// entry as filled, so data leaves the queue in program order); a page table
// walk gets its 64-bit PTE; LIMA gets the whole 64-byte chunk. Steering by
// transaction id follows the design description; the id layout and the one
// register stage are this design's choice.
//
// Interface: mem_resp valid (always accepted), three one-cycle output
// strobes. Latency one cycle.
module maple_mem_resp_dec
  import maple_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  mem_resp_t         in_resp,
  output logic              sp_we,
  output logic [IDX_W-1:0]  sp_widx,
  output logic [ENTRY_W-1:0] sp_wdata,
  output logic              ptw_valid,
  output logic [63:0]       ptw_pte,
  output logic              lima_valid,
  output logic [LINE_W-1:0] lima_line
);
  logic      q_valid;
  mem_resp_t q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q       <= '0;
    end else begin
      q_valid <= in_valid;
      if (in_valid) q <= in_resp;
    end
  end

  assign sp_we      = q_valid && q.txid.src == TX_PRODUCE;
  assign sp_widx    = q.txid.idx;
  assign sp_wdata   = q.data[ENTRY_W-1:0];
  assign ptw_valid  = q_valid && q.txid.src == TX_PTW;
  assign ptw_pte    = q.data[63:0];
  assign lima_valid = q_valid && q.txid.src == TX_LIMA;
  assign lima_line  = q.data;
endmodule
