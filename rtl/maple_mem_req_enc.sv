// maple_mem_req_enc: memory request encoder towards the LLC and DRAM.
//
// Three sources issue memory requests: the produce pipeline (pointer loads
// and prefetches, tagged with the scratchpad entry they fill), the MMU's page
// table walker (8-byte PTE reads) and the LIMA unit (64-byte chunks of array
// B). The encoder stamps each request with a transaction id naming its source
// (and, for produce loads, the queue entry), arbitrates round-robin and holds
// the winner in an output register. Using the queue-entry index as the
// transaction id follows the design description; the id layout, the
// arbitration and the register are this design's choice.
//
// Interface: input 0 = produce, 1 = PTW, 2 = LIMA, each valid/ready with a
// mem_req_t whose txid.src field is overwritten here. One cycle latency.
module maple_mem_req_enc
  import maple_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic [2:0] in_valid,
  output logic [2:0] in_ready,
  input  mem_req_t in_req [3],
  output logic     out_valid,
  input  logic     out_ready,
  output mem_req_t out_req
);
  logic [1:0] last, pick;
  logic       any, take;
  mem_req_t   enc;

  always_comb begin
    pick = 2'd0;
    any  = 1'b0;
    for (int unsigned k = 1; k <= 3; k++) begin
      int unsigned c;
      c = (int'(last) + k) % 3;
      if (!any && in_valid[c]) begin
        any  = 1'b1;
        pick = 2'(c);
      end
    end
  end

  always_comb begin
    enc = in_req[pick];
    unique case (pick)
      2'd0:    enc.txid.src = TX_PRODUCE;
      2'd1:    begin enc.txid.src = TX_PTW;  enc.txid.idx = '0; end
      default: begin enc.txid.src = TX_LIMA; enc.txid.idx = '0; end
    endcase
  end

  assign take = any && (!out_valid || out_ready);

  always_comb begin
    in_ready = '0;
    if (take) in_ready[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_req   <= '0;
      last      <= 2'd2;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (take) begin
        out_valid <= 1'b1;
        out_req   <= enc;
        last      <= pick;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_req));
endmodule
