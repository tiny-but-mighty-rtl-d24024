// maple_resp_enc: response encoder towards the cores.
//
// Each of MAPLE's three pipelines (consume, configuration, produce) ends in
// a stage that answers the core that issued the load or store. This block
// arbitrates between them round-robin and holds the chosen response in an
// output register that feeds the NoC. That every pipeline ends by replying
// to the core follows the design description; round-robin arbitration and
// the single output register are this design's choice.
//
// Interface: NIN valid/ready inputs of core_resp_t, one valid/ready output.
// Latency one cycle from an accepted input to the output register.
module maple_resp_enc
  import maple_pkg::*;
#(
  parameter int unsigned NIN = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [NIN-1:0] in_valid,
  output logic [NIN-1:0] in_ready,
  input  core_resp_t in_resp [NIN],
  output logic       out_valid,
  input  logic       out_ready,
  output core_resp_t out_resp
);
  localparam int unsigned SW = (NIN > 1) ? $clog2(NIN) : 1;

  logic [SW-1:0] last;     // most recently granted input
  logic [SW-1:0] pick;
  logic          any;
  logic          take;

  // round-robin: first valid input after the last grant
  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int unsigned k = 1; k <= NIN; k++) begin
      int unsigned c;
      c = (int'(last) + k) % NIN;
      if (!any && in_valid[c]) begin
        any  = 1'b1;
        pick = SW'(c);
      end
    end
  end

  assign take = any && (!out_valid || out_ready);

  always_comb begin
    in_ready = '0;
    if (take) in_ready[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_resp  <= '0;
      last      <= SW'(NIN - 1);
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (take) begin
        out_valid <= 1'b1;
        out_resp  <= in_resp[pick];
        last      <= pick;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_resp));
endmodule
