// maple_req_dec: MMIO request decoder of a MAPLE unit.
//
// A core reaches MAPLE with plain loads and stores into MAPLE's page. The
// decoder takes the queue id from offset bits 11..9 and the operation code
// from bits 8..3, and routes the operation to one of three pipelines:
// consume (loads with LD_CONSUME or LD_CONSUME2), produce (stores PRODUCE, PRODUCE_PTR,
// PRODUCE_PTR to DRAM and PREFETCH) or configuration (everything else).
// Routing into three separate pipelines follows the design description; the
// bit fields of the opcode and the queue id follow it too (bits 3..8), while
// placing the queue id in bits 11..9 is this design's choice.
//
// Interface: valid/ready in, three valid/ready outputs. One register stage:
// an accepted request appears on its output on the next cycle. The input is
// ready when the register is empty or drains in the same cycle.
module maple_req_dec
  import maple_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  core_req_t in_req,
  output logic      cons_valid,
  input  logic      cons_ready,
  output logic      prod_valid,
  input  logic      prod_ready,
  output logic      cfg_valid,
  input  logic      cfg_ready,
  output op_t       out_op
);
  typedef enum logic [1:0] {R_CONS, R_PROD, R_CFG} route_e;

  logic   q_valid;
  route_e q_route, d_route;
  op_t    q_op, d_op;
  logic   out_ready;

  always_comb begin
    d_op.src    = in_req.src;
    d_op.tag    = in_req.tag;
    d_op.store  = in_req.store;
    d_op.opcode = in_req.offset[8:3];
    d_op.qid    = in_req.offset[11:9];
    d_op.data   = in_req.data;
    if (!in_req.store && (d_op.opcode == LD_CONSUME || d_op.opcode == LD_CONSUME2))
      d_route = R_CONS;
    else if (in_req.store && (d_op.opcode == ST_PRODUCE || d_op.opcode == ST_PRODUCE_PTR ||
                              d_op.opcode == ST_PRODUCE_PTRD || d_op.opcode == ST_PREFETCH))
      d_route = R_PROD;
    else
      d_route = R_CFG;
  end

  always_comb begin
    unique case (q_route)
      R_CONS:  out_ready = cons_ready;
      R_PROD:  out_ready = prod_ready;
      default: out_ready = cfg_ready;
    endcase
  end

  assign in_ready   = !q_valid || out_ready;
  assign cons_valid = q_valid && q_route == R_CONS;
  assign prod_valid = q_valid && q_route == R_PROD;
  assign cfg_valid  = q_valid && q_route == R_CFG;
  assign out_op     = q_op;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q_route <= R_CFG;
      q_op    <= '0;
    end else if (in_ready) begin
      q_valid <= in_valid;
      if (in_valid) begin
        q_route <= d_route;
        q_op    <= d_op;
      end
    end
  end
endmodule
