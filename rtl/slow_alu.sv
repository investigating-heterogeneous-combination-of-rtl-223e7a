// slow_alu: multi-cycle integer ALU on the low-voltage supply.
//
// The same integer logic as the fast ALU, but given LAT cycles (default 2)
// to settle, as a circuit at reduced supply voltage would need. An
// instruction issued in cycle t is held in the input register; the result is
// on the result bus in cycle t+LAT. The unit is not pipelined: it accepts a
// new instruction only at the end of the cycle in which it presents its
// result (in_ready high), so it starts at most one operation every LAT
// cycles. Two-cycle latency follows the described configuration; holding the
// operands for the whole latency (a multi-cycle path) instead of pipelining
// is this design's own choice.
module slow_alu
  import clp_pkg::*;
#(
  parameter int unsigned LAT = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  alu_req_t in_req,
  output logic     in_ready,
  output result_t  result
);

  localparam int unsigned CNT_W = (LAT > 1) ? $clog2(LAT) : 1;

  logic             busy_q;
  logic [CNT_W-1:0] cnt_q;   // cycles of execution already spent minus one
  alu_req_t         req_q;
  logic             last;

  assign last     = busy_q && (cnt_q == CNT_W'(LAT - 1));
  assign in_ready = !busy_q || last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      cnt_q  <= '0;
      req_q  <= '0;
    end else if (in_valid && in_ready) begin
      busy_q <= 1'b1;
      cnt_q  <= '0;
      req_q  <= in_req;
    end else if (last) begin
      busy_q <= 1'b0;
    end else if (busy_q) begin
      cnt_q <= cnt_q + 1'b1;
    end
  end

  assign result.valid = last;
  assign result.tag   = req_q.tag;
  assign result.value = alu_compute(req_q.op, req_q.a, req_q.b);

endmodule
