// fast_alu: one-cycle integer ALU on the high-voltage supply.
//
// An instruction issued in cycle t is latched into the input register at the
// end of t; its result is on the result bus for the whole of cycle t+1, so a
// dependent instruction can be issued in t+1 (the issue queue picks the value
// off the bus). The unit accepts a new instruction every cycle; in_ready is
// always high and exists so that both ALU kinds share one issue interface.
// One-cycle latency for most integer operations follows the described
// configuration; the operation set and the registered-input timing are this
// design's own.
module fast_alu
  import clp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  alu_req_t in_req,
  output logic     in_ready,
  output result_t  result
);

  logic     v_q;
  alu_req_t req_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q   <= 1'b0;
      req_q <= '0;
    end else begin
      v_q <= in_valid;
      if (in_valid) req_q <= in_req;
    end
  end

  assign in_ready     = 1'b1;
  assign result.valid = v_q;
  assign result.tag   = req_q.tag;
  assign result.value = alu_compute(req_q.op, req_q.a, req_q.b);

endmodule
