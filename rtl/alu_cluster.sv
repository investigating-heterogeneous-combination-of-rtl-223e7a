// alu_cluster: heterogeneous pool of integer ALUs.
//
// NFAST one-cycle fast ALUs (units 0..NFAST-1) and NSLOW two-cycle slow
// ALUs (units NFAST..NFAST+NSLOW-1), each with its own issue port, ready
// flag and result bus. The default mix of two fast and four slow units is
// the combination found best for a six-ALU machine; either count may be set
// to zero. Issue on a unit whose ready flag is low is ignored by the unit.
module alu_cluster
  import clp_pkg::*;
#(
  parameter int unsigned NFAST    = 2,
  parameter int unsigned NSLOW    = 4,
  parameter int unsigned SLOW_LAT = 2,
  localparam int unsigned NALU    = NFAST + NSLOW
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     iss_valid [NALU],
  input  alu_req_t iss_req   [NALU],
  output logic     unit_ready[NALU],
  output result_t  result    [NALU]
);

  for (genvar f = 0; f < NFAST; f++) begin : g_fast
    fast_alu u_alu (
      .clk, .rst_n,
      .in_valid(iss_valid[f]), .in_req(iss_req[f]),
      .in_ready(unit_ready[f]), .result(result[f])
    );
  end

  for (genvar s = 0; s < NSLOW; s++) begin : g_slow
    slow_alu #(.LAT(SLOW_LAT)) u_alu (
      .clk, .rst_n,
      .in_valid(iss_valid[NFAST+s] && unit_ready[NFAST+s]), .in_req(iss_req[NFAST+s]),
      .in_ready(unit_ready[NFAST+s]), .result(result[NFAST+s])
    );
  end

endmodule
