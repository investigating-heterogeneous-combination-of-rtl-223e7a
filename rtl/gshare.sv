// gshare: gshare branch predictor with its global branch history (GBH).
//
// ENTRIES two-bit saturating counters are indexed by the instruction address
// (PC >> PC_SHIFT) XORed with the HIST most recent branch outcomes. A
// prediction is combinational; the front end keeps the history it was made
// with (pred_ghr) and hands it back with the resolved outcome, which trains
// the same counter and shifts the outcome into the history register (newest
// in bit 0). The history register is the GBH that the critical path
// predictor also reads. The 4K entries and 8-outcome history follow the
// described configuration; two-bit counters, reset to weakly not-taken, and
// training at resolution are this design's own choices.
module gshare
  import clp_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096,
  parameter int unsigned HIST    = GBH_LEN,
  localparam int unsigned IW     = $clog2(ENTRIES)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  word_t           pred_pc,
  output logic            pred_taken,
  output logic [HIST-1:0] pred_ghr,
  input  logic            upd_valid,
  input  word_t           upd_pc,
  input  logic [HIST-1:0] upd_ghr,
  input  logic            upd_taken,
  output logic [HIST-1:0] ghr
);

  logic [1:0]      ctr [ENTRIES];
  logic [HIST-1:0] ghr_q;
  logic [IW-1:0]   p_idx, u_idx;

  function automatic logic [IW-1:0] hash(word_t pc, logic [HIST-1:0] h);
    logic [IW-1:0] a;
    a = IW'(pc >> PC_SHIFT);
    return a ^ IW'(h);
  endfunction

  assign p_idx      = hash(pred_pc, ghr_q);
  assign u_idx      = hash(upd_pc, upd_ghr);
  assign pred_taken = ctr[p_idx][1];
  assign pred_ghr   = ghr_q;
  assign ghr        = ghr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ghr_q <= '0;
      for (int e = 0; e < ENTRIES; e++) ctr[e] <= 2'b01;
    end else if (upd_valid) begin
      ghr_q <= {ghr_q[HIST-2:0], upd_taken};
      if (upd_taken && ctr[u_idx] != 2'b11)       ctr[u_idx] <= ctr[u_idx] + 2'b01;
      else if (!upd_taken && ctr[u_idx] != 2'b00) ctr[u_idx] <= ctr[u_idx] - 2'b01;
    end
  end

endmodule
