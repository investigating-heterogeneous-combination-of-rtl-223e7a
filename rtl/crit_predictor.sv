// crit_predictor: correlation-based critical path predictor (BOTH type).
//
// Looks up a criticality prediction for each instruction being dispatched
// and trains on each instruction issued. The CPHT index is the instruction
// address (PC >> PC_SHIFT) XORed with the global branch history (GBH, from
// the branch predictor) and the global critical path history (GCPH, the
// criticality of the last instructions), which is the BOTH-type predictor.
// USE_GBH = 0 gives the GCPH-type, USE_GCPH = 0 the GBH-type and both 0 the
// per-address predictor. The index is returned with the prediction; the
// issue queue keeps it and hands it back at issue together with the
// criticality observed there, so the entry that made the prediction is the
// one trained. Training happens at issue (speculatively), as described.
// The GCPH takes one bit per issued instruction, oldest first. At most one
// instruction per cycle is critical (the oldest in the queue, see
// issue_queue), and it is always the oldest issued, so the bits shifted in
// are the critical flag followed by zeros.
// Lookups are combinational; updates take effect at the clock edge.
module crit_predictor
  import clp_pkg::*;
#(
  parameter int unsigned ENTRIES  = CPHT_ENTRIES,
  parameter int unsigned GCPH_W   = GCPH_LEN,
  parameter int unsigned GBH_W    = GBH_LEN,
  parameter bit          USE_GBH  = 1'b1,
  parameter bit          USE_GCPH = 1'b1,
  parameter int unsigned NRD      = 4,
  parameter int unsigned NUPD     = 6,
  localparam int unsigned IW      = $clog2(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup at dispatch
  input  word_t             lk_pc   [NRD],
  output cpht_idx_t         lk_idx  [NRD],
  output logic              lk_crit [NRD],
  input  logic [GBH_W-1:0]  gbh,
  // training at issue
  input  logic              upd_valid [NUPD],
  input  cpht_idx_t         upd_idx   [NUPD],
  input  logic              upd_crit  [NUPD],
  output logic [GCPH_W-1:0] gcph
);

  localparam int unsigned NCW = $clog2(NUPD + 1);

  logic [IW-1:0]   rd_idx  [NRD];
  logic [CTR_W-1:0] rd_ctr [NRD];
  logic [IW-1:0]   u_idx   [NUPD];
  logic [NCW-1:0]  n_upd;
  logic            any_crit;
  logic [NUPD-1:0] shift_bits;

  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      rd_idx[r] = IW'(lk_pc[r] >> PC_SHIFT);
      if (USE_GBH)  rd_idx[r] = rd_idx[r] ^ IW'(gbh);
      if (USE_GCPH) rd_idx[r] = rd_idx[r] ^ IW'(gcph);
      lk_idx[r] = cpht_idx_t'(rd_idx[r]);
    end
    for (int u = 0; u < NUPD; u++) u_idx[u] = IW'(upd_idx[u]);
  end

  always_comb begin
    n_upd    = '0;
    any_crit = 1'b0;
    for (int u = 0; u < NUPD; u++)
      if (upd_valid[u]) begin
        n_upd    = n_upd + 1'b1;
        any_crit = any_crit | upd_crit[u];
      end
    shift_bits    = '0;
    shift_bits[0] = any_crit;
  end

  cpht #(.ENTRIES(ENTRIES), .NRD(NRD), .NUPD(NUPD)) u_cpht (
    .clk, .rst_n,
    .rd_idx, .rd_ctr, .rd_crit(lk_crit),
    .upd_valid, .upd_idx(u_idx), .upd_crit
  );

  gcph_reg #(.LEN(GCPH_W), .NIN(NUPD)) u_gcph (
    .clk, .rst_n, .in_cnt(n_upd), .in_bits(shift_bits), .hist(gcph)
  );

endmodule
