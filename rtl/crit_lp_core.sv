// crit_lp_core: integer back end of a criticality-based low-power
// out-of-order processor.
//
// The machine has two kinds of integer ALU: fast ones (one cycle, high supply
// voltage, power-hungry) and slow ones (two cycles, low supply voltage,
// energy-efficient); by default two fast and four slow. A critical path
// predictor guesses for every instruction whether it lies on the program's
// critical path. Predicted-critical instructions are executed on the fast
// ALUs and all others on the slow ALUs, so that most work runs at low
// voltage while the chain of instructions that sets the run time does not
// slow down.
//
// Flow per instruction:
//   dispatch: rename_unit resolves the sources; crit_predictor looks up the
//     CPHT with PC ^ GBH ^ GCPH; the instruction enters the issue_queue with
//     its prediction and CPHT index.
//   issue: each free ALU takes the oldest ready instruction of its kind; an
//     instruction that is the oldest in the queue when it issues counts as
//     critical (QOLD), and the CPHT entry that predicted it is trained (+8
//     critical, -1 otherwise) while the GCPH shifts in the outcome.
//   execute/writeback: the result appears on the ALU's result bus 1 (fast)
//     or 2 (slow) cycles after issue, wakes up consumers in the queue (they
//     can issue in that same cycle) and updates the register file.
// Branch outcomes from outside train the gshare predictor, whose global
// history register is the GBH of the critical path predictor.
//
// Interfaces: a dispatch group of up to DW decoded integer instructions per
// cycle with a valid/ready handshake (disp_valid per slot, one disp_ready;
// the group must stay unchanged while disp_ready is low); a branch
// prediction port and a branch resolution port; a register read port for
// inspection; idle (nothing in flight) and event counters. Loads, stores,
// caches, fetch and commit are outside this block.
// Structure sizes follow the described configuration; the dispatch width,
// tag scheme, steering rules and timing are this design's own choices.
module crit_lp_core
  import clp_pkg::*;
#(
  parameter int unsigned DW             = 4,
  parameter int unsigned IQ_ENTRIES     = 32,
  parameter int unsigned NFAST          = 2,
  parameter int unsigned NSLOW          = 4,
  parameter int unsigned SLOW_LAT       = 2,
  parameter int unsigned CPHT_SIZE      = CPHT_ENTRIES,
  parameter bit          USE_GBH        = 1'b1,
  parameter bit          USE_GCPH       = 1'b1,
  parameter int unsigned GSHARE_ENTRIES = 4096,
  localparam int unsigned NALU          = NFAST + NSLOW
) (
  input  logic               clk,
  input  logic               rst_n,
  // dispatch
  input  logic               disp_valid [DW],
  input  dinstr_t            disp_instr [DW],
  output logic               disp_ready,
  // branch prediction and resolution
  input  word_t              bp_pc,
  output logic               bp_taken,
  output logic [GBH_LEN-1:0] bp_ghr,
  input  logic               br_valid,
  input  word_t              br_pc,
  input  logic [GBH_LEN-1:0] br_ghr,
  input  logic               br_taken,
  // inspection
  input  areg_t              dbg_raddr,
  output word_t              dbg_rdata,
  output logic               idle,
  output perf_t              perf
);

  alu_op_e   rn_op  [DW];
  opnd_t     rn_s1  [DW];
  opnd_t     rn_s2  [DW];
  tag_t      rn_tag [DW];
  word_t     lk_pc  [DW];
  cpht_idx_t lk_idx [DW];
  logic      lk_crit[DW];
  iq_entry_t iq_in  [DW];
  logic      fire;
  logic      any_valid;

  logic      unit_ready [NALU];
  result_t   result     [NALU];
  logic      iss_valid  [NALU];
  alu_req_t  iss_req    [NALU];
  cpht_idx_t iss_idx    [NALU];
  logic      iss_qold   [NALU];
  logic      iss_bypass [NALU];
  logic [$clog2(IQ_ENTRIES+1)-1:0] occupancy;
  logic [GBH_LEN-1:0]  gbh;
  logic [GCPH_LEN-1:0] gcph;

  always_comb begin
    any_valid = 1'b0;
    for (int k = 0; k < DW; k++) begin
      any_valid  = any_valid | disp_valid[k];
      lk_pc[k]   = disp_instr[k].pc;
      iq_in[k]   = '{op: rn_op[k], s1: rn_s1[k], s2: rn_s2[k], tag: rn_tag[k],
                     crit: lk_crit[k], idx: lk_idx[k]};
    end
  end
  assign fire = disp_ready && any_valid;

  rename_unit #(.DW(DW), .NALU(NALU)) u_rename (
    .clk, .rst_n,
    .in_valid(disp_valid), .in_instr(disp_instr), .fire,
    .out_op(rn_op), .out_s1(rn_s1), .out_s2(rn_s2), .out_tag(rn_tag),
    .result, .dbg_raddr, .dbg_rdata
  );

  crit_predictor #(.ENTRIES(CPHT_SIZE), .USE_GBH(USE_GBH), .USE_GCPH(USE_GCPH),
                   .NRD(DW), .NUPD(NALU)) u_cpp (
    .clk, .rst_n,
    .lk_pc, .lk_idx, .lk_crit, .gbh,
    .upd_valid(iss_valid), .upd_idx(iss_idx), .upd_crit(iss_qold), .gcph
  );

  gshare #(.ENTRIES(GSHARE_ENTRIES), .HIST(GBH_LEN)) u_bp (
    .clk, .rst_n,
    .pred_pc(bp_pc), .pred_taken(bp_taken), .pred_ghr(bp_ghr),
    .upd_valid(br_valid), .upd_pc(br_pc), .upd_ghr(br_ghr), .upd_taken(br_taken),
    .ghr(gbh)
  );

  issue_queue #(.ENTRIES(IQ_ENTRIES), .DW(DW), .NFAST(NFAST), .NSLOW(NSLOW)) u_iq (
    .clk, .rst_n,
    .disp_valid, .disp_entry(iq_in), .disp_ready,
    .unit_ready, .result,
    .iss_valid, .iss_req, .iss_idx, .iss_qold, .iss_bypass, .occupancy
  );

  alu_cluster #(.NFAST(NFAST), .NSLOW(NSLOW), .SLOW_LAT(SLOW_LAT)) u_alus (
    .clk, .rst_n,
    .iss_valid, .iss_req, .unit_ready, .result
  );

  always_comb begin
    idle = (occupancy == '0);
    for (int u = 0; u < NALU; u++)
      if (result[u].valid || !unit_ready[u]) idle = 1'b0;
  end

  // Event counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf <= '0;
    end else begin
      perf_t p;
      p = perf;
      p.cycles = p.cycles + 1;
      if (br_valid) p.branches = p.branches + 1;
      if (any_valid && !disp_ready) p.disp_stall = p.disp_stall + 1;
      if (fire)
        for (int k = 0; k < DW; k++)
          if (disp_valid[k]) begin
            p.dispatched = p.dispatched + 1;
            if (lk_crit[k]) p.pred_crit = p.pred_crit + 1;
          end
      for (int u = 0; u < NALU; u++)
        if (iss_valid[u]) begin
          if (u < int'(NFAST)) p.issued_fast = p.issued_fast + 1;
          else                 p.issued_slow = p.issued_slow + 1;
          if (iss_qold[u])   p.qold   = p.qold + 1;
          if (iss_bypass[u]) p.bypass = p.bypass + 1;
        end
      perf <= p;
    end
  end

  // Dispatch handshake: a group offered while disp_ready is low must be
  // offered unchanged in the next cycle.
  for (genvar k = 0; k < DW; k++) begin : g_hs
    a_disp_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (disp_valid[k] && !disp_ready) |=> (disp_valid[k] && $stable(disp_instr[k])));
  end

endmodule
