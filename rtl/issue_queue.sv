// issue_queue: instruction queue with criticality-based steering and
// QOLD criticality detection.
//
// ENTRIES slots hold dispatched integer instructions until they issue.
// Operands not yet available carry the tag of their producer; every cycle
// each waiting operand watches all result buses, captures the value at the
// clock edge, and may also be taken straight off a bus in the cycle the
// value appears (bypass), so a consumer can issue in the cycle its producer's
// result is on the bus.
//
// Steering: a slot predicted critical may only issue to a fast ALU and a
// non-critical one only to a slow ALU; when the machine has no unit of one
// kind, all instructions go to the other kind. Each ALU whose ready flag is
// high takes the oldest ready instruction of its kind (fast units first, in
// unit order). Age is the program-order tag.
//
// Criticality detection (QOLD): an instruction that issues while it is the
// oldest instruction in the queue is marked critical (iss_qold); every other
// issued instruction is marked non-critical. The predictor trains on this.
//
// Dispatch: up to DW instructions per cycle; disp_ready is high when there
// are free slots for all valid ones, and the group is written at the clock
// edge when disp_valid and disp_ready. A slot freed by issue is reusable in
// the next cycle. Queue size follows the described configuration; strict
// steering and the oldest-first select are this design's own reading.
module issue_queue
  import clp_pkg::*;
#(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned DW      = 4,
  parameter int unsigned NFAST   = 2,
  parameter int unsigned NSLOW   = 4,
  localparam int unsigned NALU   = NFAST + NSLOW,
  localparam int unsigned CNT_W  = $clog2(ENTRIES + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  // dispatch
  input  logic       disp_valid [DW],
  input  iq_entry_t  disp_entry [DW],
  output logic       disp_ready,
  // ALUs
  input  logic       unit_ready [NALU],
  input  result_t    result     [NALU],
  output logic       iss_valid  [NALU],
  output alu_req_t   iss_req    [NALU],
  output cpht_idx_t  iss_idx    [NALU],
  output logic       iss_qold   [NALU],
  output logic       iss_bypass [NALU],  // an operand came straight off a result bus
  output logic [CNT_W-1:0] occupancy
);

  logic      valid_q [ENTRIES];
  logic      fast_q  [ENTRIES];
  iq_entry_t e_q     [ENTRIES];

  logic      rdy     [ENTRIES];
  word_t     v1      [ENTRIES];
  word_t     v2      [ENTRIES];
  logic      byp     [ENTRIES];
  logic      r1_ok   [ENTRIES];
  logic      r2_ok   [ENTRIES];
  logic      issued  [ENTRIES];
  logic      alloc   [ENTRIES];
  int        alloc_slot [ENTRIES];
  int        oldest;

  // Operand readiness including the bypass from the result buses.
  function automatic logic bus_hit(opnd_t s, result_t res [NALU], output word_t v);
    v = s.val;
    if (s.rdy) return 1'b1;
    for (int u = 0; u < NALU; u++)
      if (res[u].valid && res[u].tag == s.tag) begin
        v = res[u].value;
        return 1'b1;
      end
    return 1'b0;
  endfunction

  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      r1_ok[e] = bus_hit(e_q[e].s1, result, v1[e]);
      r2_ok[e] = bus_hit(e_q[e].s2, result, v2[e]);
      rdy[e]   = valid_q[e] && r1_ok[e] && r2_ok[e];
      byp[e] = !e_q[e].s1.rdy || !e_q[e].s2.rdy;
    end
  end

  // Oldest valid slot in the queue.
  always_comb begin
    oldest = -1;
    for (int e = 0; e < ENTRIES; e++)
      if (valid_q[e] && (oldest < 0 || tag_older(e_q[e].tag, e_q[oldest].tag))) oldest = e;
  end

  // Select: each ready unit takes the oldest ready slot of its kind.
  always_comb begin
    for (int e = 0; e < ENTRIES; e++) issued[e] = 1'b0;
    for (int u = 0; u < NALU; u++) begin
      int best;
      best = -1;
      if (unit_ready[u]) begin
        for (int e = 0; e < ENTRIES; e++)
          if (rdy[e] && !issued[e] && (fast_q[e] == (u < int'(NFAST))) &&
              (best < 0 || tag_older(e_q[e].tag, e_q[best].tag)))
            best = e;
      end
      iss_valid[u]  = best >= 0;
      iss_req[u]    = '0;
      iss_idx[u]    = '0;
      iss_qold[u]   = 1'b0;
      iss_bypass[u] = 1'b0;
      if (best >= 0) begin
        issued[best]    = 1'b1;
        iss_req[u].op   = e_q[best].op;
        iss_req[u].a    = v1[best];
        iss_req[u].b    = v2[best];
        iss_req[u].tag  = e_q[best].tag;
        iss_idx[u]      = e_q[best].idx;
        iss_qold[u]     = (best == oldest);
        iss_bypass[u]   = byp[best];
      end
    end
  end

  // Allocation of free slots to the dispatch group: each valid dispatch
  // slot, in order, takes the lowest-numbered free entry still unclaimed.
  always_comb begin
    int nfree, nreq;
    nfree = 0;
    nreq  = 0;
    for (int e = 0; e < ENTRIES; e++) if (!valid_q[e]) nfree++;
    for (int k = 0; k < DW; k++) if (disp_valid[k]) nreq++;
    disp_ready = nfree >= nreq;
    for (int e = 0; e < ENTRIES; e++) begin
      alloc[e]      = 1'b0;
      alloc_slot[e] = 0;
    end
    for (int k = 0; k < DW; k++) begin
      logic placed;
      placed = 1'b0;
      for (int e = 0; e < ENTRIES; e++)
        if (disp_valid[k] && !placed && !valid_q[e] && !alloc[e]) begin
          alloc[e]      = 1'b1;
          alloc_slot[e] = k;
          placed        = 1'b1;
        end
    end
  end

  always_comb begin
    int n;
    n = 0;
    for (int e = 0; e < ENTRIES; e++) if (valid_q[e]) n++;
    occupancy = CNT_W'(n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        valid_q[e] <= 1'b0;
        fast_q[e]  <= 1'b0;
        e_q[e]     <= '0;
      end
    end else begin
      for (int e = 0; e < ENTRIES; e++) begin
        if (valid_q[e]) begin
          if (issued[e]) valid_q[e] <= 1'b0;
          // wakeup: capture values that appear on the result buses
          if (!e_q[e].s1.rdy && r1_ok[e]) begin
            e_q[e].s1.rdy <= 1'b1;
            e_q[e].s1.val <= v1[e];
          end
          if (!e_q[e].s2.rdy && r2_ok[e]) begin
            e_q[e].s2.rdy <= 1'b1;
            e_q[e].s2.val <= v2[e];
          end
        end else if (alloc[e] && disp_ready) begin
          valid_q[e] <= 1'b1;
          e_q[e]     <= disp_entry[alloc_slot[e]];
          fast_q[e]  <= (NFAST > 0) && (disp_entry[alloc_slot[e]].crit || NSLOW == 0);
        end
      end
    end
  end

  // A dispatched operand must not wait on a tag that is already on a bus;
  // the rename stage resolves that case.
  for (genvar u = 0; u < NALU; u++) begin : g_chk
    a_no_iss_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
      iss_valid[u] |-> unit_ready[u]);
  end

endmodule
