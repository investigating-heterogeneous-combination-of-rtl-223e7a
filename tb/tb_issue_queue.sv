// tb_issue_queue: drives the 32-entry queue with random dependent
// instructions (some predicted critical) and models the ALUs itself (two
// one-cycle fast units, four two-cycle slow units). Every cycle it checks:
//   - each issued instruction carries the right operand values (so none
//     issues before its producers' results exist, and bypassed values are
//     right);
//   - critical instructions issue only to fast units, others only to slow;
//   - each unit takes the oldest ready instruction of its kind, and no ready
//     unit stays idle while a ready instruction of its kind waits;
//   - the QOLD flag is set exactly when the issued instruction is the oldest
//     in the queue;
//   - disp_ready and the occupancy match the model.
// It counts the bypass, a full queue and both kinds of issue, and fails if
// any of them never happens.
module tb_issue_queue;
  import clp_pkg::*;
  import tb_ref_pkg::*;

  localparam int NF = 2, NS = 4, NA = 6, DW = 4, NE = 32, NI = 3000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic       disp_valid [DW];
  iq_entry_t  disp_entry [DW];
  logic       disp_ready;
  logic       unit_ready [NA];
  result_t    result     [NA];
  logic       iss_valid  [NA];
  alu_req_t   iss_req    [NA];
  cpht_idx_t  iss_idx    [NA];
  logic       iss_qold   [NA];
  logic       iss_bypass [NA];
  logic [5:0] occupancy;
  int checks = 0, failures = 0;

  issue_queue dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // instruction table, indexed by id (tag = id mod 256)
  word_t   a_v [NI], b_v [NI], r_v [NI];
  alu_op_e op_v [NI];
  int      p1 [NI], p2 [NI];     // producer ids, -1 for a ready value
  bit      crit [NI];
  bit      inq [NI], iss [NI], done [NI];

  function automatic bit ready_now(int id);
    return (p1[id] < 0 || done[p1[id]]) && (p2[id] < 0 || done[p2[id]]);
  endfunction

  initial begin
    int next_id = 0, ncomp = 0, cyc = 0;
    int n_byp = 0, n_full = 0, n_fast = 0, n_slow = 0, n_qold = 0;
    int f_id [NF], s_id [NS], s_cnt [NS];
    int last_iss [NA];
    for (int u = 0; u < NA; u++) begin
      unit_ready[u] = 1; result[u] = '0; last_iss[u] = -1;
    end
    for (int u = 0; u < NF; u++) f_id[u] = -1;
    for (int u = 0; u < NS; u++) begin s_id[u] = -1; s_cnt[u] = 0; end
    for (int k = 0; k < DW; k++) begin disp_valid[k] = 0; disp_entry[k] = '0; end
    for (int i = 0; i < NI; i++) begin inq[i] = 0; iss[i] = 0; done[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (ncomp < NI && cyc < 30000) begin
      int nfree, nval, oldest;
      @(negedge clk);
      cyc++;
      // advance the ALU model with what issued last cycle
      for (int u = 0; u < NF; u++) f_id[u] = last_iss[u];
      for (int s = 0; s < NS; s++) begin
        if (s_id[s] >= 0 && s_cnt[s] == 0) s_cnt[s] = 1;
        else if (s_id[s] >= 0 && s_cnt[s] == 1) s_id[s] = -1;
        if (last_iss[NF+s] >= 0) begin s_id[s] = last_iss[NF+s]; s_cnt[s] = 0; end
      end
      for (int u = 0; u < NA; u++) begin
        int id;
        id = (u < NF) ? f_id[u] : ((s_cnt[u-NF] == 1) ? s_id[u-NF] : -1);
        result[u] = '0;
        if (id >= 0) begin
          result[u] = '{valid: 1'b1, tag: tag_t'(id), value: r_v[id]};
          done[id] = 1;
          ncomp++;
        end
        unit_ready[u] = (u < NF) ? 1'b1 : (s_id[u-NF] < 0 || s_cnt[u-NF] == 1);
      end
      // new dispatch group; producers are instructions not yet issued, so their
      // results cannot be on a bus already, or finished ones (value known)
      nval = 0;
      for (int k = 0; k < DW; k++) begin
        disp_valid[k] = 0;
        disp_entry[k] = '0;
        if (next_id + nval < NI && $urandom_range(0, 4) != 0) begin
          int id, pid;
          id = next_id + nval;
          op_v[id] = rand_op();
          crit[id] = ($urandom_range(0, 2) == 0);
          for (int s = 0; s < 2; s++) begin
            pid = -1;
            if (id > 0 && $urandom_range(0, 2) != 0) begin
              pid = id - $urandom_range(1, (id < 6) ? id : 6);
              if (pid < next_id && iss[pid] && !done[pid]) pid = -1;  // in flight in an ALU
            end
            if (s == 0) p1[id] = pid; else p2[id] = pid;
          end
          a_v[id] = (p1[id] >= 0) ? r_v[p1[id]] : word_t'($urandom);
          b_v[id] = (p2[id] >= 0) ? r_v[p2[id]] : word_t'($urandom_range(0, 40));
          r_v[id] = ref_alu(op_v[id], a_v[id], b_v[id]);
          disp_valid[k] = 1;
          disp_entry[k].op   = op_v[id];
          disp_entry[k].tag  = tag_t'(id);
          disp_entry[k].crit = crit[id];
          disp_entry[k].idx  = cpht_idx_t'(id * 3);
          disp_entry[k].s1   = (p1[id] >= 0 && !done[p1[id]]) ? '{rdy: 1'b0, tag: tag_t'(p1[id]), val: '0}
                                                              : '{rdy: 1'b1, tag: '0, val: a_v[id]};
          disp_entry[k].s2   = (p2[id] >= 0 && !done[p2[id]]) ? '{rdy: 1'b0, tag: tag_t'(p2[id]), val: '0}
                                                              : '{rdy: 1'b1, tag: '0, val: b_v[id]};
          nval++;
        end
      end
      #1;
      nfree = NE;
      oldest = -1;
      for (int i = 0; i < next_id; i++) if (inq[i]) begin nfree--; if (oldest < 0) oldest = i; end
      checks += 2;
      if (disp_ready != (nfree >= nval)) begin failures++; $display("disp_ready wrong at %0d", cyc); end
      if (int'(occupancy) != NE - nfree) begin failures++; $display("occupancy %0d exp %0d", occupancy, NE - nfree); end
      if (!disp_ready) n_full++;
      // check issue
      for (int u = 0; u < NA; u++) begin
        last_iss[u] = -1;
        if (iss_valid[u]) begin
          int id;
          id = -1;
          for (int i = 0; i < next_id; i++) if (inq[i] && tag_t'(i) == iss_req[u].tag) id = i;
          checks++;
          if (id < 0) begin failures++; $display("unknown tag issued"); continue; end
          checks += 4;
          if (!ready_now(id)) begin failures++; $display("id %0d issued before its operands", id); end
          if (iss_req[u].a != a_v[id] || iss_req[u].b != b_v[id] || iss_req[u].op != op_v[id]) begin
            failures++; $display("id %0d wrong operands", id);
          end
          if (crit[id] != (u < NF)) begin failures++; $display("id %0d crit %0d on unit %0d", id, crit[id], u); end
          if (iss_qold[u] != (id == oldest)) begin failures++; $display("qold wrong for id %0d", id); end
          if (iss_idx[u] != cpht_idx_t'(id * 3)) begin failures++; $display("idx not carried"); end
          // oldest-first within the kind: no older ready same-kind entry left behind
          for (int i = 0; i < id; i++)
            if (inq[i] && ready_now(i) && crit[i] == (u < NF)) begin
              bit taken;
              taken = 0;
              for (int w = 0; w < NA; w++) if (iss_valid[w] && iss_req[w].tag == tag_t'(i)) taken = 1;
              checks++;
              if (!taken) begin failures++; $display("older id %0d passed over by %0d", i, id); end
            end
          if (iss_bypass[u]) n_byp++;
          if (id == oldest) n_qold++;
          if (u < NF) n_fast++; else n_slow++;
          last_iss[u] = id;
        end else if (unit_ready[u]) begin
          for (int i = 0; i < next_id; i++)
            if (inq[i] && ready_now(i) && crit[i] == (u < NF)) begin
              bit taken;
              taken = 0;
              for (int w = 0; w < NA; w++) if (iss_valid[w] && iss_req[w].tag == tag_t'(i)) taken = 1;
              checks++;
              if (!taken) begin failures++; $display("unit %0d idle while id %0d ready", u, i); end
            end
        end
      end
      for (int u = 0; u < NA; u++) if (last_iss[u] >= 0) begin inq[last_iss[u]] = 0; iss[last_iss[u]] = 1; end
      if (disp_ready) begin
        for (int k = 0; k < nval; k++) inq[next_id + k] = 1;
        next_id += nval;
      end
    end
    checks++;
    if (ncomp != NI) begin failures++; $display("only %0d of %0d completed", ncomp, NI); end
    checks += 4;
    if (n_byp == 0)  begin failures++; $display("bypass never happened"); end
    if (n_full == 0) begin failures++; $display("queue never full"); end
    if (n_fast == 0 || n_slow == 0) begin failures++; $display("a unit kind never used"); end
    if (n_qold == 0) begin failures++; $display("no QOLD instruction"); end
    $display("bypass=%0d full=%0d fast=%0d slow=%0d qold=%0d cycles=%0d", n_byp, n_full, n_fast, n_slow, n_qold, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
