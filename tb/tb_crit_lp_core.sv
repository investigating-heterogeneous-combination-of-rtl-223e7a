// tb_crit_lp_core: end-to-end test of the back end at its default size
// (four-wide dispatch, 32-entry queue, 2 fast + 4 slow ALUs, 2K-entry
// BOTH-type predictor, 4K-entry gshare).
//
// A reference model executes every instruction in program order; the
// register file is compared with it after each phase.
//   1. Dependence chain, cold and trained: 40 instructions each depending
//      on the previous one. After reset every prediction is "not critical",
//      so the chain runs on slow ALUs at two cycles per instruction. Every
//      instruction of a chain is the oldest in the queue when it issues, so
//      training marks it critical; after some repetitions the chain must run
//      on the fast ALUs at close to one cycle per instruction.
//   2. The eight-instruction data-flow graph I0..I7 (critical path
//      I0-I3-I4-I6-I7) repeated as a loop body.
//   3. Random instructions from a 64-instruction loop body with random
//      dependences, while branch outcomes are fed to the branch predictor.
// Counts each mechanism (queue-full stall, bypass, fast and slow issue,
// QOLD critical, predicted critical, branch history update) and fails if
// one never happened.
module tb_crit_lp_core;
  import clp_pkg::*;
  import tb_ref_pkg::*;

  localparam int DW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic    disp_valid [DW];
  dinstr_t disp_instr [DW];
  logic    disp_ready;
  word_t   bp_pc;
  logic    bp_taken;
  logic [7:0] bp_ghr;
  logic    br_valid;
  word_t   br_pc;
  logic [7:0] br_ghr;
  logic    br_taken;
  areg_t   dbg_raddr;
  word_t   dbg_rdata;
  logic    idle;
  perf_t   perf;
  int checks = 0, failures = 0;
  int total = 0;
  bit branches_on = 0;

  crit_lp_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // branch resolutions, independent of the instruction stream
  always @(negedge clk) begin
    br_valid <= branches_on && ($urandom_range(0, 3) == 0);
    br_pc    <= 32'h0041_0000 + 32'($urandom_range(0, 7) * 8);
    br_taken <= $urandom_range(0, 1);
    br_ghr   <= bp_ghr;
  end
  assign bp_pc = br_pc;

  word_t   gold [32];
  dinstr_t prog [$];

  function automatic dinstr_t mk(word_t pc, alu_op_e op, int rd, int rs1, int rs2, bit ui, word_t imm);
    dinstr_t d;
    d.pc = pc; d.op = op; d.rd = areg_t'(rd); d.rs1 = areg_t'(rs1); d.rs2 = areg_t'(rs2);
    d.use_imm = ui; d.imm = imm;
    return d;
  endfunction

  task automatic gold_exec(dinstr_t d);
    word_t a, b, r;
    a = (d.rs1 == 0) ? 0 : gold[d.rs1];
    b = d.use_imm ? d.imm : ((d.rs2 == 0) ? 0 : gold[d.rs2]);
    r = ref_alu(d.op, a, b);
    if (d.rd != 0) gold[d.rd] = r;
  endtask

  // Sends prog through the dispatch port (groups of up to four, held until
  // accepted), then waits for idle. Returns the cycles taken.
  task automatic run_prog(output int cycles);
    int t0;
    t0 = perf.cycles;
    while (prog.size() > 0) begin
      int n;
      @(negedge clk);
      n = $urandom_range(1, DW);
      if (n > prog.size()) n = prog.size();
      for (int k = 0; k < DW; k++) begin
        disp_valid[k] = (k < n);
        disp_instr[k] = (k < n) ? prog[k] : '0;
      end
      do begin
        #1;
        if (!disp_ready) @(negedge clk);
      end while (!disp_ready);
      @(posedge clk);
      for (int k = 0; k < n; k++) begin
        gold_exec(prog[0]);
        void'(prog.pop_front());
        total++;
      end
      #1;
      for (int k = 0; k < DW; k++) disp_valid[k] = 0;
    end
    @(negedge clk);
    while (!idle) @(negedge clk);
    cycles = perf.cycles - t0;
  endtask

  task automatic check_regs(string phase);
    for (int r = 0; r < 32; r++) begin
      dbg_raddr = areg_t'(r);
      #1;
      checks++;
      if (dbg_rdata != ((r == 0) ? 0 : gold[r])) begin
        failures++; $display("%s: r%0d = %h, expected %h", phase, r, dbg_rdata, gold[r]);
      end
    end
  endtask

  initial begin
    int cyc, cold, trained, slow_before;
    localparam int L = 40;
    for (int r = 0; r < 32; r++) gold[r] = 0;
    for (int k = 0; k < DW; k++) begin disp_valid[k] = 0; disp_instr[k] = '0; end
    dbg_raddr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Phase 1: dependent chain
    for (int rep = 0; rep < 12; rep++) begin
      prog.push_back(mk(32'h0040_0000, OP_ADD, 1, 0, 0, 1, 32'd7));
      for (int i = 1; i < L; i++)
        prog.push_back(mk(32'h0040_0000 + 32'(i * 8), (i % 3 == 0) ? OP_XOR : OP_ADD, 1, 1, 0, 1, 32'(i * 13)));
      slow_before = perf.issued_slow;
      run_prog(cyc);
      if (rep == 0) begin
        cold = cyc;
        checks++;
        if (perf.issued_slow - slow_before != L) begin failures++; $display("cold chain not all on slow ALUs"); end
      end
      if (rep == 11) trained = cyc;
      check_regs("chain");
    end
    $display("chain of %0d: cold %0d cycles, trained %0d cycles", L, cold, trained);
    checks += 2;
    if (cold < 2 * L) begin failures++; $display("cold chain faster than two cycles per instruction"); end
    if (trained > L + L / 4 + 4) begin failures++; $display("trained chain not close to one cycle per instruction"); end

    // Phase 2: the eight-instruction data-flow graph, as a loop body
    for (int rep = 0; rep < 50; rep++) begin
      word_t b;
      b = 32'h0040_1000;
      prog.push_back(mk(b + 0,  OP_ADD, 10, 10, 0, 1, 32'd3));   // I0
      prog.push_back(mk(b + 8,  OP_ADD, 11, 11, 0, 1, 32'd5));   // I1
      prog.push_back(mk(b + 16, OP_SLL, 12, 10, 0, 1, 32'd2));   // I2 <- I0
      prog.push_back(mk(b + 24, OP_SUB, 13, 10, 15, 0, 0));      // I3 <- I0
      prog.push_back(mk(b + 32, OP_XOR, 14, 13, 10, 0, 0));      // I4 <- I3
      prog.push_back(mk(b + 40, OP_OR,  16, 13, 11, 0, 0));      // I5 <- I3, I1
      prog.push_back(mk(b + 48, OP_ADD, 17, 14, 0, 1, 32'd1));   // I6 <- I4
      prog.push_back(mk(b + 56, OP_ADD, 15, 17, 12, 0, 0));      // I7 <- I6, I2
    end
    run_prog(cyc);
    check_regs("dfg");

    // Phase 3: random loop body with branch outcomes flowing
    branches_on = 1;
    begin
      dinstr_t body [64];
      for (int i = 0; i < 64; i++)
        body[i] = mk(32'h0040_2000 + 32'(i * 8), rand_op(), $urandom_range(0, 15),
                     $urandom_range(0, 15), $urandom_range(0, 15), $urandom_range(0, 2) == 0, $urandom);
      for (int rep = 0; rep < 60; rep++)
        for (int i = 0; i < 64; i++) prog.push_back(body[i]);
    end
    run_prog(cyc);
    check_regs("random");
    branches_on = 0;

    checks += 2;
    if (perf.dispatched != total) begin failures++; $display("dispatched %0d, sent %0d", perf.dispatched, total); end
    if (perf.issued_fast + perf.issued_slow != total) begin failures++; $display("issued count wrong"); end
    $display("cycles=%0d dispatched=%0d fast=%0d slow=%0d pred_crit=%0d qold=%0d bypass=%0d stall=%0d branches=%0d",
             perf.cycles, perf.dispatched, perf.issued_fast, perf.issued_slow, perf.pred_crit, perf.qold,
             perf.bypass, perf.disp_stall, perf.branches);
    checks += 7;
    if (perf.disp_stall == 0)  begin failures++; $display("queue-full stall never happened"); end
    if (perf.bypass == 0)      begin failures++; $display("bypass never happened"); end
    if (perf.issued_fast == 0) begin failures++; $display("no fast issue"); end
    if (perf.issued_slow == 0) begin failures++; $display("no slow issue"); end
    if (perf.qold == 0)        begin failures++; $display("no QOLD critical instruction"); end
    if (perf.pred_crit == 0)   begin failures++; $display("no critical prediction"); end
    if (perf.branches == 0)    begin failures++; $display("no branch history update"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
