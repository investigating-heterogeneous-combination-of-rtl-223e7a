// tb_alu_mix_sweep: the ALU-combination study in miniature. The same program
// runs on seven copies of the back end, with 6fast/0slow, 5fast/1slow, ...
// 0fast/6slow ALUs. The program is a 64-instruction loop body, repeated 40
// times, that mixes a long dependence chain with independent work; it is
// generated from a fixed linear congruential sequence, so it is identical
// for every copy. Each copy's final registers are compared with an in-order
// reference model. The testbench prints, per mix, the cycle count and the
// share of instructions that ran on slow ALUs, and checks that 6fast/0slow
// is the fastest, that no instruction reaches a kind of ALU a mix lacks, and
// that every mix with slow ALUs sends some work to them.
module tb_alu_mix_sweep;
  import clp_pkg::*;
  import tb_ref_pkg::*;

  localparam int DW = 4, NBODY = 64, NREP = 40, NPROG = NBODY * NREP;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int cycles [7];
  int nfast_i [7], nslow_i [7];
  bit done [7];

  dinstr_t prog [NPROG];
  word_t   gold [32];

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program and reference result
  initial begin
    int unsigned s;
    dinstr_t body [NBODY];
    s = 32'd12345;
    for (int i = 0; i < NBODY; i++) begin
      int unsigned r;
      s = s * 32'd1103515245 + 32'd12345;
      r = s >> 8;
      body[i].pc      = 32'h0040_0000 + 32'(i * 8);
      body[i].op      = alu_op_e'(r % 12);
      body[i].use_imm = (r[3:2] == 2'b00);
      body[i].imm     = 32'(r);
      if (i % 4 == 0) begin        // the chain through r1
        body[i].rd  = 5'd1;
        body[i].rs1 = 5'd1;
        body[i].rs2 = areg_t'(2 + (r >> 4) % 14);
        body[i].op  = (i % 8 == 0) ? OP_ADD : OP_XOR;
      end else begin
        body[i].rd  = areg_t'(2 + (r >> 8) % 14);
        body[i].rs1 = areg_t'((r >> 12) % 16);
        body[i].rs2 = areg_t'((r >> 16) % 16);
      end
    end
    for (int k = 0; k < NPROG; k++) prog[k] = body[k % NBODY];
    for (int r = 0; r < 32; r++) gold[r] = 0;
    for (int k = 0; k < NPROG; k++) begin
      word_t a, b;
      a = (prog[k].rs1 == 0) ? 0 : gold[prog[k].rs1];
      b = prog[k].use_imm ? prog[k].imm : ((prog[k].rs2 == 0) ? 0 : gold[prog[k].rs2]);
      if (prog[k].rd != 0) gold[prog[k].rd] = ref_alu(prog[k].op, a, b);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  for (genvar g = 0; g < 7; g++) begin : g_mix
    localparam int NF = 6 - g;
    localparam int NS = g;
    logic    disp_valid [DW];
    dinstr_t disp_instr [DW];
    logic    disp_ready;
    logic    bp_taken;
    logic [7:0] bp_ghr;
    areg_t   dbg_raddr;
    word_t   dbg_rdata;
    logic    idle;
    perf_t   perf;

    crit_lp_core #(.NFAST(NF), .NSLOW(NS)) dut (
      .clk, .rst_n, .disp_valid, .disp_instr, .disp_ready,
      .bp_pc('0), .bp_taken, .bp_ghr,
      .br_valid(1'b0), .br_pc('0), .br_ghr('0), .br_taken(1'b0),
      .dbg_raddr, .dbg_rdata, .idle, .perf
    );

    initial begin
      int k;
      for (int j = 0; j < DW; j++) begin disp_valid[j] = 0; disp_instr[j] = '0; end
      dbg_raddr = 0;
      @(posedge rst_n);
      k = 0;
      while (k < NPROG) begin
        @(negedge clk);
        for (int j = 0; j < DW; j++) begin
          disp_valid[j] = (k + j < NPROG);
          disp_instr[j] = (k + j < NPROG) ? prog[k + j] : '0;
        end
        #1;
        if (disp_ready) k += DW;
        @(posedge clk);
      end
      @(negedge clk);
      for (int j = 0; j < DW; j++) disp_valid[j] = 0;
      while (!idle) @(negedge clk);
      cycles[g]  = perf.cycles;
      nfast_i[g] = perf.issued_fast;
      nslow_i[g] = perf.issued_slow;
      for (int r = 0; r < 32; r++) begin
        dbg_raddr = areg_t'(r);
        #1;
        checks++;
        if (dbg_rdata != ((r == 0) ? 0 : gold[r])) begin
          failures++; $display("%0dfast/%0dslow: r%0d = %h, expected %h", NF, NS, r, dbg_rdata, gold[r]);
        end
      end
      done[g] = 1;
    end
  end

  initial begin
    for (int g = 0; g < 7; g++) done[g] = 0;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6]);
    for (int g = 0; g < 7; g++) begin
      $display("%0dfast/%0dslow: %0d cycles, relative performance %0d%%, %0d%% of instructions on slow ALUs",
               6 - g, g, cycles[g], cycles[0] * 100 / cycles[g], nslow_i[g] * 100 / NPROG);
      checks += 3;
      if (cycles[g] < cycles[0]) begin failures++; $display("faster than the all-fast machine"); end
      if ((g == 0 && nslow_i[g] != 0) || (g == 6 && nfast_i[g] != 0)) begin failures++; $display("issue to a missing ALU kind"); end
      if (g > 0 && g < 6 && (nslow_i[g] == 0 || nfast_i[g] == 0)) begin failures++; $display("one ALU kind unused"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
